// qq_node_tb: self-checking test of one QuickQ node.
//
// The testbench plays both the user on the left and the rest of the queue
// on the right. The right-hand model keeps the items the node hands down in
// a sorted list (same rule: an item goes in front of equal keys), answers a
// read handshake one cycle later with its head (or the all-ones default),
// and drops its list on a passed-on reset. A reference list of the whole
// queue predicts every fetched item, including the order of equal keys
// (most recently added first). Phase 1 keeps the right side always ready and
// checks the busy time of each command: DEPTH+1 cycles for an add, DEPTH+2
// for a fetch, DEPTH+1 for a reset. It starts with the worked insertion
// example of a 4-slot node: 3 5 8 9 plus a new 4 gives 3 4 5 8 and hands
// 9 to the next node. Phase 2 makes the right side randomly busy
// so the node has to wait in its handshakes.
module qq_node_tb;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned KEY_W  = 8;
  localparam int unsigned DEPTH  = 4;
  localparam logic [DATA_W-1:0] DEF = '1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic write_i = 0, read_i = 0, reset_i = 0;
  logic [DATA_W-1:0] data_lt_i = '0, data_lt_o, data_rt_o;
  logic ready_o, data_lt_valid_o, write_o, read_o, reset_o;
  logic ready_i = 1'b1, data_rt_valid_i = 1'b0;
  logic [DATA_W-1:0] data_rt_i = DEF;

  logic [DATA_W-1:0] ref_q[$];    // whole queue
  logic [DATA_W-1:0] down_q[$];   // what the node handed down
  int checks = 0, failures = 0;
  int n_add = 0, n_fetch = 0, n_reset = 0, n_stall = 0, n_tie = 0, n_empty = 0;
  bit random_ready = 1'b0;
  int unsigned seq = 1;
  logic [DATA_W-1:0] last_down = '0;

  qq_node #(.DATA_W(DATA_W), .KEY_W(KEY_W), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n),
    .write_i(write_i), .read_i(read_i), .reset_i(reset_i), .data_lt_i(data_lt_i),
    .ready_o(ready_o), .data_lt_o(data_lt_o), .data_lt_valid_o(data_lt_valid_o),
    .write_o(write_o), .read_o(read_o), .reset_o(reset_o), .data_rt_o(data_rt_o),
    .ready_i(ready_i), .data_rt_i(data_rt_i), .data_rt_valid_i(data_rt_valid_i));

  always #5 clk = ~clk;

  function automatic void sorted_insert(ref logic [DATA_W-1:0] q[$], input logic [DATA_W-1:0] it);
    int j = 0;
    while (j < q.size() && it[DATA_W-1 -: KEY_W] > q[j][DATA_W-1 -: KEY_W]) j++;
    q.insert(j, it);
  endfunction

  // right-hand side model
  always @(posedge clk) begin
    data_rt_valid_i <= 1'b0;
    if (rst_n && ready_i) begin
      if (write_o) begin
        sorted_insert(down_q, data_rt_o);
        last_down <= data_rt_o;
      end
      if (reset_o) down_q.delete();
      if (read_o) begin
        data_rt_valid_i <= 1'b1;
        data_rt_i <= (down_q.size() > 0) ? down_q.pop_front() : DEF;
      end
    end
    if (rst_n && !ready_i && (write_o || read_o || reset_o)) n_stall++;
  end

  always @(negedge clk) ready_i <= random_ready ? ($urandom_range(2) != 0) : 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // issue one command; returns cycles until ready again
  task automatic issue(input int op, input logic [DATA_W-1:0] it, output int busy);
    @(negedge clk);
    while (!ready_o) @(negedge clk);
    write_i = (op == 0); read_i = (op == 1); reset_i = (op == 2); data_lt_i = it;
    @(negedge clk);
    write_i = 0; read_i = 0; reset_i = 0;
    busy = 1;
    if (op == 1) begin
      logic [DATA_W-1:0] exp;
      exp = (ref_q.size() > 0) ? ref_q.pop_front() : DEF;
      if (exp == DEF) n_empty++;
      check(data_lt_valid_o === 1'b1, "fetch valid one cycle after accept");
      check(data_lt_o === exp, $sformatf("fetch got %h expected %h", data_lt_o, exp));
      n_fetch++;
    end else if (op == 0) begin
      foreach (ref_q[j]) if (ref_q[j][DATA_W-1 -: KEY_W] == it[DATA_W-1 -: KEY_W]) begin n_tie++; break; end
      sorted_insert(ref_q, it);
      n_add++;
    end else begin
      ref_q.delete();
      n_reset++;
    end
    while (!ready_o) begin @(negedge clk); busy++; end
  endtask

  function automatic logic [DATA_W-1:0] new_item();
    logic [DATA_W-1:0] it;
    it = {KEY_W'($urandom_range(12) * 19), (DATA_W-KEY_W)'(seq)};
    seq++;
    return it;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int busy;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // after rst_n the node clears its RAM for DEPTH cycles
    busy = 0;
    while (!ready_o) begin @(negedge clk); busy++; end
    check(busy == DEPTH, $sformatf("clear after rst_n took %0d", busy));
    issue(1, '0, busy);   // empty queue gives the default item
    // the insertion example: slots 3 5 8 9, add 4 -> 3 4 5 8, 9 moves on
    issue(0, {KEY_W'(9), 8'd1}, busy);
    issue(0, {KEY_W'(5), 8'd2}, busy);
    issue(0, {KEY_W'(3), 8'd3}, busy);
    issue(0, {KEY_W'(8), 8'd4}, busy);
    begin
      bit only_def = 1'b1;
      foreach (down_q[j]) if (down_q[j] != DEF) only_def = 1'b0;
      check(only_def, "four items fit in the node");
    end
    issue(0, {KEY_W'(4), 8'd5}, busy);
    check(last_down == {KEY_W'(9), 8'd1}, "9 handed to the next node");
    check(dut.u_bram.mem[0][DATA_W-1 -: KEY_W] == 3 && dut.u_bram.mem[1][DATA_W-1 -: KEY_W] == 4 &&
          dut.u_bram.mem[2][DATA_W-1 -: KEY_W] == 5 && dut.u_bram.mem[3][DATA_W-1 -: KEY_W] == 8,
          "slots hold 3 4 5 8");
    // phase 1: always-ready neighbour, check busy times
    for (int i = 0; i < 300; i++) begin
      int op;
      op = ($urandom_range(9) < 5) ? 0 : ($urandom_range(19) == 0 ? 2 : 1);
      issue(op, new_item(), busy);
      case (op)
        0: check(busy == DEPTH + 1, $sformatf("add busy %0d", busy));
        1: check(busy == DEPTH + 2, $sformatf("fetch busy %0d", busy));
        default: check(busy == DEPTH + 1, $sformatf("reset busy %0d", busy));
      endcase
    end
    // phase 2: randomly busy neighbour
    random_ready = 1'b1;
    for (int i = 0; i < 600; i++) begin
      int op;
      op = ($urandom_range(9) < 5) ? 0 : ($urandom_range(29) == 0 ? 2 : 1);
      issue(op, new_item(), busy);
    end
    // drain
    random_ready = 1'b0;
    while (ref_q.size() > 0) issue(1, '0, busy);
    issue(1, '0, busy);
    check(n_stall > 0, "neighbour stall exercised");
    check(n_tie > 0, "equal keys exercised");
    check(n_empty > 1, "empty fetch exercised");
    check(n_reset > 0, "reset exercised");
    $display("adds=%0d fetches=%0d resets=%0d stalls=%0d ties=%0d empty=%0d",
             n_add, n_fetch, n_reset, n_stall, n_tie, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
