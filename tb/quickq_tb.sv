// quickq_tb: end-to-end test of the QuickQ chain at a small size
// (4 nodes of 4 slots, 16-bit items with 8-bit keys), so that the queue
// overflows often.
//
// Commands are issued as soon as ready_o allows, which keeps several nodes
// busy at once and makes nodes wait for their neighbours. A reference list
// of capacity NODES*DEPTH (sorted, an item goes in front of equal keys,
// the last item dropped when full) predicts every fetched item and every
// item pushed off the tail. The test counts each mechanism of the design
// and fails if one never happened: add, fetch, reset command, clear after
// rst_n, fetch from an empty queue, equal keys, an item lost at the tail,
// several nodes busy at once. It also checks the command timing: the
// fetched item one cycle after the read is accepted, ready_o back after
// exactly DEPTH+1 (add, reset) or DEPTH+2 (fetch) cycles even with
// commands back to back, and that no node ever has to wait for the next
// one (the per-node schedule leaves the next node free just in time).
// A second copy built as a max queue gets the same commands with every key
// bit inverted and must return the same items with all-zeros filler.
module quickq_tb;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned KEY_W  = 8;
  localparam int unsigned DEPTH  = 4;
  localparam int unsigned NODES  = 4;
  localparam int unsigned CAP    = NODES * DEPTH;
  localparam logic [DATA_W-1:0] DEF = '1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic write_i = 0, read_i = 0, reset_i = 0;
  logic [DATA_W-1:0] data_i = '0, data_o, lost_data_o;
  logic ready_o, data_valid_o, lost_valid_o;
  // a max-queue build fed the same commands with every key bit inverted,
  // which must return the same items (keys inverted back)
  logic [DATA_W-1:0] mx_data_i, mx_data_o, mx_lost_data_o;
  logic mx_ready_o, mx_data_valid_o, mx_lost_valid_o;
  int n_max = 0;

  logic [DATA_W-1:0] ref_q[$];
  logic [DATA_W-1:0] lost_q[$];
  int checks = 0, failures = 0;
  int n_add = 0, n_fetch = 0, n_reset = 0, n_clear = 0, n_empty = 0, n_tie = 0;
  int n_lost = 0, n_stall = 0, n_timed = 0, n_overlap = 0;
  int unsigned seq = 1;

  quickq #(.DATA_W(DATA_W), .KEY_W(KEY_W), .DEPTH(DEPTH), .NODES(NODES)) dut (
    .clk(clk), .rst_n(rst_n), .write_i(write_i), .read_i(read_i), .reset_i(reset_i),
    .data_i(data_i), .ready_o(ready_o), .data_o(data_o), .data_valid_o(data_valid_o),
    .lost_valid_o(lost_valid_o), .lost_data_o(lost_data_o));

  quickq #(.DATA_W(DATA_W), .KEY_W(KEY_W), .DEPTH(DEPTH), .NODES(NODES), .MIN_QUEUE(1'b0)) dut_max (
    .clk(clk), .rst_n(rst_n), .write_i(write_i), .read_i(read_i), .reset_i(reset_i),
    .data_i(mx_data_i), .ready_o(mx_ready_o), .data_o(mx_data_o), .data_valid_o(mx_data_valid_o),
    .lost_valid_o(mx_lost_valid_o), .lost_data_o(mx_lost_data_o));
  assign mx_data_i = {~data_i[DATA_W-1 -: KEY_W], data_i[DATA_W-KEY_W-1:0]};

  always @(posedge clk) if (rst_n) begin
    if (mx_ready_o !== ready_o) check(1'b0, "max build ready differs");
    if (mx_lost_valid_o && mx_lost_data_o != '0)
      check(lost_valid_o && lost_data_o == {~mx_lost_data_o[DATA_W-1 -: KEY_W], mx_lost_data_o[DATA_W-KEY_W-1:0]},
            "max build lost item");
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic void sorted_insert(input logic [DATA_W-1:0] it);
    int j = 0;
    while (j < ref_q.size() && it[DATA_W-1 -: KEY_W] > ref_q[j][DATA_W-1 -: KEY_W]) j++;
    ref_q.insert(j, it);
    if (ref_q.size() > CAP) lost_q.push_back(ref_q.pop_back());
  endfunction

  function automatic bit chain_idle();
    bit idle = 1'b1;
    for (int n = 0; n < NODES; n++) if (!dut.lk_ready[n]) idle = 1'b0;
    return idle;
  endfunction

  // items leaving the tail, and nodes waiting for their neighbour
  always @(posedge clk) if (rst_n) begin
    if (lost_valid_o && lost_data_o != DEF) begin
      n_lost++;
      if (lost_q.size() == 0) check(1'b0, $sformatf("unexpected lost item %h", lost_data_o));
      else begin
        logic [DATA_W-1:0] exp;
        exp = lost_q.pop_front();
        check(lost_data_o === exp, $sformatf("lost %h expected %h", lost_data_o, exp));
      end
    end
    begin
      int nb = 0;
      for (int n = 0; n < NODES; n++) if (!dut.lk_ready[n]) nb++;
      if (nb > 1) n_overlap++;
    end
    for (int n = 1; n < NODES; n++)
      if ((dut.lk_write[n] || dut.lk_read[n] || dut.lk_reset[n]) && !dut.lk_ready[n]) n_stall++;
  end

  task automatic issue(input int op, input logic [DATA_W-1:0] it);
    int busy;
    bit idle;
    while (!ready_o) @(negedge clk);
    idle = chain_idle();
    write_i = (op == 0); read_i = (op == 1); reset_i = (op == 2); data_i = it;
    @(negedge clk);
    write_i = 0; read_i = 0; reset_i = 0;
    if (op == 1) begin
      logic [DATA_W-1:0] exp;
      exp = (ref_q.size() > 0) ? ref_q.pop_front() : DEF;
      if (exp == DEF) n_empty++;
      check(data_valid_o === 1'b1, "fetch valid one cycle after accept");
      check(data_o === exp, $sformatf("fetch got %h expected %h", data_o, exp));
      check(mx_data_valid_o === 1'b1 &&
            mx_data_o === ((exp == DEF) ? '0 : {~exp[DATA_W-1 -: KEY_W], exp[DATA_W-KEY_W-1:0]}),
            $sformatf("max build fetch got %h", mx_data_o));
      n_max++;
      n_fetch++;
    end else if (op == 0) begin
      foreach (ref_q[j]) if (ref_q[j][DATA_W-1 -: KEY_W] == it[DATA_W-1 -: KEY_W]) begin n_tie++; break; end
      sorted_insert(it);
      n_add++;
    end else begin
      ref_q.delete();
      n_reset++;
    end
    busy = 1;
    while (!ready_o) begin @(negedge clk); busy++; end
    if (idle) n_timed++;
    check(busy == ((op == 1) ? DEPTH + 2 : DEPTH + 1), $sformatf("op %0d busy %0d", op, busy));
  endtask

  function automatic logic [DATA_W-1:0] new_item();
    logic [DATA_W-1:0] it;
    it = {KEY_W'($urandom_range(20) * 11), (DATA_W-KEY_W)'(seq)};
    seq++;
    return it;
  endfunction

  task automatic wait_idle();
    do @(negedge clk); while (!chain_idle());
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait_idle();
    n_clear++;
    issue(1, '0);
    for (int round = 0; round < 6; round++) begin
      // fill past capacity, then mix, then drain
      for (int i = 0; i < CAP + 8; i++) issue(0, new_item());
      for (int i = 0; i < 400; i++) begin
        int r;
        r = $urandom_range(99);
        issue((r < 50) ? 0 : (r < 98) ? 1 : 2, new_item());
      end
      while (ref_q.size() > 0) issue(1, '0);
      issue(1, '0);
      wait_idle();
      check(lost_q.size() == 0, "all expected lost items seen");
      lost_q.delete();
      // an occasional rst_n while the queue holds items
      for (int i = 0; i < 5; i++) issue(0, new_item());
      wait_idle();
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      ref_q.delete();
      wait_idle();
      n_clear++;
      issue(1, '0);
    end
    check(n_add > 0,   "add exercised");
    check(n_fetch > 0, "fetch exercised");
    check(n_reset > 0, "reset command exercised");
    check(n_clear > 1, "clear after rst_n exercised");
    check(n_empty > 0, "empty fetch exercised");
    check(n_tie > 0,   "equal keys exercised");
    check(n_lost > 0,  "tail overflow exercised");
    check(n_stall == 0, "no node ever waited for its neighbour");
    check(n_timed > 0, "latency measured on an idle chain");
    check(n_overlap > 0, "several nodes busy at once");
    check(n_max > 0, "max-queue build exercised");
    $display("adds=%0d fetches=%0d resets=%0d clears=%0d empty=%0d ties=%0d lost=%0d stalls=%0d timed=%0d overlap=%0d",
             n_add, n_fetch, n_reset, n_clear, n_empty, n_tie, n_lost, n_stall, n_timed, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
