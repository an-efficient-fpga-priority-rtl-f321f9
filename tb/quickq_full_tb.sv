// quickq_full_tb: the QuickQ at its default size (45 nodes of 16 slots,
// 64-bit items: a 32-bit key and a 32-bit payload, 720 items in all),
// driven with the workloads the queue was built for.
//
//  1. Full heaps: for heap depths 0..8, add 2^(d+1)-1 items (1, 3, ... 511)
//     with random 32-bit keys and a distinct 32-bit payload, then fetch the
//     same number; every fetched item is checked against a reference list.
//  2. Plain keys: 600 random 32-bit keys with a zero payload, added and
//     fetched back in sorted order.
//  3. Overflow: 760 items added to the 720-slot queue; the 40 largest leave
//     the tail in order, the 720 smallest come back sorted and a further
//     fetch returns the empty (all-ones) item.
//
// Each command is issued as soon as ready_o allows. The testbench checks
// that every add and fetch keeps ready_o low for exactly DEPTH+1 and
// DEPTH+2 cycles, whatever the number of items queued, and prints the clock
// cycles each workload took.
module quickq_full_tb;
  localparam int unsigned DATA_W = 64;
  localparam int unsigned KEY_W  = 32;
  localparam int unsigned DEPTH  = 16;
  localparam int unsigned CAP    = 720;
  localparam logic [DATA_W-1:0] DEF = '1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic write_i = 0, read_i = 0, reset_i = 0;
  logic [DATA_W-1:0] data_i = '0, data_o, lost_data_o;
  logic ready_o, data_valid_o, lost_valid_o;

  logic [DATA_W-1:0] ref_q[$];
  logic [DATA_W-1:0] lost_q[$];
  int checks = 0, failures = 0, n_lost = 0;
  longint cycle = 0;
  int unsigned seq = 1;

  quickq dut (
    .clk(clk), .rst_n(rst_n), .write_i(write_i), .read_i(read_i), .reset_i(reset_i),
    .data_i(data_i), .ready_o(ready_o), .data_o(data_o), .data_valid_o(data_valid_o),
    .lost_valid_o(lost_valid_o), .lost_data_o(lost_data_o));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic void sorted_insert(input logic [DATA_W-1:0] it);
    int j = 0;
    while (j < ref_q.size() && it[DATA_W-1 -: KEY_W] > ref_q[j][DATA_W-1 -: KEY_W]) j++;
    ref_q.insert(j, it);
    if (ref_q.size() > CAP) lost_q.push_back(ref_q.pop_back());
  endfunction

  always @(posedge clk) if (rst_n && lost_valid_o && lost_data_o != DEF) begin
    n_lost++;
    if (lost_q.size() == 0) check(1'b0, "unexpected lost item");
    else check(lost_data_o === lost_q.pop_front(), "lost item order");
  end

  task automatic issue(input int op, input logic [DATA_W-1:0] it);
    int busy;
    while (!ready_o) @(negedge clk);
    write_i = (op == 0); read_i = (op == 1); reset_i = (op == 2); data_i = it;
    @(negedge clk);
    write_i = 0; read_i = 0; reset_i = 0;
    if (op == 1) begin
      logic [DATA_W-1:0] exp;
      exp = (ref_q.size() > 0) ? ref_q.pop_front() : DEF;
      check(data_valid_o === 1'b1, "fetch valid");
      check(data_o === exp, $sformatf("fetch got %h expected %h", data_o, exp));
    end else if (op == 0) sorted_insert(it);
    else ref_q.delete();
    busy = 1;
    while (!ready_o) begin @(negedge clk); busy++; end
    check(busy == ((op == 1) ? DEPTH + 2 : DEPTH + 1), $sformatf("op %0d busy %0d", op, busy));
  endtask

  function automatic logic [DATA_W-1:0] item(input bit plain);
    logic [DATA_W-1:0] it;
    it = {32'($urandom), plain ? 32'd0 : 32'(seq)};
    if (it == DEF) it[0] = 1'b0;
    seq++;
    return it;
  endfunction

  task automatic run(input int n, input bit plain, input string name);
    longint t0, t1;
    issue(2, '0);
    t0 = cycle;
    for (int i = 0; i < n; i++) issue(0, item(plain));
    t1 = cycle;
    for (int i = 0; i < n; i++) issue(1, '0);
    $display("%s: %0d items, %0d cycles to add (%0d each), %0d to fetch (%0d each)",
             name, n, t1 - t0, (t1 - t0) / n, cycle - t1, (cycle - t1) / n);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int d = 0; d <= 8; d++) run((2 << d) - 1, 1'b0, $sformatf("full heap depth %0d", d));
    run(600, 1'b1, "600 plain keys");
    // overflow
    issue(2, '0);
    for (int i = 0; i < CAP + 40; i++) issue(0, item(1'b0));
    for (int i = 0; i < CAP + 1; i++) issue(1, '0);
    repeat (DEPTH * 50) @(negedge clk);
    check(n_lost == 40, $sformatf("%0d items lost at the tail, expected 40", n_lost));
    check(lost_q.size() == 0, "all lost items seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
