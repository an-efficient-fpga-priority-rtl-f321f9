// quickq_initial_tb: the QuickQ in its smaller first configuration,
// 40 nodes of 16 slots holding 32-bit unsigned keys with no payload (640
// items), driven like a first stand-alone test of the queue: one list of
// 600 pseudo-random keys is made, and sublists of its first 50, 100, 250,
// 500 and 600 keys are each added and then fetched back. Every fetched key
// is checked against a sorted copy, every add and fetch against its cycle
// count (DEPTH+1 and DEPTH+2), and the clock cycles per sublist are printed.
module quickq_initial_tb;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned KEY_W  = 32;
  localparam int unsigned DEPTH  = 16;
  localparam int unsigned NODES  = 40;
  localparam int unsigned CAP    = NODES * DEPTH;
  localparam logic [DATA_W-1:0] DEF = '1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic write_i = 0, read_i = 0, reset_i = 0;
  logic [DATA_W-1:0] data_i = '0, data_o, lost_data_o;
  logic ready_o, data_valid_o, lost_valid_o;

  logic [DATA_W-1:0] ref_q[$];
  logic [DATA_W-1:0] lost_q[$];
  int checks = 0, failures = 0, n_lost = 0;
  longint cycle = 0;

  quickq #(.DATA_W(DATA_W), .KEY_W(KEY_W), .DEPTH(DEPTH), .NODES(NODES)) dut (
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

  logic [DATA_W-1:0] keys [600];

  task automatic run(input int n);
    longint t0, t1;
    issue(2, '0);
    t0 = cycle;
    for (int i = 0; i < n; i++) issue(0, keys[i]);
    t1 = cycle;
    for (int i = 0; i < n; i++) issue(1, '0);
    check(n_lost == 0, "no item lost");
    $display("sublist of %0d keys: %0d cycles to add, %0d to fetch, %0d cycles for both",
             n, t1 - t0, cycle - t1, cycle - t0);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (keys[i]) begin
      keys[i] = $urandom;
      if (keys[i] == DEF) keys[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(50);
    run(100);
    run(250);
    run(500);
    run(600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
