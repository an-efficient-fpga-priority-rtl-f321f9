// qq_bram_tb: self-checking test of the node RAM.
// Fills every slot while reading a different slot in the same cycle, then
// reads every slot back and checks the synchronous read timing, that the
// read port holds its value while rd_en_i is low, and that random
// simultaneous read/write traffic at different addresses matches a
// reference array.
module qq_bram_tb;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned DEPTH  = 8;
  localparam int unsigned ADDR_W = $clog2(DEPTH);

  logic              clk = 1'b0;
  logic              wr_en = 1'b0, rd_en = 1'b0;
  logic [ADDR_W-1:0] wr_addr = '0, rd_addr = '0;
  logic [DATA_W-1:0] wr_data = '0, rd_data;
  logic [DATA_W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  qq_bram #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (
    .clk(clk), .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
    .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_data_o(rd_data));

  always #5 clk = ~clk;

  task automatic check(input logic [DATA_W-1:0] exp, input string what);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rd_data, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = ADDR_W'(a); wr_data = DATA_W'($urandom);
      ref_mem[a] = wr_data;
      rd_en = 1'b0;
    end
    @(negedge clk); wr_en = 1'b0;
    // read back, one cycle latency
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); rd_en = 1'b1; rd_addr = ADDR_W'(a);
      @(negedge clk); rd_en = 1'b0; rd_addr = ADDR_W'(a + 1);
      check(ref_mem[a], "readback");
      @(negedge clk);
      check(ref_mem[a], "hold with rd_en low");
    end
    // random concurrent traffic at different addresses
    for (int i = 0; i < 500; i++) begin
      logic [ADDR_W-1:0] ra, wa;
      @(negedge clk);
      ra = ADDR_W'($urandom_range(DEPTH-1));
      wa = ADDR_W'($urandom_range(DEPTH-1));
      if (wa == ra) wa = wa + 1'b1;
      rd_en = 1'b1; rd_addr = ra;
      wr_en = ($urandom_range(1) == 1); wr_addr = wa; wr_data = DATA_W'($urandom);
      @(posedge clk);
      begin
        logic [DATA_W-1:0] exp;
        exp = ref_mem[ra];
        if (wr_en) ref_mem[wa] = wr_data;
        @(negedge clk);
        wr_en = 1'b0; rd_en = 1'b0;
        check(exp, "concurrent read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
