// qq_bram: simple dual-port RAM of one QuickQ node (one write port, one
// read port, one clock), written so that FPGA tools map it to block RAM.
//
// Each node stores its sorted items here. The node reads one slot and writes
// another in the same cycle; the two addresses always differ, so no
// read-during-write ordering is relied on (an assertion checks this).
//
// Timing: the read is synchronous. rd_data_o shows mem[rd_addr_i] from the
// clock edge at which rd_en_i was high and holds its value while rd_en_i is
// low. A write with wr_en_i high takes effect at the clock edge.
// The contents are not reset; the node clears them by writing.
//
// A per-node dual-port RAM with simultaneous read and write at different
// slots is the original QuickQ arrangement; the registered read with enable
// is this implementation's choice, matching FPGA block RAM.
module qq_bram #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned DEPTH  = 16,
  localparam int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              wr_en_i,
  input  logic [ADDR_W-1:0] wr_addr_i,
  input  logic [DATA_W-1:0] wr_data_i,
  input  logic              rd_en_i,
  input  logic [ADDR_W-1:0] rd_addr_i,
  output logic [DATA_W-1:0] rd_data_o
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en_i) mem[wr_addr_i] <= wr_data_i;
    if (rd_en_i) rd_data_o <= mem[rd_addr_i];
  end

  // The node never reads and writes the same slot in one cycle.
  a_no_collision: assert property (@(posedge clk)
    !(wr_en_i && rd_en_i && (wr_addr_i == rd_addr_i)));

endmodule
