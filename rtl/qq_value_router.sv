// qq_value_router: the compare-and-route unit of a QuickQ node.
//
// In RT_INSERT mode it compares the key of the item in the node's temp
// register (temp_i) with the key of the item just read from the RAM (ram_i).
// The item that belongs in the current slot goes to place_o (towards the RAM
// write port); the other goes to carry_o, which moves on to the temp register
// for the next slot or, after the last slot, to the next node. Keys are the
// top KEY_W bits and are compared as unsigned numbers; with MIN_QUEUE set
// the smaller key is placed, otherwise the larger one. Only the key is
// compared, the payload travels with it. On equal keys the temp item is
// placed first, so the most recently added of equal items leaves the queue
// first, and an item displaced from slot k always lands in slot k+1.
//
// RT_SHIFT routes the RAM item to both outputs (fetch), RT_LOAD routes the
// temp item to place_o (reset fill). Purely combinational.
//
// The compare-on-key-only routing and the newest-first tie order follow the
// original QuickQ design; the three modes, which let the same unit feed the
// RAM during fetches and resets, are this implementation's choice.
module qq_value_router
  import quickq_pkg::*;
#(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned KEY_W  = 32,
  parameter bit          MIN_QUEUE = 1'b1
) (
  input  route_e            mode_i,
  input  logic [DATA_W-1:0] temp_i,
  input  logic [DATA_W-1:0] ram_i,
  output logic [DATA_W-1:0] place_o,
  output logic [DATA_W-1:0] carry_o
);

  logic [KEY_W-1:0] temp_key, ram_key;
  logic             temp_first;

  assign temp_key   = temp_i[DATA_W-1 -: KEY_W];
  assign ram_key    = ram_i[DATA_W-1 -: KEY_W];
  assign temp_first = MIN_QUEUE ? (temp_key <= ram_key) : (temp_key >= ram_key);

  always_comb begin
    unique case (mode_i)
      RT_INSERT: begin
        place_o = temp_first ? temp_i : ram_i;
        carry_o = temp_first ? ram_i  : temp_i;
      end
      RT_SHIFT: begin
        place_o = ram_i;
        carry_o = ram_i;
      end
      default: begin // RT_LOAD
        place_o = temp_i;
        carry_o = temp_i;
      end
    endcase
  end

endmodule
