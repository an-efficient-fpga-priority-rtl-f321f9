// quickq: the complete QuickQ priority queue, a chain of NODES cascaded
// qq_node instances holding up to NODES*DEPTH items in sorted order.
//
// The smallest key is at the head of node 0 (MIN_QUEUE = 1, the default;
// with MIN_QUEUE = 0 the largest, and empty slots hold all zeros instead of
// all ones). Commands enter node 0 and
// ripple down the chain: an add inserts its item where it belongs and the
// displaced items overflow from node to node; a fetch returns node 0's head
// and every node refills its last slot with the head of the node after it;
// a reset clears each node in turn. Because each node passes a command on
// once it is done with it, all nodes can be busy with different commands at
// once and the host waits only for node 0: about DEPTH cycles per command,
// whatever the length of the queue.
//
// Interface: issue one of write_i (add data_i), read_i (fetch) or reset_i
// in a cycle where ready_o is high. A fetched item appears on data_o with
// data_valid_o one cycle after the read is accepted. ready_o is low for
// DEPTH+1 cycles after an add or a reset and DEPTH+2 after a fetch
// (longer only if node 1 is still busy with an earlier command), and for
// DEPTH cycles after rst_n while the RAMs are cleared.
//
// The tail node has nowhere to pass its last item: when the queue is full,
// an add pushes the largest item off the end. lost_valid_o/lost_data_o show
// every item leaving the tail (the default item when the tail slot was
// still empty). A fetch at the tail refills its last slot with the default
// item. Tail termination and the lost-item port are own choices;
// that the last item of a full queue is lost follows the document.
module quickq #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned KEY_W  = 32,
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned NODES  = 45,
  parameter bit          MIN_QUEUE = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              write_i,
  input  logic              read_i,
  input  logic              reset_i,
  input  logic [DATA_W-1:0] data_i,
  output logic              ready_o,
  output logic [DATA_W-1:0] data_o,
  output logic              data_valid_o,
  output logic              lost_valid_o,
  output logic [DATA_W-1:0] lost_data_o
);

  // Link n connects the right side of node n-1 with the left side of node n;
  // link 0 is the user port and link NODES is the tail termination.
  logic              lk_write [NODES+1];
  logic              lk_read  [NODES+1];
  logic              lk_reset [NODES+1];
  logic [DATA_W-1:0] lk_down  [NODES+1];   // items moving to the tail
  logic              lk_ready [NODES+1];
  logic [DATA_W-1:0] lk_up    [NODES+1];   // items moving to the head
  logic              lk_up_vld[NODES+1];

  assign lk_write[0] = write_i;
  assign lk_read[0]  = read_i;
  assign lk_reset[0] = reset_i;
  assign lk_down[0]  = data_i;
  assign ready_o      = lk_ready[0];
  assign data_o       = lk_up[0];
  assign data_valid_o = lk_up_vld[0];

  for (genvar n = 0; n < NODES; n++) begin : g_node
    qq_node #(.DATA_W(DATA_W), .KEY_W(KEY_W), .DEPTH(DEPTH), .MIN_QUEUE(MIN_QUEUE)) u_node (
      .clk             (clk),
      .rst_n           (rst_n),
      .write_i         (lk_write[n]),
      .read_i          (lk_read[n]),
      .reset_i         (lk_reset[n]),
      .data_lt_i       (lk_down[n]),
      .ready_o         (lk_ready[n]),
      .data_lt_o       (lk_up[n]),
      .data_lt_valid_o (lk_up_vld[n]),
      .write_o         (lk_write[n+1]),
      .read_o          (lk_read[n+1]),
      .reset_o         (lk_reset[n+1]),
      .data_rt_o       (lk_down[n+1]),
      .ready_i         (lk_ready[n+1]),
      .data_rt_i       (lk_up[n+1]),
      .data_rt_valid_i (lk_up_vld[n+1])
    );
  end

  // Tail termination: always ready, answers a read with the default item
  // one cycle later, drops whatever is added or reset.
  logic tail_read_q;

  always_ff @(posedge clk) begin
    if (!rst_n) tail_read_q <= 1'b0;
    else        tail_read_q <= lk_read[NODES];
  end

  assign lk_ready[NODES]  = 1'b1;
  assign lk_up[NODES]     = MIN_QUEUE ? '1 : '0;
  assign lk_up_vld[NODES] = tail_read_q;
  assign lost_valid_o     = lk_write[NODES];
  assign lost_data_o      = lk_down[NODES];

endmodule
