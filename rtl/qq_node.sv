// qq_node: one cascadable node of the QuickQ priority queue.
//
// A node holds DEPTH items, sorted with the smallest key in slot 0, in its
// own dual-port RAM (qq_bram). Around the RAM sit a temp register, the value
// router (qq_value_router), the multiplexers that feed both, and the control
// logic below. Nodes are chained: the "left" side faces the head of the
// queue (the previous node or the user), the "right" side faces the next
// node. A node works on one command at a time; the next node works on the
// command this node passed on, so commands ripple down the chain in order
// and the head node is free again after one node's worth of cycles.
//
// Commands from the left (write_i = add, read_i = fetch, reset_i = clear)
// are accepted in a cycle where ready_o is high; at most one may be high.
//
//   add   : the new item (data_lt_i) is loaded into the temp register. For
//           slots 0..DEPTH-1 the node reads the slot, the value router keeps
//           the smaller-keyed item in the slot and the other in the temp
//           register, so the new item drops into place and every item behind
//           it moves one slot down. The item pushed out of slot DEPTH-1 (or
//           the new item itself, if it is larger than all) is handed to the
//           next node with write_o/data_rt_o, waiting for ready_i.
//           Busy DEPTH+1 cycles when the next node is ready.
//   fetch : the head item appears on data_lt_o with data_lt_valid_o in the
//           first cycle after acceptance. The node then moves slots
//           1..DEPTH-1 up by one, asks the next node for its head (read_o,
//           waiting for ready_i) and writes the item it gets back on
//           data_rt_i (flagged by data_rt_valid_i one cycle after the
//           handshake) into slot DEPTH-1. Busy DEPTH+2 cycles.
//   reset : every slot is written with the default item (all ones), then
//           reset_o passes the command on. Busy DEPTH+1 cycles.
//
// While idle the node keeps reading slot 0, so the head item is already on
// the RAM read port when a command arrives; this is why a fetch can answer
// in one cycle. rst_n (synchronous, active low) clears the RAM the same way
// as a reset command but does not pass anything on, since every node sees
// rst_n. Empty slots hold the default item, which a fetch of an empty queue
// returns: all ones for a min queue (MIN_QUEUE = 1, smallest key at the
// head), all zeros for a max queue (MIN_QUEUE = 0, largest key at the head).
//
// Following the document: per-node dual-port RAM, temp register, value
// router, the insertion walk from the head with displacement down the node,
// passing the last item to the next node, the default all-ones item and the
// read/write/reset command wires. Own choices: the ready/valid handshakes
// between nodes, the idle read of slot 0, the exact cycle schedule, clearing
// on rst_n, and sending the default item on data_rt_o when no item is being
// passed (the figure shows a "Z" input to that multiplexer).
module qq_node
  import quickq_pkg::*;
#(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned KEY_W  = 32,
  parameter int unsigned DEPTH  = 16,
  parameter bit          MIN_QUEUE = 1'b1,
  localparam int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // left side: commands in, fetched item out
  input  logic              write_i,
  input  logic              read_i,
  input  logic              reset_i,
  input  logic [DATA_W-1:0] data_lt_i,
  output logic              ready_o,
  output logic [DATA_W-1:0] data_lt_o,
  output logic              data_lt_valid_o,
  // right side: commands out, item from the next node in
  output logic              write_o,
  output logic              read_o,
  output logic              reset_o,
  output logic [DATA_W-1:0] data_rt_o,
  input  logic              ready_i,
  input  logic [DATA_W-1:0] data_rt_i,
  input  logic              data_rt_valid_i
);

  localparam logic [DATA_W-1:0] DEFAULT_ITEM = MIN_QUEUE ? '1 : '0;
  localparam logic [ADDR_W-1:0] LAST_SLOT    = ADDR_W'(DEPTH - 1);

  node_state_e       state_q;
  logic [ADDR_W-1:0] slot_q;
  logic [DATA_W-1:0] temp_q;
  logic              clr_fwd_q;   // clear came from reset_i: pass it on

  // RAM ports
  logic              ram_we, ram_re;
  logic [ADDR_W-1:0] ram_wr_addr, ram_rd_addr;
  logic [DATA_W-1:0] ram_in, ram_out;

  // value router
  route_e            rt_mode;
  logic [DATA_W-1:0] rt_place, rt_carry;

  logic last_slot;
  logic advance;    // the current step completes this cycle

  qq_bram #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_bram (
    .clk       (clk),
    .wr_en_i   (ram_we),
    .wr_addr_i (ram_wr_addr),
    .wr_data_i (ram_in),
    .rd_en_i   (ram_re),
    .rd_addr_i (ram_rd_addr),
    .rd_data_o (ram_out)
  );

  qq_value_router #(.DATA_W(DATA_W), .KEY_W(KEY_W), .MIN_QUEUE(MIN_QUEUE)) u_router (
    .mode_i  (rt_mode),
    .temp_i  (temp_q),
    .ram_i   (ram_out),
    .place_o (rt_place),
    .carry_o (rt_carry)
  );

  assign last_slot = (slot_q == LAST_SLOT);
  assign ready_o   = (state_q == S_IDLE);
  assign data_lt_o = rt_carry;

  // Control logic: RAM enables and addresses, multiplexer selects, outputs.
  always_comb begin
    ram_we          = 1'b0;
    ram_wr_addr     = slot_q;
    ram_in          = rt_place;
    ram_re          = 1'b0;
    ram_rd_addr     = '0;
    rt_mode         = RT_INSERT;
    advance         = 1'b1;
    write_o         = 1'b0;
    read_o          = 1'b0;
    reset_o         = 1'b0;
    data_rt_o       = DEFAULT_ITEM;
    data_lt_valid_o = 1'b0;

    unique case (state_q)
      S_IDLE: begin
        ram_re  = 1'b1;          // keep the head item on the read port
        rt_mode = RT_SHIFT;
      end

      S_CLR: begin
        rt_mode = RT_LOAD;       // temp register holds the default item
        ram_we  = 1'b1;
        if (last_slot) begin
          reset_o = clr_fwd_q;
          advance = !clr_fwd_q || ready_i;
          ram_re  = advance;     // fetch slot 0 for the idle state
        end
      end

      S_ADD: begin
        rt_mode = RT_INSERT;
        ram_we  = 1'b1;          // smaller item into this slot
        if (!last_slot) begin
          ram_re      = 1'b1;
          ram_rd_addr = slot_q + 1'b1;
        end else begin
          write_o   = 1'b1;      // larger item leaves for the next node
          data_rt_o = rt_carry;
          advance   = ready_i;
          ram_re    = advance;
        end
      end

      S_FETCH: begin
        rt_mode = RT_SHIFT;
        data_lt_valid_o = (slot_q == '0);
        if (slot_q != '0) begin
          ram_we      = 1'b1;    // slot k moves to slot k-1
          ram_wr_addr = slot_q - 1'b1;
        end
        if (!last_slot) begin
          ram_re      = 1'b1;
          ram_rd_addr = slot_q + 1'b1;
        end else begin
          read_o  = 1'b1;        // ask the next node for its head
          advance = ready_i;
        end
      end

      S_FWR: begin
        ram_we      = 1'b1;      // next node's head into the last slot
        ram_wr_addr = LAST_SLOT;
        ram_in      = data_rt_i;
        ram_re      = 1'b1;
      end

      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= S_CLR;
      slot_q    <= '0;
      temp_q    <= DEFAULT_ITEM;
      clr_fwd_q <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          slot_q <= '0;
          if (write_i) begin
            state_q <= S_ADD;
            temp_q  <= data_lt_i;
          end else if (read_i) begin
            state_q <= S_FETCH;
          end else if (reset_i) begin
            state_q   <= S_CLR;
            temp_q    <= DEFAULT_ITEM;
            clr_fwd_q <= 1'b1;
          end
        end

        S_CLR: begin
          if (advance) begin
            if (last_slot) begin
              state_q   <= S_IDLE;
              clr_fwd_q <= 1'b0;
            end else begin
              slot_q <= slot_q + 1'b1;
            end
          end
        end

        S_ADD: begin
          if (advance) begin
            if (last_slot) begin
              state_q <= S_IDLE;
            end else begin
              slot_q <= slot_q + 1'b1;
              temp_q <= rt_carry;
            end
          end
        end

        S_FETCH: begin
          if (advance) begin
            if (last_slot) state_q <= S_FWR;
            else           slot_q  <= slot_q + 1'b1;
          end
        end

        S_FWR: state_q <= S_IDLE;

        default: state_q <= S_IDLE;
      endcase
    end
  end

  // At most one command at a time from the left.
  a_onehot_cmd: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({write_i, read_i, reset_i}));

  // The next node answers a read handshake in the following cycle.
  a_rt_answer: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_FWR) |-> data_rt_valid_i);

  initial begin
    assert (DEPTH >= 2) else $fatal(1, "qq_node needs DEPTH >= 2");
    assert (KEY_W <= DATA_W) else $fatal(1, "qq_node needs KEY_W <= DATA_W");
  end

endmodule
