// quickq_pkg: types shared by the QuickQ priority-queue modules.
//
// The QuickQ keeps items sorted, smallest key at the head (a min queue).
// An item is a DATA_W-bit word whose top KEY_W bits are the sort key and
// whose remaining bits are a payload carried along with the key. Empty
// slots hold the default item, all ones, which sorts behind every real key
// when keys are compared as unsigned numbers.
//
// route_e selects what the value router of a node does in a cycle.
// node_state_e is the state of a node's control logic. The min-queue order
// and the all-ones default follow the original QuickQ design; the encodings
// are this implementation's own.
package quickq_pkg;

  // Value-router modes.
  //   RT_INSERT : compare the temp-register key with the RAM key; the smaller
  //               (the temp item on a tie) is written back, the other moves on.
  //   RT_SHIFT  : the RAM item is routed both to the RAM port and onward
  //               (used while a fetch moves every item one slot to the head).
  //   RT_LOAD   : the temp-register item is written to the RAM (used by reset,
  //               which fills the RAM with the default item).
  typedef enum logic [1:0] {
    RT_INSERT = 2'd0,
    RT_SHIFT  = 2'd1,
    RT_LOAD   = 2'd2
  } route_e;

  // Node control states.
  //   S_CLR   : write the default item to every slot (after reset_i or rst_n)
  //   S_IDLE  : keep reading slot 0 so the head item is always on the RAM port
  //   S_ADD   : insertion walk over slots 0..DEPTH-1
  //   S_FETCH : head returned, items moved one slot towards the head
  //   S_FWR   : last slot refilled with the next node's head item
  typedef enum logic [2:0] {
    S_CLR   = 3'd0,
    S_IDLE  = 3'd1,
    S_ADD   = 3'd2,
    S_FETCH = 3'd3,
    S_FWR   = 3'd4
  } node_state_e;

endpackage
