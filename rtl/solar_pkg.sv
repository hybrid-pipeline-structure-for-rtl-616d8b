// solar_pkg -- types and constants shared by the hybrid-pipeline SOLAR array.
//
// A SOLAR network is a 2D array of identical processing nodes. Each column of
// the array owns a long circulating shift register (the routing channel); each
// node reads the slots it is configured for as they pass its tap position,
// applies one arithmetic function and writes the result back into the same
// slots. This package holds what every block of that structure agrees on:
//   * the data word (8 bits, the width of the 8-bit node processor the design
//     is modelled on; the exact width is this design's choice),
//   * the slot index type (8 bits, so a channel can be up to 256 slots long),
//   * the node function set (half, identity, logarithm, exponent, sigmoid,
//     addition, subtraction -- the set the architecture names; the 3-bit
//     encoding is this design's own),
//   * the four node working modes (idle, reading, processing, writing),
//   * the per-node configuration record,
//   * the rule that places the k nodes of a column evenly along its channel.
package solar_pkg;

  localparam int DW     = 8;
  localparam int SLOT_W = 8;

  typedef logic [DW-1:0]     data_t;
  typedef logic [SLOT_W-1:0] slot_t;

  // Node arithmetic functions.
  typedef enum logic [2:0] {
    FN_IDENT   = 3'd0,
    FN_HALF    = 3'd1,
    FN_LOG     = 3'd2,
    FN_EXP     = 3'd3,
    FN_SIGMOID = 3'd4,
    FN_ADD     = 3'd5,
    FN_SUB     = 3'd6
  } func_e;

  // Node working modes.
  typedef enum logic [1:0] {
    MODE_IDLE  = 2'd0,
    MODE_READ  = 2'd1,
    MODE_PROC  = 2'd2,
    MODE_WRITE = 2'd3
  } mode_e;

  // Configuration of one node: whether it takes part, which function it
  // performs, which channel slots it reads (and later overwrites with its
  // result), and a one-input function applied to each operand on its way in
  // (the function written on an input connection). slot_b and pre_b are only
  // used by the two-input functions; a two-input code given as pre_a or pre_b
  // acts as identity.
  typedef struct packed {
    logic  en;
    func_e func;
    func_e pre_a;
    func_e pre_b;
    slot_t slot_a;
    slot_t slot_b;
  } node_cfg_t;

  function automatic logic is_binary(func_e f);
    return (f == FN_ADD) || (f == FN_SUB);
  endfunction

  // The function actually applied to an operand for input code f.
  function automatic func_e pre_fn(func_e f);
    return (is_binary(f) || f > FN_SUB) ? FN_IDENT : f;
  endfunction

  // Tap position of node i (0-based) in a column of L slots holding K nodes:
  // nodes are spread evenly and the last one sits at the bottom stage, so
  // positions run 1..L-1 and P_k = L-1 when K divides L.
  function automatic int node_pos(int i, int L, int K);
    return ((i + 1) * L) / K - 1;
  endfunction

endpackage
