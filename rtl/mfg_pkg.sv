// mfg_pkg: types and constants shared by the multifunction-gate modules.
//
// The gate realises F = (A*X + A'*Y)', where X and Y are each one of A, A', B
// and B'. gate_t names the eight two-input functions the structure is meant to
// give. contacts_t is the set of programming contacts c1..c8 of the
// pass-transistor gate: bit i is contact ci, present when 1. c1..c4 tie the
// left node to A, A', B, B'; c5..c8 tie the right node to A, A', B, B'.
// The select encodings of the gate-level model's two 4:1 multiplexers follow
// the order in which their inputs are drawn, top input = 0:
//   X multiplexer (k1): A, B, B', A'
//   Y multiplexer (k2): A', A, B', B
// That numbering is this design's choice; only the input order is drawn.
package mfg_pkg;

  typedef enum logic [2:0] {
    GATE_AND  = 3'd0,
    GATE_NAND = 3'd1,
    GATE_OR   = 3'd2,
    GATE_NOR  = 3'd3,
    GATE_XOR  = 3'd4,
    GATE_XNOR = 3'd5,
    GATE_NOT  = 3'd6,
    GATE_BUF  = 3'd7
  } gate_t;

  // Contact vector, bit i = contact ci.
  typedef logic [8:1] contacts_t;

  // X multiplexer selects (k1)
  localparam logic [1:0] KX_A  = 2'd0;
  localparam logic [1:0] KX_B  = 2'd1;
  localparam logic [1:0] KX_BN = 2'd2;
  localparam logic [1:0] KX_AN = 2'd3;

  // Y multiplexer selects (k2)
  localparam logic [1:0] KY_AN = 2'd0;
  localparam logic [1:0] KY_A  = 2'd1;
  localparam logic [1:0] KY_BN = 2'd2;
  localparam logic [1:0] KY_B  = 2'd3;

  // Build a contact vector from the index of the left contact (1..4) and of
  // the right contact (5..8).
  function automatic contacts_t contact_pair(input int unsigned left,
                                             input int unsigned right);
    contacts_t c;
    c = '0;
    c[left]  = 1'b1;
    c[right] = 1'b1;
    return c;
  endfunction

endpackage
