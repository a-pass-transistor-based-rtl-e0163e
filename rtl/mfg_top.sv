// mfg_top: configurable multifunction gate with its gate-level model.
//
// A gate function is chosen with op. mfg_cfg_decoder turns it into the
// contact pair of the pass-transistor gate (pt_mfgate) and into the two
// multiplexer selects of the gate-level model (mf_logic_model). Both compute
// F = (A*X + A'*Y)' on the same inputs, so f and f_model agree for every
// function and input; the model is the functional reference of the circuit.
// Wiring the two side by side under one selector is this design's choice;
// the document presents the model first and then the circuit that replaces
// its multiplexers with contacts.
//
// Interface: a, b are the gate inputs and op the function (mfg_pkg::gate_t).
// f is the pass-transistor gate's output, f_model the model's output, and
// cfg_ok says the decoded contacts put exactly one contact on each side.
// Timing: purely combinational, no clock or reset.
module mfg_top
  import mfg_pkg::*;
(
  input  logic  a,
  input  logic  b,
  input  gate_t op,
  output logic  f,
  output logic  f_model,
  output logic  cfg_ok
);

  contacts_t  contacts;
  logic [1:0] k1, k2;

  mfg_cfg_decoder u_dec (
    .op       (op),
    .contacts (contacts),
    .k1       (k1),
    .k2       (k2)
  );

  pt_mfgate u_gate (
    .a        (a),
    .b        (b),
    .contacts (contacts),
    .f        (f),
    .cfg_ok   (cfg_ok)
  );

  mf_logic_model u_model (
    .a  (a),
    .b  (b),
    .k1 (k1),
    .k2 (k2),
    .f  (f_model)
  );

endmodule
