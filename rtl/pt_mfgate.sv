// pt_mfgate: the pass-transistor multifunction gate.
//
// Two transmission gates share one middle node, which an inverter turns into
// the output F. The left switch has A on its nMOS gate and A' on its pMOS
// gate, so it conducts when A = 1; the right switch has A' on its nMOS gate
// and A on its pMOS gate and conducts when A = 0. The outer terminal of each
// switch is a node that programming contacts tie to one of the literals:
//   left node : c1 = A, c2 = A', c3 = B, c4 = B'
//   right node: c5 = A, c6 = A', c7 = B, c8 = B'
// With left literal X and right literal Y this gives F = (A*X + A'*Y)', and
// the choice of one contact per side selects the gate function (AND: c4+c6,
// NAND: c3+c5, OR: c2+c8, NOR: c1+c7, XOR: c3+c8, XNOR: c4+c7, NOT: c1+c5,
// BUF: c2+c6). Contacts that are absent are dummies with no effect, which is
// what lets one layout hide which function it computes.
//
// The structure, the contact literals and the pairs for AND, NAND, OR, NOR,
// XOR, XNOR and BUF are those of the published design. The NOT pair is taken
// as c1+c5 (X = A, Y = A), since c2+c5 would give a constant 1.
//
// Interface: a and b are the gate inputs; contacts[i] = 1 means contact ci is
// present. In this model the contacts are an input so that one instance can
// take every configuration; in silicon they are fixed when the gate is made.
// cfg_ok is 1 when exactly one contact is present on each side (and exactly
// one switch conducts). With none a
// node would float and with two literals would fight; such a node is modelled
// as the OR of its connected literals, and f is then meaningless.
//
// Timing: purely combinational.
module pt_mfgate
  import mfg_pkg::*;
(
  input  logic      a,
  input  logic      b,
  input  contacts_t contacts,
  output logic      f,
  output logic      cfg_ok
);

  logic [3:0] literals;   // {B', B, A', A}, same order on both sides
  logic       left_node, right_node;
  logic       on_l, on_r, drive_l, drive_r;
  logic       mid;

  function automatic logic one_hot4(input logic [3:0] v);
    return (v != 4'b0000) && ((v & (v - 4'd1)) == 4'b0000);
  endfunction

  always_comb begin
    literals   = {~b, b, ~a, a};
    left_node  = |(contacts[4:1] & literals);
    right_node = |(contacts[8:5] & literals);
  end

  // Left switch: conducts when A = 1.
  pt_tgate u_tg_left (
    .d     (left_node),
    .g_n   (a),
    .g_p   (~a),
    .on    (on_l),
    .drive (drive_l)
  );

  // Right switch: conducts when A = 0.
  pt_tgate u_tg_right (
    .d     (right_node),
    .g_n   (~a),
    .g_p   (a),
    .on    (on_r),
    .drive (drive_r)
  );

  // Middle node and output inverter.
  always_comb begin
    mid    = drive_l | drive_r;
    f      = ~mid;
    // Well-formed: one literal per side, and exactly one switch drives the
    // middle node (always so, as the switches take complementary controls).
    cfg_ok = one_hot4(contacts[4:1]) && one_hot4(contacts[8:5]) && (on_l ^ on_r);
  end

endmodule
