// mfg_cfg_decoder: configuration table of the multifunction gate.
//
// For each of the eight gate functions it gives the contact pair that
// programs the pass-transistor gate and the X/Y multiplexer selects that make
// the gate-level model compute the same function. Both come from the published
// configuration tables: X is the literal on the left contact and Y the one on
// the right contact.
//
//   gate  contacts  X   Y
//   AND   c4  c6    B'  A'
//   NAND  c3  c5    B   A
//   OR    c2  c8    A'  B'
//   NOR   c1  c7    A   B
//   XOR   c3  c8    B   B'
//   XNOR  c4  c7    B'  B
//   NOT   c1  c5    A   A
//   BUF   c2  c6    A'  A'
//
// Two entries are this design's reading where the sources disagree: NOR uses
// X = A, Y = B (the contact table's c1/c7; X = B, Y = A would give NAND) and
// NOT uses c1/c5 (the literal list's X = A, Y = A; c2/c5 would give a constant
// 1).
//
// Interface: op selects the function; contacts, k1 and k2 are the decoded
// configuration. Timing: purely combinational.
module mfg_cfg_decoder
  import mfg_pkg::*;
(
  input  gate_t      op,
  output contacts_t  contacts,
  output logic [1:0] k1,
  output logic [1:0] k2
);

  always_comb begin
    unique case (op)
      GATE_AND:  begin contacts = contact_pair(4, 6); k1 = KX_BN; k2 = KY_AN; end
      GATE_NAND: begin contacts = contact_pair(3, 5); k1 = KX_B;  k2 = KY_A;  end
      GATE_OR:   begin contacts = contact_pair(2, 8); k1 = KX_AN; k2 = KY_BN; end
      GATE_NOR:  begin contacts = contact_pair(1, 7); k1 = KX_A;  k2 = KY_B;  end
      GATE_XOR:  begin contacts = contact_pair(3, 8); k1 = KX_B;  k2 = KY_BN; end
      GATE_XNOR: begin contacts = contact_pair(4, 7); k1 = KX_BN; k2 = KY_B;  end
      GATE_NOT:  begin contacts = contact_pair(1, 5); k1 = KX_A;  k2 = KY_A;  end
      default:   begin contacts = contact_pair(2, 6); k1 = KX_AN; k2 = KY_AN; end // GATE_BUF
    endcase
  end

endmodule
