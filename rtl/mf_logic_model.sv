// mf_logic_model: gate-level model of the multifunction logic.
//
// It computes F = (A*X + A'*Y)' the way the logic model draws it: a 4:1
// multiplexer picks X under select k1, a second picks Y under select k2, one
// AND gate forms A*X, another A'*Y, and a NOR gate combines them. The
// multiplexer inputs, in drawn order, are A, B, B', A' for X and A', A, B', B
// for Y; the select value of each input (top input = 0, see mfg_pkg) is this
// design's choice.
//
// Interface: a, b are the gate inputs, k1 and k2 the two selects, f the
// output. Timing: purely combinational.
module mf_logic_model
  import mfg_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic [1:0] k1,
  input  logic [1:0] k2,
  output logic       f
);

  logic x, y, ax, any;

  always_comb begin
    unique case (k1)
      KX_A:    x = a;
      KX_B:    x = b;
      KX_BN:   x = ~b;
      default: x = ~a;   // KX_AN
    endcase
    unique case (k2)
      KY_AN:   y = ~a;
      KY_A:    y = a;
      KY_BN:   y = ~b;
      default: y = b;    // KY_B
    endcase
    ax  = a & x;
    any = ~a & y;
    f   = ~(ax | any);
  end

endmodule
