// pt_tgate: one transmission gate (complementary pass-transistor switch).
//
// An nMOS and a pMOS transistor in parallel join terminal d to the shared
// output node. The nMOS conducts while g_n is 1 and the pMOS while g_p is 0,
// so the switch is on when either conducts. In the multifunction gate the two
// gate terminals are always driven with complementary signals (A and A', or A'
// and A), so both devices switch together and the full logic level is passed.
//
// Interface: d is the value at the switch's input terminal, g_n and g_p the
// two gate terminals. on says whether the switch conducts; drive is the value
// it places on the output node, 0 when it is off, so that the outputs of
// several switches sharing one node can be ORed (at most one is on at a time
// in a well-formed circuit).
//
// Timing: purely combinational; the circuit's analog delays and the weak level
// a single device passes are not modelled.
module pt_tgate (
  input  logic d,
  input  logic g_n,
  input  logic g_p,
  output logic on,
  output logic drive
);

  always_comb begin
    on    = g_n | ~g_p;
    drive = on & d;
  end

endmodule
