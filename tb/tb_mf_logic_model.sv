// tb_mf_logic_model: checks the gate-level model F = (A*X + A'*Y)'.
//
// All 16 select pairs are applied with all four input pairs, and F is
// compared with the formula evaluated on the literal each select stands for
// (X: A, B, B', A'; Y: A', A, B', B), and also with its expanded
// sum-of-products form A*X' + A'*Y' + X'*Y', which must agree. Then the eight named gate settings are
// checked against their truth tables.
module tb_mf_logic_model;

  logic       a, b, f;
  logic [1:0] k1, k2;
  int         checks = 0, failures = 0;

  mf_logic_model dut (.a(a), .b(b), .k1(k1), .k2(k2), .f(f));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic xlit(int k, logic av, logic bv);
    case (k)
      0: return av;
      1: return bv;
      2: return ~bv;
      default: return ~av;
    endcase
  endfunction

  function automatic logic ylit(int k, logic av, logic bv);
    case (k)
      0: return ~av;
      1: return av;
      2: return ~bv;
      default: return bv;
    endcase
  endfunction

  // {k1, k2, truth table indexed by {A,B}}
  typedef struct { string name; int kx; int ky; logic [3:0] tt; } sel_case_t;
  sel_case_t cases [8] = '{
    '{"AND",  2, 0, 4'b1000},
    '{"NAND", 1, 1, 4'b0111},
    '{"OR",   3, 2, 4'b1110},
    '{"NOR",  0, 3, 4'b0001},
    '{"XOR",  1, 2, 4'b0110},
    '{"XNOR", 2, 3, 4'b1001},
    '{"NOT",  0, 1, 4'b0011},
    '{"BUF",  3, 0, 4'b1100}
  };

  initial begin
    logic x, y, exp_f, sop_f;
    for (int s = 0; s < 16; s++) begin
      {k1, k2} = 4'(s);
      for (int ab = 0; ab < 4; ab++) begin
        {a, b} = 2'(ab);
        #1;
        x = xlit(int'(k1), a, b);
        y = ylit(int'(k2), a, b);
        exp_f = ~((a & x) | (~a & y));
        sop_f = (a & ~x) | (~a & ~y) | (~x & ~y);
        checks++;
        if (f !== sop_f) begin
          failures++;
          $display("FAIL k1=%0d k2=%0d A=%b B=%b: F=%b, expanded form gives %b", k1, k2, a, b, f, sop_f);
        end
        checks++;
        if (f !== exp_f) begin
          failures++;
          $display("FAIL k1=%0d k2=%0d A=%b B=%b: F=%b expected %b", k1, k2, a, b, f, exp_f);
        end
      end
    end
    foreach (cases[g]) begin
      k1 = 2'(cases[g].kx);
      k2 = 2'(cases[g].ky);
      for (int ab = 0; ab < 4; ab++) begin
        {a, b} = 2'(ab);
        #1;
        checks++;
        if (f !== cases[g].tt[ab]) begin
          failures++;
          $display("FAIL %s A=%b B=%b: F=%b expected %b", cases[g].name, a, b, f, cases[g].tt[ab]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
