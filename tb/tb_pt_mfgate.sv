// tb_pt_mfgate: checks the pass-transistor multifunction gate.
//
// Part 1 programs the eight contact pairs of the configuration table and
// compares F with the truth table of the intended gate for all four input
// pairs (AND, NAND, OR, NOR, XOR, XNOR, NOT, BUF). Part 2 sweeps all 256
// contact vectors: for each legal one (one contact per side) F must equal
// the inverted literal selected by A, and cfg_ok must be 1 exactly for legal
// vectors.
module tb_pt_mfgate;

  logic       a, b, f, cfg_ok;
  logic [8:1] contacts;
  int         checks = 0, failures = 0;

  pt_mfgate dut (.a(a), .b(b), .contacts(contacts), .f(f), .cfg_ok(cfg_ok));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Truth tables, indexed by {A,B}: bit 3 = (1,1) ... bit 0 = (0,0).
  typedef struct {
    string      name;
    logic [8:1] c;
    logic [3:0] tt;
  } gate_case_t;

  gate_case_t cases [8] = '{
    '{"AND",  8'b0010_1000, 4'b1000},
    '{"NAND", 8'b0001_0100, 4'b0111},
    '{"OR",   8'b1000_0010, 4'b1110},
    '{"NOR",  8'b0100_0001, 4'b0001},
    '{"XOR",  8'b1000_0100, 4'b0110},
    '{"XNOR", 8'b0100_1000, 4'b1001},
    '{"NOT",  8'b0001_0001, 4'b0011},
    '{"BUF",  8'b0010_0010, 4'b1100}
  };

  // Literal wired by contact index 1..4 (left) or 5..8 (right).
  function automatic logic literal(int idx, logic av, logic bv);
    case ((idx - 1) % 4)
      0: return av;
      1: return ~av;
      2: return bv;
      default: return ~bv;
    endcase
  endfunction

  initial begin
    int nl, nr, il, ir;
    logic legal, exp_f;
    // Part 1: the named gates
    foreach (cases[g]) begin
      contacts = cases[g].c;
      for (int ab = 0; ab < 4; ab++) begin
        {a, b} = 2'(ab);
        #1;
        checks++;
        if (f !== cases[g].tt[ab] || cfg_ok !== 1'b1) begin
          failures++;
          $display("FAIL %s A=%b B=%b: F=%b expected %b cfg_ok=%b",
                   cases[g].name, a, b, f, cases[g].tt[ab], cfg_ok);
        end
      end
    end
    // Part 2: every contact vector
    for (int cv = 0; cv < 256; cv++) begin
      contacts = 8'(cv);
      nl = 0; nr = 0; il = 0; ir = 0;
      for (int i = 1; i <= 4; i++) if (contacts[i]) begin nl++; il = i; end
      for (int i = 5; i <= 8; i++) if (contacts[i]) begin nr++; ir = i; end
      legal = (nl == 1) && (nr == 1);
      for (int ab = 0; ab < 4; ab++) begin
        {a, b} = 2'(ab);
        #1;
        checks++;
        if (cfg_ok !== legal) begin
          failures++;
          $display("FAIL contacts=%b: cfg_ok=%b expected %b", contacts, cfg_ok, legal);
        end
        if (legal) begin
          exp_f = a ? ~literal(il, a, b) : ~literal(ir, a, b);
          checks++;
          if (f !== exp_f) begin
            failures++;
            $display("FAIL contacts=%b A=%b B=%b: F=%b expected %b", contacts, a, b, f, exp_f);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
