// tb_mfg_top: end-to-end test of the configurable multifunction gate.
//
// The top is used at its defaults. Phase 1 steps through the eight gate
// functions and applies all four input pairs to each, comparing the
// pass-transistor output f and the model output f_model with the gate's
// truth table. Phase 2 switches function and inputs at random for a few
// thousand steps, as a reconfigurable (camouflaged) cell would see. Each
// function must have been exercised and each function switch counted; a
// function never reached counts as a failure.
module tb_mfg_top;
  import mfg_pkg::*;

  logic  a, b, f, f_model, cfg_ok;
  gate_t op;
  int    checks = 0, failures = 0;
  int    used [8];
  int    switches = 0;

  mfg_top dut (.a(a), .b(b), .op(op), .f(f), .f_model(f_model), .cfg_ok(cfg_ok));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference truth of each two-input gate.
  function automatic logic ref_gate(int g, logic av, logic bv);
    case (g)
      0: return av & bv;
      1: return ~(av & bv);
      2: return av | bv;
      3: return ~(av | bv);
      4: return av ^ bv;
      5: return ~(av ^ bv);
      6: return ~av;
      default: return av;
    endcase
  endfunction

  task automatic apply(int g, logic av, logic bv);
    logic exp_f;
    if (int'(op) != g) switches++;
    op = gate_t'(g);
    a  = av;
    b  = bv;
    #1;
    used[g]++;
    exp_f = ref_gate(g, av, bv);
    checks++;
    if (f !== exp_f) begin
      failures++;
      $display("FAIL gate %0d A=%b B=%b: f=%b expected %b", g, av, bv, f, exp_f);
    end
    checks++;
    if (f_model !== exp_f) begin
      failures++;
      $display("FAIL gate %0d A=%b B=%b: f_model=%b expected %b", g, av, bv, f_model, exp_f);
    end
    checks++;
    if (cfg_ok !== 1'b1) begin
      failures++;
      $display("FAIL gate %0d: cfg_ok low", g);
    end
  endtask

  initial begin
    foreach (used[i]) used[i] = 0;
    op = GATE_AND;
    a  = 1'b0;
    b  = 1'b0;
    // Phase 1: exhaustive per function
    for (int g = 0; g < 8; g++)
      for (int ab = 0; ab < 4; ab++)
        apply(g, 1'(ab >> 1), 1'(ab));
    // Phase 2: random function switching
    for (int n = 0; n < 4000; n++)
      apply(int'($urandom_range(7)), 1'($urandom), 1'($urandom));
    for (int g = 0; g < 8; g++) begin
      $display("function %0d applied %0d times", g, used[g]);
      checks++;
      if (used[g] == 0) begin
        failures++;
        $display("FAIL function %0d never exercised", g);
      end
    end
    $display("function switches: %0d", switches);
    checks++;
    if (switches < 8) begin
      failures++;
      $display("FAIL too few function switches");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
