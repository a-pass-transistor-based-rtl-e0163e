// tb_pt_tgate: exhaustive check of the transmission-gate switch.
//
// Every combination of d, g_n and g_p is applied. The switch must conduct when
// the nMOS gate is high or the pMOS gate is low, and then pass d; when off it
// must place 0 on the shared node.
module tb_pt_tgate;

  logic d, g_n, g_p, on, drive;
  int   checks = 0, failures = 0;

  pt_tgate dut (.d(d), .g_n(g_n), .g_p(g_p), .on(on), .drive(drive));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_on;
    for (int i = 0; i < 8; i++) begin
      {d, g_n, g_p} = 3'(i);
      #1;
      exp_on = 1'b0;
      if (g_n == 1'b1) exp_on = 1'b1;  // nMOS on
      if (g_p == 1'b0) exp_on = 1'b1;  // pMOS on
      checks++;
      if (on !== exp_on) begin
        failures++;
        $display("FAIL d=%b g_n=%b g_p=%b: on=%b expected %b", d, g_n, g_p, on, exp_on);
      end
      checks++;
      if (drive !== (exp_on ? d : 1'b0)) begin
        failures++;
        $display("FAIL d=%b g_n=%b g_p=%b: drive=%b", d, g_n, g_p, drive);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
