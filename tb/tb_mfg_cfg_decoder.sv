// tb_mfg_cfg_decoder: checks the configuration table entry by entry.
//
// For each gate function the contact vector (bit i = contact ci) and the two
// model selects must match the table written out below.
module tb_mfg_cfg_decoder;
  import mfg_pkg::*;

  gate_t      op;
  logic [8:1] contacts;
  logic [1:0] k1, k2;
  int         checks = 0, failures = 0;

  mfg_cfg_decoder dut (.op(op), .contacts(contacts), .k1(k1), .k2(k2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Indexed by gate_t value: AND, NAND, OR, NOR, XOR, XNOR, NOT, BUF
  logic [8:1] exp_c  [8] = '{8'b0010_1000, 8'b0001_0100, 8'b1000_0010, 8'b0100_0001,
                             8'b1000_0100, 8'b0100_1000, 8'b0001_0001, 8'b0010_0010};
  logic [1:0] exp_k1 [8] = '{2'd2, 2'd1, 2'd3, 2'd0, 2'd1, 2'd2, 2'd0, 2'd3};
  logic [1:0] exp_k2 [8] = '{2'd0, 2'd1, 2'd2, 2'd3, 2'd2, 2'd3, 2'd1, 2'd0};

  initial begin
    for (int i = 0; i < 8; i++) begin
      op = gate_t'(i);
      #1;
      checks++;
      if (contacts !== exp_c[i]) begin
        failures++;
        $display("FAIL op=%0d contacts=%b expected %b", i, contacts, exp_c[i]);
      end
      checks++;
      if (k1 !== exp_k1[i] || k2 !== exp_k2[i]) begin
        failures++;
        $display("FAIL op=%0d k1=%0d k2=%0d expected %0d %0d", i, k1, k2, exp_k1[i], exp_k2[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
