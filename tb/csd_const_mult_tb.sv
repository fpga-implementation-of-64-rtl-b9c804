// csd_const_mult_tb: checks the constant multiplier against ordinary
// integer multiplication for the two constants of the design (log2(e) with
// 16 fraction bits, ln(2) with 72 fraction bits) and an arbitrary odd one.
// A fourth instance drops the 8 lowest product columns (as the ln(2)
// multiplier of the pipeline does); its result must lie at most 40 LSBs
// below the exact truncated product and never above it.
module csd_const_mult_tb;
  import exp_pkg::*;

  logic [17:0]  a1;  logic [34:0]  p1;
  logic [10:0]  a2;  logic [82:0]  p2;
  logic [23:0]  a3;  logic [47:0]  p3;
  logic [74:0]  p4;

  csd_const_mult #(.IN_W(18), .C_W(17), .CONST(LOG2E_Q)) dut1 (.a(a1), .p(p1));
  csd_const_mult #(.IN_W(11), .C_W(72), .CONST(LN2_Q))   dut2 (.a(a2), .p(p2));
  csd_const_mult #(.IN_W(24), .C_W(24), .CONST(24'hB6DB6F)) dut3 (.a(a3), .p(p3));
  csd_const_mult #(.IN_W(11), .C_W(72), .CONST(LN2_Q), .DROP(8)) dut4 (.a(a2), .p(p4));

  int checks = 0, failures = 0;

  logic [74:0] exact4;

  initial begin
    for (int i = 0; i < 4000; i++) begin
      a1 = (i == 0) ? '1 : 18'($urandom);
      a2 = (i == 0) ? '1 : 11'($urandom);
      a3 = (i == 0) ? '1 : 24'($urandom);
      #1;
      checks += 3;
      if (p1 != 35'(a1) * 35'(17'd94548)) begin
        failures++; $display("FAIL log2e a=%0d p=%0d", a1, p1);
      end
      if (p2 != 83'(a2) * 83'(72'hB1_7217_F7D1_CF79_ABC9)) begin
        failures++; $display("FAIL ln2 a=%0d p=%h", a2, p2);
      end
      if (p3 != 48'(a3) * 48'(24'hB6DB6F)) begin
        failures++; $display("FAIL c3 a=%0d p=%h", a3, p3);
      end
      exact4 = 75'((83'(a2) * 83'(72'hB1_7217_F7D1_CF79_ABC9)) >> 8);
      checks++;
      if (p4 > exact4 || exact4 - p4 > 75'd40) begin
        failures++; $display("FAIL reduced a=%0d p=%h exact=%h", a2, p4, exact4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
