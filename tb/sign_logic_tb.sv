// sign_logic_tb: checks the sign migration. For every case the value
// (+/-int)*ln2 + xf must equal (+/-)(q*ln2 + r) up to the rounding of the
// ln2 constant, and xf must be a valid fraction (0 <= xf < 1).
module sign_logic_tb;
  import exp_pkg::*;

  logic neg;
  logic [10:0] q, int_mag;
  logic [59:0] r, xf;
  logic int_neg, migrated, wrapped;

  sign_logic dut (.neg(neg), .q(q), .r(r), .int_mag(int_mag), .int_neg(int_neg),
                  .xf(xf), .migrated(migrated), .wrapped(wrapped));

  int checks = 0, failures = 0;
  int n_wrap = 0, n_mig = 0;
  localparam real LN2 = 0.69314718055994530942;
  localparam real TWO60 = 1152921504606846976.0;

  task automatic one(input logic n, input logic [10:0] qq, input logic [59:0] rr);
    real want, got, e_int;
    neg = n; q = qq; r = rr;
    #1;
    checks++;
    want = (real'(qq) * LN2 + real'(rr) / TWO60) * (n ? -1.0 : 1.0);
    e_int = real'(int_mag) * (int_neg ? -1.0 : 1.0);
    got  = e_int * LN2 + real'(xf) / TWO60;
    if ((got - want) > 1.0e-12 || (want - got) > 1.0e-12 || int_neg != n ||
        (n && rr != 0 && !migrated) || (!n && migrated)) begin
      failures++;
      $display("FAIL neg=%b q=%0d r=%h -> int=%s%0d xf=%h (%g vs %g)",
               n, qq, rr, int_neg ? "-" : "+", int_mag, xf, got, want);
    end
    if (wrapped) n_wrap++;
    if (migrated) n_mig++;
  endtask

  initial begin
    one(1'b0, 11'd5, 60'h123_4567_89AB_CDEF);
    one(1'b1, 11'd5, 60'd0);
    one(1'b1, 11'd0, 60'd1);
    one(1'b1, 11'd7, 60'hB17_217F_7D1C_F79A);      // r = ln2 (60-bit)
    one(1'b1, 11'd7, 60'hE00_0000_0000_0000);      // r = 0.875 > ln2: wrap
    for (int i = 0; i < 5000; i++) begin
      logic [59:0] rr;
      rr = 60'({$urandom, $urandom});
      if (rr > 60'hB80_0000_0000_0000) rr = rr >> 1; // keep r in [0, 0.72)
      one(1'($urandom), 11'($urandom % 1480), rr);
    end
    checks++;
    if (n_wrap == 0 || n_mig == 0) begin
      failures++;
      $display("FAIL: wrap (%0d) or migration (%0d) never exercised", n_wrap, n_mig);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
