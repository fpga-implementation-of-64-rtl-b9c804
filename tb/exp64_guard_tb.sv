// exp64_guard_tb: accuracy of the exp() unit against the number of guard
// bits. Four copies of the unit (0, 2, 4 and 8 guard bits) receive the
// same stream of random arguments in [-700, 700] and [-1, 1]; each result
// is compared with the simulator's double-precision exp() in units in the
// last place (ulp). Printed per configuration: mean and maximum |error|.
// Checks: every result within 2 ulp (4 ulp with no guard bits), the mean
// error with 4 and with 8 guard bits below 0.5 ulp, and the mean error not
// growing when guard bits are added (0 -> 4 -> 8). Latency 27 cycles.
module exp64_guard_tb;
  localparam int N = 20000;
  localparam int NCFG = 4;
  localparam int G [NCFG] = '{0, 2, 4, 8};

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [63:0] x = '0;
  logic        ov [NCFG];
  logic [63:0] y  [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    exp64 #(.GUARD_BITS(G[c])) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
                                    .out_valid(ov[c]), .y(y[c]));
  end

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  real sum [NCFG];
  int  mx  [NCFG];
  int  cnt = 0;
  logic [63:0] q_x[$];

  always @(posedge clk) begin
    if (rst_n && ov[0]) begin
      logic [63:0] a, e;
      longint d;
      a = q_x.pop_front();
      e = $realtobits($exp($bitstoreal(a)));
      cnt++;
      for (int c = 0; c < NCFG; c++) begin
        checks++;
        d = longint'(y[c]) - longint'(e);
        if (d < 0) d = -d;
        sum[c] += real'(d);
        if (int'(d) > mx[c]) mx[c] = int'(d);
        if (!ov[c] || d > ((G[c] == 0) ? 4 : 2)) begin
          failures++;
          $display("FAIL guard=%0d x=%h got %h expected %h", G[c], a, y[c], e);
        end
      end
    end
  end

  initial begin
    real u;
    for (int c = 0; c < NCFG; c++) begin sum[c] = 0.0; mx[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      u = real'($urandom) / 4294967296.0;
      x = $realtobits((i % 2 == 0) ? (u * 1400.0 - 700.0) : (u * 2.0 - 1.0));
      in_valid = 1'b1;
      q_x.push_back(x);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (30) @(negedge clk);
    for (int c = 0; c < NCFG; c++)
      $display("guard bits %0d: mean |error| %f ulp, max %0d ulp over %0d results",
               G[c], sum[c] / cnt, mx[c], cnt);
    checks += 3;
    if (cnt != N) begin failures++; $display("FAIL: %0d of %0d results", cnt, N); end
    if (sum[2] / cnt >= 0.5 || sum[3] / cnt >= 0.5) begin
      failures++; $display("FAIL: mean error with 4 or 8 guard bits not below 0.5 ulp");
    end
    if (sum[3] > sum[2] || sum[2] > sum[0]) begin
      failures++; $display("FAIL: mean error grows with more guard bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
