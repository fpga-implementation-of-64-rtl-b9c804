// taylor_mult_tb: checks q = l + t + l*t (57 fraction bits, 9 multiplier
// stages) against exact integer arithmetic: the result must equal
// l + t + floor(l*t / 2^57) or be one below it, 10 cycles after the
// operands, for random and all-ones operands with idle cycles in between.
module taylor_mult_tb;
  localparam int unsigned FW = 57;
  logic clk = 0, rst_n = 0, v = 0;
  logic [FW-19:0] l = '0;
  logic [FW-28:0] t = '0;
  logic [FW-18:0] q;
  logic ov;

  taylor_mult #(.FW(FW), .STAGES(9)) dut (.clk(clk), .rst_n(rst_n), .in_valid(v), .l(l), .t(t),
                                          .out_valid(ov), .q(q));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  logic [FW-18:0] eq[$];
  longint unsigned tq[$];

  always @(posedge clk) begin
    if (rst_n && ov) begin
      logic [FW-18:0] e; longint unsigned tt;
      e = eq.pop_front(); tt = tq.pop_front();
      checks++;
      if (!(q == e || q == e - 1) || cycle - tt != 10) begin
        failures++; $display("FAIL q=%h expected %h latency %0d", q, e, cycle - tt);
      end
    end
  end

  initial begin
    logic [127:0] full;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      v = (i < 2) || (($urandom % 4) != 0);
      l = (i < 2) ? '1 : (FW-18)'({$urandom, $urandom});
      t = (i < 2) ? '1 : (FW-27)'($urandom);
      if (v) begin
        full = 128'(l) * 128'(t);
        eq.push_back((FW-17)'(l) + (FW-17)'(t) + (FW-17)'(full >> FW));
        tq.push_back(cycle);
      end
    end
    @(negedge clk); v = 0;
    repeat (14) @(negedge clk);
    checks++;
    if (eq.size() != 0) begin failures++; $display("FAIL: results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
