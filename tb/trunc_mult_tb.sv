// trunc_mult_tb: checks the reduced-width multiplier against the exact
// product. Two instances: the widest one of the pipeline (59 x 48 bits,
// 57 bits dropped, 9 stages) and a small one (16 x 12, 10 dropped, 3
// stages). The result must equal floor(a*b / 2^DROP) or be one below it,
// and appear exactly STAGES cycles after its operands.
module trunc_mult_tb;
  logic clk = 0, rst_n = 0, v = 0;
  logic [58:0] a1 = '0; logic [47:0] b1 = '0; logic [49:0] p1; logic ov1;
  logic [15:0] a2 = '0; logic [11:0] b2 = '0; logic [17:0] p2; logic ov2;

  trunc_mult #(.A_W(59), .B_W(48), .DROP(57), .STAGES(9)) dut1 (
    .clk(clk), .rst_n(rst_n), .in_valid(v), .a(a1), .b(b1), .out_valid(ov1), .p(p1));
  trunc_mult #(.A_W(16), .B_W(12), .DROP(10), .STAGES(3)) dut2 (
    .clk(clk), .rst_n(rst_n), .in_valid(v), .a(a2), .b(b2), .out_valid(ov2), .p(p2));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_low = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [49:0] e1[$]; logic [17:0] e2[$];
  longint unsigned t1[$], t2[$];

  always @(posedge clk) begin
    if (rst_n && ov1) begin
      logic [49:0] e; longint unsigned t;
      e = e1.pop_front(); t = t1.pop_front();
      checks++;
      if (!(p1 == e || p1 == e - 1) || cycle - t != 9) begin
        failures++; $display("FAIL dut1 p=%h exp=%h lat=%0d", p1, e, cycle - t);
      end
      if (p1 != e) n_low++;
    end
    if (rst_n && ov2) begin
      logic [17:0] e; longint unsigned t;
      e = e2.pop_front(); t = t2.pop_front();
      checks++;
      if (!(p2 == e || p2 == e - 1) || cycle - t != 3) begin
        failures++; $display("FAIL dut2 p=%h exp=%h lat=%0d", p2, e, cycle - t);
      end
    end
  end

  initial begin
    logic [127:0] full;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      v  = ($urandom % 5) != 0;
      a1 = (i < 2) ? '1 : 59'({$urandom, $urandom});
      b1 = (i < 2) ? '1 : 48'({$urandom, $urandom});
      a2 = (i < 2) ? '1 : 16'($urandom);
      b2 = (i < 2) ? '1 : 12'($urandom);
      if (i < 2) v = 1'b1;
      if (v) begin
        full = 128'(a1) * 128'(b1);
        e1.push_back(50'(full >> 57)); t1.push_back(cycle);
        full = 128'(a2) * 128'(b2);
        e2.push_back(18'(full >> 10)); t2.push_back(cycle);
      end
    end
    @(negedge clk); v = 0;
    repeat (12) @(negedge clk);
    checks++;
    if (e1.size() != 0 || e2.size() != 0) begin
      failures++; $display("FAIL: results missing");
    end
    $display("truncated one LSB low: %0d results", n_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
