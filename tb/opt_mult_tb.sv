// opt_mult_tb: checks a*(1+y) = a + a*y for the operand shapes of the
// pipeline: exp(x_M)*(1+d) (59 x 48 bits) and the final product (59 x 40
// bits), 57 fraction bits, 9 multiplier stages. The result must equal
// a + floor(a*y / 2^57) or be one below it, 10 cycles after the operands.
module opt_mult_tb;
  logic clk = 0, rst_n = 0, v = 0;
  logic [58:0] a = '0;
  logic [47:0] y1 = '0; logic [59:0] p1; logic ov1;
  logic [39:0] y2 = '0; logic [59:0] p2; logic ov2;

  opt_mult #(.A_W(59), .Y_W(48), .FW(57), .STAGES(9)) dut1 (
    .clk(clk), .rst_n(rst_n), .in_valid(v), .a(a), .y(y1), .out_valid(ov1), .p(p1));
  opt_mult #(.A_W(59), .Y_W(40), .FW(57), .STAGES(9)) dut2 (
    .clk(clk), .rst_n(rst_n), .in_valid(v), .a(a), .y(y2), .out_valid(ov2), .p(p2));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [59:0] e1[$], e2[$];
  longint unsigned tq[$];

  always @(posedge clk) begin
    if (rst_n && ov1) begin
      logic [59:0] x1, x2; longint unsigned t;
      x1 = e1.pop_front(); x2 = e2.pop_front(); t = tq.pop_front();
      checks++;
      if (!(p1 == x1 || p1 == x1 - 1) || !(p2 == x2 || p2 == x2 - 1) ||
          cycle - t != 10 || !ov2) begin
        failures++;
        $display("FAIL p1=%h exp %h p2=%h exp %h lat=%0d", p1, x1, p2, x2, cycle - t);
      end
    end
  end

  initial begin
    logic [127:0] full;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      v  = ($urandom % 4) != 0;
      a  = 59'({$urandom, $urandom});
      a[58:57] = 2'b01;                       // 1 <= a < 2
      if ($urandom % 2 == 1) a[58:57] = 2'b10;     // 2 <= a < 3
      y1 = 48'({$urandom, $urandom});
      y2 = 40'({$urandom, $urandom});
      if (v) begin
        full = 128'(a) * 128'(y1);
        e1.push_back(60'(a) + 60'(full >> 57));
        full = 128'(a) * 128'(y2);
        e2.push_back(60'(a) + 60'(full >> 57));
        tq.push_back(cycle);
      end
    end
    @(negedge clk); v = 0;
    repeat (14) @(negedge clk);
    checks++;
    if (e1.size() != 0) begin
      failures++; $display("FAIL: results missing");
    end
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
