// tb_fxp_mul_node - self-checking test of the registered multiplication node.
//
// Two instances: the Q2.5 x Q3.7 -> Q3.6 node (operand b is pre-shifted by
// one bit, the Q5.11 product truncated to Q3.6) and a Q0.16 x Q4.16 ->
// Q4.16 node as used by the motor model. The expected value is computed with
// floor divisions on integers: pre-shift, exact product, floor to the
// output FWL, wrap to the output width. The result must appear exactly one
// clock after the operands.
module tb_fxp_mul_node;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [7:0]  a1;  // Q2.5
  logic signed [10:0] b1;  // Q3.7
  logic signed [9:0]  y1;  // Q3.6
  logic signed [16:0] a2;  // Q0.16
  logic signed [20:0] b2;  // Q4.16
  logic signed [20:0] y2;  // Q4.16

  fxp_mul_node #(.A_IWL(2), .A_FWL(5), .B_IWL(3), .B_FWL(7), .Y_IWL(3), .Y_FWL(6))
    dut1 (.clk(clk), .a(a1), .b(b1), .y(y1));
  fxp_mul_node #(.A_IWL(0), .A_FWL(16), .B_IWL(4), .B_FWL(16), .Y_IWL(4), .Y_FWL(16))
    dut2 (.clk(clk), .a(a2), .b(b2), .y(y2));

  function automatic longint fdiv(longint x, longint d);  // floor(x/d), d > 0
    return (x >= 0) ? x / d : -((-x + d - 1) / d);
  endfunction
  function automatic longint wrap(longint x, int w);
    longint m = longint'(1) << w;
    longint r = x % m;
    if (r < 0) r += m;
    if (r >= (m >> 1)) r -= m;
    return r;
  endfunction

  longint e1, e2;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a1 = '0; b1 = '0; a2 = '0; b2 = '0;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      // small operands for the first half (no wrap), any for the rest
      if (n < 1000) begin
        a1 = 8'($signed($urandom_range(0, 120)) - 60);
        b1 = 11'($signed($urandom_range(0, 700)) - 350);
      end else begin
        a1 = 8'($urandom);
        b1 = 11'($urandom);
      end
      a2 = 17'($urandom_range(0, 65535));
      b2 = 21'($urandom);
      e1 = wrap(fdiv(longint'(a1) * fdiv(longint'(b1), 2), 32), 10);
      e2 = wrap(fdiv(longint'(a2) * longint'(b2), 65536), 21);
      @(posedge clk);
      #1;
      checks++;
      if (longint'(y1) !== e1) begin
        failures++;
        if (failures < 10) $display("mul1 a=%0d b=%0d y=%0d expected %0d", a1, b1, y1, e1);
      end
      checks++;
      if (longint'(y2) !== e2) begin
        failures++;
        if (failures < 10) $display("mul2 a=%0d b=%0d y=%0d expected %0d", a2, b2, y2, e2);
      end
      @(negedge clk);
    end
    // Figure example values: 1.5 (Q2.5) x 2.25 (Q3.7) = 3.375 (Q3.6 = 216)
    a1 = 8'sd48; b1 = 11'sd288;
    @(posedge clk); #1;
    checks++;
    if (y1 !== 10'sd216) begin failures++; $display("1.5 x 2.25 gave %0d", y1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
