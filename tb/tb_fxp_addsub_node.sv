// tb_fxp_addsub_node - self-checking test of the addition/subtraction node.
//
// The Q2.5 (+/-) Q3.7 -> Q3.6 node in both flavours: operand a is shifted
// left by one bit, operand b right by one bit (floor), the Q4.6 sum is
// wrapped to Q3.6. Expected values are computed with integer floor
// division; the result must appear exactly one clock after the operands.
module tb_fxp_addsub_node;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [7:0]  a;   // Q2.5
  logic signed [10:0] b;   // Q3.7
  logic signed [9:0]  ys, yd;

  fxp_addsub_node #(.A_IWL(2), .A_FWL(5), .B_IWL(3), .B_FWL(7), .Y_IWL(3), .Y_FWL(6), .SUB(1'b0))
    dut_add (.clk(clk), .a(a), .b(b), .y(ys));
  fxp_addsub_node #(.A_IWL(2), .A_FWL(5), .B_IWL(3), .B_FWL(7), .Y_IWL(3), .Y_FWL(6), .SUB(1'b1))
    dut_sub (.clk(clk), .a(a), .b(b), .y(yd));

  function automatic longint fdiv(longint x, longint d);
    return (x >= 0) ? x / d : -((-x + d - 1) / d);
  endfunction
  function automatic longint wrap(longint x, int w);
    longint m = longint'(1) << w;
    longint r = x % m;
    if (r < 0) r += m;
    if (r >= (m >> 1)) r -= m;
    return r;
  endfunction

  longint es, ed;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      a = 8'($urandom);
      b = 11'($urandom);
      es = wrap(longint'(a) * 2 + fdiv(longint'(b), 2), 10);
      ed = wrap(longint'(a) * 2 - fdiv(longint'(b), 2), 10);
      @(posedge clk); #1;
      checks += 2;
      if (longint'(ys) !== es) begin
        failures++;
        if (failures < 10) $display("add a=%0d b=%0d y=%0d expected %0d", a, b, ys, es);
      end
      if (longint'(yd) !== ed) begin
        failures++;
        if (failures < 10) $display("sub a=%0d b=%0d y=%0d expected %0d", a, b, yd, ed);
      end
      @(negedge clk);
    end
    // 1.5 + 2.25 = 3.75 -> 240 in Q3.6; 1.5 - 2.25 = -0.75 -> -48
    a = 8'sd48; b = 11'sd288;
    @(posedge clk); #1;
    checks += 2;
    if (ys !== 10'sd240) begin failures++; $display("1.5 + 2.25 gave %0d", ys); end
    if (yd !== -10'sd48) begin failures++; $display("1.5 - 2.25 gave %0d", yd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
