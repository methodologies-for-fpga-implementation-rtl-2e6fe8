// tb_equation_example - self-checking test of the D = A x B + C circuit.
//
// Drives new random A and C every clock. D at clock t must equal
//   floor( floor( floor(A(t-2)/2) * 201 / 64 ) / 2 ) + C(t-1)
// wrapped to 13 bits: A passes two registers (product, sum), C one. The
// result is also compared with the real-valued A*3.14159 + C within the
// quantisation error of the chosen formats.
module tb_equation_example;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [11:0] a;
  logic signed [10:0] c;
  logic signed [12:0] d;

  equation_example dut (.clk(clk), .input_a(a), .input_c(c), .output_d(d));

  function automatic longint fdiv(longint x, longint d_);
    return (x >= 0) ? x / d_ : -((-x + d_ - 1) / d_);
  endfunction
  function automatic longint wrap(longint x, int w);
    longint m = longint'(1) << w;
    longint r = x % m;
    if (r < 0) r += m;
    if (r >= (m >> 1)) r -= m;
    return r;
  endfunction

  longint ah [0:2];
  longint ch [0:2];
  longint exp_d;
  real    ideal, got;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; c = '0;
    for (int k = 0; k < 3; k++) begin ah[k] = 0; ch[k] = 0; end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      a = 12'($urandom);
      c = 11'($urandom);
      @(posedge clk);
      // shift the histories: index 0 = value sampled at this edge
      ah[2] = ah[1]; ah[1] = ah[0]; ah[0] = longint'(a);
      ch[2] = ch[1]; ch[1] = ch[0]; ch[0] = longint'(c);
      #1;
      if (n >= 3) begin
        exp_d = wrap(fdiv(wrap(fdiv(fdiv(ah[1], 2) * 201, 64), 14), 2) + ch[0], 13);
        checks++;
        if (longint'(d) !== exp_d) begin
          failures++;
          if (failures < 10) $display("n=%0d d=%0d expected %0d", n, d, exp_d);
        end
        ideal = real'(ah[1]) / 256.0 * 3.14159 + real'(ch[0]) / 64.0;
        got   = real'(d) / 64.0;
        if (ideal > -60.0 && ideal < 60.0) begin
          checks++;
          if (got - ideal > 0.06 || ideal - got > 0.06) begin
            failures++;
            if (failures < 10) $display("n=%0d d=%f ideal %f", n, got, ideal);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
