// tb_sine_lut - self-checking test of the sine table and six-value lookup.
//
// For random angles the six returned values must equal the table formula
// trunc((2/3) sin(2*pi*(i + 1/2)/16000) * 2^15) at the expected addresses
// (theta, theta - 5333, theta + 5333, each also +4000 for the cosine,
// modulo 16000), and lie within 3e-4 of (2/3) sin/cos of the exact angles.
// done must rise exactly 4 clocks after start.
module tb_sine_lut;
  import fcs_mpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979323846;
  localparam int  N  = 16000;

  int checks = 0, failures = 0;

  logic               rst, start, done;
  logic [THETA_W-1:0] theta;
  trig_t              trig;

  sine_lut dut (.clk, .rst, .start, .theta, .done, .trig);

  function automatic int entry(int i);
    int k = ((i % N) + N) % N;
    return $rtoi((2.0 / 3.0) * $sin(2.0 * PI * (real'(k) + 0.5) / real'(N)) * 32768.0);
  endfunction

  task automatic chk(string what, logic signed [15:0] got, int idx, real ang);
    real ideal = (2.0 / 3.0) * $sin(ang);
    real v     = real'(got) / 32768.0;
    checks += 2;
    if (int'(got) != entry(idx)) begin
      failures++;
      if (failures < 10) $display("%s: %0d expected entry %0d", what, got, entry(idx));
    end
    if (v - ideal > 3.0e-4 || ideal - v > 3.0e-4) begin
      failures++;
      if (failures < 10) $display("%s: %f vs %f", what, v, ideal);
    end
  endtask

  int  th, lat;
  real a;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; start = 1'b0; theta = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      th = (n < 4) ? (n * 3999) : $urandom_range(0, N - 1);
      @(negedge clk);
      theta = THETA_W'(th);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      theta = THETA_W'($urandom_range(0, N - 1));   // must not matter
      lat = 1;
      while (!done && lat < 20) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 4) begin failures++; $display("done after %0d clocks", lat); end
      a = 2.0 * PI * real'(th) / real'(N);
      chk("sin0", trig.sin0, th,               a);
      chk("cos0", trig.cos0, th + 4000,        a + PI / 2.0);
      chk("sinm", trig.sinm, th - 5333,        a - 2.0 * PI / 3.0);
      chk("cosm", trig.cosm, th + 4000 - 5333, a - 2.0 * PI / 3.0 + PI / 2.0);
      chk("sinp", trig.sinp, th + 5333,        a + 2.0 * PI / 3.0);
      chk("cosp", trig.cosp, th + 4000 + 5333, a + 2.0 * PI / 3.0 + PI / 2.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
