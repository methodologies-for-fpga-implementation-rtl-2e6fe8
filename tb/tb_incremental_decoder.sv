// tb_incremental_decoder - self-checking test of angle and speed decoding.
//
// Counting is tested on a small instance with 40 edges per electrical turn
// (theta wraps at 10) and 200 edges per mechanical turn: theta is invalid
// until the first index pulse, then equals (edges since the index mod 40)/4
// while turning forward, backward through the wrap, and across index
// pulses; forward follows the direction. Speed is tested on an instance
// with the full 64000 edges per electrical turn and a 1000-clock window:
// at a steady edge rate omega must equal edges-per-window * 2*pi/64000 /
// 10 us within one edge, with the sign of the direction.
module tb_incremental_decoder;
  import fcs_mpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979323846;

  int checks = 0, failures = 0;

  logic rst;
  longint pos1, pos2;
  logic a1, b1, z1, a2, b2, z2;
  logic [THETA_W-1:0] th1, th2;
  logic tv1, tv2, fw1, fw2, ov1, ov2;
  logic signed [W_W-1:0] om1, om2;

  quad_encoder_model #(.EDGES_PER_REV(200)) enc1 (.pos(pos1), .a(a1), .b(b1), .z(z1));
  quad_encoder_model #(.EDGES_PER_REV(320_000)) enc2 (.pos(pos2), .a(a2), .b(b2), .z(z2));

  incremental_decoder #(.EDGES(40), .THETA_DIV(4), .WINDOW_CYCLES(100_000)) dut1 (
    .clk, .rst, .enc_a(a1), .enc_b(b1), .enc_z(z1), .theta(th1), .theta_valid(tv1),
    .forward(fw1), .omega(om1), .omega_valid(ov1));
  incremental_decoder #(.WINDOW_CYCLES(1000)) dut2 (
    .clk, .rst, .enc_a(a2), .enc_b(b2), .enc_z(z2), .theta(th2), .theta_valid(tv2),
    .forward(fw2), .omega(om2), .omega_valid(ov2));

  longint zpos;
  bit     seen_z;

  task automatic step1(int dir);
    repeat (6) @(negedge clk);
    pos1 += dir;
    if (((pos1 % 200) + 200) % 200 == 0 && dir > 0) begin
      seen_z = 1;
      zpos = pos1;
    end
    repeat (6) @(negedge clk);
    checks++;
    if (tv1 !== seen_z) begin failures++; $display("theta_valid %b expected %b", tv1, seen_z); end
    if (seen_z) begin
      longint cnt = (((pos1 - zpos) % 40) + 40) % 40;
      checks += 2;
      if (int'(th1) != int'(cnt / 4)) begin
        failures++;
        if (failures < 10) $display("pos %0d theta %0d expected %0d", pos1, th1, cnt / 4);
      end
      if (fw1 !== (dir > 0)) begin failures++; $display("direction wrong at pos %0d", pos1); end
    end
  endtask

  real expw;
  int  spacing;

  task automatic run_speed(int sp, int dir, int nwin);
    int n = 0;
    spacing = sp;
    expw = real'(dir) * (1000.0 / real'(sp)) * 2.0 * PI / 64000.0 * 1.0e5;
    while (n < nwin) begin
      @(negedge clk);
      if (($time / 10) % sp == 0) pos2 += dir;
      if (ov2) begin
        n++;
        if (n > 1) begin
          real w = real'(om2) / 65536.0;
          real tol = 2.0 * PI / 64000.0 * 1.0e5 * 1.01;
          checks++;
          if (w - expw > tol || expw - w > tol) begin
            failures++;
            $display("omega %f expected %f", w, expw);
          end
        end
      end
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; pos1 = 190; pos2 = 5; seen_z = 0; zpos = 0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (8) @(negedge clk);
    for (int k = 0; k < 30; k++) step1(+1);      // through the index at 200
    for (int k = 0; k < 45; k++) step1(-1);      // back below 0 (wrap to 39)
    for (int k = 0; k < 260; k++) step1(+1);     // through the next index
    // speed: 50 clocks per edge = 20 edges per window -> 196.3 rad/s
    run_speed(50, +1, 6);
    run_speed(37, -1, 6);
    run_speed(500, +1, 6);
    checks++;
    if (!tv2) begin failures++; $display("speed instance never saw the index"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
