// tb_clarke_park - self-checking test of the abc -> dq transform.
//
// Table values for a random angle are built with the sine table's formula
// and applied with random phase values (currents within +/-10 A and
// voltage vectors 0/300 V). Checks:
//   1. d and q equal an integer evaluation of the same arithmetic (floor of
//      each product to 16 fractional bits, then the sums) exactly;
//   2. for a balanced current set a = I cos(phi), b = I cos(phi - 2pi/3),
//      c = I cos(phi + 2pi/3): d = I cos(phi - theta), q = I sin(phi - theta)
//      within 5 mA (the table answers for the middle of each angle step and the third-turn offsets are rounded to whole entries);
//   3. out_valid, and the result, come exactly 3 clocks after in_valid, with
//      a new input every clock.
module tb_clarke_park;
  import fcs_mpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979323846;
  localparam int  N  = 16000;

  int checks = 0, failures = 0;

  logic                   rst, in_valid, out_valid;
  abc_t                   x;
  trig_t                  trig;
  logic signed [DQ_W-1:0] d, q;

  clarke_park dut (.clk, .rst, .in_valid, .x, .trig, .out_valid, .d, .q);

  function automatic int entry(int i);
    int k = ((i % N) + N) % N;
    return $rtoi((2.0 / 3.0) * $sin(2.0 * PI * (real'(k) + 0.5) / real'(N)) * 32768.0);
  endfunction
  function automatic longint fdiv(longint v, longint dd);
    return (v >= 0) ? v / dd : -((-v + dd - 1) / dd);
  endfunction

  // expected values of the last inputs, index 2 = captured two edges before the current one
  longint ed [4], eq [4];
  bit     ev [4];
  real    rd [4], rq [4];
  bit     rv [4];

  task automatic drive(int th, real fa, real fb, real fc, bit balanced, real rdv, real rqv);
    longint pa, pb, pc, sa, sb, sc;
    trig.sin0 = 16'(entry(th));        trig.cos0 = 16'(entry(th + 4000));
    trig.sinm = 16'(entry(th - 5333)); trig.cosm = 16'(entry(th - 1333));
    trig.sinp = 16'(entry(th + 5333)); trig.cosp = 16'(entry(th + 9333));
    x.a = PH_W'($rtoi(fa * 65536.0));
    x.b = PH_W'($rtoi(fb * 65536.0));
    x.c = PH_W'($rtoi(fc * 65536.0));
    pa = fdiv(longint'(x.a) * longint'(trig.cos0), 32768);
    pb = fdiv(longint'(x.b) * longint'(trig.cosm), 32768);
    pc = fdiv(longint'(x.c) * longint'(trig.cosp), 32768);
    sa = fdiv(longint'(x.a) * longint'(trig.sin0), 32768);
    sb = fdiv(longint'(x.b) * longint'(trig.sinm), 32768);
    sc = fdiv(longint'(x.c) * longint'(trig.sinp), 32768);
    for (int k = 3; k > 0; k--) begin
      ed[k] = ed[k-1]; eq[k] = eq[k-1]; ev[k] = ev[k-1];
      rd[k] = rd[k-1]; rq[k] = rq[k-1]; rv[k] = rv[k-1];
    end
    ed[0] = pa + pb + pc;
    eq[0] = -(sa + sb) - sc;
    ev[0] = 1'b1;
    rd[0] = rdv; rq[0] = rqv; rv[0] = balanced;
  endtask

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1_000_000)) / 1.0e6;
  endfunction

  int  th;
  real amp, phi, ang, vd;
  int  vld_hist;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0; x = '0; trig = '0;
    for (int k = 0; k < 4; k++) begin ev[k] = 0; rv[k] = 0; ed[k] = 0; eq[k] = 0; end
    vld_hist = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      th  = $urandom_range(0, N - 1);
      ang = 2.0 * PI * real'(th) / real'(N);
      in_valid = ($urandom_range(0, 3) != 0);
      unique case (n % 3)
        0: begin  // balanced currents
          amp = rnd(0.0, 10.0); phi = rnd(0.0, 2.0 * PI);
          drive(th, amp * $cos(phi), amp * $cos(phi - 2.0 * PI / 3.0), amp * $cos(phi + 2.0 * PI / 3.0),
                1'b1, amp * $cos(phi - ang), amp * $sin(phi - ang));
        end
        1: drive(th, rnd(-10.0, 10.0), rnd(-10.0, 10.0), rnd(-10.0, 10.0), 1'b0, 0.0, 0.0);
        default: drive(th, ($urandom_range(0, 1) != 0) ? 300.0 : 0.0,
                       ($urandom_range(0, 1) != 0) ? 300.0 : 0.0,
                       ($urandom_range(0, 1) != 0) ? 300.0 : 0.0, 1'b0, 0.0, 0.0);
      endcase
      vld_hist = {vld_hist[30:0], in_valid};
      @(posedge clk); #1;
      if (n >= 3) begin
        // the third edge after an input shows its result
        checks += 3;
        if (longint'(d) != ed[2] || longint'(q) != eq[2]) begin
          failures++;
          if (failures < 10) $display("n=%0d d=%0d (exp %0d) q=%0d (exp %0d)", n, d, ed[2], q, eq[2]);
        end
        if (out_valid != vld_hist[2]) begin
          failures++;
          $display("out_valid wrong at n=%0d", n);
        end
        if (rv[2]) begin
          vd = real'(d) / 65536.0;
          if (vd - rd[2] > 0.005 || rd[2] - vd > 0.005 ||
              real'(q) / 65536.0 - rq[2] > 0.005 || rq[2] - real'(q) / 65536.0 > 0.005) begin
            failures++;
            if (failures < 10) $display("balanced: d=%f q=%f expected %f %f", vd,
                                        real'(q) / 65536.0, rd[2], rq[2]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
