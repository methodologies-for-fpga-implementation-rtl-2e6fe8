// tb_motor_model - self-checking test of the fixed-point current predictor.
//
// For random operating points within the model's ranges (|Id|,|Iq| < 10 A,
// |Vd|,|Vq| < 200 V, 0..367 rad/s) the inputs are held for 5 clocks and the
// outputs compared with
//   1. a node-by-node integer evaluation of the same equations (floor after
//      every product, constants truncated to Q0.16): must match exactly;
//   2. the real-valued model Id' = Id - Ts*Rs/Ld*Id + Ts*Lq/Ld*w*Iq + Ts/Ld*Vd,
//      Iq' = Iq - Ts*Rs/Lq*Iq - Ts*Ld/Lq*w*Id + Ts/Lq*Vq - Ts*lambda/Lq*w:
//      must agree within 0.1 A.
// It also checks the latency: iq_p is not yet right after 4 clocks for an
// input step that changes it, and right after 5.
module tb_motor_model;
  import fcs_mpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int FS = 10_000;
  localparam real TS = 1.0 / FS;

  int checks = 0, failures = 0;

  logic signed [I_W-1:0]  id_n, iq_n;
  logic signed [V_W-1:0]  vd, vq;
  logic signed [W_W-1:0]  omega;
  logic signed [IP_W-1:0] id_p, iq_p;

  motor_model #(.FS_HZ(FS)) dut (.clk, .id_n, .iq_n, .vd, .vq, .omega, .id_p, .iq_p);

  function automatic longint fdiv(longint x, longint d);
    return (x >= 0) ? x / d : -((-x + d - 1) / d);
  endfunction
  function automatic longint qmul(longint a, longint b);   // Q.16 x Q.16 -> Q.16
    return fdiv(a * b, 65536);
  endfunction
  function automatic longint cq(real x);
    return longint'($rtoi(x * 65536.0));
  endfunction

  longint c1, c2, c3, c4, c5, c6, c7, eid, eiq, prev_iq;
  real    rid, riq, fid, fiq, fvd, fvq, fw;

  task automatic apply(real xd, real xq, real ud, real uq, real w, bit check_latency);
    @(negedge clk);
    id_n  = I_W'(cq(xd));  iq_n = I_W'(cq(xq));
    vd    = V_W'(cq(ud));  vq   = V_W'(cq(uq));
    omega = W_W'(cq(w));
    eid = longint'(id_n) - qmul(c1, id_n) + qmul(qmul(c2, omega), iq_n) + qmul(c3, vd);
    eiq = longint'(iq_n) - qmul(c4, iq_n) - qmul(qmul(c5, omega), id_n) + qmul(c6, vq) - qmul(c7, omega);
    repeat (4) @(posedge clk);
    #1;
    if (check_latency && eiq != prev_iq) begin
      checks++;
      if (longint'(iq_p) == eiq) begin
        failures++;
        $display("iq_p already final after 4 clocks");
      end
    end
    @(posedge clk);
    #1;
    checks += 2;
    if (longint'(id_p) != eid || longint'(iq_p) != eiq) begin
      failures++;
      if (failures < 10) $display("id_p=%0d (exp %0d) iq_p=%0d (exp %0d)", id_p, eid, iq_p, eiq);
    end
    fid = real'(id_n) / 65536.0; fiq = real'(iq_n) / 65536.0;
    fvd = real'(vd) / 65536.0;   fvq = real'(vq) / 65536.0;  fw = real'(omega) / 65536.0;
    rid = fid - TS * MOTOR_RS / MOTOR_LD * fid + TS * MOTOR_LQ / MOTOR_LD * fw * fiq + TS / MOTOR_LD * fvd;
    riq = fiq - TS * MOTOR_RS / MOTOR_LQ * fiq - TS * MOTOR_LD / MOTOR_LQ * fw * fid
              + TS / MOTOR_LQ * fvq - TS * MOTOR_LAMBDA / MOTOR_LQ * fw;
    if ((real'(id_p) / 65536.0 - rid) > 0.1 || (rid - real'(id_p) / 65536.0) > 0.1 ||
        (real'(iq_p) / 65536.0 - riq) > 0.1 || (riq - real'(iq_p) / 65536.0) > 0.1) begin
      failures++;
      if (failures < 10) $display("model %f %f vs real %f %f", real'(id_p) / 65536.0,
                                  real'(iq_p) / 65536.0, rid, riq);
    end
    prev_iq = eiq;
  endtask

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1_000_000)) / 1.0e6;
  endfunction

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c1 = cq(TS * 0.4 / 0.011);      c2 = cq(TS * 0.0143 / 0.011);  c3 = cq(TS / 0.011);
    c4 = cq(TS * 0.4 / 0.0143);     c5 = cq(TS * 0.011 / 0.0143);  c6 = cq(TS / 0.0143);
    c7 = cq(TS * 0.3333 / 0.0143);
    prev_iq = 0;
    id_n = '0; iq_n = '0; vd = '0; vq = '0; omega = '0;
    repeat (8) @(posedge clk);
    apply(0.0, 5.0, 0.0, 200.0, 52.36, 1'b0);          // 100 rpm, Iq = 5 A
    apply(0.0, 5.0, -100.0, 100.0, 261.8, 1'b0);       // 500 rpm
    apply(-6.6, 6.6, 200.0, -200.0, 367.0, 1'b0);      // corners
    for (int n = 0; n < 400; n++)
      apply(rnd(-10.0, 10.0), rnd(-10.0, 10.0), rnd(-200.0, 200.0), rnd(-200.0, 200.0),
            rnd(0.0, 367.0), 1'b0);
    // latency: a step of Iq alone travels the 5-register path
    for (int n = 0; n < 20; n++) begin
      fw = rnd(0.0, 367.0); fvd = rnd(-200.0, 200.0); fvq = rnd(-200.0, 200.0);
      fid = rnd(-5.0, 5.0);
      apply(fid, -4.0, fvd, fvq, fw, 1'b0);
      apply(fid, 4.0, fvd, fvq, fw, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
