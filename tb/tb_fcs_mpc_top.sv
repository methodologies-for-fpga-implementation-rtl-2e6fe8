// tb_fcs_mpc_top - end-to-end test of the FCS-MPC current controller.
//
// The controller runs at its default parameters (10 kHz control rate, 1 us
// deadtime, 1 ms speed window) in closed loop with models of the drive:
//   - an IPMSM (5 pole pairs, Rs 0.4 ohm, Ld 11 mH, Lq 14.3 mH, flux
//     0.3333 Wb) held at 100 RPM, later 500 RPM, by a dynamometer,
//     integrated in the dq frame every 100 ns;
//   - a two-level 300 V inverter driven by the six gate signals; a leg
//     with both switches off conducts through the diode chosen by the sign
//     of its phase current;
//   - a 320000-edge-per-turn incremental encoder that starts a little
//     before its index mark, so the angle is unknown at first;
//   - a 16-bit ADC (1 us conversion, 25 mV/A around mid-scale).
//   - a USB FIFO bridge chip (60 MHz FIFO clock) through which every
//     run-time setting is written and every decision is logged back.
// Script (ms): target Id 0 A, Iq 4 A from the start; Iq target 5 A at 10;
// steady state 14-30; an ADC conversion that never ends at 31; a +20 A
// error on the phase-a measurement from 33 to 34 (overcurrent trip);
// fault_clear at 35; disable from 37 to 37.5; 500 RPM from 40, steady
// state 45-68 (the angle wraps here); end at 68.
// Checks: every decision is compared with a floating-point evaluation of
// the same eight predictions from the same samples (where the best two
// costs differ by more than 0.05 A), the evaluation takes 68 clocks, the
// decoded angle, direction and speed follow the shaft, the raw codes are
// the sampled ones, nine transforms run per evaluation, no leg ever has both switches
// on, every deadtime is 100 clocks, the gates are off while tripped or
// disabled, the Iq step reaches 90 % within 2 ms, and the steady-state RMS
// errors of Id and Iq stay below 1 A at both speeds. Each mechanism (skipped cycle before
// the index, decision, deadtime, angle wrap, speed update, ADC error, trip,
// clear, disable, target step) is counted and must happen at least once.
// The example circuit D = A*B + C beside the controller gets random A and
// C every clock for the first millisecond and is checked against its exact
// fixed-point result (A delayed two clocks, C one).
// At the end the logged byte stream must hold exactly one frame per
// decision, in order, with the decided state and the measured dq currents.
module tb_fcs_mpc_top;
  import fcs_mpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam real PI    = 3.14159265358979323846;
  localparam real PP    = 5.0;
  localparam real EPR   = 320000.0;                  // edges per mech. turn
  localparam real TH0   = -600.0 * 2.0 * PI / EPR;   // start before the index
  localparam real DT    = 100.0e-9;
  localparam real TS    = 1.0e-4;
  localparam real A_PER_CODE = 5.0 / 65536.0 / 0.025;

  int checks = 0, failures = 0;

  // ---- DUT ----
  logic rst, enable;
  logic signed [I_W-1:0] id_target, iq_target;
  logic ft_clk, ft_rxf_n, ft_txe_n, ft_rd_n, ft_wr_n, ft_oe_n, ft_doe;
  logic [7:0] ft_din, ft_dout;
  logic [15:0] frames_dropped;
  logic enc_a, enc_b, enc_z;
  logic adc_convst, adc_eoc_n, adc_cs_n, adc_rd_n;
  logic [15:0] adc_db;
  gates_t gates;
  logic fault;
  logic [THETA_W-1:0] theta;
  logic theta_valid;
  logic signed [W_W-1:0] omega;
  logic forward, omega_valid, dq_valid;
  logic [15:0] adc_code [3];
  logic sel_valid;
  sw_state_t sel_state;
  logic [COST_W-1:0] sel_cost;
  logic signed [I_W-1:0] id_meas, iq_meas;
  logic [6:0] compute_cycles;
  logic overrun;
  logic [15:0] skipped;
  logic signed [11:0] eq_input_a;
  logic signed [10:0] eq_input_c;
  logic signed [12:0] eq_output_d;

  fcs_mpc_top dut (.*);

  // ---- USB FIFO bridge chip ----
  ft232h_model ft (
    .ft_clk, .rxf_n(ft_rxf_n), .txe_n(ft_txe_n), .rd_n(ft_rd_n), .wr_n(ft_wr_n),
    .oe_n(ft_oe_n), .din(ft_din), .dout(ft_dout), .doe(ft_doe)
  );

  // one 4-byte register write, returns once the controller has the value
  task automatic usb_cmd(byte unsigned addr, int unsigned value);
    ft.push(addr);
    ft.push(8'(value >> 16));
    ft.push(8'(value >> 8));
    ft.push(8'(value));
    wait (ft.q.size() == 0);
    #(1us);
  endtask

  // every decision, as the log frames must report it
  sw_state_t log_st [$];
  logic signed [I_W-1:0] log_idq [$][2];
  always @(posedge clk) if (!rst && sel_valid) begin
    log_st.push_back(sel_state);
    log_idq.push_back('{id_meas, iq_meas});
  end

  // parse the byte stream: header, consecutive sequence numbers, contents
  task automatic check_frames(output int n_ok);
    int pos;
    byte unsigned b [16];
    logic [23:0] fid, fiq;
    n_ok = 0;
    pos = 0;
    checks++;
    if (ft.bus_errors != 0 || frames_dropped != 0) begin
      failures++;
      $display("USB: %0d bus errors, %0d frames dropped", ft.bus_errors, frames_dropped);
    end
    checks++;
    if (ft.rx_bytes.size() != 16 * log_st.size()) begin
      failures++;
      $display("USB: %0d bytes for %0d decisions", ft.rx_bytes.size(), log_st.size());
    end
    for (int k = 0; k < log_st.size() && pos + 16 <= ft.rx_bytes.size(); k++) begin
      for (int i = 0; i < 16; i++) b[i] = ft.rx_bytes[pos + i];
      pos += 16;
      fid = {b[4], b[5], b[6]};
      fiq = {b[7], b[8], b[9]};
      checks++;
      if (b[0] != 8'hA5 || b[1] != 8'h5A || b[2] != 8'(k) || b[3][2:0] != log_st[k]
          || fid != 24'(log_idq[k][0]) || fiq != 24'(log_idq[k][1])) begin
        failures++;
        if (failures < 20) $display("USB frame %0d wrong: %p", k, b);
      end else n_ok++;
    end
  endtask

  // ---- plant ----
  real id_r, iq_r, th_m, th_e, ia, ib, ic;
  real wm, we;          // shaft speed, mechanical and electrical rad/s
  real t_speed;         // time of the last speed change, ns
  real va, vb, vc;
  longint enc_pos;
  logic [15:0] ch [4];
  logic eoc_model, eoc_block;
  real inj_a;

  quad_encoder_model #(.EDGES_PER_REV(320_000)) enc (.pos(enc_pos), .a(enc_a), .b(enc_b), .z(enc_z));
  max11047_model adc (.convst(adc_convst), .ch_in(ch), .eoc_n(eoc_model), .cs_n(adc_cs_n),
                      .rd_n(adc_rd_n), .db(adc_db));
  assign adc_eoc_n = eoc_model | eoc_block;

  function automatic real leg_v(logic p, logic n, real i);
    if (p) return VDC;
    if (n) return 0.0;
    return (i > 0.0) ? 0.0 : VDC;
  endfunction

  function automatic logic [15:0] to_code(real i);
    real c;
    c = 32768.0 + i / A_PER_CODE;
    if (c < 0.0) c = 0.0;
    if (c > 65535.0) c = 65535.0;
    return 16'($rtoi(c + 0.5));
  endfunction

  int sub;
  always @(posedge clk) begin
    sub = (sub + 1) % 10;
    if (sub == 0) begin
      real vn, vds, vqs, did, diq;
      th_m += wm * DT;
      th_e = PP * th_m;
      va = leg_v(gates.a_p, gates.a_n, ia);
      vb = leg_v(gates.b_p, gates.b_n, ib);
      vc = leg_v(gates.c_p, gates.c_n, ic);
      vn = (va + vb + vc) / 3.0;
      va -= vn; vb -= vn; vc -= vn;
      vds =  2.0 / 3.0 * (va * $cos(th_e) + vb * $cos(th_e - 2.0 * PI / 3.0) + vc * $cos(th_e + 2.0 * PI / 3.0));
      vqs = -2.0 / 3.0 * (va * $sin(th_e) + vb * $sin(th_e - 2.0 * PI / 3.0) + vc * $sin(th_e + 2.0 * PI / 3.0));
      did = (vds - MOTOR_RS * id_r + we * MOTOR_LQ * iq_r) / MOTOR_LD;
      diq = (vqs - MOTOR_RS * iq_r - we * MOTOR_LD * id_r - we * MOTOR_LAMBDA) / MOTOR_LQ;
      id_r += did * DT;
      iq_r += diq * DT;
      ia = id_r * $cos(th_e) - iq_r * $sin(th_e);
      ib = id_r * $cos(th_e - 2.0 * PI / 3.0) - iq_r * $sin(th_e - 2.0 * PI / 3.0);
      ic = id_r * $cos(th_e + 2.0 * PI / 3.0) - iq_r * $sin(th_e + 2.0 * PI / 3.0);
      enc_pos = longint'($floor(th_m * EPR / (2.0 * PI)));
      ch[0] = to_code(ia + inj_a);
      ch[1] = to_code(ib);
      ch[2] = to_code(ic);
      ch[3] = 16'd32768;
    end
  end

  // ---- floating-point reference decision ----
  real    s_ia, s_ib, s_ic, s_w, s_id, s_iq;
  int     s_th;
  logic [15:0] s_code [3];
  always @(posedge adc_convst) begin
    s_code = '{ch[0], ch[1], ch[2]};
    s_ia = (real'(ch[0]) - 32768.0) * A_PER_CODE;
    s_ib = (real'(ch[1]) - 32768.0) * A_PER_CODE;
    s_ic = (real'(ch[2]) - 32768.0) * A_PER_CODE;
    s_th = int'(theta);
    s_w  = real'(omega) / 65536.0;
    s_id = id_r;
    s_iq = iq_r;
  end

  function automatic void park(real a, real b, real c, real th, output real d, output real q);
    d =  2.0 / 3.0 * (a * $cos(th) + b * $cos(th - 2.0 * PI / 3.0) + c * $cos(th + 2.0 * PI / 3.0));
    q = -2.0 / 3.0 * (a * $sin(th) + b * $sin(th - 2.0 * PI / 3.0) + c * $sin(th + 2.0 * PI / 3.0));
  endfunction

  function automatic bit zero_vec(int k);
    return k == 0 || k == 7;
  endfunction

  int agree, compared;
  task automatic check_decision();
    real th, idn, iqn, vdk, vqk, idp, iqp, costs [8], best, second;
    int bk;
    th = 2.0 * PI * (real'(s_th) + 0.5) / 16000.0;
    park(s_ia, s_ib, s_ic, th, idn, iqn);
    for (int k = 0; k < 8; k++) begin
      park((k & 4) ? VDC : 0.0, (k & 2) ? VDC : 0.0, (k & 1) ? VDC : 0.0, th, vdk, vqk);
      idp = idn + TS / MOTOR_LD * (vdk - MOTOR_RS * idn + s_w * MOTOR_LQ * iqn);
      iqp = iqn + TS / MOTOR_LQ * (vqk - MOTOR_RS * iqn - s_w * MOTOR_LD * idn - s_w * MOTOR_LAMBDA);
      costs[k] = ((real'(id_target) / 65536.0 - idp) > 0 ? (real'(id_target) / 65536.0 - idp) : (idp - real'(id_target) / 65536.0))
               + ((real'(iq_target) / 65536.0 - iqp) > 0 ? (real'(iq_target) / 65536.0 - iqp) : (iqp - real'(iq_target) / 65536.0));
    end
    bk = 0;
    for (int k = 1; k < 8; k++) if (costs[k] < costs[bk]) bk = k;
    best = costs[bk];
    // states 0 and 7 are the same (zero) voltage: they count as one
    second = 1.0e9;
    for (int k = 0; k < 8; k++)
      if (k != bk && !(zero_vec(k) && zero_vec(bk)) && costs[k] < second) second = costs[k];
    if (second - best > 0.05) begin
      compared++;
      checks++;
      if (int'(sel_state) != bk && !(zero_vec(int'(sel_state)) && zero_vec(bk))) begin
        failures++;
        $display("t=%0t decision %0d, reference %0d (costs %f %f)", $time, sel_state, bk, best, second);
      end else agree++;
    end
    // the held measurement must match the reference transform
    checks++;
    if ((real'(id_meas) / 65536.0 - idn) > 0.01 || (idn - real'(id_meas) / 65536.0) > 0.01 ||
        (real'(iq_meas) / 65536.0 - iqn) > 0.01 || (iqn - real'(iq_meas) / 65536.0) > 0.01) begin
      failures++;
      $display("t=%0t measured dq %f %f, reference %f %f", $time,
               real'(id_meas) / 65536.0, real'(iq_meas) / 65536.0, idn, iqn);
    end
  endtask

  // ---- mechanism counters and running checks ----
  int n_decisions, n_dead, n_wrap, n_speed, n_trip, n_clear, n_disable_off, n_step;
  int n_skip_pre, n_adc_err;
  int dead_len [3];
  bit dead_ok [3];
  logic [THETA_W-1:0] prev_theta;
  logic prev_fault;
  real se_d, se_q;
  int  n_rms;
  bit  in_steady;
  logic [1:0] prev_lp [3];
  logic prev_en, prev_flt2;

  int n_dq;
  always @(posedge clk) if (dq_valid) n_dq++;

  always @(posedge sel_valid) begin
    n_decisions++;
    checks += 4;
    if (compute_cycles != 7'd68) begin failures++; $display("evaluation took %0d clocks", compute_cycles); end
    // one transform of the currents and one per switch state
    if (n_dq != 9) begin failures++; $display("%0d dq transforms in one evaluation", n_dq); end
    n_dq = 0;
    if (adc_code != s_code) begin failures++; $display("ADC codes differ from the sampled values"); end
    if (!forward) begin failures++; $display("direction not forward"); end
    if (!rst) check_decision();
  end

  always @(posedge adc_convst) begin
    if (in_steady) begin
      se_d += (s_id - real'(id_target) / 65536.0) ** 2;
      se_q += (s_iq - real'(iq_target) / 65536.0) ** 2;
      n_rms++;
    end
  end

  always @(negedge clk) begin
    if (!rst) begin
      logic [1:0] lp [3];
      lp[0] = {gates.a_p, gates.a_n};
      lp[1] = {gates.b_p, gates.b_n};
      lp[2] = {gates.c_p, gates.c_n};
      for (int k = 0; k < 3; k++) begin
        if (lp[k] == 2'b11) begin failures++; $display("shoot-through on leg %0d", k); end
        if (lp[k] == 2'b00) begin
          if (dead_len[k] == 0) dead_ok[k] = enable && !fault && prev_lp[k] != 2'b00;
          dead_len[k]++;
        end else begin
          if (dead_len[k] > 0 && dead_ok[k] && enable && !fault) begin
            n_dead++;
            checks++;
            if (dead_len[k] != 100) begin failures++; $display("deadtime %0d clocks on leg %0d", dead_len[k], k); end
          end
          dead_len[k] = 0;
        end
      end
      prev_lp = lp;
      if (((fault && prev_flt2) || (!enable && !prev_en)) && gates != '0) begin
        failures++; $display("gates on while tripped or disabled");
      end
      prev_en = enable;
      prev_flt2 = fault;
      if (theta_valid && prev_theta > 14'd15000 && theta < 14'd1000) n_wrap++;
      prev_theta = theta;
      if (fault && !prev_fault) n_trip++;
      if (!fault && prev_fault) n_clear++;
      prev_fault = fault;
    end
  end

  // angle and speed follow the shaft
  always begin
    #10us;
    if (theta_valid) begin
      real e, th_ref;
      th_ref = th_e * 16000.0 / (2.0 * PI);
      th_ref = th_ref - 16000.0 * $floor(th_ref / 16000.0);
      e = real'(theta) - th_ref;
      if (e > 8000.0) e -= 16000.0;
      if (e < -8000.0) e += 16000.0;
      checks++;
      if (e > 2.0 || e < -2.0) begin failures++; $display("theta %0d, shaft %f", theta, th_ref); end
    end
    if ($realtime - t_speed > 2.5e6) begin
      real w;
      w = real'(omega) / 65536.0;
      checks++;
      n_speed++;
      if (w - we > 0.3 || we - w > 0.3) begin failures++; $display("omega %f, shaft %f", w, we); end
    end
  end

  task automatic report_rms(string speed);
    real rd, rq;
    rd = $sqrt(se_d / real'(n_rms));
    rq = $sqrt(se_q / real'(n_rms));
    $display("%s steady state over %0d samples: Id RMSE %f A, Iq RMSE %f A", speed, n_rms, rd, rq);
    checks += 2;
    if (rd > 1.0 || n_rms < 100) begin failures++; $display("Id RMSE too large"); end
    if (rq > 1.0) begin failures++; $display("Iq RMSE too large"); end
    se_d = 0.0; se_q = 0.0; n_rms = 0;
  endtask

  // ---- the example circuit beside the controller: D = A*B + C ----
  // D = floor(P / 2) + C(t-1) wrapped to 13 bits, where the product node holds
  // P = floor(floor(A(t-2) / 2) * 201 / 64) wrapped to 14 bits
  function automatic longint fdiv(longint x, longint dv);
    return (x >= 0) ? x / dv : -((-x + dv - 1) / dv);
  endfunction
  function automatic longint wrapw(longint x, int w);
    longint m, r;
    m = longint'(1) << w;
    r = x % m;
    if (r < 0) r += m;
    if (r >= (m >> 1)) r -= m;
    return r;
  endfunction
  longint eq_ah [3], eq_ch [3];
  int n_eq;
  always @(posedge clk) begin
    eq_ah[2] = eq_ah[1]; eq_ah[1] = eq_ah[0]; eq_ah[0] = longint'(eq_input_a);
    eq_ch[2] = eq_ch[1]; eq_ch[1] = eq_ch[0]; eq_ch[0] = longint'(eq_input_c);
  end
  always @(negedge clk) begin
    if (!rst && $realtime > 1000.0 && $realtime < 1.0e6) begin
      longint e;
      e = wrapw(fdiv(wrapw(fdiv(fdiv(eq_ah[1], 2) * 201, 64), 14), 2) + eq_ch[0], 13);
      if (n_eq >= 0) begin
        checks++;
        if (longint'(eq_output_d) != e) begin
          failures++;
          if (failures < 10) $display("example circuit: D %0d expected %0d (A %0d %0d %0d, C %0d %0d)", eq_output_d, e, eq_ah[0], eq_ah[1], eq_ah[2], eq_ch[0], eq_ch[1]);
        end
      end
      n_eq++;
    end
  end
  always @(negedge clk) if ($realtime < 1.0e6) begin
    eq_input_a = 12'($urandom);
    eq_input_c = 11'($urandom);
  end

  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
  endtask

  initial begin
    #75ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t_step;
    rst = 1'b1;
    id_r = 0.0; iq_r = 0.0; ia = 0.0; ib = 0.0; ic = 0.0; th_m = TH0; th_e = PP * TH0;
    wm = 100.0 / 60.0 * 2.0 * PI; we = PP * wm; t_speed = 0.0;
    prev_lp = '{2'b00, 2'b00, 2'b00}; prev_en = 1'b0; prev_flt2 = 1'b0;
    va = 0.0; vb = 0.0; vc = 0.0; sub = 0; inj_a = 0.0; eoc_block = 1'b0;
    enc_pos = longint'($floor(TH0 * EPR / (2.0 * PI)));
    for (int k = 0; k < 4; k++) ch[k] = 16'd32768;
    n_decisions = 0; n_dead = 0; n_wrap = 0; n_speed = 0; n_trip = 0; n_clear = 0;
    eq_input_a = '0; eq_input_c = '0; eq_ah = '{0, 0, 0}; eq_ch = '{0, 0, 0}; n_eq = -3;
    n_disable_off = 0; n_step = 0; n_dq = 0; s_code = '{16'd0, 16'd0, 16'd0}; n_skip_pre = 0; n_adc_err = 0;
    dead_len = '{0, 0, 0}; dead_ok = '{0, 0, 0}; prev_theta = '0; prev_fault = 1'b0;
    se_d = 0.0; se_q = 0.0; n_rms = 0; in_steady = 0; agree = 0; compared = 0;
    s_ia = 0; s_ib = 0; s_ic = 0; s_w = 0; s_th = 0; s_id = 0; s_iq = 0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    ft.rx_bytes.delete();
    ft.bus_errors = 0;
    // targets Id 0 A, Iq 4 A, then enable with logging
    usb_cmd(8'd1, 0);
    usb_cmd(8'd2, 4 * 65536);
    usb_cmd(8'd0, 32'h5);
    // before the index mark every cycle is skipped
    wait (theta_valid);
    n_skip_pre = int'(skipped);
    checks++;
    if (n_decisions != 0) begin failures++; $display("decision before the angle was known"); end
    // target step 4 -> 5 A at 10 ms
    #(10ms - $realtime * 1ns);
    fork usb_cmd(8'd2, 5 * 65536); join_none
    wait (iq_target == I_W'(5 * 65536));
    t_step = $realtime;
    while (iq_r < 4.9 && $realtime - t_step < 2.0e6) @(negedge clk);
    checks++;
    if (iq_r >= 4.9) begin
      n_step++;
      $display("Iq 4 -> 5 A: 90 %% after %0.0f us", ($realtime - t_step) / 1000.0);
    end else begin failures++; $display("Iq step not followed"); end
    // steady state
    #(14ms - $realtime * 1ns);
    in_steady = 1;
    #(30ms - $realtime * 1ns);
    in_steady = 0;
    // one conversion that never ends
    begin
      int sk;
      sk = int'(skipped);
      #(31ms - $realtime * 1ns);
      eoc_block = 1'b1;
      #(150us);
      eoc_block = 1'b0;
      #(200us);
      n_adc_err = int'(skipped) - sk;
    end
    // overcurrent: a 20 A error on the phase-a measurement (full scale)
    #(33ms - $realtime * 1ns);
    inj_a = 20.0;
    #(1ms);
    inj_a = 0.0;
    checks++;
    if (!fault) begin failures++; $display("no trip"); end
    #(35ms - $realtime * 1ns);
    usb_cmd(8'd0, 32'h7);
    checks++;
    if (fault) begin failures++; $display("fault not cleared"); end
    // disable for 0.5 ms
    #(37ms - $realtime * 1ns);
    usb_cmd(8'd0, 32'h4);
    #(100us);
    if (gates == '0) n_disable_off++;
    #(400us);
    usb_cmd(8'd0, 32'h5);
    #(40ms - $realtime * 1ns);
    report_rms("100 RPM");
    // 500 RPM: the dynamometer changes speed at once
    wm = 500.0 / 60.0 * 2.0 * PI; we = PP * wm; t_speed = $realtime;
    #(45ms - $realtime * 1ns);
    in_steady = 1;
    #(68ms - $realtime * 1ns);
    in_steady = 0;
    report_rms("500 RPM");
    $display("decisions compared with the reference: %0d, agreed %0d", compared, agree);
    checks++;
    if (compared < 100) begin failures++; $display("too few decisions compared"); end
    checks++;
    if (overrun) begin failures++; $display("overrun at 10 kHz"); end
    $display("mechanisms:");
    need("skipped before index", n_skip_pre);
    need("decisions", n_decisions);
    need("deadtimes", n_dead);
    need("angle wraps", n_wrap);
    need("speed checks", n_speed);
    need("target step followed", n_step);
    need("ADC error skips", n_adc_err);
    need("overcurrent trips", n_trip);
    need("fault clears", n_clear);
    need("disable, gates off", n_disable_off);
    need("example circuit results", n_eq);
    begin
      int n_frames;
      check_frames(n_frames);
      need("log frames", n_frames);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
