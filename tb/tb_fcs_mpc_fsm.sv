// tb_fcs_mpc_fsm - self-checking test of the control-cycle sequencer.
//
// The sequencer runs against stubs: an ADC that answers 120 clocks after
// adc_start with random currents (and now and then an error), a sine table
// that answers after 4 clocks, a 3-stage abc->dq stand-in that passes
// (a/2, b/2) through as (d, q), and a 1-stage cost stand-in that returns a
// scripted cost for the k-th request. The costs are drawn from a small
// range so that ties happen. The test checks
//   - one decision per control period, exactly PERIOD clocks apart;
//   - the chosen state is the first index of minimum cost, with its cost;
//   - the k-th cost request sees the voltage of switch state k (300 V on
//     each phase whose bit is 1, halved by the stand-in) on vd/vq, and the held Id(n), Iq(n) are
//     the sampled currents;
//   - the last cost arrives 68 clocks into the evaluation;
//   - cycles without a valid angle or with an ADC error are skipped and
//     counted, and nothing happens while enable is low;
//   - an instance with a period shorter than the evaluation flags overrun.
module tb_fcs_mpc_fsm;
  import fcs_mpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned FS = 125_000;
  localparam int unsigned PER = CLK_HZ / FS;   // 800 clocks

  int checks = 0, failures = 0;

  logic rst, enable;
  logic [THETA_W-1:0] theta;
  logic theta_valid;
  logic signed [W_W-1:0] omega_in;
  logic adc_start, adc_done, adc_err;
  abc_t i_abc;
  logic lut_start, lut_done;
  logic [THETA_W-1:0] lut_theta;
  logic cp_valid;
  abc_t cp_x;
  logic signed [DQ_W-1:0] cp_d, cp_q;
  logic signed [I_W-1:0] id_n, iq_n;
  logic signed [V_W-1:0] vd, vq;
  logic signed [W_W-1:0] omega;
  logic cost_in_valid, cost_valid;
  logic [COST_W-1:0] cost;
  logic sel_valid;
  sw_state_t sel_state;
  logic [COST_W-1:0] sel_cost;
  logic [6:0] lcc;
  logic overrun;
  logic [15:0] skipped;

  fcs_mpc_fsm #(.FS_HZ(FS)) dut (.*, .last_compute_cycles(lcc));

  // ---- stubs ----
  int adc_cnt, lut_cnt;
  bit err_next;
  abc_t i_next;
  logic signed [DQ_W-1:0] d_pipe [3], q_pipe [3];
  logic [COST_W-1:0] script [8];
  int req_k;

  always @(posedge clk) begin
    adc_done <= 1'b0;
    lut_done <= 1'b0;
    if (adc_start) adc_cnt <= 120;
    else if (adc_cnt > 0) begin
      adc_cnt <= adc_cnt - 1;
      if (adc_cnt == 1) begin
        adc_done <= 1'b1;
        adc_err  <= err_next;
        i_abc    <= i_next;
      end
    end
    if (lut_start) lut_cnt <= 4;
    else if (lut_cnt > 0) begin
      lut_cnt <= lut_cnt - 1;
      if (lut_cnt == 1) lut_done <= 1'b1;
    end
    d_pipe <= '{DQ_W'(cp_x.a >>> 1), d_pipe[0], d_pipe[1]};
    q_pipe <= '{DQ_W'(cp_x.b >>> 1), q_pipe[0], q_pipe[1]};
    cost_valid <= cost_in_valid;
    if (cost_in_valid) begin
      cost  <= script[req_k];
      req_k <= (req_k + 1) % 8;
    end
  end
  assign cp_d = d_pipe[2];
  assign cp_q = q_pipe[2];

  // ---- checks on every cost request ----
  localparam longint VQ = longint'(150) << 16;   // stand-in halves the input
  always @(negedge clk) begin
    if (!rst && cost_in_valid) begin
      longint evd, evq;
      evd = (req_k & 4) ? VQ : 0;
      evq = (req_k & 2) ? VQ : 0;
      checks++;
      if (longint'(vd) != evd || longint'(vq) != evq) begin
        failures++;
        $display("request %0d: vd %0d vq %0d expected %0d %0d", req_k, vd, vq, evd, evq);
      end
    end
  end

  // overrun instance: 50-clock period
  logic ov_sel, ov_flag, ov_ast, ov_lst;
  sw_state_t ov_state;
  logic [COST_W-1:0] ov_cost;
  logic [6:0] ov_lcc;
  logic [15:0] ov_sk;
  logic [THETA_W-1:0] ov_lt;
  abc_t ov_x;
  logic ov_cpv, ov_civ;
  logic signed [I_W-1:0] ov_id, ov_iq;
  logic signed [V_W-1:0] ov_vd, ov_vq;
  logic signed [W_W-1:0] ov_w;
  fcs_mpc_fsm #(.PERIOD(50)) dut_ov (.clk, .rst, .enable(1'b1), .theta, .theta_valid(1'b1),
    .omega_in, .adc_start(ov_ast), .adc_done(1'b0), .adc_err(1'b0), .i_abc,
    .lut_start(ov_lst), .lut_theta(ov_lt), .lut_done(1'b0), .cp_valid(ov_cpv), .cp_x(ov_x),
    .cp_d, .cp_q, .id_n(ov_id), .iq_n(ov_iq), .vd(ov_vd), .vq(ov_vq), .omega(ov_w),
    .cost_in_valid(ov_civ), .cost_valid(1'b0), .cost('0), .sel_valid(ov_sel),
    .sel_state(ov_state), .sel_cost(ov_cost), .last_compute_cycles(ov_lcc),
    .overrun(ov_flag), .skipped(ov_sk));

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint last_sel;
  int decisions, skips_expected;

  initial begin
    rst = 1'b1; enable = 1'b0; theta = '0; theta_valid = 1'b0; omega_in = '0;
    adc_cnt = 0; lut_cnt = 0; err_next = 0; i_next = '0; req_k = 0;
    adc_err = 0; i_abc = '0; cost = '0; cost_valid = 0; adc_done = 0; lut_done = 0;
    d_pipe = '{default: '0}; q_pipe = '{default: '0};
    for (int k = 0; k < 8; k++) script[k] = '0;
    last_sel = -1; decisions = 0; skips_expected = 0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    // disabled: nothing may start
    repeat (3 * PER) begin
      @(negedge clk);
      checks++;
      if (adc_start || lut_start || sel_valid) begin failures++; $display("activity while disabled"); end
    end
    enable = 1'b1;
    for (int n = 0; n < 400; n++) begin
      int bestk;
      bit skip;
      // set up the next cycle while the sequencer is idle
      theta       = THETA_W'($urandom_range(THETA_N - 1));
      theta_valid = (n >= 5) && ($urandom_range(9) != 0);
      err_next    = ($urandom_range(19) == 0);
      i_next.a    = PH_W'($signed($urandom_range(2_000_000)) - 1_000_000);
      i_next.b    = PH_W'($signed($urandom_range(2_000_000)) - 1_000_000);
      i_next.c    = '0;
      for (int k = 0; k < 8; k++) script[k] = COST_W'($urandom_range(6));
      bestk = 0;
      for (int k = 1; k < 8; k++) if (script[k] < script[bestk]) bestk = k;
      skip = !theta_valid || err_next;
      while (!adc_start) @(negedge clk);
      checks++;
      if (lut_theta !== theta) begin failures++; $display("lut_theta not sampled"); end
      if (skip) begin
        skips_expected++;
        repeat (PER - 2) begin
          @(negedge clk);
          if (sel_valid) begin failures++; $display("decision in a skipped cycle"); end
        end
        checks++;
        if (int'(skipped) != skips_expected) begin failures++; $display("skipped %0d expected %0d", skipped, skips_expected); end
        continue;
      end
      while (!sel_valid) @(negedge clk);
      decisions++;
      checks += 4;
      if (sel_state !== 3'(bestk) || sel_cost !== script[bestk]) begin
        failures++;
        $display("cycle %0d: chose %0d (cost %0d), expected %0d (cost %0d)", n, sel_state, sel_cost, bestk, script[bestk]);
      end
      if (lcc != 7'd68) begin failures++; $display("last cost at c=%0d", lcc); end
      if (longint'(id_n) != (longint'(i_next.a) >>> 1) || longint'(iq_n) != (longint'(i_next.b) >>> 1)) begin
        failures++; $display("held currents wrong");
      end
      if (last_sel >= 0 && ($time / 10 - last_sel) % PER != 0) begin
        failures++; $display("decision not on the period grid");
      end
      last_sel = $time / 10;
    end
    checks += 3;
    if (decisions < 100) begin failures++; $display("only %0d decisions", decisions); end
    if (overrun) begin failures++; $display("overrun at 125 kHz"); end
    if (!ov_flag) begin failures++; $display("overrun never flagged"); end
    $display("decisions=%0d skipped=%0d", decisions, skips_expected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
