// fcs_mpc_top - FPGA current controller for an IPMSM using finite control
// set model predictive control (FCS-MPC).
//
// Every control period the controller samples the three phase currents and
// the rotor angle and speed, predicts for each of the eight switch states
// of the two-level inverter where the dq currents will be one period later,
// and applies the state whose prediction lies closest to the target
// currents. Because the whole evaluation takes 68 clocks (0.68 us at
// 100 MHz) the decision is applied in the same period, without the delay
// compensation a software controller needs.
//
// Blocks and data flow:
//   incremental_decoder  encoder A/B/Z -> theta (0..15999), omega (rad/s)
//   adc_interface        ADC pins -> phase currents Q9.16
//   sine_lut             theta -> six 2/3-scaled sin/cos values
//   clarke_park          abc -> dq, shared by the currents and the vectors
//   motor_model          Idq(n), Vdq, omega -> Idq(n+1)     (5 stages)
//   cost_function        |Id* - Id(n+1)| + |Iq* - Iq(n+1)|  (1 stage)
//   fcs_mpc_fsm          schedules all of the above, ranks the 8 costs
//   gate_drive           state -> 6 gate signals, deadtime, overcurrent trip
//   usb_interface        PC link: run-time registers in, one log frame per
//                        decision out (USB FIFO bridge chip, own clock)
// The gates stay off after reset until the first decision has been made.
//
// Interface: enable, the target currents and fault clearing are written by
// the PC over the USB link and are visible as status outputs; every
// decision is logged back with the measured dq currents, angle and speed.
// Further status outputs expose the decoded angle, direction and speed, the
// raw ADC codes, the dq transform's output strobe, the decision and the
// schedule length.
// FS_HZ sets the control rate, and with it the motor model constants.
// The small example circuit D = A x B + C (equation_example), built with the
// same fixed-point nodes as the motor model, is a separate design; it sits
// beside the controller with its own eq_* ports.
module fcs_mpc_top
  import fcs_mpc_pkg::*;
#(
  parameter int unsigned FS_HZ         = 10_000,
  parameter int unsigned DEADTIME      = 100,
  parameter int unsigned WINDOW_CYCLES = 100_000
) (
  input  logic                   clk,
  input  logic                   rst,
  // USB FIFO bridge (run-time configuration and logging), ft_clk domain
  input  logic                   ft_clk,
  input  logic                   ft_rxf_n,
  input  logic                   ft_txe_n,
  output logic                   ft_rd_n,
  output logic                   ft_wr_n,
  output logic                   ft_oe_n,
  input  logic [7:0]             ft_din,
  output logic [7:0]             ft_dout,
  output logic                   ft_doe,
  // incremental encoder (after the differential receiver)
  input  logic                   enc_a,
  input  logic                   enc_b,
  input  logic                   enc_z,
  // current ADC
  output logic                   adc_convst,
  input  logic                   adc_eoc_n,
  output logic                   adc_cs_n,
  output logic                   adc_rd_n,
  input  logic [15:0]            adc_db,
  // inverter gate drivers
  output gates_t                 gates,
  output logic                   fault,
  // status
  output logic                   enable,      // run-time registers as set
  output logic signed [I_W-1:0]  id_target,   // Q4.16 A
  output logic signed [I_W-1:0]  iq_target,   // Q4.16 A
  output logic [15:0]            frames_dropped,
  output logic [THETA_W-1:0]     theta,
  output logic                   theta_valid,
  output logic                   forward,
  output logic signed [W_W-1:0]  omega,
  output logic                   omega_valid,
  output logic [15:0]            adc_code [3],
  output logic                   dq_valid,
  output logic                   sel_valid,
  output sw_state_t              sel_state,
  output logic [COST_W-1:0]      sel_cost,
  output logic signed [I_W-1:0]  id_meas,
  output logic signed [I_W-1:0]  iq_meas,
  output logic [6:0]             compute_cycles,
  output logic                   overrun,
  output logic [15:0]            skipped,
  // word-length example circuit D = A x B + C (independent of the controller)
  input  logic signed [11:0]     eq_input_a,  // Q3.8
  input  logic signed [10:0]     eq_input_c,  // Q4.6
  output logic signed [12:0]     eq_output_d  // Q6.6
);
  logic                   adc_start, adc_done, adc_err;
  abc_t                   i_abc;
  logic                   lut_start, lut_done;
  logic [THETA_W-1:0]     lut_theta;
  trig_t                  trig;
  logic                   cp_in_valid;
  abc_t                   cp_x;
  logic signed [DQ_W-1:0] cp_d, cp_q;
  logic signed [V_W-1:0]  vd, vq;
  logic signed [W_W-1:0]  omega_h;
  logic signed [IP_W-1:0] id_p, iq_p;
  logic                   cost_in_valid, cost_valid;
  logic [COST_W-1:0]      cost;
  logic                   started;
  logic                   fault_clear, log_enable;

  incremental_decoder #(.WINDOW_CYCLES(WINDOW_CYCLES)) u_dec (
    .clk, .rst, .enc_a, .enc_b, .enc_z,
    .theta, .theta_valid, .forward, .omega, .omega_valid
  );

  adc_interface u_adc (
    .clk, .rst, .start(adc_start), .done(adc_done), .err(adc_err),
    .code(adc_code), .i_abc,
    .adc_convst, .adc_eoc_n, .adc_cs_n, .adc_rd_n, .adc_db
  );

  sine_lut u_lut (
    .clk, .rst, .start(lut_start), .theta(lut_theta), .done(lut_done), .trig
  );

  clarke_park u_cp (
    .clk, .rst, .in_valid(cp_in_valid), .x(cp_x), .trig,
    .out_valid(dq_valid), .d(cp_d), .q(cp_q)
  );

  motor_model #(.FS_HZ(FS_HZ)) u_model (
    .clk, .id_n(id_meas), .iq_n(iq_meas), .vd, .vq, .omega(omega_h),
    .id_p, .iq_p
  );

  cost_function u_cost (
    .clk, .rst, .in_valid(cost_in_valid), .id_target, .iq_target,
    .id_p, .iq_p, .out_valid(cost_valid), .cost
  );

  fcs_mpc_fsm #(.FS_HZ(FS_HZ)) u_fsm (
    .clk, .rst, .enable,
    .theta, .theta_valid, .omega_in(omega),
    .adc_start, .adc_done, .adc_err, .i_abc,
    .lut_start, .lut_theta, .lut_done,
    .cp_valid(cp_in_valid), .cp_x, .cp_d, .cp_q,
    .id_n(id_meas), .iq_n(iq_meas), .vd, .vq, .omega(omega_h),
    .cost_in_valid, .cost_valid, .cost,
    .sel_valid, .sel_state, .sel_cost,
    .last_compute_cycles(compute_cycles), .overrun, .skipped
  );

  // gates stay off until the first decision
  always_ff @(posedge clk) begin
    if (rst || !enable) started <= 1'b0;
    else if (sel_valid) started <= 1'b1;
  end

  gate_drive #(.DEADTIME(DEADTIME)) u_gate (
    .clk, .rst, .enable(enable && started),
    .state_valid(sel_valid), .state(sel_state),
    .i_valid(adc_done && !adc_err), .i_abc,
    .fault_clear, .gates, .fault
  );

  usb_interface u_usb (
    .clk, .rst, .enable, .log_enable, .id_target, .iq_target, .fault_clear,
    .log_valid(sel_valid), .log_state(sel_state), .log_fault(fault),
    .log_theta_valid(theta_valid), .log_overrun(overrun),
    .log_id(id_meas), .log_iq(iq_meas), .log_theta(lut_theta), .log_omega(omega_h),
    .frames_dropped,
    .ft_clk, .ft_rxf_n, .ft_txe_n, .ft_rd_n, .ft_wr_n, .ft_oe_n, .ft_din, .ft_dout, .ft_doe
  );

  // The example circuit of the word-length method stands beside the
  // controller with its own ports; it shares only the clock.
  equation_example u_eq (
    .clk, .input_a(eq_input_a), .input_c(eq_input_c), .output_d(eq_output_d)
  );

endmodule
