// motor_model - one-step current prediction of the IPMSM in fixed point.
//
// Evaluates the forward-Euler model of the motor in the rotor (dq) frame:
//   Id' = Id - C1*Id + C2*w*Iq + C3*Vd
//   Iq' = Iq - C4*Iq - C5*w*Id + C6*Vq - C7*w
// with C1 = Ts*Rs/Ld, C2 = Ts*Lq/Ld, C3 = Ts/Ld, C4 = Ts*Rs/Lq,
// C5 = Ts*Ld/Lq, C6 = Ts/Lq, C7 = Ts*lambda/Lq and Ts = 1/FS_HZ. The
// constants are folded at elaboration from the nominal motor parameters in
// fcs_mpc_pkg and stored as Q0.16, truncated toward zero.
//
// How it works: the equations are a data-flow graph of registered
// fixed-point nodes (fxp_mul_node, fxp_addsub_node), each followed by one
// register, evaluated left to right as written. This is the 16-bit-FWL
// configuration: every node keeps 16 fractional bits and only the integer
// widths differ (chosen for FS_HZ >= 10 kHz, |Id|,|Iq| < 16 A,
// |Vd|,|Vq| < 256 V, |w| < 512 rad/s).
//
// Timing: the pipeline is not balanced. The q path is 5 registers deep
// (C4*Iq, Iq-.., -C5wId, +C6Vq, -C7w), the d path 4. Inputs must be held
// for 5 clocks; iq_p (and id_p) are then valid and stay valid while the
// inputs stay put. The structure (folded constants, one register per node,
// 5-stage longest path, 16-bit FWL at the ports) follows the controller
// this was built from; the grouping (C5*w)*Id and (C2*w)*Iq and the
// integer widths are this design's choice.
module motor_model
  import fcs_mpc_pkg::*;
#(
  parameter int unsigned FS_HZ = 10_000  // control (sampling) rate
) (
  input  logic                  clk,
  input  logic signed [I_W-1:0] id_n,   // Q4.16 A, measured
  input  logic signed [I_W-1:0] iq_n,   // Q4.16 A, measured
  input  logic signed [V_W-1:0] vd,     // Q8.16 V, test vector
  input  logic signed [V_W-1:0] vq,     // Q8.16 V, test vector
  input  logic signed [W_W-1:0] omega,  // Q9.16 rad/s, electrical
  output logic signed [IP_W-1:0] id_p,  // Q5.16 A, predicted
  output logic signed [IP_W-1:0] iq_p   // Q5.16 A, predicted
);
  localparam real TS = 1.0 / real'(FS_HZ);
  localparam int unsigned CW = FWL + 1;   // Q0.16 constants
  localparam logic signed [CW-1:0] C1 = CW'(to_fix(TS * MOTOR_RS / MOTOR_LD, FWL));
  localparam logic signed [CW-1:0] C2 = CW'(to_fix(TS * MOTOR_LQ / MOTOR_LD, FWL));
  localparam logic signed [CW-1:0] C3 = CW'(to_fix(TS / MOTOR_LD, FWL));
  localparam logic signed [CW-1:0] C4 = CW'(to_fix(TS * MOTOR_RS / MOTOR_LQ, FWL));
  localparam logic signed [CW-1:0] C5 = CW'(to_fix(TS * MOTOR_LD / MOTOR_LQ, FWL));
  localparam logic signed [CW-1:0] C6 = CW'(to_fix(TS / MOTOR_LQ, FWL));
  localparam logic signed [CW-1:0] C7 = CW'(to_fix(TS * MOTOR_LAMBDA / MOTOR_LQ, FWL));

  if (FS_HZ < 10_000) begin : g_range_check
    $error("motor_model: integer widths are sized for FS_HZ >= 10000");
  end

  localparam int unsigned F  = FWL;
  localparam int unsigned SI = 2;   // integer bits of the small product terms

  // ------------------------------------------------------------- d axis
  logic signed [I_IWL+F:0]  d_m1;   // C1*Id
  logic signed [SI+F:0]     d_m2;   // C2*w
  logic signed [SI+F:0]     d_m3;   // C3*Vd
  logic signed [IP_IWL+F:0] d_a1;   // Id - C1*Id
  logic signed [SI+F:0]     d_m4;   // (C2*w)*Iq
  logic signed [IP_IWL+F:0] d_a2;   // .. + C2*w*Iq

  fxp_mul_node #(.A_IWL(0), .A_FWL(F), .B_IWL(I_IWL), .B_FWL(F), .Y_IWL(I_IWL), .Y_FWL(F))
    u_d_m1 (.clk(clk), .a(C1), .b(id_n), .y(d_m1));
  fxp_mul_node #(.A_IWL(0), .A_FWL(F), .B_IWL(W_IWL), .B_FWL(F), .Y_IWL(SI), .Y_FWL(F))
    u_d_m2 (.clk(clk), .a(C2), .b(omega), .y(d_m2));
  fxp_mul_node #(.A_IWL(0), .A_FWL(F), .B_IWL(V_IWL), .B_FWL(F), .Y_IWL(SI), .Y_FWL(F))
    u_d_m3 (.clk(clk), .a(C3), .b(vd), .y(d_m3));
  fxp_addsub_node #(.A_IWL(I_IWL), .A_FWL(F), .B_IWL(I_IWL), .B_FWL(F), .Y_IWL(IP_IWL), .Y_FWL(F), .SUB(1'b1))
    u_d_a1 (.clk(clk), .a(id_n), .b(d_m1), .y(d_a1));
  fxp_mul_node #(.A_IWL(SI), .A_FWL(F), .B_IWL(I_IWL), .B_FWL(F), .Y_IWL(SI), .Y_FWL(F))
    u_d_m4 (.clk(clk), .a(d_m2), .b(iq_n), .y(d_m4));
  fxp_addsub_node #(.A_IWL(IP_IWL), .A_FWL(F), .B_IWL(SI), .B_FWL(F), .Y_IWL(IP_IWL), .Y_FWL(F), .SUB(1'b0))
    u_d_a2 (.clk(clk), .a(d_a1), .b(d_m4), .y(d_a2));
  fxp_addsub_node #(.A_IWL(IP_IWL), .A_FWL(F), .B_IWL(SI), .B_FWL(F), .Y_IWL(IP_IWL), .Y_FWL(F), .SUB(1'b0))
    u_d_a3 (.clk(clk), .a(d_a2), .b(d_m3), .y(id_p));

  // ------------------------------------------------------------- q axis
  logic signed [I_IWL+F:0]  q_m1;   // C4*Iq
  logic signed [SI+F:0]     q_m2;   // C5*w
  logic signed [SI+F:0]     q_m3;   // C6*Vq
  logic signed [SI+F:0]     q_m4;   // C7*w
  logic signed [IP_IWL+F:0] q_a1;   // Iq - C4*Iq
  logic signed [SI+F:0]     q_m5;   // (C5*w)*Id
  logic signed [IP_IWL+F:0] q_a2;   // .. - C5*w*Id
  logic signed [IP_IWL+F:0] q_a3;   // .. + C6*Vq

  fxp_mul_node #(.A_IWL(0), .A_FWL(F), .B_IWL(I_IWL), .B_FWL(F), .Y_IWL(I_IWL), .Y_FWL(F))
    u_q_m1 (.clk(clk), .a(C4), .b(iq_n), .y(q_m1));
  fxp_mul_node #(.A_IWL(0), .A_FWL(F), .B_IWL(W_IWL), .B_FWL(F), .Y_IWL(SI), .Y_FWL(F))
    u_q_m2 (.clk(clk), .a(C5), .b(omega), .y(q_m2));
  fxp_mul_node #(.A_IWL(0), .A_FWL(F), .B_IWL(V_IWL), .B_FWL(F), .Y_IWL(SI), .Y_FWL(F))
    u_q_m3 (.clk(clk), .a(C6), .b(vq), .y(q_m3));
  fxp_mul_node #(.A_IWL(0), .A_FWL(F), .B_IWL(W_IWL), .B_FWL(F), .Y_IWL(SI), .Y_FWL(F))
    u_q_m4 (.clk(clk), .a(C7), .b(omega), .y(q_m4));
  fxp_addsub_node #(.A_IWL(I_IWL), .A_FWL(F), .B_IWL(I_IWL), .B_FWL(F), .Y_IWL(IP_IWL), .Y_FWL(F), .SUB(1'b1))
    u_q_a1 (.clk(clk), .a(iq_n), .b(q_m1), .y(q_a1));
  fxp_mul_node #(.A_IWL(SI), .A_FWL(F), .B_IWL(I_IWL), .B_FWL(F), .Y_IWL(SI), .Y_FWL(F))
    u_q_m5 (.clk(clk), .a(q_m2), .b(id_n), .y(q_m5));
  fxp_addsub_node #(.A_IWL(IP_IWL), .A_FWL(F), .B_IWL(SI), .B_FWL(F), .Y_IWL(IP_IWL), .Y_FWL(F), .SUB(1'b1))
    u_q_a2 (.clk(clk), .a(q_a1), .b(q_m5), .y(q_a2));
  fxp_addsub_node #(.A_IWL(IP_IWL), .A_FWL(F), .B_IWL(SI), .B_FWL(F), .Y_IWL(IP_IWL), .Y_FWL(F), .SUB(1'b0))
    u_q_a3 (.clk(clk), .a(q_a2), .b(q_m3), .y(q_a3));
  fxp_addsub_node #(.A_IWL(IP_IWL), .A_FWL(F), .B_IWL(SI), .B_FWL(F), .Y_IWL(IP_IWL), .Y_FWL(F), .SUB(1'b1))
    u_q_a4 (.clk(clk), .a(q_a3), .b(q_m4), .y(iq_p));

endmodule
