// fcs_mpc_fsm - control-cycle sequencer of the finite-control-set MPC.
//
// Once every control period (CLK_HZ / FS_HZ clocks) the controller samples
// the sensors, predicts the next-step dq currents for each of the eight
// inverter switch states, scores each prediction with the cost function and
// applies the state with the lowest cost. There is no delay compensation:
// the decision is made within about 2 us of the current sample and applied
// at once.
//
// Sequence of one control cycle:
//   IDLE     wait for the period tick; sample theta and omega, start the ADC
//            conversion and the six-value sine lookup for theta
//   WAIT_ADC wait for the three phase currents; if the angle is not yet
//            valid (no index pulse seen) or the ADC failed, skip this cycle
//   COMPUTE  a clock counter c drives one shared abc->dq unit (3 stages),
//            the motor model (5 stages) and the cost function (1 stage):
//              c = 0        currents into the transform
//              c = 3        Id(n), Iq(n) held; vector 0 into the transform
//              c = 3 + 8k   voltage vector k (k = 0..7) into the transform
//              c = 6 + 8k   its Vd, Vq reach the model (held 5 clocks)
//              c = 11 + 8k  prediction k into the cost function
//              c = 12 + 8k  cost k ranked against the best so far
//            so the cost of the last state arrives at c = 68; the cost
//            stage of one vector overlaps the transform of the next
//   DECIDE   sel_valid pulses with the state of minimum cost (the lowest
//            index wins a tie)
// Switch state k = {a,b,c} puts Vdc = 300 V on each phase whose bit is 1 and
// 0 V on the others.
//
// The sequence of Figure-style steps (sample, transform the currents,
// transform/predict/score each of 8 states, find the minimum, update the
// gates), the 68-clock schedule and the timing of the ADC by this block
// follow the controller this was built from. The skip rule, the tie rule,
// the saturation of the transform outputs to the model's input formats and
// the status outputs are this design's choices.
module fcs_mpc_fsm
  import fcs_mpc_pkg::*;
#(
  parameter int unsigned FS_HZ  = 10_000,
  parameter int unsigned PERIOD = CLK_HZ / FS_HZ   // clocks per control cycle
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   enable,
  // sensors
  input  logic [THETA_W-1:0]     theta,
  input  logic                   theta_valid,
  input  logic signed [W_W-1:0]  omega_in,
  output logic                   adc_start,
  input  logic                   adc_done,
  input  logic                   adc_err,
  input  abc_t                   i_abc,
  // sine table
  output logic                   lut_start,
  output logic [THETA_W-1:0]     lut_theta,
  input  logic                   lut_done,
  // abc->dq transform
  output logic                   cp_valid,
  output abc_t                   cp_x,
  input  logic signed [DQ_W-1:0] cp_d,
  input  logic signed [DQ_W-1:0] cp_q,
  // motor model inputs
  output logic signed [I_W-1:0]  id_n,
  output logic signed [I_W-1:0]  iq_n,
  output logic signed [V_W-1:0]  vd,
  output logic signed [V_W-1:0]  vq,
  output logic signed [W_W-1:0]  omega,
  // cost function
  output logic                   cost_in_valid,
  input  logic                   cost_valid,
  input  logic [COST_W-1:0]      cost,
  // decision
  output logic                   sel_valid,
  output sw_state_t              sel_state,
  output logic [COST_W-1:0]      sel_cost,
  // status
  output logic [6:0]             last_compute_cycles,  // c at the last cost
  output logic                   overrun,              // tick while busy (sticky)
  output logic [15:0]            skipped               // cycles without decision
);
  typedef enum logic [2:0] {S_IDLE, S_WAIT_ADC, S_COMPUTE, S_DECIDE} state_e;

  localparam int unsigned PCW = $clog2(PERIOD);
  localparam int unsigned C_LAST = 3 + 8 * N_STATES + 1;   // 68
  localparam logic signed [PH_W-1:0] VDC_Q = PH_W'(to_fix(VDC, FWL));

  state_e                st;
  logic [PCW-1:0]        pcnt;
  logic                  tick;
  logic [6:0]            c;
  logic                  th_ok, lut_ok;
  abc_t                  i_hold;
  logic [2:0]            vec;        // vector in the transform
  logic [2:0]            rank_k;     // index of the next cost to arrive
  logic [COST_W-1:0]     best_cost;
  sw_state_t             best_k;

  // saturate a transform output to a narrower signed format
  function automatic logic signed [V_W-1:0] sat_v(logic signed [DQ_W-1:0] x);
    localparam logic signed [DQ_W-1:0] HI = DQ_W'((longint'(1) << (V_W - 1)) - 1);
    if (x > HI)       return V_W'(HI);
    else if (x < -HI) return V_W'(-HI);
    else              return V_W'(x);
  endfunction
  function automatic logic signed [I_W-1:0] sat_i(logic signed [DQ_W-1:0] x);
    localparam logic signed [DQ_W-1:0] HI = DQ_W'((longint'(1) << (I_W - 1)) - 1);
    if (x > HI)       return I_W'(HI);
    else if (x < -HI) return I_W'(-HI);
    else              return I_W'(x);
  endfunction

  // control period
  always_ff @(posedge clk) begin
    if (rst) pcnt <= '0;
    else     pcnt <= (pcnt == PCW'(PERIOD - 1)) ? '0 : pcnt + PCW'(1);
  end
  assign tick = (pcnt == PCW'(PERIOD - 1));

  // transform input: currents first, then the eight voltage vectors
  always_comb begin
    vec = 3'((c - 7'd3) >> 3);
    if (c < 7'd3) begin
      cp_x = i_hold;
    end else begin
      cp_x.a = vec[2] ? VDC_Q : '0;
      cp_x.b = vec[1] ? VDC_Q : '0;
      cp_x.c = vec[0] ? VDC_Q : '0;
    end
    cp_valid      = (st == S_COMPUTE) && (c == 7'd0 || (c >= 7'd3 && c < 7'd67 && ((c - 7'd3) & 7'd7) == 7'd0));
    cost_in_valid = (st == S_COMPUTE) && (c >= 7'd11) && (c < 7'd75) && (((c - 7'd11) & 7'd7) == 7'd0);
    vd            = sat_v(cp_d);
    vq            = sat_v(cp_q);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st                  <= S_IDLE;
      c                   <= '0;
      adc_start           <= 1'b0;
      lut_start           <= 1'b0;
      lut_theta           <= '0;
      th_ok               <= 1'b0;
      lut_ok              <= 1'b0;
      i_hold              <= '0;
      id_n                <= '0;
      iq_n                <= '0;
      omega               <= '0;
      rank_k              <= '0;
      best_cost           <= '0;
      best_k              <= '0;
      sel_valid           <= 1'b0;
      sel_state           <= '0;
      sel_cost            <= '0;
      last_compute_cycles <= '0;
      overrun             <= 1'b0;
      skipped             <= '0;
    end else begin
      adc_start <= 1'b0;
      lut_start <= 1'b0;
      sel_valid <= 1'b0;
      if (lut_done) lut_ok <= 1'b1;
      if (tick && st != S_IDLE) overrun <= 1'b1;

      unique case (st)
        S_IDLE: begin
          if (tick && enable) begin
            lut_theta <= theta;
            th_ok     <= theta_valid;
            omega     <= omega_in;
            lut_start <= 1'b1;
            lut_ok    <= 1'b0;
            adc_start <= 1'b1;
            st        <= S_WAIT_ADC;
          end
        end
        S_WAIT_ADC: begin
          if (adc_done) begin
            if (adc_err || !th_ok) begin
              skipped <= skipped + 16'd1;
              st      <= S_IDLE;
            end else begin
              i_hold <= i_abc;
              c      <= '0;
              rank_k <= '0;
              st     <= S_COMPUTE;
            end
          end
        end
        S_COMPUTE: begin
          // the ADC takes >= 1 us, far longer than the lookup; wait anyway
          if (c != 7'd0 || lut_ok) c <= c + 7'd1;
          if (c == 7'd3) begin
            id_n <= sat_i(cp_d);
            iq_n <= sat_i(cp_q);
          end
          if (cost_valid) begin
            rank_k <= rank_k + 3'd1;
            if (rank_k == 3'd0 || cost < best_cost) begin
              best_cost <= cost;
              best_k    <= rank_k;
            end
            if (rank_k == 3'(N_STATES - 1)) begin
              last_compute_cycles <= c;
              st                  <= S_DECIDE;
            end
          end
        end
        S_DECIDE: begin
          sel_valid <= 1'b1;
          sel_state <= best_k;
          sel_cost  <= best_cost;
          st        <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // the schedule puts the last cost exactly at c = 68
  a_schedule: assert property (@(posedge clk) disable iff (rst)
    (st == S_COMPUTE && cost_valid && rank_k == 3'(N_STATES - 1)) |-> (c == 7'(C_LAST)));

endmodule
