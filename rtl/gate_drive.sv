// gate_drive - inverter gate signals with deadtime and overcurrent trip.
//
// Turns the switch state chosen by the controller ({a,b,c}, 1 = upper switch
// of that leg on) into the six gate signals of the three-leg inverter. When
// a leg's commanded state changes, both of its switches are held off for
// DEADTIME clocks before the new switch is turned on, so the two switches of
// a leg never conduct together. Legs whose state does not change are not
// disturbed.
//
// Overcurrent protection: if the magnitude of any sampled phase current
// exceeds OC_LIMIT the block trips: all six gates go off at once and stay
// off until fault_clear. While enable is low all gates are off as well.
// After a trip or a disable every leg goes through a deadtime before it
// switches on again.
//
// Timing: state is taken when state_valid is high; a changed leg turns its
// new switch on DEADTIME+1 clocks later, an unchanged leg is untouched.
// The 1 us deadtime (100 clocks at 100 MHz), the per-leg deadtime only on a
// change and the overcurrent disable follow the controller this was built
// from. The trip level (the motor's 9.4 A rated current, inside the
// +/-10 A measuring range), the latching and the clear input are this
// design's choices.
module gate_drive
  import fcs_mpc_pkg::*;
#(
  parameter int unsigned DEADTIME = 100,                      // clocks
  parameter longint      OC_LIMIT = longint'(9.4 * 65536.0)  // Q9.16 A
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      enable,
  input  logic      state_valid,
  input  sw_state_t state,
  input  logic      i_valid,       // new current sample
  input  abc_t      i_abc,         // Q9.16 A
  input  logic      fault_clear,
  output gates_t    gates,
  output logic      fault
);
  localparam int unsigned DW = $clog2(DEADTIME + 1);

  sw_state_t     applied;           // state each leg conducts when not dead
  logic [2:0]    dead;              // leg is in deadtime
  logic [DW-1:0] dcnt [3];
  logic          oc;

  function automatic logic over(logic signed [PH_W-1:0] i);
    return (i > PH_W'(OC_LIMIT)) || (i < -PH_W'(OC_LIMIT));
  endfunction

  assign oc = i_valid && (over(i_abc.a) || over(i_abc.b) || over(i_abc.c));

  always_ff @(posedge clk) begin
    if (rst) begin
      fault <= 1'b0;
    end else if (oc) begin
      fault <= 1'b1;
    end else if (fault_clear) begin
      fault <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      applied <= '0;
      dead    <= '1;
      for (int l = 0; l < 3; l++) dcnt[l] <= DW'(DEADTIME);
    end else begin
      for (int l = 0; l < 3; l++) begin
        if (!enable || fault || oc) begin
          // all off; restart with a full deadtime afterwards
          dead[l] <= 1'b1;
          dcnt[l] <= DW'(DEADTIME);
        end else if (state_valid && state[l] != applied[l]) begin
          dead[l]    <= 1'b1;
          dcnt[l]    <= DW'(DEADTIME);
          applied[l] <= state[l];
        end else if (dead[l]) begin
          if (dcnt[l] <= DW'(1)) dead[l] <= 1'b0;
          dcnt[l] <= dcnt[l] - DW'(1);
        end
        if ((!enable || fault || oc) && state_valid) applied[l] <= state[l];
      end
    end
  end

  always_comb begin
    gates.a_p = !dead[2] &&  applied[2];
    gates.a_n = !dead[2] && !applied[2];
    gates.b_p = !dead[1] &&  applied[1];
    gates.b_n = !dead[1] && !applied[1];
    gates.c_p = !dead[0] &&  applied[0];
    gates.c_n = !dead[0] && !applied[0];
  end

  // never both switches of one leg
  a_no_shoot_through: assert property (@(posedge clk) disable iff (rst)
    !(gates.a_p && gates.a_n) && !(gates.b_p && gates.b_n) && !(gates.c_p && gates.c_n));

endmodule
