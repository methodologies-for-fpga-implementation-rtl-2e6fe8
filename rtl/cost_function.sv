// cost_function - cost of one predicted current vector.
//
//   cost = |Id_target - Id_pred| + |Iq_target - Iq_pred|
//
// The sum of absolute deviations from the target currents; the inverter
// state with the smallest cost is the one the controller applies.
//
// How it works: two subtractions, two absolute values and an addition in one
// combinational step, registered. Targets are Q4.16, predictions Q5.16, the
// cost Q7.16 (never negative, no overflow for these input widths).
//
// Timing: one clock; cost and out_valid follow id_p/iq_p and in_valid by
// exactly one clock. The formula, the 16-bit FWL and the single clock follow
// the controller this was built from; the valid flag is this design's.
module cost_function
  import fcs_mpc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [I_W-1:0]    id_target,  // Q4.16 A
  input  logic signed [I_W-1:0]    iq_target,  // Q4.16 A
  input  logic signed [IP_W-1:0]   id_p,       // Q5.16 A
  input  logic signed [IP_W-1:0]   iq_p,       // Q5.16 A
  output logic                     out_valid,
  output logic        [COST_W-1:0] cost        // Q7.16, unsigned
);
  localparam int unsigned EW = IP_W + 1;   // Q6.16 difference

  logic signed [EW-1:0] ed, eq;
  logic        [EW-1:0] ad, aq;

  always_comb begin
    ed = EW'(id_target) - EW'(id_p);
    eq = EW'(iq_target) - EW'(iq_p);
    ad = ed[EW-1] ? EW'(-ed) : EW'(ed);
    aq = eq[EW-1] ? EW'(-eq) : EW'(eq);
  end

  always_ff @(posedge clk) begin
    cost <= COST_W'(ad) + COST_W'(aq);
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

endmodule
