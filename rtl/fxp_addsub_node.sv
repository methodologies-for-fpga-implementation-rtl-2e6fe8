// fxp_addsub_node - registered fixed-point addition or subtraction node.
//
// One addition (SUB = 0) or subtraction (SUB = 1, y = a - b) of a
// word-length-optimised equation circuit. Operand a is Q(A_IWL).(A_FWL),
// operand b is Q(B_IWL).(B_FWL), the result y is Q(Y_IWL).(Y_FWL).
//
// How it works, in three steps:
//   1. Pre-shift: both operands are brought to the output FWL to align the
//      radix points, by an arithmetic right shift (dropping LSBs) when the
//      operand has more fractional bits, by a left shift when it has fewer.
//   2. Operate: add or subtract at full width; the raw result has one more
//      integer bit than the wider operand.
//   3. Truncate MSBs down to Y_IWL. This wraps if the range analysis that
//      chose Y_IWL was wrong, so Y_IWL must cover the result's range.
//
// Timing: one register after the node, so y follows a and b by one clock.
// The three-stage structure follows the arithmetic model the design was
// built from; dropped LSBs round toward minus infinity (plain truncation).
module fxp_addsub_node #(
  parameter int unsigned A_IWL = 2,
  parameter int unsigned A_FWL = 5,
  parameter int unsigned B_IWL = 3,
  parameter int unsigned B_FWL = 7,
  parameter int unsigned Y_IWL = 3,
  parameter int unsigned Y_FWL = 6,
  parameter bit          SUB   = 1'b0
) (
  input  logic                          clk,
  input  logic signed [A_IWL+A_FWL:0]   a,
  input  logic signed [B_IWL+B_FWL:0]   b,
  output logic signed [Y_IWL+Y_FWL:0]   y
);
  localparam int unsigned YW  = Y_IWL + Y_FWL + 1;
  localparam int unsigned MI  = (A_IWL > B_IWL) ? A_IWL : B_IWL;
  // working width: widest integer part + one carry bit, output fraction, sign
  localparam int unsigned XW  = MI + Y_FWL + 3 + ((A_FWL > Y_FWL) ? A_FWL - Y_FWL : 0)
                                             + ((B_FWL > Y_FWL) ? B_FWL - Y_FWL : 0);
  localparam int unsigned ASL = (Y_FWL > A_FWL) ? Y_FWL - A_FWL : 0;
  localparam int unsigned ASR = (A_FWL > Y_FWL) ? A_FWL - Y_FWL : 0;
  localparam int unsigned BSL = (Y_FWL > B_FWL) ? Y_FWL - B_FWL : 0;
  localparam int unsigned BSR = (B_FWL > Y_FWL) ? B_FWL - Y_FWL : 0;

  logic signed [XW-1:0] a_al, b_al, res;

  always_comb begin
    a_al = (XW'(a) <<< ASL) >>> ASR;
    b_al = (XW'(b) <<< BSL) >>> BSR;
    res  = SUB ? (a_al - b_al) : (a_al + b_al);
  end

  always_ff @(posedge clk) y <= res[YW-1:0];

endmodule
