// fxp_mul_node - registered fixed-point multiplication node.
//
// One multiplication of a word-length-optimised equation circuit. Operand a
// is Q(A_IWL).(A_FWL), operand b is Q(B_IWL).(B_FWL) and the result y is
// Q(Y_IWL).(Y_FWL), each with one sign bit on top.
//
// How it works, in three steps:
//   1. Pre-shift: an operand whose FWL exceeds the output FWL is shifted
//      right arithmetically down to the output FWL, so the multiplier is no
//      wider than the result needs. Operands with a smaller FWL are left
//      alone; a multiplication needs no radix alignment.
//   2. Multiply: the full product of the two (pre-shifted) operands.
//   3. Truncate: the product's LSBs are dropped (or zero bits appended) to
//      reach Y_FWL and its MSBs are dropped to reach Y_IWL.
// Dropping LSBs of a two's-complement word rounds toward minus infinity.
// Dropping MSBs wraps; the word lengths must be chosen from a range analysis
// so that it never happens.
//
// Timing: one register after the node, so y follows a and b by one clock.
// The node structure (pre-shift only when the operand FWL is larger, then
// LSB/MSB truncation, one output register) follows the arithmetic model the
// design was built from; the rounding of the dropped LSBs is the plain
// truncation of an arithmetic shift.
module fxp_mul_node #(
  parameter int unsigned A_IWL = 3,
  parameter int unsigned A_FWL = 7,
  parameter int unsigned B_IWL = 2,
  parameter int unsigned B_FWL = 5,
  parameter int unsigned Y_IWL = 3,
  parameter int unsigned Y_FWL = 6
) (
  input  logic                          clk,
  input  logic signed [A_IWL+A_FWL:0]   a,
  input  logic signed [B_IWL+B_FWL:0]   b,
  output logic signed [Y_IWL+Y_FWL:0]   y
);
  localparam int unsigned AW  = A_IWL + A_FWL + 1;
  localparam int unsigned BW  = B_IWL + B_FWL + 1;
  localparam int unsigned YW  = Y_IWL + Y_FWL + 1;
  // pre-shift amounts
  localparam int unsigned AS  = (A_FWL > Y_FWL) ? A_FWL - Y_FWL : 0;
  localparam int unsigned BS  = (B_FWL > Y_FWL) ? B_FWL - Y_FWL : 0;
  localparam int unsigned AW2 = AW - AS;
  localparam int unsigned BW2 = BW - BS;
  // product format
  localparam int unsigned PW  = AW2 + BW2;
  localparam int unsigned PF  = (A_FWL - AS) + (B_FWL - BS);
  localparam int unsigned SHR = (PF > Y_FWL) ? PF - Y_FWL : 0;
  localparam int unsigned SHL = (Y_FWL > PF) ? Y_FWL - PF : 0;
  localparam int unsigned XW  = PW + SHL + 1;

  logic signed [AW-1:0]  a_sh;
  logic signed [BW-1:0]  b_sh;
  logic signed [AW2-1:0] a_ps;
  logic signed [BW2-1:0] b_ps;
  logic signed [PW-1:0]  prod;
  logic signed [XW-1:0]  prod_x;
  logic signed [XW-1:0]  aligned;

  always_comb begin
    a_sh    = a >>> AS;
    b_sh    = b >>> BS;
    a_ps    = a_sh[AW2-1:0];
    b_ps    = b_sh[BW2-1:0];
    prod    = PW'(a_ps) * PW'(b_ps);
    prod_x  = XW'(prod);
    aligned = (prod_x <<< SHL) >>> SHR;
  end

  always_ff @(posedge clk) y <= aligned[YW-1:0];

endmodule
