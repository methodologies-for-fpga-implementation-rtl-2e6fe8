// equation_example - word-length-optimised circuit for D = A x B + C.
//
// The small worked example of an equation circuit built from fixed-point
// nodes: input A is Q3.8, the constant B = 3.14159 is Q2.6, input C is Q4.6,
// the product node is Q6.7, the sum node and output D are Q6.6.
//
// How it works: the multiplication node drops one fractional bit of A
// (8 > 7), multiplies by B (6 fractional bits) and shifts the 13-fraction-bit
// product right by 6 to Q6.7. The addition node aligns the product to
// 6 fractional bits and adds C. Every node is followed by one register and
// nothing balances the paths, so D follows A by two clocks and C by one.
//
// Interface: input_a (12 bits), input_c (11 bits), output_d (13 bits), all
// signed. The node formats and the unbalanced one-register-per-node timing
// follow the example design. The constant is the Q2.6 encoding of 3.14159,
// truncated: 201 (3.140625).
module equation_example (
  input  logic               clk,
  input  logic signed [11:0] input_a,   // Q3.8
  input  logic signed [10:0] input_c,   // Q4.6
  output logic signed [12:0] output_d   // Q6.6
);
  import fcs_mpc_pkg::*;

  localparam logic signed [8:0] CONSTANT_B = 9'(to_fix(3.14159, 6));  // Q2.6

  logic signed [13:0] multiply_0;  // Q6.7

  fxp_mul_node #(
    .A_IWL(3), .A_FWL(8), .B_IWL(2), .B_FWL(6), .Y_IWL(6), .Y_FWL(7)
  ) u_mul (
    .clk(clk), .a(input_a), .b(CONSTANT_B), .y(multiply_0)
  );

  fxp_addsub_node #(
    .A_IWL(6), .A_FWL(7), .B_IWL(4), .B_FWL(6), .Y_IWL(6), .Y_FWL(6), .SUB(1'b0)
  ) u_add (
    .clk(clk), .a(multiply_0), .b(input_c), .y(output_d)
  );

endmodule
