// quad_encoder_model - behavioural model of an incremental encoder.
//
// Behavioural model for testbenches, not synthesizable logic of the design.
// The shaft position is given as a signed count of A/B edges (four per
// encoder line). A and B follow the quadrature sequence 00, 10, 11, 01
// (A leading B) as the position counts up; Z is high while the position
// modulo EDGES_PER_REV is 0, one quarter of a line per revolution.
module quad_encoder_model #(
  parameter longint EDGES_PER_REV = 320_000
) (
  input  longint pos,
  output logic   a,
  output logic   b,
  output logic   z
);
  longint q, r;
  always_comb begin
    q = pos % 4;
    if (q < 0) q += 4;
    r = pos % EDGES_PER_REV;
    if (r < 0) r += EDGES_PER_REV;
    a = (q == 1) || (q == 2);
    b = (q == 2) || (q == 3);
    z = (r == 0);
  end
endmodule
