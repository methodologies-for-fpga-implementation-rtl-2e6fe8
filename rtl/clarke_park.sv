// clarke_park - abc to dq transform (Clarke and Park in one step).
//
//   d =  2/3 * ( a*cos(th) + b*cos(th - 2pi/3) + c*cos(th + 2pi/3) )
//   q = -2/3 * ( a*sin(th) + b*sin(th - 2pi/3) + c*sin(th + 2pi/3) )
//
// The factor 2/3 is already folded into the six table values (trig_t, Q0.15
// from sine_lut), so the transform is six multiplications and two
// three-term sums. The same unit converts the sampled phase currents and
// each of the eight inverter voltage vectors.
//
// How it works, 3 register stages, a new input accepted every clock:
//   1. six products phase x table value, truncated from Q9.31 to Q10.16
//   2. d: a- and b-terms added, c-term carried; q likewise
//   3. d = ab + c, q = -ab - c
// Phase inputs are Q9.16 (covers +/-10 A and 0..300 V), outputs Q10.16
// (the transform of 0..300 V stays within +/-600). All intermediate values
// keep 16 fractional bits, as in the controller this was built from.
//
// Interface: in_valid/out_valid mark a transform moving through the three
// stages; out_valid rises exactly 3 clocks after in_valid.
module clarke_park
  import fcs_mpc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  abc_t                   x,       // Q9.16 phase values
  input  trig_t                  trig,    // Q0.15, pre-scaled by 2/3
  output logic                   out_valid,
  output logic signed [DQ_W-1:0] d,       // Q10.16
  output logic signed [DQ_W-1:0] q        // Q10.16
);
  localparam int unsigned PW = PH_W + SIN_W;

  function automatic logic signed [DQ_W-1:0] mul_trig(logic signed [PH_W-1:0] v,
                                                      logic signed [SIN_W-1:0] s);
    logic signed [PW-1:0] p;
    p = PW'(v) * PW'(s);
    return DQ_W'(p >>> SIN_FWL);
  endfunction

  logic signed [DQ_W-1:0] pa_c, pb_c, pc_c, pa_s, pb_s, pc_s;  // stage 1
  logic signed [DQ_W-1:0] d_ab, d_c, q_ab, q_c;                // stage 2
  logic [2:0]             vld;

  always_ff @(posedge clk) begin
    // stage 1
    pa_c <= mul_trig(x.a, trig.cos0);
    pb_c <= mul_trig(x.b, trig.cosm);
    pc_c <= mul_trig(x.c, trig.cosp);
    pa_s <= mul_trig(x.a, trig.sin0);
    pb_s <= mul_trig(x.b, trig.sinm);
    pc_s <= mul_trig(x.c, trig.sinp);
    // stage 2
    d_ab <= pa_c + pb_c;
    d_c  <= pc_c;
    q_ab <= pa_s + pb_s;
    q_c  <= pc_s;
    // stage 3
    d    <= d_ab + d_c;
    q    <= -q_ab - q_c;
  end

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[1:0], in_valid};
  end
  assign out_valid = vld[2];

endmodule
