// incremental_decoder - rotor angle and speed from a quadrature encoder.
//
// The encoder gives two square waves A and B, 90 degrees apart, and one
// index pulse Z per mechanical turn. Every edge of A or B moves a counter up
// or down; the order of the edges gives the direction (A leading B counts
// up). The counter is cleared on each rising edge of Z and wraps every
// EDGES_PER_ETURN edges, one electrical turn (64000 = 320000 edges per
// mechanical turn / 5 pole pairs). theta is the count divided by
// THETA_DIV (4), so it wraps at 16000 and addresses the sine table
// directly. theta is not valid until Z has been seen once.
//
// Speed: the signed number of edges in a window of WINDOW_CYCLES clocks
// (1 ms) is scaled to electrical rad/s,
//   omega = edges * 2*pi / EDGES_PER_ETURN / (WINDOW_CYCLES / CLK_HZ),
// in Q9.16 (resolution 0.098 rad/s, saturating) and updated at the end of
// each window.
//
// Timing: A, B and Z pass a two-flop synchroniser; a count reflects an edge
// 3 clocks after it. The edge counting with Z reset, the 64000/16000 wraps
// and speed by edge counting follow the controller this was built from; the
// window length, the direction convention and the speed format are this
// design's choices.
module incremental_decoder
  import fcs_mpc_pkg::*;
#(
  parameter int unsigned EDGES         = EDGES_PER_ETURN,
  parameter int unsigned THETA_DIV     = 4,
  parameter int unsigned WINDOW_CYCLES = 100_000
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  enc_a,
  input  logic                  enc_b,
  input  logic                  enc_z,
  output logic [THETA_W-1:0]    theta,
  output logic                  theta_valid,
  output logic                  forward,      // last edge counted up
  output logic signed [W_W-1:0] omega,        // Q9.16 electrical rad/s
  output logic                  omega_valid   // one clock, new omega
);
  localparam int unsigned CW  = $clog2(EDGES);
  localparam int unsigned WCW = $clog2(WINDOW_CYCLES);
  localparam int unsigned AW  = WCW + 2;        // signed edge accumulator
  localparam real         PI  = 3.14159265358979323846;
  localparam int unsigned KW  = 40;
  // Q.16 scale from edges per window to rad/s, rounded
  localparam logic [KW-1:0] K = KW'(longint'(2.0 * PI / real'(EDGES)
                                  * real'(CLK_HZ) / real'(WINDOW_CYCLES)
                                  * (2.0 ** FWL)));
  localparam int unsigned PW  = AW + KW + 1;
  localparam logic signed [PW-1:0] WMAX = PW'((longint'(1) << (W_W - 1)) - 1);

  logic [2:0] sa, sb, sz;   // synchronisers plus one history flop
  logic       up, down, z_rise;
  logic [CW-1:0]        cnt;
  logic [WCW-1:0]       wcnt;
  logic signed [AW-1:0] acc;
  logic signed [PW-1:0] prod;

  always_ff @(posedge clk) begin
    sa <= {sa[1:0], enc_a};
    sb <= {sb[1:0], enc_b};
    sz <= {sz[1:0], enc_z};
  end

  // prev = {sa[2], sb[2]}, cur = {sa[1], sb[1]}; forward: 00-10-11-01-00
  always_comb begin
    up = 1'b0;
    down = 1'b0;
    unique case ({sa[2], sb[2], sa[1], sb[1]})
      4'b00_10, 4'b10_11, 4'b11_01, 4'b01_00: up   = 1'b1;
      4'b00_01, 4'b01_11, 4'b11_10, 4'b10_00: down = 1'b1;
      default: ;  // no edge, or both changed (not countable)
    endcase
    z_rise = sz[1] && !sz[2];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt         <= '0;
      theta_valid <= 1'b0;
      forward     <= 1'b1;
    end else begin
      if (up)   forward <= 1'b1;
      if (down) forward <= 1'b0;
      if (z_rise) begin
        cnt         <= '0;
        theta_valid <= 1'b1;
      end else if (up) begin
        cnt <= (cnt == CW'(EDGES - 1)) ? '0 : cnt + CW'(1);
      end else if (down) begin
        cnt <= (cnt == '0) ? CW'(EDGES - 1) : cnt - CW'(1);
      end
    end
  end

  assign theta = THETA_W'(cnt / CW'(THETA_DIV));

  // speed by counting edges in a fixed window
  always_comb prod = PW'(acc) * PW'($signed({1'b0, K}));

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt        <= '0;
      acc         <= '0;
      omega       <= '0;
      omega_valid <= 1'b0;
    end else begin
      omega_valid <= 1'b0;
      if (wcnt == WCW'(WINDOW_CYCLES - 1)) begin
        wcnt        <= '0;
        acc         <= up ? AW'(1) : (down ? -AW'(1) : '0);
        omega_valid <= 1'b1;
        if (prod > WMAX)       omega <= W_W'(WMAX);
        else if (prod < -WMAX) omega <= W_W'(-WMAX);
        else                   omega <= W_W'(prod);
      end else begin
        wcnt <= wcnt + WCW'(1);
        acc  <= acc + (up ? AW'(1) : (down ? -AW'(1) : '0));
      end
    end
  end

endmodule
