// max11047_model - behavioural model of a 4-channel simultaneous-sampling
// 16-bit ADC with a parallel bus (MAX11047 class).
//
// Behavioural model for testbenches, not synthesizable logic of the design.
// A rising edge of convst samples all four channel inputs at once; after
// T_CONV_NS the model pulls eoc_n low. With cs_n low, each falling edge of
// rd_n puts the next channel (0, 1, 2, 3, then 0 again) on db; eoc_n
// returns high on the first read. Channel values are given as codes; the
// testbench maps its currents to codes. db holds its last value otherwise.
module max11047_model #(
  parameter int unsigned T_CONV_NS = 1000
) (
  input  logic        convst,
  input  logic [15:0] ch_in [4],
  output logic        eoc_n,
  input  logic        cs_n,
  input  logic        rd_n,
  output logic [15:0] db
);
  logic [15:0] held [4];
  int          next_ch;
  int          conversions;

  initial begin
    eoc_n       = 1'b1;
    db          = '0;
    next_ch     = 0;
    conversions = 0;
    for (int k = 0; k < 4; k++) held[k] = '0;
  end

  always @(posedge convst) begin
    held = ch_in;
    eoc_n = 1'b1;
    next_ch = 0;
    conversions++;
    #(T_CONV_NS * 1ns);
    eoc_n = 1'b0;
  end

  always @(negedge rd_n) begin
    if (!cs_n) begin
      db      = held[next_ch];
      next_ch = (next_ch + 1) % 4;
      eoc_n   = 1'b1;
    end
  end
endmodule
