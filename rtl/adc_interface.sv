// adc_interface - controls the simultaneous-sampling current ADC.
//
// The three phase currents are measured by a 4-channel, 16-bit ADC with one
// sample-and-hold per channel (MAX11047 class, parallel data bus). The
// controller's state machine decides when a sample is taken, so the delay
// from sampling to the new gate state is the same in every control cycle.
//
// How it works: between conversions convst is low and the track-and-hold
// circuits follow their inputs. A start pulse drives convst high, which
// holds all channels at once and starts the conversion (about 1 us). The
// ADC pulls eoc_n low when it is done; the block then reads channels 0, 1
// and 2 (phases a, b, c) with three rd_n strobes under cs_n, each low for
// RD_LOW clocks with the data taken at its end and high for RD_HIGH clocks.
// Each 0..65535 code (0..5 V) is turned into amperes as
//   i = (code - OFFSET) * LSB_Q16      (Q9.16)
// where LSB_Q16 = 200 is exactly 5 V / 2^16 / 25 mV/A = 3.052 mA in Q.16 and
// OFFSET = 32768 puts 0 A at mid-scale.
//
// Timing: done pulses for one clock with i_abc and code valid after the
// third read; if eoc_n does not fall within TIMEOUT clocks done pulses with
// err set. The ADC part, its 1 us conversion, the simultaneous sampling and
// the 25 mV/A, 0..5 V, 16-bit scaling follow the controller this was built
// from; the bus sequence, strobe widths, mid-scale offset and timeout are
// this design's choices.
module adc_interface
  import fcs_mpc_pkg::*;
#(
  parameter int unsigned RD_LOW   = 4,       // clocks
  parameter int unsigned RD_HIGH  = 2,       // clocks
  parameter int unsigned TIMEOUT  = 1000,    // clocks, 10 us
  parameter int unsigned OFFSET   = 32768,
  parameter int unsigned LSB_Q16  = 200
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  output logic        done,
  output logic        err,
  output logic [15:0] code [3],
  output abc_t        i_abc,
  // ADC pins
  output logic        adc_convst,
  input  logic        adc_eoc_n,
  output logic        adc_cs_n,
  output logic        adc_rd_n,
  input  logic [15:0] adc_db
);
  typedef enum logic [2:0] {S_TRACK, S_CONVERT, S_RD_LOW, S_RD_HIGH, S_DONE} state_e;

  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  state_e        st;
  logic [TW-1:0] tcnt;
  logic [1:0]    ch;
  logic [15:0]   raw [3];

  function automatic logic signed [PH_W-1:0] to_amps(logic [15:0] c);
    logic signed [17:0] centred;
    centred = $signed({2'b00, c}) - $signed(18'(OFFSET));
    return PH_W'(centred * $signed({1'b0, 16'(LSB_Q16)}));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= S_TRACK;
      tcnt       <= '0;
      ch         <= '0;
      adc_convst <= 1'b0;
      adc_cs_n   <= 1'b1;
      adc_rd_n   <= 1'b1;
      done       <= 1'b0;
      err        <= 1'b0;
      for (int k = 0; k < 3; k++) raw[k] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_TRACK: begin
          if (start) begin
            adc_convst <= 1'b1;      // hold and convert
            tcnt       <= '0;
            err        <= 1'b0;
            st         <= S_CONVERT;
          end
        end
        S_CONVERT: begin
          tcnt <= tcnt + TW'(1);
          if (!adc_eoc_n) begin
            ch       <= '0;
            tcnt     <= '0;
            adc_cs_n <= 1'b0;
            adc_rd_n <= 1'b0;
            st       <= S_RD_LOW;
          end else if (tcnt == TW'(TIMEOUT)) begin
            err <= 1'b1;
            st  <= S_DONE;
          end
        end
        S_RD_LOW: begin
          tcnt <= tcnt + TW'(1);
          if (tcnt == TW'(RD_LOW - 1)) begin
            raw[ch]  <= adc_db;
            adc_rd_n <= 1'b1;
            tcnt     <= '0;
            st       <= S_RD_HIGH;
          end
        end
        S_RD_HIGH: begin
          tcnt <= tcnt + TW'(1);
          if (tcnt == TW'(RD_HIGH - 1)) begin
            tcnt <= '0;
            if (ch == 2'd2) begin
              st <= S_DONE;
            end else begin
              ch       <= ch + 2'd1;
              adc_rd_n <= 1'b0;
              st       <= S_RD_LOW;
            end
          end
        end
        S_DONE: begin
          adc_cs_n   <= 1'b1;
          adc_convst <= 1'b0;        // back to tracking
          done       <= 1'b1;
          st         <= S_TRACK;
        end
        default: st <= S_TRACK;
      endcase
    end
  end

  always_comb begin
    code    = raw;
    i_abc.a = to_amps(raw[0]);
    i_abc.b = to_amps(raw[1]);
    i_abc.c = to_amps(raw[2]);
  end

endmodule
