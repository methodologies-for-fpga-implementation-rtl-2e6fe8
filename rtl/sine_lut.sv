// sine_lut - sine table and the six-value lookup for the dq transform.
//
// One full period of (2/3)*sin is stored in N = 16000 words of Q0.15 (one
// entry per step of the electrical angle theta from incremental_decoder).
// Entry i holds trunc( (2/3) * sin(2*pi*(i + 1/2)/N) * 2^15 ): the half-entry
// offset makes the table answer for the middle of each angle step, so
// looking up theta rounds to the nearest step instead of down. The table is
// computed at elaboration, no data file is needed.
//
// How it works: the table is one dual-port memory with two synchronous read
// ports. After start, three clocks issue three address pairs: port A reads
// the sines and port B the cosines (sin at +N/4) of theta, theta - N/3 and
// theta + N/3, all modulo N. N is not divisible by 3, so N/3 is rounded to
// 5333 entries.
//
// Timing: start is a one-clock pulse with theta valid in the same clock.
// The three reads are issued in that clock and the two after it; the memory
// output is registered, so done pulses, with trig complete, 4 clocks after
// start, and trig then holds until the next lookup. The table size, word format, 2/3 scaling, dual-port memory and
// the three-clock lookup follow the controller this was built from.
module sine_lut
  import fcs_mpc_pkg::*;
#(
  parameter int unsigned N = THETA_N
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [THETA_W-1:0] theta,   // 0 .. N-1
  output logic               done,
  output trig_t              trig
);
  localparam int unsigned AW      = $clog2(N);
  localparam int unsigned QUARTER = N / 4;
  localparam int unsigned THIRD   = (N + 1) / 3;   // rounded N/3
  localparam real         PI      = 3.14159265358979323846;

  logic signed [SIN_W-1:0] rom [N];

  initial begin
    for (int i = 0; i < int'(N); i++)
      rom[i] = SIN_W'($rtoi((2.0 / 3.0) * $sin(2.0 * PI * (real'(i) + 0.5) / real'(N))
                            * (2.0 ** SIN_FWL)));
  end

  // address modulo N of base + off, base < N, off < N
  function automatic logic [AW-1:0] wrap(logic [AW-1:0] base, int unsigned off);
    logic [AW:0] s;
    s = {1'b0, base} + (AW+1)'(off);
    if (s >= (AW+1)'(N)) s = s - (AW+1)'(N);
    return s[AW-1:0];
  endfunction

  logic [AW-1:0]           th;        // theta held for reads 1 and 2
  logic [AW-1:0]           base;
  logic [1:0]              step;      // next read while busy: 1 or 2
  logic                    busy;
  logic [1:0]              rstep;     // read issued this clock
  logic [1:0]              rd_step;   // read whose data is on the ports
  logic                    rd_vld;
  logic [AW-1:0]           addr_a, addr_b;
  logic signed [SIN_W-1:0] q_a, q_b;

  assign base  = start ? AW'(theta) : th;
  assign rstep = start ? 2'd0 : step;

  always_comb begin
    unique case (rstep)
      2'd0:    begin addr_a = base;                  addr_b = wrap(base, QUARTER); end
      2'd1:    begin addr_a = wrap(base, N - THIRD); addr_b = wrap(base, QUARTER + N - THIRD); end
      default: begin addr_a = wrap(base, THIRD);     addr_b = wrap(base, QUARTER + THIRD); end
    endcase
  end

  // the memory: two synchronous read ports
  always_ff @(posedge clk) begin
    q_a <= rom[addr_a];
    q_b <= rom[addr_b];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      step    <= 2'd1;
      rd_vld  <= 1'b0;
      rd_step <= '0;
      th      <= '0;
    end else begin
      rd_vld  <= start || busy;
      rd_step <= rstep;
      if (start) begin
        th   <= AW'(theta);
        busy <= 1'b1;
        step <= 2'd1;
      end else if (busy) begin
        if (step == 2'd2) busy <= 1'b0;
        step <= step + 2'd1;
      end
    end
  end

  // collect the three pairs as they come out of the ports
  always_ff @(posedge clk) begin
    if (rst) begin
      done <= 1'b0;
      trig <= '0;
    end else begin
      done <= 1'b0;
      if (rd_vld) begin
        unique case (rd_step)
          2'd0:    begin trig.sin0 <= q_a; trig.cos0 <= q_b; end
          2'd1:    begin trig.sinm <= q_a; trig.cosm <= q_b; end
          default: begin trig.sinp <= q_a; trig.cosp <= q_b; done <= 1'b1; end
        endcase
      end
    end
  end

endmodule
