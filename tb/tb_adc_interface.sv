// tb_adc_interface - self-checking test of the ADC controller.
//
// A behavioural ADC converts in 1 us. Random codes are put on channels 0-2
// (and a distractor on channel 3) before each start; the test checks that
// done comes once per start, that the three codes arrive in phase order,
// that the ampere values equal (code - 32768) * 200 in Q.16 (3.052 mA per
// code), that convst stays high for at least the 1 us conversion, and that
// the whole conversion plus readout takes a fixed number of clocks. A
// second ADC instance whose eoc_n is held high tests the timeout error.
module tb_adc_interface;
  import fcs_mpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst, start, done, err;
  logic [15:0] code [3];
  abc_t        i_abc;
  logic        convst, eoc_n, cs_n, rd_n;
  logic [15:0] db;
  logic [15:0] ch [4];

  max11047_model adc (.convst, .ch_in(ch), .eoc_n, .cs_n, .rd_n, .db);

  adc_interface dut (.clk, .rst, .start, .done, .err, .code, .i_abc,
    .adc_convst(convst), .adc_eoc_n(eoc_n), .adc_cs_n(cs_n), .adc_rd_n(rd_n), .adc_db(db));

  // timeout instance: eoc_n never falls
  logic        start2, done2, err2, cv2, cs2, rd2;
  logic [15:0] code2 [3];
  abc_t        i2;
  adc_interface #(.TIMEOUT(50)) dut2 (.clk, .rst, .start(start2), .done(done2), .err(err2),
    .code(code2), .i_abc(i2), .adc_convst(cv2), .adc_eoc_n(1'b1), .adc_cs_n(cs2),
    .adc_rd_n(rd2), .adc_db(16'h1234));

  function automatic longint amps_q16(logic [15:0] c);
    return (longint'(c) - 32768) * 200;
  endfunction

  int lat, first_lat, hi_cnt;
  always @(posedge clk) if (convst) hi_cnt++;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; start = 1'b0; start2 = 1'b0; hi_cnt = 0; first_lat = -1;
    for (int k = 0; k < 4; k++) ch[k] = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (4) @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      logic [15:0] e [3];
      for (int k = 0; k < 4; k++) ch[k] = 16'($urandom);
      if (n == 0) begin ch[0] = 16'd0; ch[1] = 16'd65535; ch[2] = 16'd32768; end
      e = '{ch[0], ch[1], ch[2]};
      hi_cnt = 0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      ch[0] = ~ch[0];     // must not matter: the sample is held
      lat = 1;
      while (!done && lat < 2000) begin @(negedge clk); lat++; end
      checks++;
      if (!done || err) begin failures++; $display("no done or err at %0d", n); continue; end
      if (first_lat < 0) first_lat = lat;
      checks++;
      if (lat != first_lat) begin failures++; $display("latency %0d vs %0d", lat, first_lat); end
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (code[k] !== e[k]) begin failures++; $display("ch%0d code %h expected %h", k, code[k], e[k]); end
      end
      checks += 3;
      if (longint'(i_abc.a) != amps_q16(e[0])) begin failures++; $display("ia %0d", i_abc.a); end
      if (longint'(i_abc.b) != amps_q16(e[1])) begin failures++; $display("ib %0d", i_abc.b); end
      if (longint'(i_abc.c) != amps_q16(e[2])) begin failures++; $display("ic %0d", i_abc.c); end
      checks++;
      if (hi_cnt < 100) begin failures++; $display("convst high only %0d clocks", hi_cnt); end
      @(negedge clk);
      checks++;
      if (done) begin failures++; $display("done longer than one clock"); end
      repeat ($urandom_range(3, 0)) @(negedge clk);
    end
    // latency: 1 us conversion plus three reads of RD_LOW + RD_HIGH clocks
    checks++;
    if (first_lat < 100 + 3 * 6 || first_lat > 100 + 3 * 6 + 6) begin
      failures++; $display("conversion latency %0d clocks", first_lat);
    end
    $display("conversion and readout: %0d clocks", first_lat);
    // timeout
    start2 = 1'b1;
    @(negedge clk);
    start2 = 1'b0;
    lat = 1;
    while (!done2 && lat < 500) begin @(negedge clk); lat++; end
    checks += 2;
    if (!done2 || !err2) begin failures++; $display("timeout not flagged"); end
    if (cv2 || !cs2 || !rd2) begin failures++; $display("pins not idle after timeout"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
