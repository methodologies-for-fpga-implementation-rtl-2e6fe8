// tb_usb_interface - self-checking test of the USB configuration and
// logging link.
//
// A behavioural FIFO bridge (60 MHz) stands in for the USB chip and the PC.
// The test writes the three registers with random values and checks that
// they reach the 100 MHz side, that an unknown address changes nothing and
// that a clear bit gives exactly one fault_clear pulse. It then sends
// decisions with random field values, slowly and with the host stalling
// 30 % of the time, and parses the received bytes: every frame must start
// with A5 5A, carry consecutive sequence numbers and the logged values in
// order. A burst of decisions faster than a frame can be sent must drop
// frames, count them, and leave a matching gap in the sequence numbers.
// With logging off no frame may be sent.
module tb_usb_interface;
  import fcs_mpc_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic rst;
  logic enable, log_enable, fault_clear;
  logic signed [I_W-1:0] id_target, iq_target;
  logic log_valid, log_fault, log_theta_valid, log_overrun;
  sw_state_t log_state;
  logic signed [I_W-1:0] log_id, log_iq;
  logic [THETA_W-1:0] log_theta;
  logic signed [W_W-1:0] log_omega;
  logic [15:0] frames_dropped;
  logic ft_clk, ft_rxf_n, ft_txe_n, ft_rd_n, ft_wr_n, ft_oe_n, ft_doe;
  logic [7:0] ft_din, ft_dout;

  ft232h_model ft (.ft_clk, .rxf_n(ft_rxf_n), .txe_n(ft_txe_n), .rd_n(ft_rd_n),
    .wr_n(ft_wr_n), .oe_n(ft_oe_n), .din(ft_din), .dout(ft_dout), .doe(ft_doe));

  usb_interface dut (.*);

  int clears;
  always @(posedge clk) if (!rst && fault_clear) clears++;

  task automatic cmd(byte unsigned addr, int unsigned value);
    ft.push(addr);
    ft.push(8'(value >> 16));
    ft.push(8'(value >> 8));
    ft.push(8'(value));
    repeat (30) @(negedge clk);
  endtask

  // expected frames
  typedef struct { logic [7:0] flags; longint id, iq, th, w; } rec_t;
  rec_t sent [$];

  task automatic decide();
    rec_t r;
    log_state       = 3'($urandom);
    log_fault       = 1'($urandom);
    log_theta_valid = 1'($urandom);
    log_overrun     = 1'($urandom);
    log_id          = I_W'($urandom);
    log_iq          = I_W'($urandom);
    log_theta       = THETA_W'($urandom_range(THETA_N - 1));
    log_omega       = W_W'($urandom);
    r.flags = {log_fault, log_theta_valid, log_overrun, 2'b00, log_state};
    r.id = longint'(log_id); r.iq = longint'(log_iq);
    r.th = longint'(log_theta); r.w = longint'(log_omega);
    sent.push_back(r);
    log_valid = 1'b1;
    @(negedge clk);
    log_valid = 1'b0;
  endtask

  function automatic longint sext(longint v, int w);
    return (v >= (longint'(1) << (w - 1))) ? v - (longint'(1) << w) : v;
  endfunction

  // parse the received bytes; returns the number of frames
  int seq_gaps;
  function automatic int parse(int first_seq, bit allow_gaps);
    int n = 0, pos = 0, k = 0, expect_seq = first_seq;
    seq_gaps = 0;
    while (pos + 16 <= ft.rx_bytes.size()) begin
      byte unsigned b [16];
      longint id, iq, th, w;
      for (int i = 0; i < 16; i++) b[i] = ft.rx_bytes[pos + i];
      pos += 16;
      checks++;
      if (b[0] != 8'hA5 || b[1] != 8'h5A) begin failures++; $display("bad header %h %h", b[0], b[1]); return n; end
      if (int'(b[2]) != (expect_seq & 255)) begin
        int gap = (int'(b[2]) - expect_seq) & 255;
        if (!allow_gaps) begin failures++; $display("seq %0d expected %0d", b[2], expect_seq & 255); end
        seq_gaps += gap;
        k += gap;
        expect_seq += gap;
      end
      expect_seq++;
      id = sext({b[4], b[5], b[6]}, 24);
      iq = sext({b[7], b[8], b[9]}, 24);
      th = {b[10], b[11]};
      w  = sext({b[12], b[13], b[14], b[15]}, 32);
      checks++;
      if (k >= sent.size() || b[3] != sent[k].flags || id != sent[k].id || iq != sent[k].iq ||
          th != sent[k].th || w != sent[k].w) begin
        failures++;
        $display("frame %0d content wrong", n);
      end
      k++;
      n++;
    end
    return n;
  endfunction

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned vid, viq;
    int nf;
    rst = 1'b1; log_valid = 1'b0; log_state = '0; log_fault = 0; log_theta_valid = 0;
    log_overrun = 0; log_id = '0; log_iq = '0; log_theta = '0; log_omega = '0; clears = 0;
    repeat (10) @(negedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);
    // whatever the pins did before the reset reached the FIFO side
    ft.rx_bytes.delete();
    ft.bus_errors = 0;
    // registers
    for (int n = 0; n < 20; n++) begin
      vid = $urandom & 32'h1F_FFFF;
      viq = $urandom & 32'h1F_FFFF;
      cmd(1, vid);
      cmd(2, viq);
      cmd(0, 32'h1);
      checks += 3;
      if (id_target !== I_W'(vid) || iq_target !== I_W'(viq)) begin failures++; $display("targets not written"); end
      if (!enable || log_enable) begin failures++; $display("control register wrong"); end
      cmd(7, $urandom);   // unknown address
      if (id_target !== I_W'(vid) || iq_target !== I_W'(viq) || !enable) begin failures++; $display("unknown address changed a register"); end
    end
    // back-to-back commands in one burst
    ft.push(1); ft.push(0); ft.push(0); ft.push(8'h05);
    ft.push(2); ft.push(0); ft.push(1); ft.push(8'h00);
    repeat (40) @(negedge clk);
    checks++;
    if (id_target !== I_W'(5) || iq_target !== I_W'(256)) begin failures++; $display("burst of commands lost"); end
    // fault_clear pulses
    clears = 0;
    cmd(0, 32'h3);
    cmd(0, 32'h1);
    cmd(0, 32'h3);
    checks++;
    if (clears != 2) begin failures++; $display("%0d clear pulses, expected 2", clears); end
    // logging off: no frames
    for (int n = 0; n < 5; n++) begin decide(); repeat (300) @(negedge clk); end
    checks++;
    if (ft.rx_bytes.size() != 0) begin failures++; $display("frame sent with logging off"); end
    sent.delete();
    // logging on, host stalls 30 % of the time
    cmd(0, 32'h5);
    ft.busy_pct = 30;
    for (int n = 0; n < 300; n++) begin decide(); repeat (300) @(negedge clk); end
    repeat (500) @(negedge clk);
    nf = parse(0, 0);
    checks += 2;
    if (nf != 300) begin failures++; $display("%0d frames, expected 300", nf); end
    if (frames_dropped != 0) begin failures++; $display("frames dropped at a slow rate"); end
    // burst: decisions every 20 clocks, faster than a 16-byte frame
    ft.rx_bytes.delete();
    sent.delete();
    for (int n = 0; n < 100; n++) begin decide(); repeat (19) @(negedge clk); end
    repeat (2000) @(negedge clk);
    nf = parse(300 % 256, 1);   // decisions with logging off are not numbered
    checks += 2;
    if (frames_dropped == 0) begin failures++; $display("burst dropped nothing"); end
    if (nf + int'(frames_dropped) != 100 || seq_gaps > int'(frames_dropped)) begin
      failures++;
      $display("frames %0d + gaps %0d vs 100, dropped %0d", nf, seq_gaps, frames_dropped);
    end
    $display("burst: %0d frames sent, %0d dropped", nf, frames_dropped);
    checks++;
    if (ft.bus_errors != 0) begin failures++; $display("bus contention"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
