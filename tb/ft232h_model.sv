// ft232h_model - behavioural model of a USB FIFO bridge chip (FT232H class)
// in 245-style synchronous FIFO mode, seen from the FPGA pins.
//
// Behavioural model for testbenches, not synthesizable logic of the design.
// It drives the 60 MHz FIFO clock. Bytes the host "sends" are queued with
// the push task; from the next clock edge rxf_n is low while the queue
// holds data and the head byte is on din. On each rising edge with rd_n and
// rxf_n low the head byte is consumed. txe_n is low when the chip can take
// a byte; setting busy_pct makes it go high at random (host not reading).
// On each rising edge with wr_n and txe_n low the byte on dout is appended
// to the received list (rx_bytes / n_rx).
module ft232h_model (
  output logic       ft_clk,
  output logic       rxf_n,
  output logic       txe_n,
  input  logic       rd_n,
  input  logic       wr_n,
  input  logic       oe_n,
  output logic [7:0] din,
  input  logic [7:0] dout,
  input  logic       doe
);
  byte unsigned q [$];
  byte unsigned rx_bytes [$];
  int           busy_pct;
  int           bus_errors;

  initial begin
    ft_clk = 1'b0;
    rxf_n = 1'b1;
    txe_n = 1'b0;
    din = '0;
    busy_pct = 0;
    bus_errors = 0;
  end
  always #8.333ns ft_clk = ~ft_clk;

  task automatic push(byte unsigned b);
    q.push_back(b);
  endtask

  always @(posedge ft_clk) begin
    if (!rd_n && !rxf_n && !oe_n) void'(q.pop_front());
    if (!wr_n && !txe_n) begin
      if (!doe) bus_errors++;
      rx_bytes.push_back(dout);
    end
    if (!oe_n && doe) bus_errors++;
    rxf_n <= (q.size() == 0);
    din   <= (q.size() != 0) ? q[0] : 8'h00;
    txe_n <= ($urandom_range(99) < busy_pct);
  end
endmodule
