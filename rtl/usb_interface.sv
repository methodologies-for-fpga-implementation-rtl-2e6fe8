// usb_interface - run-time configuration and data logging over a USB FIFO
// bridge chip (FT232H class, 245-style synchronous FIFO mode).
//
// The PC writes the controller's run-time registers and receives one log
// frame per control decision. The bridge chip owns the FIFO clock (60 MHz
// ft_clk); the byte protocol runs in that domain and talks to the 100 MHz
// controller through toggle handshakes.
//
// PC -> FPGA, 4-byte commands: address, then a 24-bit value, MSB first.
//   address 0: bit 0 enable, bit 1 fault_clear (one pulse), bit 2 logging on
//   address 1: Id target (Q4.16, low 21 bits)
//   address 2: Iq target (Q4.16, low 21 bits)
//   other addresses are ignored.
// FPGA -> PC, 16-byte frames, multi-byte fields MSB first:
//   A5 5A | seq | {fault, theta_valid, overrun, 2'b0, state[2:0]} |
//   Id meas (3 bytes) | Iq meas (3) | theta (2) | omega (4)
// seq counts every decision while logging is on, so the PC sees from the
// header and the sequence number whether a frame was lost (a decision that
// comes while the previous frame is still being sent is dropped and counted
// in frames_dropped).
//
// FIFO side (sampled and driven on the rising edge of ft_clk): while rxf_n
// is low the block drives oe_n low, then rd_n low, and takes a byte on each
// edge with rd_n and rxf_n low. Otherwise, with a frame pending and txe_n
// low, it drives a byte with wr_n low; the chip takes the byte on an edge
// with wr_n and txe_n low. The bidirectional data pins are split into
// ft_din, ft_dout and ft_doe (pad tristate outside).
//
// Clock crossing: register values change in the ft_clk domain and are
// copied into the controller domain when a toggle, passed through two
// flops, changes; the next command can change them only four ft_clk
// cycles later, after the copy. A log frame is captured in the controller
// domain only when the previous one has been acknowledged, so the frame
// register is stable while the ft_clk side reads it.
//
// The bridge chip, its synchronous FIFO mode, run-time target writes, the
// logging of internal values and the frame headers follow the controller
// this was built from; the register map, command and frame formats,
// handshakes and drop rule are this design's choices.
module usb_interface
  import fcs_mpc_pkg::*;
(
  // controller clock domain
  input  logic                   clk,
  input  logic                   rst,
  output logic                   enable,
  output logic                   log_enable,
  output logic signed [I_W-1:0]  id_target,
  output logic signed [I_W-1:0]  iq_target,
  output logic                   fault_clear,    // one clk pulse
  input  logic                   log_valid,      // one decision
  input  sw_state_t              log_state,
  input  logic                   log_fault,
  input  logic                   log_theta_valid,
  input  logic                   log_overrun,
  input  logic signed [I_W-1:0]  log_id,
  input  logic signed [I_W-1:0]  log_iq,
  input  logic [THETA_W-1:0]     log_theta,
  input  logic signed [W_W-1:0]  log_omega,
  output logic [15:0]            frames_dropped,
  // FIFO bridge pins, ft_clk domain
  input  logic                   ft_clk,
  input  logic                   ft_rxf_n,
  input  logic                   ft_txe_n,
  output logic                   ft_rd_n,
  output logic                   ft_wr_n,
  output logic                   ft_oe_n,
  input  logic [7:0]             ft_din,
  output logic [7:0]             ft_dout,
  output logic                   ft_doe
);
  localparam int unsigned FRAME_BYTES = 16;

  // ------------------------------------------------------------ ft_clk side
  typedef enum logic [1:0] {F_IDLE, F_OE, F_READ, F_WRITE} fstate_e;

  logic [1:0]         frst_s;
  logic               frst;
  fstate_e            fst;
  logic [1:0]         cmd_n;
  logic [7:0]         cmd_addr;
  logic [15:0]        cmd_hi;
  logic               r_enable, r_logen;
  logic [I_W-1:0]     r_id, r_iq;
  logic               cfg_tgl, clr_tgl;
  logic [2:0]         req_s;      // frame request toggle, synchronised
  logic               ack_tgl;
  logic [3:0]         tx_idx;
  logic [8*FRAME_BYTES-1:0] frame;   // written in the clk domain
  logic [2:0]         cfg_s, clr_s, ack_s;   // controller-side synchronisers
  logic               req_tgl;
  logic [7:0]         seq;

  // reset bridge: asserted at once, released on ft_clk
  always_ff @(posedge ft_clk or posedge rst) begin
    if (rst) frst_s <= 2'b11;
    else     frst_s <= {frst_s[0], 1'b0};
  end
  assign frst = frst_s[1];

  always_ff @(posedge ft_clk) begin
    if (frst) begin
      fst      <= F_IDLE;
      ft_rd_n  <= 1'b1;
      ft_wr_n  <= 1'b1;
      ft_oe_n  <= 1'b1;
      ft_doe   <= 1'b0;
      ft_dout  <= '0;
      cmd_n    <= '0;
      cmd_addr <= '0;
      cmd_hi   <= '0;
      r_enable <= 1'b0;
      r_logen  <= 1'b0;
      r_id     <= '0;
      r_iq     <= '0;
      cfg_tgl  <= 1'b0;
      clr_tgl  <= 1'b0;
      req_s    <= '0;
      ack_tgl  <= 1'b0;
      tx_idx   <= '0;
    end else begin
      req_s <= {req_s[1:0], req_tgl};
      unique case (fst)
        F_IDLE: begin
          if (!ft_rxf_n) begin
            ft_oe_n <= 1'b0;                 // turn the bus around first
            fst     <= F_OE;
          end else if (req_s[2] != ack_tgl && !ft_txe_n) begin
            ft_doe  <= 1'b1;
            ft_dout <= frame[8*FRAME_BYTES-1 -: 8];
            ft_wr_n <= 1'b0;
            tx_idx  <= 4'd0;
            fst     <= F_WRITE;
          end
        end
        F_OE: begin
          ft_rd_n <= 1'b0;
          fst     <= F_READ;
        end
        F_READ: begin
          if (ft_rxf_n) begin
            ft_rd_n <= 1'b1;
            ft_oe_n <= 1'b1;
            fst     <= F_IDLE;
          end else if (!ft_rd_n) begin
            cmd_n <= cmd_n + 2'd1;
            unique case (cmd_n)
              2'd0: cmd_addr     <= ft_din;
              2'd1: cmd_hi[15:8] <= ft_din;
              2'd2: cmd_hi[7:0]  <= ft_din;
              default: begin
                unique case (cmd_addr)
                  8'd0: begin
                    r_enable <= ft_din[0];
                    r_logen  <= ft_din[2];
                    if (ft_din[1]) clr_tgl <= ~clr_tgl;
                    cfg_tgl  <= ~cfg_tgl;
                  end
                  8'd1: begin
                    r_id    <= I_W'({cmd_hi, ft_din});
                    cfg_tgl <= ~cfg_tgl;
                  end
                  8'd2: begin
                    r_iq    <= I_W'({cmd_hi, ft_din});
                    cfg_tgl <= ~cfg_tgl;
                  end
                  default: ;
                endcase
              end
            endcase
          end
        end
        F_WRITE: begin
          if (!ft_txe_n) begin               // byte on the bus was taken
            if (tx_idx == 4'(FRAME_BYTES - 1)) begin
              ft_wr_n <= 1'b1;
              ft_doe  <= 1'b0;
              ack_tgl <= req_s[2];
              fst     <= F_IDLE;
            end else begin
              tx_idx  <= tx_idx + 4'd1;
              ft_dout <= frame[8*FRAME_BYTES-1 - 8*(int'(tx_idx) + 1) -: 8];
            end
          end
        end
        default: fst <= F_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------- controller side

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg_s          <= '0;
      clr_s          <= '0;
      ack_s          <= '0;
      enable         <= 1'b0;
      log_enable     <= 1'b0;
      id_target      <= '0;
      iq_target      <= '0;
      fault_clear    <= 1'b0;
      req_tgl        <= 1'b0;
      seq            <= '0;
      frame          <= '0;
      frames_dropped <= '0;
    end else begin
      cfg_s       <= {cfg_s[1:0], cfg_tgl};
      clr_s       <= {clr_s[1:0], clr_tgl};
      ack_s       <= {ack_s[1:0], ack_tgl};
      fault_clear <= clr_s[2] != clr_s[1];
      if (cfg_s[2] != cfg_s[1]) begin
        enable     <= r_enable;
        log_enable <= r_logen;
        id_target  <= r_id;
        iq_target  <= r_iq;
      end
      if (log_valid && log_enable) begin
        seq <= seq + 8'd1;
        if (req_tgl == ack_s[2]) begin
          frame <= {8'hA5, 8'h5A, seq,
                    log_fault, log_theta_valid, log_overrun, 2'b00, log_state,
                    24'(log_id), 24'(log_iq), 16'(log_theta), 32'(log_omega)};
          req_tgl <= ~req_tgl;
        end else begin
          frames_dropped <= frames_dropped + 16'd1;
        end
      end
    end
  end

  // the data pins are driven only while writing, never while the chip drives
  a_bus_turn: assert property (@(posedge ft_clk) disable iff (frst) !(ft_doe && !ft_oe_n));

endmodule
