// ci_system: dynamically configurable multi-pulse real-time coherent
// integration system, programmable-logic part.
//
// Received radar echoes from an AD9361 transceiver (12-bit I/Q, 40 Msample/s,
// LVDS double data rate) are stored frame by frame in external DDR4 memory,
// one region per pulse, and the same frame of the last N pulses (N = 1..40,
// set at run time) is summed sample by sample and sent to a host in UDP
// frames over Gigabit Ethernet. The processor (outside this module) sets N,
// the frames per pulse M and the enable through AXI4-Lite, writes the
// transmit waveform into the waveform BRAM, and times transmission through
// tx_trigger.
//
// Clock domains:
//   dclk  AD9361 data clock (160 MHz for 40 Msample/s in 2R2T mode): receive
//         capture, transmit driver, sample packing
//   clk   memory controller user clock, also the AXI4-Lite and BRAM write
//         clock: frame manager, rake buffers, adder tree
//   gclk  125 MHz Ethernet clock: UDP sender, RGMII encoding
// Each domain has its own active-low reset, applied together.
// Ports left to parts outside the logic: the single-ended, delay-tuned AD9361
// lines (behind the input buffers and tap delays), the (rise, fall) pairs for
// output DDR primitives, the DDR4 controller command port (see
// coherent_integration), the AXI BRAM controller write port and the RGMII
// pairs for the PHY. Receive channel 1 is the one integrated; channel 2 is
// decoded but not used.
// The partition follows the document; the port set, the clock split and the
// choice of channel are this design's own.
module ci_system
  import ci_pkg::*;
#(
  parameter int unsigned WAVE_DEPTH = 4096
) (
  input  logic         dclk,
  input  logic         drst_n,
  input  logic         clk,
  input  logic         rst_n,
  input  logic         gclk,
  input  logic         grst_n,
  // AD9361 receive lines
  input  logic         rx_frame,
  input  logic [5:0]   rx_data,
  // AD9361 transmit lines (rise, fall)
  output logic         tx_frame_r,
  output logic         tx_frame_f,
  output logic [5:0]   tx_d_r,
  output logic [5:0]   tx_d_f,
  input  logic         tx_trigger,     // from the pulse timer, dclk domain
  // waveform BRAM write port (processor side, clk domain)
  input  logic                          wave_we,
  input  logic [$clog2(WAVE_DEPTH)-1:0] wave_addr,
  input  sample_t                       wave_din,
  // AXI4-Lite control slave (clk domain)
  input  logic [4:0]   s_awaddr,
  input  logic         s_awvalid,
  output logic         s_awready,
  input  logic [31:0]  s_wdata,
  input  logic [3:0]   s_wstrb,
  input  logic         s_wvalid,
  output logic         s_wready,
  output logic [1:0]   s_bresp,
  output logic         s_bvalid,
  input  logic         s_bready,
  input  logic [4:0]   s_araddr,
  input  logic         s_arvalid,
  output logic         s_arready,
  output logic [31:0]  s_rdata,
  output logic [1:0]   s_rresp,
  output logic         s_rvalid,
  input  logic         s_rready,
  // DDR4 controller port (clk domain)
  output logic         mem_cmd_valid,
  input  logic         mem_cmd_ready,
  output mem_cmd_t     mem_cmd,
  input  logic         mem_rd_valid,
  input  word_t        mem_rd_data,
  // RGMII transmit (rise, fall), gclk domain
  output logic [3:0]   rgmii_txd_r,
  output logic [3:0]   rgmii_txd_f,
  output logic         rgmii_txctl_r,
  output logic         rgmii_txctl_f,
  // observation
  output logic         sum_valid,
  output sum_t         sum_data,
  output logic [15:0]  udp_frames,
  output logic         frame_read,     // a frame of N pulses went to the rakes
  output logic         tx_busy
);
  localparam int unsigned WAW = $clog2(WAVE_DEPTH);

  ci_cfg_t      cfg;
  logic         restart;
  logic [WAW:0] tx_len, tx_len_d1, tx_len_d2;
  logic [2:0]   status;
  logic         rx_valid;
  sample_t      rx_ch1, rx_ch2;
  logic [WAW-1:0] wave_raddr;
  sample_t      wave_rdata;
  logic         in_overflow, ovf_q1, ovf_q2;
  logic         filled, dropped;
  logic [7:0]   gmii_txd;
  logic         gmii_txen;

  ctrl_regs #(.TX_AW(WAW)) u_regs (
    .clk(clk), .rst_n(rst_n),
    .s_awaddr(s_awaddr), .s_awvalid(s_awvalid), .s_awready(s_awready),
    .s_wdata(s_wdata), .s_wstrb(s_wstrb), .s_wvalid(s_wvalid), .s_wready(s_wready),
    .s_bresp(s_bresp), .s_bvalid(s_bvalid), .s_bready(s_bready),
    .s_araddr(s_araddr), .s_arvalid(s_arvalid), .s_arready(s_arready),
    .s_rdata(s_rdata), .s_rresp(s_rresp), .s_rvalid(s_rvalid), .s_rready(s_rready),
    .cfg(cfg), .restart(restart), .tx_len(tx_len), .status(status)
  );

  // Overflow flag from the sample clock, into the register clock.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovf_q1 <= 1'b0; ovf_q2 <= 1'b0;
    end else begin
      ovf_q1 <= in_overflow; ovf_q2 <= ovf_q1;
    end
  end
  assign status = {dropped, ovf_q2, filled};

  // Transmit length is static while transmitting; it is re-registered in
  // dclk so that no logic depth crosses the domains.
  always_ff @(posedge dclk or negedge drst_n) begin
    if (!drst_n) begin
      tx_len_d1 <= '0; tx_len_d2 <= '0;
    end else begin
      tx_len_d1 <= tx_len; tx_len_d2 <= tx_len_d1;
    end
  end

  waveform_bram #(.DEPTH(WAVE_DEPTH)) u_wave (
    .a_clk(clk), .a_we(wave_we), .a_addr(wave_addr), .a_din(wave_din),
    .b_clk(dclk), .b_addr(wave_raddr), .b_dout(wave_rdata)
  );

  ad9361_tx #(.AW(WAW)) u_tx (
    .dclk(dclk), .rst_n(drst_n), .trigger(tx_trigger), .len(tx_len_d2),
    .bram_addr(wave_raddr), .bram_data(wave_rdata),
    .tx_frame_r(tx_frame_r), .tx_frame_f(tx_frame_f),
    .tx_d_r(tx_d_r), .tx_d_f(tx_d_f), .busy(tx_busy)
  );

  ad9361_rx u_rx (
    .dclk(dclk), .rst_n(drst_n), .rx_frame(rx_frame), .rx_data(rx_data),
    .out_valid(rx_valid), .ch1(rx_ch1), .ch2(rx_ch2)
  );

  storage_integration u_store (
    .dclk(dclk), .drst_n(drst_n), .in_valid(rx_valid), .in_sample(rx_ch1),
    .in_overflow(in_overflow),
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .restart(restart),
    .cmd_valid(mem_cmd_valid), .cmd_ready(mem_cmd_ready), .cmd(mem_cmd),
    .rd_valid(mem_rd_valid), .rd_data(mem_rd_data),
    .out_valid(sum_valid), .out_sum(sum_data),
    .filled(filled), .frame_read(frame_read)
  );

  eth_tx u_eth (
    .clk(clk), .rst_n(rst_n), .in_valid(sum_valid), .in_sum(sum_data),
    .dropped(dropped),
    .gclk(gclk), .grst_n(grst_n),
    .gmii_txd(gmii_txd), .gmii_txen(gmii_txen), .frames(udp_frames)
  );

  rgmii_tx u_rgmii (
    .clk(gclk), .rst_n(grst_n), .gmii_txd(gmii_txd), .gmii_txen(gmii_txen),
    .gmii_txer(1'b0),
    .txd_r(rgmii_txd_r), .txd_f(rgmii_txd_f),
    .txctl_r(rgmii_txctl_r), .txctl_f(rgmii_txctl_f)
  );

endmodule
