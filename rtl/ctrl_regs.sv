// ctrl_regs: AXI4-Lite slave through which the processor controls the data
// path. 32-bit registers, byte address:
//   0x00 CTRL    bit 0 enable (acquisition and integration run while set)
//                bit 1 restart (write 1: start a new fill phase; reads 0)
//   0x04 PULSES  number of pulses N to integrate, 1..40   (reset 40)
//   0x08 DEPTH   frames stored per pulse M, 1..18823       (reset 100)
//   0x0C TX_LEN  transmit waveform length in samples       (reset 0)
//   0x10 STATUS  read only: bit 0 circular phase reached, bit 1 sample FIFO
//                overflow, bit 2 Ethernet FIFO dropped data
// Writing PULSES or DEPTH also restarts the fill phase, so a new pulse count
// takes effect at once. restart is a one-cycle pulse.
// Handshake: a write is taken when AWVALID and WVALID are both high and no
// response is pending (AWREADY and WREADY together for one cycle); BVALID
// stays until BREADY. A read is taken when ARVALID is high and no read data
// is pending; RVALID stays until RREADY. Responses are always OKAY; WSTRB is
// ignored (whole-register writes).
// The document says only that the processor drives the logic over AXI4-Lite
// and that pulse count and frame depth are set from the host; the register
// map, the reset values and the restart rule are this design's own.
module ctrl_regs
  import ci_pkg::*;
#(
  parameter int unsigned TX_AW = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Lite slave
  input  logic [4:0]         s_awaddr,
  input  logic               s_awvalid,
  output logic               s_awready,
  input  logic [31:0]        s_wdata,
  input  logic [3:0]         s_wstrb,
  input  logic               s_wvalid,
  output logic               s_wready,
  output logic [1:0]         s_bresp,
  output logic               s_bvalid,
  input  logic               s_bready,
  input  logic [4:0]         s_araddr,
  input  logic               s_arvalid,
  output logic               s_arready,
  output logic [31:0]        s_rdata,
  output logic [1:0]         s_rresp,
  output logic               s_rvalid,
  input  logic               s_rready,
  // to the data path
  output ci_cfg_t            cfg,
  output logic               restart,
  output logic [TX_AW:0]     tx_len,
  input  logic [2:0]         status
);
  logic wr_go, rd_go;

  assign wr_go     = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr_go;
  assign s_wready  = wr_go;
  assign rd_go     = s_arvalid && !s_rvalid;
  assign s_arready = rd_go;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.enable <= 1'b0;
      cfg.pulses <= PULSE_W'(MAX_PULSES);
      cfg.depth  <= DEPTH_W'(100);
      tx_len     <= '0;
      restart    <= 1'b0;
      s_bvalid   <= 1'b0;
    end else begin
      restart <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_go) begin
        s_bvalid <= 1'b1;
        unique case (s_awaddr[4:2])
          3'd0: begin
            cfg.enable <= s_wdata[0];
            restart    <= s_wdata[1];
          end
          3'd1: begin
            cfg.pulses <= s_wdata[PULSE_W-1:0];
            restart    <= 1'b1;
          end
          3'd2: begin
            cfg.depth <= s_wdata[DEPTH_W-1:0];
            restart   <= 1'b1;
          end
          3'd3: tx_len <= s_wdata[TX_AW:0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (rd_go) begin
        s_rvalid <= 1'b1;
        unique case (s_araddr[4:2])
          3'd0:    s_rdata <= {31'd0, cfg.enable};
          3'd1:    s_rdata <= 32'(cfg.pulses);
          3'd2:    s_rdata <= 32'(cfg.depth);
          3'd3:    s_rdata <= 32'(tx_len);
          3'd4:    s_rdata <= 32'(status);
          default: s_rdata <= '0;
        endcase
      end
    end
  end

  // AXI rule: a response, once valid, is held until accepted.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_bvalid && !s_bready |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
