// eth_tx: Ethernet data transfer module. Buffers the 48-bit integration
// results, cuts them into bytes and sends them to the host in UDP frames of
// PAYLOAD (1500) bytes.
//
// Results enter in the integration clock (in_valid/in_sum) into a dual-clock
// FIFO. If the FIFO is full the result is dropped and the sticky dropped flag
// is raised. In the Ethernet clock the fill level is watched; when at least
// PAYLOAD bytes are waiting and the sender is free, a frame is started and
// udp_tx pulls the payload one byte per clock. Each result gives six bytes:
// I_sum (bits 47:24) then Q_sum, most significant byte first. frames counts
// the frames started.
// The buffer-then-send rule at 1500 bytes and the byte-wide read follow the
// document; the FIFO depth, the byte order and the drop-on-full policy are
// this design's own.
module eth_tx
  import ci_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned PAYLOAD    = 1500
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  sum_t        in_sum,
  output logic        dropped,
  input  logic        gclk,
  input  logic        grst_n,
  output logic [7:0]  gmii_txd,
  output logic        gmii_txen,
  output logic [15:0] frames
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;
  localparam int unsigned BPW = SUM_W / 8;   // bytes per result, 6

  logic          full, empty, rd_en;
  sum_t          rd_word;
  logic [CW-1:0] rd_count;
  logic [2:0]    bidx;
  logic          pay_rd, busy, start;
  logic [7:0]    pay_byte;

  async_fifo #(.WIDTH(SUM_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk  (clk),
    .wr_rst_n(rst_n),
    .wr_en   (in_valid),
    .wr_data (in_sum),
    .full    (full),
    .rd_clk  (gclk),
    .rd_rst_n(grst_n),
    .rd_en   (rd_en),
    .rd_data (rd_word),
    .empty   (empty),
    .rd_count(rd_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 dropped <= 1'b0;
    else if (in_valid && full)  dropped <= 1'b1;
  end

  // Byte serializer on the FIFO's read side.
  assign pay_byte = rd_word[(BPW - 1 - int'(bidx)) * 8 +: 8];
  assign rd_en    = pay_rd && bidx == 3'(BPW - 1);
  always_ff @(posedge gclk or negedge grst_n) begin
    if (!grst_n) bidx <= '0;
    else if (pay_rd) bidx <= (bidx == 3'(BPW - 1)) ? '0 : bidx + 1'b1;
  end

  // Fill-level monitor.
  assign start = !busy && (32'(rd_count) * BPW >= 32'(PAYLOAD) + 32'(bidx));
  always_ff @(posedge gclk or negedge grst_n) begin
    if (!grst_n)    frames <= '0;
    else if (start) frames <= frames + 1'b1;
  end

  udp_tx #(.PAYLOAD(PAYLOAD)) u_udp (
    .clk      (gclk),
    .rst_n    (grst_n),
    .start    (start),
    .busy     (busy),
    .pay_rd   (pay_rd),
    .pay_byte (pay_byte),
    .gmii_txd (gmii_txd),
    .gmii_txen(gmii_txen)
  );

  a_no_underrun: assert property (@(posedge gclk) disable iff (!grst_n) pay_rd |-> !empty);

endmodule
