// data_write: collects the 24-bit I/Q samples of the receive channel and
// passes them, eight at a time, to the memory clock domain.
//
// Runs in the AD9361 data clock. While enable (synchronised here through two
// flip-flops) is high, every in_valid sample is placed in a 192-bit packing
// register, sample 0 of a word in the low bits. After the eighth sample the
// word is pushed into a dual-clock FIFO together with a start-of-frame flag,
// set on the first word of every 680-sample frame. Frames count from the
// first sample after enable rises, so pulse and frame boundaries are set by
// when the processor enables the path. If the FIFO is full the word is
// dropped and the sticky overflow flag is raised.
// On the memory side the FIFO is read first-word-fall-through: rd_word and
// rd_sof are valid while rd_empty is low, rd_en pops, rd_count gives the
// number of words held (so a whole frame can be waited for).
// The 24-bit input, the 192-bit FIFO output and the 680-sample frame follow
// the document; the start-of-frame flag, the FIFO depth and the enable
// handling are this design's own.
module data_write
  import ci_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 256
) (
  // sample side (AD9361 data clock)
  input  logic                         dclk,
  input  logic                         drst_n,
  input  logic                         enable,
  input  logic                         in_valid,
  input  sample_t                      in_sample,
  output logic                         overflow,
  // memory side
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         rd_en,
  output word_t                        rd_word,
  output logic                         rd_sof,
  output logic                         rd_empty,
  output logic [$clog2(FIFO_DEPTH):0]  rd_count
);
  logic en_q1, en_q2;
  logic [$clog2(FRAME_SAMPLES)-1:0] samp_cnt;
  logic [$clog2(SAMPLES_PER_WORD)-1:0] lane;
  word_t pack;
  logic  pack_sof;
  logic  push;
  word_t push_word;
  logic  push_sof;
  logic  full;

  always_ff @(posedge dclk or negedge drst_n) begin
    if (!drst_n) begin
      en_q1 <= 1'b0;
      en_q2 <= 1'b0;
    end else begin
      en_q1 <= enable;
      en_q2 <= en_q1;
    end
  end

  always_ff @(posedge dclk or negedge drst_n) begin
    if (!drst_n) begin
      samp_cnt <= '0;
      lane     <= '0;
      pack     <= '0;
      pack_sof <= 1'b0;
      push     <= 1'b0;
      push_word <= '0;
      push_sof <= 1'b0;
      overflow <= 1'b0;
    end else begin
      push <= 1'b0;
      if (!en_q2) begin
        samp_cnt <= '0;
        lane     <= '0;
      end else if (in_valid) begin
        pack[lane*SAMPLE_W +: SAMPLE_W] <= in_sample;
        if (lane == 0) pack_sof <= (samp_cnt == 0);
        if (lane == $bits(lane)'(SAMPLES_PER_WORD - 1)) begin
          push      <= 1'b1;
          push_word <= pack;
          push_word[lane*SAMPLE_W +: SAMPLE_W] <= in_sample;
          push_sof  <= pack_sof;
        end
        lane     <= lane + 1'b1;
        samp_cnt <= (samp_cnt == $bits(samp_cnt)'(FRAME_SAMPLES - 1)) ? '0 : samp_cnt + 1'b1;
      end
      if (push && full) overflow <= 1'b1;
    end
  end

  async_fifo #(.WIDTH(WORD_W + 1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk  (dclk),
    .wr_rst_n(drst_n),
    .wr_en   (push),
    .wr_data ({push_sof, push_word}),
    .full    (full),
    .rd_clk  (clk),
    .rd_rst_n(rst_n),
    .rd_en   (rd_en),
    .rd_data ({rd_sof, rd_word}),
    .empty   (rd_empty),
    .rd_count(rd_count)
  );

endmodule
