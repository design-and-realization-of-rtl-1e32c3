// storage_integration: the data storage and coherent integration module.
// A chain of three parts: data_write (24-bit samples to 192-bit words across
// to the memory clock), coherent_integration (DDR4 pulse regions and rake
// buffers) and adder_tree (sum of the active rakes).
//
// Whenever every active rake buffer holds a sample, one sample is taken from
// each and handed to the adder tree; the sum leaves on out_valid/out_sum three
// cycles later as {I_sum, Q_sum}, 24 bits each. In the circular phase each
// input frame of 680 samples therefore yields 680 summed samples, the sum of
// that frame position over the last N pulses.
// The memory port is passed out to the DDR4 controller. The structure follows
// the document; the interfaces between the parts are this design's own.
module storage_integration
  import ci_pkg::*;
#(
  parameter int unsigned N_CH       = MAX_PULSES,
  parameter int unsigned REGION_FR  = REGION_FRAMES,
  parameter int unsigned IN_DEPTH   = 256,
  parameter int unsigned RAKE_DEPTH = 128
) (
  input  logic      dclk,
  input  logic      drst_n,
  input  logic      in_valid,
  input  sample_t   in_sample,
  output logic      in_overflow,
  input  logic      clk,
  input  logic      rst_n,
  input  ci_cfg_t   cfg,
  input  logic      restart,
  output logic      cmd_valid,
  input  logic      cmd_ready,
  output mem_cmd_t  cmd,
  input  logic      rd_valid,
  input  word_t     rd_data,
  output logic      out_valid,
  output sum_t      out_sum,
  output logic      filled,
  output logic      frame_read
);
  localparam int unsigned CW = $clog2(IN_DEPTH) + 1;

  word_t          f_word;
  logic           f_sof, f_empty, f_rd;
  logic [CW-1:0]  f_count;
  logic           rake_ready;
  sample_t        rake_sample [N_CH];
  logic [PULSE_W-1:0] pulses_act;
  logic           en_d1, en_d2;

  // Carry enable into the sample clock for the data write part (two-flop
  // synchroniser). A restart does not stop the sample stream: the frame
  // manager drops words up to the next start of frame and begins there.
  always_ff @(posedge dclk or negedge drst_n) begin
    if (!drst_n) begin
      en_d1 <= 1'b0;
      en_d2 <= 1'b0;
    end else begin
      en_d1 <= cfg.enable;
      en_d2 <= en_d1;
    end
  end

  data_write #(.FIFO_DEPTH(IN_DEPTH)) u_write (
    .dclk     (dclk),
    .drst_n   (drst_n),
    .enable   (en_d2),
    .in_valid (in_valid),
    .in_sample(in_sample),
    .overflow (in_overflow),
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_en    (f_rd),
    .rd_word  (f_word),
    .rd_sof   (f_sof),
    .rd_empty (f_empty),
    .rd_count (f_count)
  );

  coherent_integration #(
    .N_CH(N_CH), .REGION_FR(REGION_FR), .RAKE_DEPTH(RAKE_DEPTH), .IN_CNT_W(CW)
  ) u_ci (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg        (cfg),
    .restart    (restart),
    .in_rd_en   (f_rd),
    .in_word    (f_word),
    .in_sof     (f_sof),
    .in_empty   (f_empty),
    .in_count   (f_count),
    .cmd_valid  (cmd_valid),
    .cmd_ready  (cmd_ready),
    .cmd        (cmd),
    .rd_valid   (rd_valid),
    .rd_data    (rd_data),
    .rake_rd_en (rake_ready),
    .rake_ready (rake_ready),
    .rake_sample(rake_sample),
    .filled     (filled),
    .pulses_act (pulses_act),
    .frame_read (frame_read)
  );

  adder_tree #(.N_IN(N_CH)) u_sum (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (rake_ready),
    .pulses   (pulses_act),
    .in_data  (rake_sample),
    .out_valid(out_valid),
    .out_sum  (out_sum)
  );

endmodule
