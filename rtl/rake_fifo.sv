// rake_fifo: one rake buffer. Takes 192-bit words from the memory read path
// and gives them back one 24-bit sample at a time.
//
// Single clock. A word is written with wr_en (the writer must check
// wr_free > 0). The read side is first-word-fall-through: rd_sample is the
// oldest sample while empty is low, rd_en consumes it. Samples of a word are
// returned from the least significant one up. clear empties the buffer.
// The 192-bit width and one FIFO per pulse follow the document; the narrow
// read port is this design's way of feeding the adder tree one sample per
// cycle, and DEPTH (in words) is its own choice.
module rake_fifo
  import ci_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     wr_en,
  input  word_t                    wr_word,
  output logic [$clog2(DEPTH):0]   wr_free,
  input  logic                     rd_en,
  output sample_t                  rd_sample,
  output logic                     empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned LW = $clog2(SAMPLES_PER_WORD);

  word_t mem [DEPTH];
  logic [AW:0]      wptr;      // in words
  logic [AW+LW:0]   rptr;      // in samples
  logic [AW:0]      used;

  assign used      = wptr - rptr[AW+LW:LW];
  assign wr_free   = (AW+1)'(DEPTH) - used;
  assign empty     = (wptr == rptr[AW+LW:LW]);
  assign rd_sample = mem[rptr[AW+LW-1:LW]][rptr[LW-1:0]*SAMPLE_W +: SAMPLE_W];

  always_ff @(posedge clk) if (wr_en) mem[wptr[AW-1:0]] <= wr_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else if (clear) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_en)            wptr <= wptr + 1'b1;
      if (rd_en && !empty)  rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> wr_free != 0);

endmodule
