// waveform_bram: simple dual-port block RAM holding the transmit waveform.
// The processor side (through its BRAM controller) writes 24-bit {I, Q}
// samples on port A; the transmit driver reads port B in its own clock with
// one clock of latency. DEPTH is this design's own choice (4096 samples,
// about 100 us at 40 Msample/s); the document gives none.
module waveform_bram
  import ci_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     a_clk,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  sample_t                  a_din,
  input  logic                     b_clk,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  output sample_t                  b_dout
);
  sample_t mem [DEPTH];

  always_ff @(posedge a_clk) if (a_we) mem[a_addr] <= a_din;
  always_ff @(posedge b_clk) b_dout <= mem[b_addr];

endmodule
