// async_fifo: dual-clock first-in first-out buffer with Gray-coded pointers.
//
// The write side pushes a word when wr_en is high and full is low; the read
// side shows the oldest word on rd_data whenever empty is low and pops it
// with rd_en (first-word-fall-through). Pointers cross between the clocks as
// Gray codes through two flip-flops, so full and empty are conservative for
// two cycles of the other clock. rd_count is the read side's view of the
// number of stored words. DEPTH must be a power of two. Each side has its own
// active-low reset; both must be applied together.
// A generic building block of this design; the document names FIFOs but not
// their construction.
module async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     wr_clk,
  input  logic                     wr_rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     full,
  input  logic                     rd_clk,
  input  logic                     rd_rst_n,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   rd_count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1_rgray, wq2_rgray, rq1_wgray, rq2_wgray;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Write side.
  logic [AW:0] wbin_nxt;
  assign wbin_nxt = wbin + (AW+1)'(wr_en && !full);
  always_ff @(posedge wr_clk) if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin <= '0; wgray <= '0; wq1_rgray <= '0; wq2_rgray <= '0;
    end else begin
      wbin <= wbin_nxt;
      wgray <= bin2gray(wbin_nxt);
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
    end
  end
  assign full = (wgray == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});

  // Read side.
  logic [AW:0] rbin_nxt, wbin_r;
  assign rbin_nxt = rbin + (AW+1)'(rd_en && !empty);
  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin <= '0; rgray <= '0; rq1_wgray <= '0; rq2_wgray <= '0;
    end else begin
      rbin <= rbin_nxt;
      rgray <= bin2gray(rbin_nxt);
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
    end
  end
  assign wbin_r   = gray2bin(rq2_wgray);
  assign empty    = (rgray == rq2_wgray);
  assign rd_count = wbin_r - rbin;
  assign rd_data  = mem[rbin[AW-1:0]];

endmodule
