// tb_data_write: streams numbered samples at 40 Msample/s (one every four
// 160 MHz clocks) and reads the FIFO in a 300 MHz clock. Checks the packing
// of eight samples per word, the start-of-frame flag on every 85th word, the
// restart of frame counting after enable drops mid-frame, and the overflow
// flag when the reader stops.
module tb_data_write;
  import ci_pkg::*;
  logic dclk = 0, drst_n = 0, clk = 0, rst_n = 0;
  logic enable = 0, in_valid = 0, rd_en = 0;
  sample_t in_sample = '0;
  logic overflow, rd_sof, rd_empty;
  word_t rd_word;
  logic [8:0] rd_count;
  int checks = 0, failures = 0;
  int t = 0;                 // sample number since enable
  int nw = 0;                // words read since enable
  bit reading = 1;
  sample_t base = '0;

  data_write dut (.*);
  always #3.125 dclk = ~dclk;
  always #1.667 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t samp(int n);
    return 24'(n * 40503 + 17) ^ base;
  endfunction

  // source: one sample every four clocks while enable is set here
  int ph = 0;
  always @(negedge dclk) begin
    ph = (ph + 1) % 4;
    in_valid = (ph == 0) && drst_n;
    in_sample = samp(t);
  end
  always @(posedge dclk) if (in_valid && dut.en_q2) t <= t + 1;

  // reader
  always @(posedge clk) begin
    #0.2;
    rd_en = reading && !rd_empty;
  end
  always @(posedge clk) if (rd_en && rst_n) begin
    word_t e;
    for (int k = 0; k < 8; k++) e[k * 24 +: 24] = samp(nw * 8 + k);
    checks++;
    if (rd_word !== e || rd_sof !== (nw % FRAME_WORDS == 0)) begin
      failures++;
      if (failures < 5) $display("word %0d: sof %b got %h want %h", nw, rd_sof, rd_word, e);
    end
    nw++;
  end

  initial begin
    repeat (3) @(posedge dclk);
    drst_n = 1; rst_n = 1;
    repeat (5) @(posedge dclk);
    enable = 1;
    wait (nw == 3 * FRAME_WORDS + 20);
    // drop enable mid-frame; after the FIFO drains restart from sample 0
    enable = 0;
    repeat (40) @(posedge dclk);
    wait (rd_empty);
    repeat (10) @(posedge clk);
    t = 0; nw = 0; base = 24'h5A5A5A;
    enable = 1;
    wait (nw == 2 * FRAME_WORDS + 3);
    checks++;
    if (overflow) begin failures++; $display("early overflow"); end
    reading = 0;
    repeat (4 * 8 * 300) @(posedge dclk);
    checks++;
    if (!overflow) begin failures++; $display("no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
