// tb_ad9361_tx: loads a waveform into a BRAM model, triggers two bursts
// (with an extra trigger inside the first, which must be ignored), decodes
// the transmit lanes back into channel 1 and channel 2 samples and checks
// them against the stored waveform, the zero fill between bursts and the
// start delay after the trigger.
module tb_ad9361_tx;
  import ci_pkg::*;
  localparam int AW = 12;
  localparam int LEN = 37;
  logic dclk = 0, rst_n = 0, trigger = 0;
  logic [AW:0] len = LEN;
  logic [AW-1:0] bram_addr;
  sample_t bram_data;
  logic tx_frame_r, tx_frame_f, busy;
  logic [5:0] tx_d_r, tx_d_f;
  sample_t wave [1 << AW];
  int checks = 0, failures = 0;
  int clk_n = 0, trig_clk = 0;
  int first_clk [$];
  sample_t got1 [$], got2 [$];

  ad9361_tx #(.AW(AW)) dut (.*);

  always #5 dclk = ~dclk;
  always @(posedge dclk) bram_data <= wave[bram_addr];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // lane decoder
  logic prev_fr = 0, second = 0;
  logic [5:0] ih, qh;
  always @(posedge dclk) begin
    #1;
    clk_n++;
    if (rst_n) begin
      if (tx_frame_r != prev_fr) begin
        ih = tx_d_r; qh = tx_d_f; second = 1;
        if (tx_frame_r && (tx_d_r != 0 || tx_d_f != 0) && got1.size() > 0 && got1[$] == 0)
          first_clk.push_back(clk_n);
      end else if (second) begin
        if (tx_frame_r) got1.push_back({ih, tx_d_r, qh, tx_d_f});
        else            got2.push_back({ih, tx_d_r, qh, tx_d_f});
        second = 0;
      end
      if (tx_frame_r != tx_frame_f) begin
        checks++; failures++; $display("frame line differs between edges");
      end
      prev_fr = tx_frame_r;
    end
  end

  task automatic check_burst(input int start);
    int k;
    k = start;
    // zeros up to the burst, then the waveform, then zeros again
    while (k < got1.size() && got1[k] == 0) k++;
    for (int i = 0; i < LEN; i++) begin
      checks++;
      if (k + i >= got1.size() || got1[k + i] !== wave[i] || got2[k + i] !== wave[i]) begin
        failures++;
        $display("burst sample %0d wrong", i);
        break;
      end
    end
    checks++;
    if (got1[k + LEN] !== 0) begin failures++; $display("no zero after burst"); end
  endtask

  initial begin
    foreach (wave[i]) wave[i] = 24'($urandom) | 24'h000001;
    repeat (3) @(posedge dclk);
    rst_n = 1;
    repeat (21) @(posedge dclk);
    @(negedge dclk) trigger = 1;
    trig_clk = clk_n + 1;
    @(negedge dclk) trigger = 0;
    checks++;
    @(negedge dclk);
    if (!busy) begin failures++; $display("busy not raised"); end
    repeat (30) @(posedge dclk);
    @(negedge dclk) trigger = 1;            // inside the burst: ignored
    @(negedge dclk) trigger = 0;
    wait (!busy);
    repeat (40) @(posedge dclk);
    begin
      int n1;
      n1 = got1.size();
      check_burst(0);
      @(negedge dclk) trigger = 1;
      @(negedge dclk) trigger = 0;
      repeat (LEN * 4 + 60) @(posedge dclk);
      check_burst(n1);
    end
    // exactly two bursts of LEN non-zero samples
    begin
      int nz;
      nz = 0;
      foreach (got1[i]) if (got1[i] != 0) nz++;
      checks++;
      if (nz != 2 * LEN) begin failures++; $display("%0d non-zero samples", nz); end
    end
    // first burst sample on the lanes 4 to 8 clocks after the trigger edge
    checks++;
    if (first_clk.size() < 1 || first_clk[0] - trig_clk < 4 || first_clk[0] - trig_clk > 9) begin
      failures++;
      $display("start delay %0d", first_clk.size() ? first_clk[0] - trig_clk : -1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
