// tb_storage_integration: the whole storage and integration chain with a DDR
// model. Samples arrive at 40 Msample/s in a 160 MHz clock; the chain runs
// at 300 MHz. Every output is compared with the sum, formed here, of the
// same frame position over the last N pulses of the input stream. Runs
// N=4, M=2 and then, after a reconfiguration, N=40, M=1, and checks the
// three-cycle adder delay and that nothing comes out during a fill phase.
module tb_storage_integration;
  import ci_pkg::*;
  logic dclk = 0, drst_n = 0, clk = 0, rst_n = 0;
  logic in_valid = 0;
  sample_t in_sample = '0;
  logic in_overflow;
  ci_cfg_t cfg;
  logic restart = 0;
  logic cmd_valid, cmd_ready, rd_valid, out_valid, filled, frame_read;
  mem_cmd_t cmd;
  word_t rd_data;
  sum_t out_sum;
  int stalls;
  int checks = 0, failures = 0;

  storage_integration dut (.*);
  ddr_model mem (.clk, .cmd_valid, .cmd_ready, .cmd, .rd_valid, .rd_data, .stalls);

  always #3.125 dclk = ~dclk;
  always #1.667 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input sample number t of the current run
  function automatic sample_t samp(int run, int t);
    int h;
    h = (t + run * 7777) * 1103515245 + 12345;
    return 24'(h ^ (h >>> 13));
  endfunction

  int run_id = 0, t = 0, ph = 0;
  bit src_on = 0;
  always @(negedge dclk) begin
    ph = (ph + 1) % 4;
    in_valid = (ph == 0);
    in_sample = samp(run_id, t);
  end
  always @(posedge dclk) if (in_valid && dut.u_write.en_q2 && src_on) t <= t + 1;

  int n_cfg = 0, m_cfg = 1, g_out = 0, pos = 0, n_out = 0;
  always @(posedge clk) begin
    if (out_valid && rst_n && n_cfg > 0) begin
      int si, sq;
      si = 0; sq = 0;
      for (int j = 0; j < n_cfg; j++) begin
        sample_t s;
        s = samp(run_id, (g_out - j * m_cfg) * FRAME_SAMPLES + pos);
        si += int'(sample_i(s));
        sq += int'(sample_q(s));
      end
      checks++;
      if (out_sum !== {24'(si), 24'(sq)}) begin
        failures++;
        if (failures < 6) $display("frame %0d pos %0d: got %h want %h", g_out, pos, out_sum, {24'(si), 24'(sq)});
      end
      n_out++;
      pos++;
      if (pos == FRAME_SAMPLES) begin pos = 0; g_out++; end
    end
  end

  // adder delay: out_valid follows the rake pop by exactly three cycles
  logic [2:0] pop_hist = '0;
  int n_delay_bad = 0;
  always @(posedge clk) begin
    pop_hist <= {pop_hist[1:0], dut.u_ci.rake_ready};
    if (rst_n && out_valid !== pop_hist[2] && n_cfg > 0) n_delay_bad++;
  end

  task automatic run(input int n, input int m, input int frames_out);
    src_on = 0;
    cfg.enable = 0;
    repeat (200) @(posedge clk);
    wait (dut.u_ci.state == 0);
    run_id++; t = 0;
    n_cfg = n; m_cfg = m; pos = 0; g_out = n * m; n_out = 0;
    @(negedge clk);
    cfg.pulses = PULSE_W'(n); cfg.depth = DEPTH_W'(m); cfg.enable = 1;
    src_on = 1;
    wait (filled);
    checks++;
    if (n_out != 0) begin failures++; $display("output during the fill phase"); end
    wait (g_out == n * m + frames_out);
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(posedge dclk);
    drst_n = 1; rst_n = 1;
    run(4, 2, 5);
    run(40, 1, 3);
    checks++;
    if (n_delay_bad != 0 || in_overflow) begin
      failures++;
      $display("delay mismatches %0d overflow %b", n_delay_bad, in_overflow);
    end
    $display("memory stalls %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
