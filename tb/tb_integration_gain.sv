// tb_integration_gain: processing gain of the storage and integration chain
// on a noisy chirp. Every pulse is one frame (M=1) and carries the same
// linear-FM pulse of 680 samples, amplitude 200, plus independent uniform
// noise of +-700 on I and Q. The run is repeated with 1, 15, 30 and 40 pulses.
// For each run the testbench compares every output with the exact sum of the
// stored inputs. It then forms the signal-to-noise ratio at the input and at
// the output: the signal is the known chirp (times N at the output), and the
// noise is whatever is left over. The gain must be within 0.5 dB of
// 10*log10(N), which is about 16 dB for 40 pulses. Uses the DDR model with
// stalls, a 160 MHz sample clock (40 Msample/s) and a 300 MHz chain clock.
module tb_integration_gain;
  import ci_pkg::*;
  localparam real AMP = 200.0;
  localparam int  NOISE = 700;
  localparam int  FRAMES_OUT = 4;

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
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // chirp sample at frame position p, rounded to integers
  function automatic int chirp_i(int p);
    real ph;
    ph = 3.14159265358979 * 0.25 * real'(p) * real'(p) / real'(FRAME_SAMPLES);
    return int'($rtoi(AMP * $cos(ph) + 1000.5) - 1000);
  endfunction
  function automatic int chirp_q(int p);
    real ph;
    ph = 3.14159265358979 * 0.25 * real'(p) * real'(p) / real'(FRAME_SAMPLES);
    return int'($rtoi(AMP * $sin(ph) + 1000.5) - 1000);
  endfunction
  function automatic int noise();
    return int'($urandom_range(2 * NOISE)) - NOISE;
  endfunction

  // ---- source: one new noisy chirp sample every fourth dclk ----
  sample_t in_hist [int];           // input sample t of the current run
  int t = 0, ph = 0;
  bit src_on = 0;
  real in_sig = 0.0, in_noise = 0.0;
  always @(negedge dclk) begin
    ph = (ph + 1) % 4;
    in_valid = (ph == 0);
    if (in_valid) begin
      int p, ni, nq;
      p  = t % FRAME_SAMPLES;
      ni = noise();
      nq = noise();
      in_sample = {12'(chirp_i(p) + ni), 12'(chirp_q(p) + nq)};
    end
  end
  always @(posedge dclk) if (in_valid && dut.u_write.en_q2 && src_on) begin
    int p, ni, nq;
    p = t % FRAME_SAMPLES;
    in_hist[t] = in_sample;
    ni = int'(sample_i(in_sample)) - chirp_i(p);
    nq = int'(sample_q(in_sample)) - chirp_q(p);
    in_sig   += real'(chirp_i(p) * chirp_i(p) + chirp_q(p) * chirp_q(p));
    in_noise += real'(ni * ni + nq * nq);
    t <= t + 1;
  end

  // ---- output: exact check and signal/noise split ----
  int n_cfg = 0, g_out = 0, pos = 0;
  real out_sig = 0.0, out_noise = 0.0;
  always @(posedge clk) begin
    if (out_valid && rst_n && n_cfg > 0) begin
      int si, sq, ei, eq;
      si = 0; sq = 0;
      for (int j = 0; j < n_cfg; j++) begin
        sample_t s;
        s = in_hist[(g_out - j) * FRAME_SAMPLES + pos];
        si += int'(sample_i(s));
        sq += int'(sample_q(s));
      end
      checks++;
      if (out_sum !== {24'(si), 24'(sq)}) begin
        failures++;
        if (failures < 6) $display("frame %0d pos %0d: got %h want %h", g_out, pos, out_sum, {24'(si), 24'(sq)});
      end
      ei = int'(signed'(out_sum[47:24])) - n_cfg * chirp_i(pos);
      eq = int'(signed'(out_sum[23:0])) - n_cfg * chirp_q(pos);
      out_sig   += real'(n_cfg * n_cfg) * real'(chirp_i(pos) * chirp_i(pos) + chirp_q(pos) * chirp_q(pos));
      out_noise += real'(ei * ei + eq * eq);
      pos++;
      if (pos == FRAME_SAMPLES) begin pos = 0; g_out++; end
    end
  end

  task automatic run(input int n);
    real snr_in, snr_out, gain, ideal;
    src_on = 0;
    cfg.enable = 0;
    repeat (200) @(posedge clk);
    wait (dut.u_ci.state == 0);
    t = 0; in_hist.delete();
    in_sig = 0.0; in_noise = 0.0; out_sig = 0.0; out_noise = 0.0;
    n_cfg = n; pos = 0; g_out = n;
    @(negedge clk);
    cfg.pulses = PULSE_W'(n); cfg.depth = DEPTH_W'(1); cfg.enable = 1;
    src_on = 1;
    wait (g_out == n + FRAMES_OUT);
    snr_in  = 10.0 * $log10(in_sig / in_noise);
    snr_out = 10.0 * $log10(out_sig / out_noise);
    gain    = snr_out - snr_in;
    ideal   = 10.0 * $log10(real'(n));
    $display("N=%0d: input SNR %.2f dB, output SNR %.2f dB, gain %.2f dB (ideal %.2f dB)",
             n, snr_in, snr_out, gain, ideal);
    checks++;
    if (gain < ideal - 0.5 || gain > ideal + 0.5) begin
      failures++;
      $display("gain out of range");
    end
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(posedge dclk);
    drst_n = 1; rst_n = 1;
    run(1);
    run(15);
    run(30);
    run(40);
    checks++;
    if (in_overflow) begin failures++; $display("sample FIFO overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
