// ci_system_harness: runs the complete system end to end, for simulation
// only. Sets the system up through AXI4-Lite (waveform length, pulse count,
// frame depth, enable), loads a waveform and triggers transmit bursts, feeds
// receive samples through an AD9361 line model, supplies a DDR model, and
// decodes the RGMII output back into UDP frames.
// Checks: every integrated output sample against a sum formed here from the
// known input stream; the first UDP payloads against the same sums; the
// first transmitted sample against the waveform; the fill time against
// N*M frames of 680 samples at 40 Msample/s (within 2 %); and the delay from
// a frame's first input sample to its first summed output against LAT1/LAT2
// (microseconds). Runs configuration (N1, M1), then, if N2 is not zero,
// switches to (N2, M2) through the registers. Counts each mechanism (fill
// phase, circular frames, reconfiguration, transmit bursts, UDP frames,
// Ethernet drops, memory stalls) and fails one that never happened.
module ci_system_harness
  import ci_pkg::*;
#(
  parameter int  N1 = 3,
  parameter int  M1 = 2,
  parameter real LAT1 = 24.0,
  parameter int  N2 = 0,
  parameter int  M2 = 1,
  parameter real LAT2 = 24.0,
  parameter int  FRAMES_OUT = 3
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int WAVE_LEN = 64;
  localparam real FRAME_US = 680.0 / 40.0;

  logic dclk = 0, drst_n = 0, clk = 0, rst_n = 0, gclk = 0, grst_n = 0;
  always #3.125 dclk = ~dclk;
  always #1.667 clk = ~clk;
  always #4     gclk = ~gclk;

  logic rx_frame; logic [5:0] rx_data;
  logic tx_frame_r, tx_frame_f; logic [5:0] tx_d_r, tx_d_f;
  logic tx_trigger = 0;
  logic wave_we = 0; logic [11:0] wave_addr = '0; sample_t wave_din = '0;
  logic [4:0] s_awaddr = '0, s_araddr = '0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 1, s_arvalid = 0, s_rready = 1;
  logic [31:0] s_wdata = '0, s_rdata; logic [3:0] s_wstrb = '1;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid; logic [1:0] s_bresp, s_rresp;
  logic mem_cmd_valid, mem_cmd_ready, mem_rd_valid; mem_cmd_t mem_cmd; word_t mem_rd_data;
  logic [3:0] rgmii_txd_r, rgmii_txd_f; logic rgmii_txctl_r, rgmii_txctl_f;
  logic sum_valid; sum_t sum_data; logic [15:0] udp_frames; logic frame_read, tx_busy;
  int stalls;

  ci_system dut (.*);
  ddr_model mem (.clk, .cmd_valid(mem_cmd_valid), .cmd_ready(mem_cmd_ready), .cmd(mem_cmd),
                 .rd_valid(mem_rd_valid), .rd_data(mem_rd_data), .stalls);

  // ---- receive source: global sample number k ----
  function automatic sample_t samp(longint k);
    longint h;
    h = (k * 64'd2862933555777941757 + 64'd3037000493);
    return 24'(h >> 29);
  endfunction
  longint k = 0;
  logic take;
  ad9361_lvds_src src (.dclk, .ch1_next(samp(k)), .ch2_next(~samp(k)), .take, .rx_frame, .rx_data);
  always @(posedge dclk) if (take) k <= k + 1;

  // ---- where the run's sample stream starts, and frame start times ----
  longint k0 = -1;
  longint n_in = 0;                 // samples accepted since enable
  realtime t_in [longint];          // acceptance time of each frame's first sample
  realtime t_enable = 0;
  always @(posedge dclk) begin
    if (dut.u_store.u_write.in_valid && dut.u_store.u_write.en_q2 && drst_n) begin
      if (k0 < 0) begin
        for (longint j = k; j > k - 64 && j >= 0; j--)
          if (samp(j) == dut.u_store.u_write.in_sample) begin k0 = j; break; end
        if (k0 < 0) begin checks++; failures++; $display("first sample not found"); k0 = 0; end
        t_enable = $realtime;
      end
      if (n_in % FRAME_SAMPLES == 0) t_in[n_in / FRAME_SAMPLES] = $realtime;
      n_in++;
    end
  end

  // ---- integrated output check ----
  int n_cfg = 0, m_cfg = 1, g_out = 0, pos = 0;
  real lat_max = 0.0;
  sum_t exp_q [$];                  // expected results in output order (first run)
  bit record = 0;
  always @(posedge clk) begin
    if (sum_valid && n_cfg > 0) begin
      int si, sq;
      si = 0; sq = 0;
      for (int j = 0; j < n_cfg; j++) begin
        sample_t s;
        s = samp(k0 + longint'(g_out - j * m_cfg) * FRAME_SAMPLES + pos);
        si += int'(sample_i(s));
        sq += int'(sample_q(s));
      end
      checks++;
      if (sum_data !== {24'(si), 24'(sq)}) begin
        failures++;
        if (failures < 6) $display("frame %0d pos %0d: got %h want %h", g_out, pos, sum_data, {24'(si), 24'(sq)});
      end
      if (record) exp_q.push_back({24'(si), 24'(sq)});
      if (pos == 0 && t_in.exists(g_out)) begin
        real l;
        l = ($realtime - t_in[g_out]) / 1000.0;
        if (l > lat_max) lat_max = l;
      end
      pos++;
      if (pos == FRAME_SAMPLES) begin pos = 0; g_out++; end
    end
  end

  // ---- RGMII capture ----
  byte unsigned fr [$];
  sum_t udp_res [$];
  int n_udp = 0;
  always @(posedge gclk) begin
    if (grst_n && rgmii_txctl_r) fr.push_back({rgmii_txd_f, rgmii_txd_r});
    else if (fr.size() > 0) begin
      n_udp++;
      if (fr.size() == 8 + 14 + 28 + 1500 + 4)
        for (int i = 0; i < 250; i++) begin
          sum_t r;
          for (int b = 0; b < 6; b++) r[47 - 8 * b -: 8] = fr[50 + 6 * i + b];
          udp_res.push_back(r);
        end
      else begin checks++; failures++; $display("UDP frame of %0d bytes", fr.size()); end
      fr = {};
    end
  end

  // ---- transmit: bursts and first sample ----
  sample_t wave [WAVE_LEN];
  int n_burst = 0;
  logic busy_q = 0;
  sample_t tx_first = '0;
  bit tx_first_seen = 0, tx_second = 0;
  logic [5:0] ih, qh;
  always @(posedge dclk) begin
    busy_q <= tx_busy;
    if (tx_busy && !busy_q) n_burst++;
    #1;
    if (!tx_first_seen && tx_frame_r && (tx_d_r != 0 || tx_d_f != 0) && !tx_second) begin
      ih = tx_d_r; qh = tx_d_f; tx_second = 1;
    end else if (tx_second && !tx_first_seen) begin
      tx_first = {ih, tx_d_r, qh, tx_d_f};
      tx_first_seen = 1;
    end
  end

  // ---- counters ----
  int n_fill = 0, n_frames = 0, n_reconf = 0;
  always @(posedge clk) if (frame_read) n_frames++;

  task automatic axi_write(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk);
    s_awaddr = a; s_awvalid = 1; s_wdata = d; s_wvalid = 1;
    do @(posedge clk); while (!(s_awready && s_wready));
    @(negedge clk) begin s_awvalid = 0; s_wvalid = 0; end
    while (!s_bvalid) @(negedge clk);
  endtask

  task automatic axi_read(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    s_araddr = a; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk) s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
  endtask

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int n, input int m, input real lat_lim, input bit first);
    realtime t_fill;
    real want_fill;
    // stop, then start the new configuration
    if (!first) begin
      axi_write(5'h00, 0);
      repeat (300) @(posedge clk);
      n_reconf++;
    end
    n_cfg = 0;
    k0 = -1; n_in = 0; t_in.delete(); g_out = n * m; pos = 0; lat_max = 0.0;
    axi_write(5'h04, n);
    axi_write(5'h08, m);
    n_cfg = n; m_cfg = m;
    axi_write(5'h00, 1);
    wait (dut.u_store.filled);
    t_fill = $realtime;
    n_fill++;
    want_fill = n * m * FRAME_US;
    $display("N=%0d M=%0d: fill %.1f us (N*M frames %.1f us)", n, m, (t_fill - t_enable) / 1000.0, want_fill);
    chk("fill time", ((t_fill - t_enable) / 1000.0 - want_fill) < 0.02 * want_fill + 5.0 &&
                     ((t_fill - t_enable) / 1000.0 - want_fill) > -FRAME_US);
    // tx bursts while integrating
    @(negedge dclk) tx_trigger = 1;
    @(negedge dclk) tx_trigger = 0;
    wait (g_out == n * m + FRAMES_OUT);
    $display("N=%0d M=%0d: delay from frame input to integrated output %.2f us (limit %.1f)", n, m, lat_max, lat_lim);
    chk("output delay", lat_max > 0.0 && lat_max <= lat_lim);
  endtask

  initial begin
    logic [31:0] d;
    done = 0; checks = 0; failures = 0;
    repeat (4) @(posedge gclk);
    drst_n = 1; rst_n = 1; grst_n = 1;
    // waveform into the BRAM, as the processor would
    for (int i = 0; i < WAVE_LEN; i++) begin
      @(negedge clk);
      wave[i] = 24'($urandom) | 24'h1;
      wave_we = 1; wave_addr = 12'(i); wave_din = wave[i];
    end
    @(negedge clk) wave_we = 0;
    axi_write(5'h0C, WAVE_LEN);
    record = 1;
    run(N1, M1, LAT1, 1);
    record = 0;
    if (N2 != 0) run(N2, M2, LAT2, 0);
    repeat (3000) @(posedge gclk);
    // first UDP payloads equal the first integrated results
    begin
      int n_chk;
      n_chk = udp_res.size() < 1250 ? udp_res.size() : 1250;
      if (exp_q.size() < n_chk) n_chk = exp_q.size();
      chk("UDP payloads captured", n_chk >= 500);
      for (int i = 0; i < n_chk; i++)
        if (udp_res[i] !== exp_q[i]) begin chk("UDP payload", 0); $display("result %0d", i); break; end
      chk("UDP payload checked", 1);
    end
    chk("transmitted waveform", tx_first_seen && tx_first == wave[0]);
    axi_read(5'h10, d);
    $display("fill phases %0d, circular frames %0d, reconfigurations %0d, tx bursts %0d, UDP frames %0d, Ethernet drop %0d, memory stalls %0d",
             n_fill, n_frames, n_reconf, n_burst, n_udp, d[2], stalls);
    chk("fill phase seen", n_fill > 0);
    chk("circular frames seen", n_frames > 0);
    chk("reconfiguration seen", N2 == 0 || n_reconf > 0);
    chk("transmit burst seen", n_burst > 0);
    chk("UDP frame seen", n_udp > 0 && udp_frames != 0);
    chk("Ethernet drop seen", d[2] == 1'b1);
    chk("memory stall seen", stalls > 0);
    chk("circular phase in STATUS", d[0] == 1'b1);
    done = 1;
  end
endmodule
