// tb_coherent_integration: feeds numbered frames to the frame manager as fast
// as it takes them, with a DDR model that stalls at random, and checks what
// every rake buffer delivers: in the circular phase rake k must hold the
// current frame slot of the latest pulse stored in region k. Runs N=5, M=3,
// then reconfigures to N=2, M=1 and to N=40, M=1 (restart of the fill
// phase), and counts the fill phase, the circular phase, restarts, memory
// stalls and the resynchronisation to a start-of-frame word.
module tb_coherent_integration;
  import ci_pkg::*;
  localparam int N_CH = MAX_PULSES;
  logic clk = 0, rst_n = 0;
  ci_cfg_t cfg;
  logic restart = 0;
  logic in_rd_en, in_sof, in_empty;
  word_t in_word;
  logic [8:0] in_count;
  logic cmd_valid, cmd_ready, rd_valid;
  mem_cmd_t cmd;
  word_t rd_data;
  logic rake_rd_en, rake_ready, filled, frame_read;
  sample_t rake_sample [N_CH];
  logic [PULSE_W-1:0] pulses_act;
  int stalls;
  int checks = 0, failures = 0;

  coherent_integration dut (.*);
  ddr_model mem (.clk, .cmd_valid, .cmd_ready, .cmd, .rd_valid, .rd_data, .stalls);

  always #1.667 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word w of input frame g
  function automatic word_t fword(int g, int w);
    word_t x;
    for (int k = 0; k < 8; k++) x[k * 24 +: 24] = 24'((g * 1000003) ^ (w * 8 + k) * 7919 + g);
    return x;
  endfunction

  // input FIFO model
  logic [WORD_W:0] q [$];
  int g_in = 0;            // next frame number to enqueue
  bit feed = 0;
  assign in_empty = q.size() == 0;
  assign in_word  = in_empty ? '0 : q[0][WORD_W-1:0];
  assign in_sof   = in_empty ? 1'b0 : q[0][WORD_W];
  assign in_count = 9'(q.size());
  always @(posedge clk) begin
    if (in_rd_en && !in_empty) void'(q.pop_front());
    if (feed && q.size() < 100) begin
      for (int w = 0; w < FRAME_WORDS; w++) q.push_back({w == 0, fword(g_in, w)});
      g_in++;
    end
  end

  // rake drain and check
  int n_cfg = 0, m_cfg = 1, g_out = 0, pos = 0;
  int n_filled = 0, n_frames = 0, n_restart = 0;
  assign rake_rd_en = rake_ready;
  always @(posedge clk) begin
    if (frame_read) n_frames++;
    if (rake_ready && rst_n && n_cfg > 0) begin
      int pg, f, w, s;
      pg = g_out / m_cfg; f = g_out % m_cfg; w = pos / 8; s = pos % 8;
      for (int k = 0; k < n_cfg; k++) begin
        int pk, gk;
        word_t e;
        pk = pg - ((pg - k) % n_cfg);      // latest pulse with pk mod N == k
        gk = pk * m_cfg + f;
        e = fword(gk, w);
        checks++;
        if (rake_sample[k] !== e[s * 24 +: 24]) begin
          failures++;
          if (failures < 6) $display("frame %0d pos %0d rake %0d: got %h want %h (frame %0d)",
                                     g_out, pos, k, rake_sample[k], e[s * 24 +: 24], gk);
        end
      end
      pos++;
      if (pos == FRAME_SAMPLES) begin pos = 0; g_out++; end
    end
  end

  task automatic run(input int n, input int m, input int frames_out, input bit junk);
    feed = 0;
    @(negedge clk);
    cfg.pulses = PULSE_W'(n); cfg.depth = DEPTH_W'(m);
    restart = cfg.enable; cfg.enable = 1;
    @(negedge clk) restart = 0;
    n_restart++;
    wait (dut.state == 0);     // back in idle: drop what the old run left
    n_cfg = n; m_cfg = m; pos = 0; g_out = n * m; g_in = 0;
    q = {};
    if (junk) for (int i = 0; i < 7; i++) q.push_back({1'b0, word_t'(i)});
    feed = 1;
    wait (dut.state != 0);
    wait (filled);
    n_filled++;
    checks++;
    if (g_out != n * m) begin failures++; $display("output before fill ended"); end
    wait (g_out == n * m + frames_out);
  endtask

  initial begin
    cfg = '0; cfg.pulses = 1; cfg.depth = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(5, 3, 8, 1);
    run(2, 1, 5, 0);
    run(40, 1, 3, 1);
    feed = 0;
    checks++;
    if (n_filled != 3 || n_frames < 16 || stalls == 0) begin
      failures++;
      $display("fills %0d frames %0d stalls %0d", n_filled, n_frames, stalls);
    end
    $display("fill phases %0d, frames read %0d, restarts %0d, memory stalls %0d",
             n_filled, n_frames, n_restart, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
