// tb_eth_tx: writes 48-bit results into the Ethernet module in its own clock
// and checks that UDP frames go out only once 1500 bytes are waiting, that
// each payload holds the next 250 results, most significant byte first, and
// that a burst larger than the buffer raises the dropped flag.
module tb_eth_tx;
  import ci_pkg::*;
  logic clk = 0, rst_n = 0, gclk = 0, grst_n = 0;
  logic in_valid = 0;
  sum_t in_sum = '0;
  logic dropped, gmii_txen;
  logic [7:0] gmii_txd;
  logic [15:0] frames;
  int checks = 0, failures = 0;
  sum_t sent [$];
  byte unsigned fr [$];
  byte unsigned frs [$][$];

  eth_tx dut (.*);
  always #1.667 clk = ~clk;
  always #4 gclk = ~gclk;

  always @(posedge gclk) begin
    if (!grst_n) fr = {};
    else if (gmii_txen) fr.push_back(gmii_txd);
    else if (fr.size() > 0) begin frs.push_back(fr); fr = {}; end
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_sum = {24'($urandom), 24'($urandom)};
      sent.push_back(in_sum);
      @(negedge clk) in_valid = 0;
    end
  endtask

  task automatic chk(input string what, input int got, input int want);
    checks++;
    if (got != want) begin failures++; $display("%s: got %0d want %0d", what, got, want); end
  endtask

  initial begin
    repeat (3) @(posedge gclk);
    rst_n = 1; grst_n = 1;
    push(249);
    repeat (400) @(posedge gclk);
    chk("no frame below 1500 bytes", frames, 0);
    push(1);
    repeat (2000) @(posedge gclk);
    chk("one frame at 1500 bytes", frames, 1);
    push(260);
    repeat (4000) @(posedge gclk);
    chk("two frames", frames, 2);
    chk("captured frames", frs.size(), 2);
    chk("not dropped yet", dropped, 0);
    for (int f = 0; f < frs.size(); f++)
      for (int i = 0; i < 250; i++) begin
        sum_t e;
        logic [47:0] g;
        e = sent[f * 250 + i];
        for (int b = 0; b < 6; b++) g[47 - 8 * b -: 8] = frs[f][50 + 6 * i + b];
        checks++;
        if (g !== e) begin failures++; $display("frame %0d result %0d: %h want %h", f, i, g, e); break; end
      end
    // a burst of 2000 results at the full clock rate overflows the buffer
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk) in_valid = 1; in_sum = '1;
    end
    @(negedge clk) in_valid = 0;
    chk("dropped", dropped, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
