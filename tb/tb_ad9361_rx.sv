// tb_ad9361_rx: sends random I/Q pairs for both receive channels on the six
// DDR lanes in the AD9361 2R2T order and checks the rebuilt samples, that
// one pair comes out every four clocks and the fixed capture latency.
module tb_ad9361_rx;
  import ci_pkg::*;
  logic dclk = 0, rst_n = 0;
  logic rx_frame = 0;
  logic [5:0] rx_data = '0;
  logic out_valid;
  sample_t ch1, ch2;
  int checks = 0, failures = 0;
  sample_t q1 [$], q2 [$];
  realtime t_last_fall [$];
  realtime last_valid = 0;
  int n_out = 0;

  ad9361_rx dut (.*);

  always #5 dclk = ~dclk;   // 100 MHz here; the rate does not matter

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // put one channel's sample on the lanes: two clocks
  task automatic send_ch(input logic fr, input sample_t s);
    @(negedge dclk); #2.5;
    rx_frame = fr; rx_data = s[23:18];        // rise 1: I[11:6]
    @(posedge dclk); #2.5; rx_data = s[11:6];  // fall 1: Q[11:6]
    @(negedge dclk); #2.5; rx_data = s[17:12]; // rise 2: I[5:0]
    @(posedge dclk); #2.5; rx_data = s[5:0];   // fall 2: Q[5:0]
  endtask

  initial begin
    repeat (3) @(posedge dclk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      sample_t a, b;
      a = 24'($urandom); b = 24'($urandom);
      q1.push_back(a); q2.push_back(b);
      send_ch(1'b1, a);
      send_ch(1'b0, b);
      t_last_fall.push_back($realtime + 2.5);   // falling edge that takes Q[5:0] of ch2
    end
    repeat (10) @(posedge dclk);
    checks++;
    if (n_out != 60) begin failures++; $display("got %0d outputs", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge dclk) begin
    #1;
    if (out_valid) begin
      sample_t e1, e2;
      realtime tf;
      n_out++;
      e1 = q1.pop_front(); e2 = q2.pop_front(); tf = t_last_fall.pop_front();
      checks++;
      if (ch1 !== e1 || ch2 !== e2) begin
        failures++;
        $display("pair %0d: got %h %h want %h %h", n_out, ch1, ch2, e1, e2);
      end
      // latency: second rising edge after the last falling-edge lane
      checks++;
      if ($realtime - 1 - tf != 15.0) begin
        failures++;
        $display("latency %0t after last lane", $realtime - 1 - tf);
      end
      if (n_out > 1) begin
        checks++;
        if ($realtime - last_valid != 40.0) begin failures++; $display("spacing %0t", $realtime - last_valid); end
      end
      last_valid = $realtime;
    end
  end
endmodule
