// tb_waveform_bram: writes random samples through port A in one clock and
// reads them back through port B in another, checking the data and the one
// clock read latency.
module tb_waveform_bram;
  import ci_pkg::*;
  localparam int DEPTH = 4096;
  logic a_clk = 0, b_clk = 0, a_we = 0;
  logic [11:0] a_addr = '0, b_addr = '0;
  sample_t a_din = '0, b_dout;
  sample_t ref_mem [DEPTH];
  int checks = 0, failures = 0;

  waveform_bram dut (.*);

  always #4 a_clk = ~a_clk;
  always #3 b_clk = ~b_clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge a_clk);
      a_we = 1; a_addr = 12'(i); a_din = 24'($urandom);
      ref_mem[i] = a_din;
    end
    @(negedge a_clk) a_we = 0;
    // overwrite a few
    for (int i = 0; i < 50; i++) begin
      @(negedge a_clk);
      a_we = 1; a_addr = 12'($urandom); a_din = 24'($urandom);
      ref_mem[a_addr] = a_din;
    end
    @(negedge a_clk) a_we = 0;
    repeat (2) @(posedge b_clk);
    for (int i = 0; i < 600; i++) begin
      logic [11:0] a;
      a = (i < 300) ? 12'(i * 13) : 12'($urandom);
      @(negedge b_clk) b_addr = a;
      @(posedge b_clk) #1;
      checks++;
      if (b_dout !== ref_mem[a]) begin failures++; $display("addr %0d got %h want %h", a, b_dout, ref_mem[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
