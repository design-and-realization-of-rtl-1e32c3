// tb_adder_tree: drives random samples into the 40-input adder tree with a
// random active pulse count each cycle and compares every output with a sum
// formed here, three cycles later. Also checks that nothing comes out when
// nothing went in.
module tb_adder_tree;
  import ci_pkg::*;
  localparam int N = MAX_PULSES;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [PULSE_W-1:0] pulses;
  sample_t in_data [N];
  logic out_valid;
  sum_t out_sum;
  int checks = 0, failures = 0;
  // expected (valid, sum) of the inputs at each rising edge
  logic        cur_v = 0;
  logic [47:0] cur_s = '0;
  logic        q_v [$];
  logic [47:0] q_s [$];

  adder_tree dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; pulses = 1;
    foreach (in_data[k]) in_data[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int si, sq;
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      pulses = PULSE_W'(1 + $urandom % N);
      if (t < 40) pulses = PULSE_W'(t + 1);
      si = 0; sq = 0;
      for (int k = 0; k < N; k++) begin
        logic signed [11:0] vi, vq;
        vi = 12'($urandom);
        vq = 12'($urandom);
        if (t % 50 == 7) begin vi = 12'h800; vq = 12'h800; end  // most negative
        if (t % 50 == 8) begin vi = 12'h7FF; vq = 12'h7FF; end  // most positive
        in_data[k] = {vi, vq};
        if (k < int'(pulses)) begin si += int'(vi); sq += int'(vq); end
      end
      cur_v = in_valid;
      cur_s = {24'(si), 24'(sq)};
    end
    @(negedge clk) begin in_valid = 0; cur_v = 0; end
    repeat (6) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // After rising edge k the output must show the inputs taken at edge k-2:
  // three clock cycles from input to output.
  always @(posedge clk) begin
    if (rst_n) begin
      q_v.push_back(cur_v);
      q_s.push_back(cur_s);
      #1;
      if (q_v.size() >= 3) begin
        checks++;
        if (out_valid !== q_v[q_v.size() - 3]) begin
          failures++;
          $display("valid mismatch at %0t", $time);
        end else if (out_valid && out_sum !== q_s[q_s.size() - 3]) begin
          failures++;
          $display("sum mismatch at %0t: got %h want %h", $time, out_sum, q_s[q_s.size() - 3]);
        end
      end
    end
  end
endmodule
