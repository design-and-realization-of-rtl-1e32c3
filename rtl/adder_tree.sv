// adder_tree: the data computing stage. Sums the current sample of up to
// N_IN rake channels into one complex result through a three-stage pipeline.
//
// Stage 1 splits the inputs into groups of GROUP (six) and adds each group
// (seven six-input adders for 40 inputs). Stage 2 reduces the seven partial
// sums with two adders, one over the first four and one over the last three.
// Stage 3 adds those two. Every stage ends in a register, so the sum of the
// inputs presented with in_valid appears with out_valid exactly three clock
// cycles later, one result per cycle. I and Q are summed separately as signed
// 24-bit values; the output is {I_sum, Q_sum}, 48 bits.
//
// The group sizes, the three stages and the three-cycle delay follow the
// document. Channels at or above the configured pulse count are forced to
// zero here, which is this design's own way of making only N channels count.
module adder_tree
  import ci_pkg::*;
#(
  parameter int unsigned N_IN  = MAX_PULSES,
  parameter int unsigned GROUP = 6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [PULSE_W-1:0]    pulses,        // active channels: 0 .. pulses-1
  input  sample_t               in_data [N_IN],
  output logic                  out_valid,
  output sum_t                  out_sum
);
  localparam int unsigned G1 = (N_IN + GROUP - 1) / GROUP;  // stage-1 adders (7)
  localparam int unsigned GA = (G1 + 1) / 2;                 // stage-2 first adder inputs (4)

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t s1_i [G1], s1_q [G1];
  acc_t s2_i [2],  s2_q [2];
  acc_t s3_i,      s3_q;
  logic [2:0] vld;

  // Stage 1: group sums of the masked inputs.
  always_ff @(posedge clk) begin
    for (int g = 0; g < int'(G1); g++) begin
      acc_t ai, aq;
      ai = '0;
      aq = '0;
      for (int k = 0; k < int'(GROUP); k++) begin
        int idx;
        idx = g * int'(GROUP) + k;
        if (idx < int'(N_IN) && idx < int'(pulses)) begin
          ai = ai + acc_t'(sample_i(in_data[idx]));
          aq = aq + acc_t'(sample_q(in_data[idx]));
        end
      end
      s1_i[g] <= ai;
      s1_q[g] <= aq;
    end
  end

  // Stage 2: two adders over the first GA and the remaining partial sums.
  always_ff @(posedge clk) begin
    acc_t ai, aq, bi, bq;
    ai = '0; aq = '0; bi = '0; bq = '0;
    for (int g = 0; g < int'(G1); g++) begin
      if (g < int'(GA)) begin
        ai = ai + s1_i[g];
        aq = aq + s1_q[g];
      end else begin
        bi = bi + s1_i[g];
        bq = bq + s1_q[g];
      end
    end
    s2_i[0] <= ai; s2_q[0] <= aq;
    s2_i[1] <= bi; s2_q[1] <= bq;
  end

  // Stage 3: final adder.
  always_ff @(posedge clk) begin
    s3_i <= s2_i[0] + s2_i[1];
    s3_q <= s2_q[0] + s2_q[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[1:0], in_valid};
  end

  assign out_valid = vld[2];
  assign out_sum   = {s3_i, s3_q};

endmodule
