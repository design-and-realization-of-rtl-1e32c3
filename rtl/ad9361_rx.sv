// ad9361_rx: receive half of the AD9361 LVDS data interface in dual-receiver
// (2R2T) mode. Captures the six data lanes and the frame line on both clock
// edges and rebuilds the 12-bit I and Q words of both receive channels.
//
// The inputs are the single-ended, delay-tuned lines behind the differential
// input buffers and the tap delays; dclk is the forwarded data clock after
// its global buffer. Capture stands in for the IDDR primitive: one flip-flop
// bank samples on the rising edge, one on the falling edge, and both are
// re-timed to the next rising edge as a (rise, fall) pair.
// Lane order within one channel, two clocks long:
//   rise 1: I[11:6]   fall 1: Q[11:6]   rise 2: I[5:0]   fall 2: Q[5:0]
// The frame line is high for channel 1 and low for channel 2. The first
// clock of a channel is recognised by the frame line having changed; a
// frame line that stays put produces no samples.
// Output: ch1/ch2 samples {I, Q} in the dclk domain, with out_valid high for
// one clock after channel 2 completes, i.e. once every four clocks; the pair
// is registered on the second rising edge after the last falling-edge lane.
// The lane order, frame polarity and DDR capture follow the document; the
// choice of the rising edge for the first lane, the output timing and the
// frame-change detection are this design's own.
module ad9361_rx
  import ci_pkg::*;
(
  input  logic         dclk,
  input  logic         rst_n,
  input  logic         rx_frame,
  input  logic [5:0]   rx_data,
  output logic         out_valid,
  output sample_t      ch1,
  output sample_t      ch2
);
  logic [5:0] rise_q, fall_q;     // DDR capture
  logic       frame_rq;
  logic [5:0] p_rise, p_fall;     // re-timed pair
  logic       p_frame, p_frame_prev;
  logic [5:0] hi_i, hi_q;
  sample_t    ch1_hold;
  logic       second;      // second clock of a channel

  always_ff @(posedge dclk) begin
    rise_q   <= rx_data;
    frame_rq <= rx_frame;
  end
  always_ff @(negedge dclk) fall_q <= rx_data;

  always_ff @(posedge dclk or negedge rst_n) begin
    if (!rst_n) begin
      p_rise <= '0; p_fall <= '0; p_frame <= 1'b0; p_frame_prev <= 1'b0;
    end else begin
      p_rise       <= rise_q;
      p_fall       <= fall_q;
      p_frame      <= frame_rq;
      p_frame_prev <= p_frame;
    end
  end

  // Splice the two halves of each sample.
  always_ff @(posedge dclk or negedge rst_n) begin
    if (!rst_n) begin
      hi_i <= '0; hi_q <= '0; ch1_hold <= '0; second <= 1'b0;
      ch1 <= '0; ch2 <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      second    <= 1'b0;
      if (p_frame != p_frame_prev) begin
        hi_i   <= p_rise;
        hi_q   <= p_fall;
        second <= 1'b1;
      end else if (second && p_frame) begin
        ch1_hold <= {hi_i, p_rise, hi_q, p_fall};
      end else if (second) begin
        ch1       <= ch1_hold;
        ch2       <= {hi_i, p_rise, hi_q, p_fall};
        out_valid <= 1'b1;
      end
    end
  end

endmodule
