// ad9361_tx: transmit half of the AD9361 LVDS data interface (2R2T mode).
// Plays the waveform stored in the waveform BRAM once per trigger and puts it
// on the six transmit lanes in the same double-data-rate format as receive.
//
// A trigger (one dclk cycle, from the pulse timer) starts a burst of len
// samples read from BRAM addresses 0..len-1; a trigger during a burst is
// ignored. The burst begins at the next four-clock sample boundary, and its
// first sample is on the lanes four to eight clocks after the trigger. Each sample occupies four clocks: two with the frame line high
// carrying channel 1, two with it low carrying channel 2. Both channels carry
// the same sample. Per channel: rise 1 I[11:6], fall 1 Q[11:6], rise 2 I[5:0],
// fall 2 Q[5:0]. Between bursts zeros are sent, and the frame line keeps
// toggling every two clocks. Outputs are registered (rise, fall) pairs for
// output DDR primitives. The BRAM is read with one clock latency.
// The format follows the document ("analogous" to receive); sending the
// waveform on both channels, the zero fill and the trigger rule are this
// design's own choices.
module ad9361_tx
  import ci_pkg::*;
#(
  parameter int unsigned AW = 12
) (
  input  logic          dclk,
  input  logic          rst_n,
  input  logic          trigger,
  input  logic [AW:0]   len,          // burst length in samples
  output logic [AW-1:0] bram_addr,
  input  sample_t       bram_data,
  output logic          tx_frame_r,
  output logic          tx_frame_f,
  output logic [5:0]    tx_d_r,
  output logic [5:0]    tx_d_f,
  output logic          busy
);
  logic [1:0]  slot;        // 0,1: channel 1; 2,3: channel 2
  logic [AW:0] cnt;
  logic        active, cur_active, pending;
  sample_t     cur;

  assign bram_addr = cnt[AW-1:0];

  always_ff @(posedge dclk or negedge rst_n) begin
    if (!rst_n) begin
      slot <= '0; cnt <= '0; active <= 1'b0; pending <= 1'b0; cur_active <= 1'b0; cur <= '0;
      tx_frame_r <= 1'b0; tx_frame_f <= 1'b0; tx_d_r <= '0; tx_d_f <= '0;
    end else begin
      slot <= slot + 1'b1;
      if (trigger && !active && len != 0) pending <= 1'b1;
      // Load the next sample at the end of a four-clock period; the BRAM
      // has presented address cnt for at least two clocks by then.
      if (slot == 2'd3) begin
        cur_active <= active;
        cur        <= active ? bram_data : '0;
        if (active) begin
          if (cnt == len - 1'b1) active <= 1'b0;
          cnt <= cnt + 1'b1;
        end else if (pending) begin
          active  <= 1'b1;
          pending <= 1'b0;
          cnt     <= '0;
        end
      end
      tx_frame_r <= (slot[1] == 1'b0);
      tx_frame_f <= (slot[1] == 1'b0);
      if (slot[0] == 1'b0) begin
        tx_d_r <= cur[23:18];
        tx_d_f <= cur[11:6];
      end else begin
        tx_d_r <= cur[17:12];
        tx_d_f <= cur[5:0];
      end
    end
  end

  assign busy = active || cur_active || pending;

endmodule
