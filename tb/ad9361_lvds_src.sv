// ad9361_lvds_src: behavioural model of the AD9361 receive data lines in
// 2R2T LVDS mode, for simulation only. Every four clocks it takes the next
// pair of channel samples (ch1_next, ch2_next, signalling take) and puts them
// on the six lanes: frame high for channel 1, low for channel 2; per channel
// rise I[11:6], fall Q[11:6], rise I[5:0], fall Q[5:0]. Lanes change a
// little after the opposite clock edge, half a period before they are taken.
module ad9361_lvds_src
  import ci_pkg::*;
(
  input  logic     dclk,
  input  sample_t  ch1_next,
  input  sample_t  ch2_next,
  output logic     take,
  output logic     rx_frame,
  output logic [5:0] rx_data
);
  int slot = 3;
  sample_t c1 = '0, c2 = '0;
  initial begin take = 0; rx_frame = 0; rx_data = '0; end

  always @(negedge dclk) begin
    #0.5;
    slot = (slot + 1) % 4;
    take = (slot == 0);
    if (slot == 0) begin c1 = ch1_next; c2 = ch2_next; end
    rx_frame = (slot < 2);
    unique case (slot)
      0: rx_data = c1[23:18];
      1: rx_data = c1[17:12];
      2: rx_data = c2[23:18];
      default: rx_data = c2[17:12];
    endcase
  end
  always @(posedge dclk) begin
    #0.5;
    unique case (slot)
      0: rx_data = c1[11:6];
      1: rx_data = c1[5:0];
      2: rx_data = c2[11:6];
      default: rx_data = c2[5:0];
    endcase
  end
endmodule
