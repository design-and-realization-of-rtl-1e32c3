// rgmii_tx: converts the GMII byte stream of the UDP sender into the RGMII
// transmit format of the Gigabit PHY: four data lines and one control line,
// each carrying two values per 125 MHz clock.
//
// Per clock the low nibble goes out on the rising edge and the high nibble on
// the falling edge. The control line carries TX_EN on the rising edge and
// TX_EN xor TX_ER on the falling edge (TX_ER is never raised here, so both
// are TX_EN). The (rise, fall) pairs are registered, one clock after the GMII
// inputs, and feed output DDR primitives at the pins.
// The document names the RGMII interface only; this is the standard RGMII
// transmit encoding.
module rgmii_tx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] gmii_txd,
  input  logic       gmii_txen,
  input  logic       gmii_txer,
  output logic [3:0] txd_r,
  output logic [3:0] txd_f,
  output logic       txctl_r,
  output logic       txctl_f
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      txd_r <= '0; txd_f <= '0; txctl_r <= 1'b0; txctl_f <= 1'b0;
    end else begin
      txd_r   <= gmii_txd[3:0];
      txd_f   <= gmii_txd[7:4];
      txctl_r <= gmii_txen;
      txctl_f <= gmii_txen ^ gmii_txer;
    end
  end
endmodule
