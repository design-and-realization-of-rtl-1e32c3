// tb_rgmii_tx: feeds random GMII bytes and enables and checks the registered
// RGMII nibble pairs one clock later: low nibble and TX_EN on the rising
// edge, high nibble and TX_EN xor TX_ER on the falling edge.
module tb_rgmii_tx;
  logic clk = 0, rst_n = 0;
  logic [7:0] gmii_txd = '0;
  logic gmii_txen = 0, gmii_txer = 0;
  logic [3:0] txd_r, txd_f;
  logic txctl_r, txctl_f;
  int checks = 0, failures = 0;
  logic [7:0] pd; logic pe, pr;

  rgmii_tx dut (.*);
  always #4 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      gmii_txd = 8'($urandom); gmii_txen = 1'($urandom); gmii_txer = (i % 7 == 3);
      pd = gmii_txd; pe = gmii_txen; pr = gmii_txer;
      @(posedge clk) #1;
      checks++;
      if (txd_r !== pd[3:0] || txd_f !== pd[7:4] || txctl_r !== pe || txctl_f !== (pe ^ pr)) begin
        failures++;
        $display("byte %h en %b er %b -> %h %h %b %b", pd, pe, pr, txd_r, txd_f, txctl_r, txctl_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
