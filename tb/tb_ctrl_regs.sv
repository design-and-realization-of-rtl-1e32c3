// tb_ctrl_regs: AXI4-Lite writes and reads of every register, with address
// and data arriving in either order and slow response acceptance; checks
// reset values, the configuration outputs, the restart pulse and STATUS.
module tb_ctrl_regs;
  import ci_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [4:0] s_awaddr = '0, s_araddr = '0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic [31:0] s_wdata = '0, s_rdata;
  logic [3:0] s_wstrb = '1;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  ci_cfg_t cfg;
  logic restart;
  logic [12:0] tx_len;
  logic [2:0] status = 3'b101;
  int checks = 0, failures = 0, restarts = 0;

  ctrl_regs dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (restart) restarts++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axi_write(input logic [4:0] a, input logic [31:0] d, input int order);
    @(negedge clk);
    if (order != 2) begin s_awaddr = a; s_awvalid = 1; end
    if (order != 1) begin s_wdata = d; s_wvalid = 1; end
    if (order != 0) begin
      repeat (2) @(negedge clk);
      s_awaddr = a; s_awvalid = 1; s_wdata = d; s_wvalid = 1;
    end
    do @(posedge clk); while (!(s_awready && s_wready));
    @(negedge clk) begin s_awvalid = 0; s_wvalid = 0; end
    repeat (order) @(negedge clk);   // hold off the response a while
    s_bready = 1;
    do @(posedge clk); while (!s_bvalid);
    checks++;
    if (s_bresp != 0) failures++;
    @(negedge clk) s_bready = 0;
  endtask

  task automatic axi_read(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    s_araddr = a; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk) s_arvalid = 0;
    repeat (2) @(negedge clk);
    s_rready = 1;
    do @(posedge clk); while (!s_rvalid);
    d = s_rdata;
    @(negedge clk) s_rready = 0;
  endtask

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %0d want %0d", what, got, want); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    axi_read(5'h04, d); expect_eq("reset PULSES", d, 40);
    axi_read(5'h08, d); expect_eq("reset DEPTH", d, 100);
    axi_read(5'h00, d); expect_eq("reset CTRL", d, 0);
    axi_write(5'h04, 15, 0);  expect_eq("pulses out", 32'(cfg.pulses), 15);
    expect_eq("restart after PULSES", restarts, 1);
    axi_write(5'h08, 18823, 1); expect_eq("depth out", 32'(cfg.depth), 18823);
    expect_eq("restart after DEPTH", restarts, 2);
    axi_write(5'h0C, 680, 2); expect_eq("tx_len out", 32'(tx_len), 680);
    expect_eq("no restart after TX_LEN", restarts, 2);
    axi_write(5'h00, 1, 0);   expect_eq("enable out", 32'(cfg.enable), 1);
    axi_write(5'h00, 3, 2);   expect_eq("restart bit", restarts, 3);
    axi_read(5'h04, d); expect_eq("PULSES", d, 15);
    axi_read(5'h08, d); expect_eq("DEPTH", d, 18823);
    axi_read(5'h0C, d); expect_eq("TX_LEN", d, 680);
    axi_read(5'h00, d); expect_eq("CTRL", d, 1);
    axi_read(5'h10, d); expect_eq("STATUS", d, 5);
    status = 3'b010;
    axi_read(5'h10, d); expect_eq("STATUS", d, 2);
    axi_write(5'h00, 0, 1);   expect_eq("disable", 32'(cfg.enable), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
