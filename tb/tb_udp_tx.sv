// tb_udp_tx: starts three frames (the third start arrives while the second
// is still going out), captures the GMII bytes and checks preamble, Ethernet,
// IPv4 and UDP headers, the IPv4 checksum, the payload, the frame check
// sequence (recomputed here bit by bit in the non-reflected form) and the
// gap between frames.
module tb_udp_tx;
  localparam int PAYLOAD = 1500;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, pay_rd, gmii_txen;
  logic [7:0] pay_byte, gmii_txd;
  int checks = 0, failures = 0;
  int pay_idx = 0;
  byte unsigned fr [$];
  byte unsigned frames [$][$];
  int gap_len = 0, min_gap = 1000;

  udp_tx #(.PAYLOAD(PAYLOAD)) dut (.*);
  always #4 clk = ~clk;

  // payload source: byte n of the stream is (n*7+3) mod 256
  assign pay_byte = 8'(pay_idx * 7 + 3);
  always @(posedge clk) if (pay_rd) pay_idx <= pay_idx + 1;

  always @(posedge clk) begin
    if (gmii_txen) begin
      fr.push_back(gmii_txd);
      if (gap_len != 0 && frames.size() > 0 && gap_len < min_gap) min_gap = gap_len;
      gap_len = 0;
    end else begin
      if (fr.size() > 0) begin frames.push_back(fr); fr = {}; end
      gap_len++;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] crc_msb(byte unsigned d [$], int from, int to);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    for (int i = from; i < to; i++)
      for (int b = 0; b < 8; b++) begin   // Ethernet sends bit 0 of a byte first
        logic inb;
        inb = d[i][b] ^ c[31];
        c = {c[30:0], 1'b0};
        if (inb) c = c ^ 32'h04C1_1DB7;
      end
    return c;
  endfunction

  function automatic logic [31:0] bitrev32(logic [31:0] x);
    for (int i = 0; i < 32; i++) bitrev32[i] = x[31 - i];
  endfunction

  task automatic chk(input string what, input int got, input int want);
    checks++;
    if (got != want) begin failures++; $display("%s: got %h want %h", what, got, want); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (!busy);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (100) @(posedge clk);
    @(negedge clk) start = 1;      // queued behind the running frame
    @(negedge clk) start = 0;
    repeat (10) @(posedge clk);
    wait (!busy);
    repeat (20) @(posedge clk);
    chk("frames", frames.size(), 3);
    for (int f = 0; f < frames.size(); f++) begin
      byte unsigned d [$];
      int sum;
      logic [31:0] c, fcs;
      d = frames[f];
      chk("length", d.size(), 8 + 14 + 28 + PAYLOAD + 4);
      for (int i = 0; i < 7; i++) chk("preamble", d[i], 8'h55);
      chk("sfd", d[7], 8'hD5);
      for (int i = 0; i < 6; i++) chk("dst mac", d[8 + i], 8'hFF);
      chk("type", {d[20], d[21]}, 16'h0800);
      chk("ver/ihl", d[22], 8'h45);
      chk("ip len", {d[24], d[25]}, 20 + 8 + PAYLOAD);
      chk("ip id", {d[26], d[27]}, f);
      chk("proto", d[31], 17);
      sum = 0;
      for (int i = 0; i < 20; i += 2) sum += {d[22 + i], d[23 + i]};
      sum = (sum & 16'hFFFF) + (sum >> 16);
      sum = (sum & 16'hFFFF) + (sum >> 16);
      chk("ip checksum", sum, 16'hFFFF);
      chk("udp len", {d[46], d[47]}, 8 + PAYLOAD);
      for (int i = 0; i < PAYLOAD; i++) begin
        int n;
        n = f * PAYLOAD + i;
        if (d[50 + i] != 8'(n * 7 + 3)) begin
          chk("payload", d[50 + i], 8'(n * 7 + 3));
          break;
        end
      end
      checks++;
      c = crc_msb(d, 8, 50 + PAYLOAD);
      fcs = ~bitrev32(c);
      if ({d[53 + PAYLOAD], d[52 + PAYLOAD], d[51 + PAYLOAD], d[50 + PAYLOAD]} != fcs) begin
        failures++;
        $display("fcs %h%h%h%h want %h", d[53 + PAYLOAD], d[52 + PAYLOAD], d[51 + PAYLOAD], d[50 + PAYLOAD], fcs);
      end
    end
    checks++;
    if (min_gap < 12) begin failures++; $display("gap %0d", min_gap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
