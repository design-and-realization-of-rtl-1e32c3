// udp_tx: sends one UDP/IPv4 Ethernet frame with a fixed-size payload on a
// GMII byte interface (one byte per clock, 125 MHz for Gigabit Ethernet).
//
// The state machine steps through
//   IDLE -> CHECK_SUM -> PREAMBLE -> ETH_HEAD -> IP_HEAD -> TX_DATA -> CRC -> IDLE
// and leaves every state on its own skip_en condition, raised when the
// state's work is done:
//   IDLE       start seen and at least 12 byte times since the last frame
//   CHECK_SUM  IPv4 header checksum formed (one clock)
//   PREAMBLE   seven 0x55 and the start delimiter 0xD5
//   ETH_HEAD   destination MAC, source MAC, type 0x0800 (14 bytes)
//   IP_HEAD    20-byte IPv4 header and 8-byte UDP header (UDP checksum 0)
//   TX_DATA    PAYLOAD bytes, each taken from pay_byte while pay_rd is high
//              (pay_byte must be valid whenever pay_rd is high)
//   CRC        frame check sequence: complemented CRC-32 over header and
//              payload, least significant byte first
// gmii_txd/gmii_txen are registered, one clock behind the state machine.
// The IPv4 identification field counts frames. busy is high from start until
// the frame has gone out.
// The states, their order and their skip_en transitions follow the document;
// addresses, ports, the 12-byte gap, the fixed payload size and the byte
// interface are this design's own choices.
module udp_tx #(
  parameter logic [47:0] SRC_MAC  = 48'h00_0A_35_00_01_02,
  parameter logic [47:0] DST_MAC  = 48'hFF_FF_FF_FF_FF_FF,
  parameter logic [31:0] SRC_IP   = {8'd192, 8'd168, 8'd1, 8'd10},
  parameter logic [31:0] DST_IP   = {8'd192, 8'd168, 8'd1, 8'd100},
  parameter logic [15:0] SRC_PORT = 16'd5000,
  parameter logic [15:0] DST_PORT = 16'd5000,
  parameter int unsigned PAYLOAD  = 1500
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       pay_rd,
  input  logic [7:0] pay_byte,
  output logic [7:0] gmii_txd,
  output logic       gmii_txen
);
  typedef enum logic [2:0] {
    ST_IDLE, ST_CHECK_SUM, ST_PREAMBLE, ST_ETH_HEAD, ST_IP_HEAD, ST_TX_DATA, ST_CRC
  } state_t;

  localparam logic [15:0] IP_LEN  = 16'(20 + 8 + PAYLOAD);
  localparam logic [15:0] UDP_LEN = 16'(8 + PAYLOAD);

  state_t      state;
  logic [15:0] cnt;          // byte index inside the state
  logic [15:0] ip_id;
  logic [15:0] ip_csum;
  logic [31:0] crc;
  logic        skip_en;
  logic [7:0]  byte_nxt;
  logic        txen_nxt;
  logic        start_pend;
  logic [3:0]  gap;

  function automatic logic [31:0] crc32_byte(logic [31:0] c, logic [7:0] d);
    logic [31:0] r;
    r = c ^ {24'd0, d};
    for (int i = 0; i < 8; i++) r = r[0] ? (r >> 1) ^ 32'hEDB8_8320 : (r >> 1);
    return r;
  endfunction

  // Header bytes, most significant byte first in each vector.
  logic [14*8-1:0] eth_hdr;
  logic [28*8-1:0] ip_hdr;
  assign eth_hdr = {DST_MAC, SRC_MAC, 16'h0800};
  assign ip_hdr  = {8'h45, 8'h00, IP_LEN, ip_id, 16'h4000, 8'd64, 8'd17, ip_csum,
                    SRC_IP, DST_IP, SRC_PORT, DST_PORT, UDP_LEN, 16'h0000};

  // One's complement sum of the IPv4 header with a zero checksum field.
  function automatic logic [15:0] ip_checksum(logic [15:0] id);
    logic [31:0] s;
    s = 32'h4500 + 32'(IP_LEN) + 32'(id) + 32'h4000 + 32'h4011
      + 32'(SRC_IP[31:16]) + 32'(SRC_IP[15:0]) + 32'(DST_IP[31:16]) + 32'(DST_IP[15:0]);
    s = {16'd0, s[15:0]} + {16'd0, s[31:16]};
    s = {16'd0, s[15:0]} + {16'd0, s[31:16]};
    return ~s[15:0];
  endfunction

  always_comb begin
    skip_en  = 1'b0;
    byte_nxt = 8'h00;
    txen_nxt = 1'b0;
    pay_rd   = 1'b0;
    unique case (state)
      ST_IDLE:      skip_en = start_pend && gap == 0;
      ST_CHECK_SUM: skip_en = 1'b1;
      ST_PREAMBLE: begin
        txen_nxt = 1'b1;
        byte_nxt = (cnt == 7) ? 8'hD5 : 8'h55;
        skip_en  = (cnt == 7);
      end
      ST_ETH_HEAD: begin
        txen_nxt = 1'b1;
        byte_nxt = eth_hdr[(13 - cnt[3:0]) * 8 +: 8];
        skip_en  = (cnt == 13);
      end
      ST_IP_HEAD: begin
        txen_nxt = 1'b1;
        byte_nxt = ip_hdr[(27 - cnt[4:0]) * 8 +: 8];
        skip_en  = (cnt == 27);
      end
      ST_TX_DATA: begin
        txen_nxt = 1'b1;
        byte_nxt = pay_byte;
        pay_rd   = 1'b1;
        skip_en  = (cnt == 16'(PAYLOAD - 1));
      end
      ST_CRC: begin
        txen_nxt = 1'b1;
        byte_nxt = ~crc[cnt[1:0] * 8 +: 8];
        skip_en  = (cnt == 3);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      cnt        <= '0;
      ip_id      <= '0;
      ip_csum    <= '0;
      crc        <= '1;
      gmii_txd   <= '0;
      gmii_txen  <= 1'b0;
      start_pend <= 1'b0;
      gap        <= '0;
    end else begin
      gmii_txd  <= byte_nxt;
      gmii_txen <= txen_nxt;
      if (start) start_pend <= 1'b1;
      if (state == ST_IDLE && gap != 0) gap <= gap - 1'b1;
      if (state == ST_ETH_HEAD || state == ST_IP_HEAD || state == ST_TX_DATA)
        crc <= crc32_byte(crc, byte_nxt);
      cnt <= cnt + 1'b1;
      if (state == ST_CHECK_SUM) ip_csum <= ip_checksum(ip_id);
      if (skip_en) begin
        cnt <= '0;
        unique case (state)
          ST_IDLE: begin
            start_pend <= 1'b0;
            state      <= ST_CHECK_SUM;
          end
          ST_CHECK_SUM: begin
            crc   <= '1;
            state <= ST_PREAMBLE;
          end
          ST_PREAMBLE: state <= ST_ETH_HEAD;
          ST_ETH_HEAD: state <= ST_IP_HEAD;
          ST_IP_HEAD:  state <= ST_TX_DATA;
          ST_TX_DATA:  state <= ST_CRC;
          ST_CRC: begin
            ip_id <= ip_id + 1'b1;
            gap   <= 4'd12;
            state <= ST_IDLE;
          end
          default: state <= ST_IDLE;
        endcase
      end
    end
  end

  assign busy = (state != ST_IDLE) || start_pend;

endmodule
