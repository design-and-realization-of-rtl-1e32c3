// coherent_integration: the frame manager between the sample FIFO, the DDR4
// memory and the rake buffers. It turns the external memory into N pulse
// regions of M frames and, for every new frame, delivers the same frame of
// the last N pulses side by side.
//
// Configuration (pulse count N, frame depth M) is taken when enable rises or
// when restart is pulsed while enabled. N is limited to 1..N_CH and M to
// 1..REGION_FR, the number of 2 KB frame slots one region can hold.
// Operation per frame (time-division, the memory never reads and writes at
// once):
//   1. wait until a whole frame (FRAME_W words starting with a start-of-frame
//      word) is in the input FIFO and, in the circular phase, every active
//      rake buffer has room for a frame;
//   2. write the frame to region wr_region, slot frame_idx;
//   3. circular phase only: read slot frame_idx of regions 0..N-1 in turn;
//      returning words are steered to rake buffer 0..N-1 in the same order;
//   4. advance: frame_idx counts 0..M-1, then wr_region moves on, wrapping
//      after N-1. Once region N-1 slot M-1 is written the fill phase is over
//      and every following frame overwrites the oldest pulse's copy.
// The rake side pops all active buffers together (rake_rd_en) whenever all of
// them hold a sample (rake_ready).
// Memory port: cmd_valid/cmd_ready handshake, byte addresses, reads answered
// in order on rd_valid/rd_data, and a read after a write to the same address
// returns the new data. Region k starts at k*REGION_FR*2048, slot f at
// +f*2048, word w at +w*24.
// Fill and circular phases, 40 regions, same-slot reads over all regions and
// one 192-bit FIFO per pulse follow the document. The handshake, the address
// layout inside a region, the restart rule and the order of steps 2 and 3
// (new frame written before the reads, so it is part of the sum) are this
// design's own choices.
module coherent_integration
  import ci_pkg::*;
#(
  parameter int unsigned N_CH       = MAX_PULSES,
  parameter int unsigned FRAME_W    = FRAME_WORDS,
  parameter int unsigned REGION_FR  = REGION_FRAMES,
  parameter int unsigned RAKE_DEPTH = 128,
  parameter int unsigned IN_CNT_W   = 9
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  ci_cfg_t                cfg,
  input  logic                   restart,
  // input FIFO (first-word-fall-through)
  output logic                   in_rd_en,
  input  word_t                  in_word,
  input  logic                   in_sof,
  input  logic                   in_empty,
  input  logic [IN_CNT_W-1:0]    in_count,
  // external memory
  output logic                   cmd_valid,
  input  logic                   cmd_ready,
  output mem_cmd_t               cmd,
  input  logic                   rd_valid,
  input  word_t                  rd_data,
  // rake buffers
  input  logic                   rake_rd_en,
  output logic                   rake_ready,
  output sample_t                rake_sample [N_CH],
  // status
  output logic                   filled,
  output logic [PULSE_W-1:0]     pulses_act,
  output logic                   frame_read     // pulse: a frame went out to the rakes
);
  typedef enum logic [2:0] {S_IDLE, S_SYNC, S_WAIT, S_WR, S_RD, S_NEXT} state_t;
  localparam int unsigned WCW = $clog2(FRAME_W);
  localparam int unsigned RKW = $clog2(RAKE_DEPTH) + 1;

  state_t             state;
  logic [PULSE_W-1:0] n_pulses;
  logic [DEPTH_W-1:0] n_depth;
  logic [PULSE_W-1:0] wr_region, rd_region;
  logic [DEPTH_W-1:0] frame_idx;
  logic [WCW-1:0]     word_idx;
  logic [PULSE_W-1:0] ret_region;
  logic [WCW-1:0]     ret_word;
  logic [15:0]        outstanding;
  logic               start_req;
  logic               en_q;

  logic [RKW-1:0]     rake_free [N_CH];
  logic [N_CH-1:0]    rake_empty;
  logic               rake_room;
  logic               rake_clear;

  // Clamp the requested configuration to what the hardware holds.
  logic [PULSE_W-1:0] cfg_n;
  logic [DEPTH_W-1:0] cfg_m;
  always_comb begin
    cfg_n = cfg.pulses;
    if (cfg_n == 0) cfg_n = 1;
    if (cfg_n > PULSE_W'(N_CH)) cfg_n = PULSE_W'(N_CH);
    cfg_m = cfg.depth;
    if (cfg_m == 0) cfg_m = 1;
    if (cfg_m > DEPTH_W'(REGION_FR)) cfg_m = DEPTH_W'(REGION_FR);
  end

  function automatic logic [MEM_ADDR_W-1:0] word_addr(logic [PULSE_W-1:0] r,
                                                     logic [DEPTH_W-1:0] f,
                                                     logic [WCW-1:0] w);
    return MEM_ADDR_W'(r) * MEM_ADDR_W'(REGION_FR * FRAME_BYTES)
         + MEM_ADDR_W'(f) * MEM_ADDR_W'(FRAME_BYTES)
         + MEM_ADDR_W'(w) * MEM_ADDR_W'(WORD_BYTES);
  endfunction

  always_comb begin
    rake_room = 1'b1;
    for (int k = 0; k < int'(N_CH); k++)
      if (k < int'(n_pulses) && rake_free[k] < RKW'(FRAME_W)) rake_room = 1'b0;
  end

  // Memory commands.
  always_comb begin
    cmd_valid = 1'b0;
    cmd       = '0;
    in_rd_en  = 1'b0;
    unique case (state)
      S_SYNC: in_rd_en = !in_empty && !in_sof;
      S_WR: begin
        cmd_valid = 1'b1;
        cmd.we    = 1'b1;
        cmd.addr  = word_addr(wr_region, frame_idx, word_idx);
        cmd.wdata = in_word;
        in_rd_en  = cmd_ready;
      end
      S_RD: begin
        cmd_valid = 1'b1;
        cmd.we    = 1'b0;
        cmd.addr  = word_addr(rd_region, frame_idx, word_idx);
      end
      default: ;
    endcase
  end

  // Restart request: rising enable, or restart while enabled.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q      <= 1'b0;
      start_req <= 1'b0;
    end else begin
      en_q <= cfg.enable;
      if ((cfg.enable && !en_q) || (restart && cfg.enable)) start_req <= 1'b1;
      else if (state == S_IDLE && outstanding == 0)         start_req <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      n_pulses   <= 1;
      n_depth    <= 1;
      wr_region  <= '0;
      rd_region  <= '0;
      frame_idx  <= '0;
      word_idx   <= '0;
      filled     <= 1'b0;
      frame_read <= 1'b0;
    end else begin
      frame_read <= 1'b0;
      unique case (state)
        S_IDLE: begin
          filled <= 1'b0;
          if (start_req && outstanding == 0) begin
            n_pulses  <= cfg_n;
            n_depth   <= cfg_m;
            wr_region <= '0;
            frame_idx <= '0;
            filled    <= 1'b0;
            state     <= S_SYNC;
          end
        end
        S_SYNC: if (!in_empty && in_sof) state <= S_WAIT;
        S_WAIT: begin
          if (!in_empty && !in_sof) state <= S_SYNC;
          else if (in_count >= IN_CNT_W'(FRAME_W) && (!filled || rake_room)) begin
            word_idx <= '0;
            state    <= S_WR;
          end
        end
        S_WR: if (cmd_ready) begin
          if (word_idx == WCW'(FRAME_W - 1)) begin
            word_idx  <= '0;
            rd_region <= '0;
            state     <= filled ? S_RD : S_NEXT;
          end else word_idx <= word_idx + 1'b1;
        end
        S_RD: if (cmd_ready) begin
          if (word_idx == WCW'(FRAME_W - 1)) begin
            word_idx <= '0;
            if (rd_region == n_pulses - 1) begin
              frame_read <= 1'b1;
              state      <= S_NEXT;
            end else rd_region <= rd_region + 1'b1;
          end else word_idx <= word_idx + 1'b1;
        end
        S_NEXT: begin
          if (frame_idx == n_depth - 1) begin
            frame_idx <= '0;
            if (wr_region == n_pulses - 1) begin
              wr_region <= '0;
              filled    <= 1'b1;
            end else wr_region <= wr_region + 1'b1;
          end else frame_idx <= frame_idx + 1'b1;
          state <= S_WAIT;
        end
        default: state <= S_IDLE;
      endcase
      if (start_req && state != S_IDLE) state <= S_IDLE;
      if (!cfg.enable) state <= S_IDLE;
    end
  end

  // Read returns: count outstanding reads and steer data to its rake.
  logic rd_issue;
  assign rd_issue = (state == S_RD) && cmd_ready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      outstanding <= '0;
      ret_region  <= '0;
      ret_word    <= '0;
    end else begin
      outstanding <= outstanding + 16'(rd_issue) - 16'(rd_valid);
      if (rd_valid) begin
        if (ret_word == WCW'(FRAME_W - 1)) begin
          ret_word   <= '0;
          ret_region <= (ret_region == n_pulses - 1) ? '0 : ret_region + 1'b1;
        end else ret_word <= ret_word + 1'b1;
      end
      if (state == S_IDLE && outstanding == 0) begin
        ret_region <= '0;
        ret_word   <= '0;
      end
    end
  end

  assign rake_clear = (state == S_IDLE);
  assign pulses_act = n_pulses;

  for (genvar k = 0; k < int'(N_CH); k++) begin : g_rake
    rake_fifo #(.DEPTH(RAKE_DEPTH)) u_rake (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (rake_clear),
      .wr_en    (rd_valid && ret_region == PULSE_W'(k)),
      .wr_word  (rd_data),
      .wr_free  (rake_free[k]),
      .rd_en    (rake_rd_en && PULSE_W'(k) < n_pulses),
      .rd_sample(rake_sample[k]),
      .empty    (rake_empty[k])
    );
  end

  always_comb begin
    rake_ready = (state != S_IDLE);
    for (int k = 0; k < int'(N_CH); k++)
      if (k < int'(n_pulses) && rake_empty[k]) rake_ready = 1'b0;
  end

  a_rd_return: assert property (@(posedge clk) disable iff (!rst_n) rd_valid |-> outstanding != 0);

endmodule
