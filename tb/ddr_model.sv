// ddr_model: behavioural stand-in for the DDR4 memory and its controller,
// for simulation only. Accepts commands on a valid/ready handshake (ready is
// withheld at random when STALL is set, modelling refresh and page misses),
// stores written words in a sparse array keyed by byte address, and answers
// reads in command order LAT clocks later. Unwritten locations read as zero.
module ddr_model
  import ci_pkg::*;
#(
  parameter int unsigned LAT   = 20,
  parameter bit          STALL = 1'b1
) (
  input  logic     clk,
  input  logic     cmd_valid,
  output logic     cmd_ready,
  input  mem_cmd_t cmd,
  output logic     rd_valid,
  output word_t    rd_data,
  output int       stalls
);
  word_t mem [logic [MEM_ADDR_W-1:0]];
  logic  pipe_v [LAT];
  word_t pipe_d [LAT];

  initial begin
    cmd_ready = 1'b1;
    stalls = 0;
    for (int i = 0; i < int'(LAT); i++) begin pipe_v[i] = 0; pipe_d[i] = '0; end
  end

  // The command is taken from the falling edge before each rising edge, so
  // the model never races the design's own rising-edge updates.
  logic     s_valid = 1'b0;
  mem_cmd_t s_cmd;
  always @(negedge clk) begin
    s_valid = cmd_valid;
    s_cmd   = cmd;
  end

  always @(posedge clk) begin
    if (s_valid && cmd_ready) begin
      if (s_cmd.we) mem[s_cmd.addr] = s_cmd.wdata;
    end
    for (int i = int'(LAT) - 1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= s_valid && cmd_ready && !s_cmd.we;
    pipe_d[0] <= (s_valid && cmd_ready && !s_cmd.we && mem.exists(s_cmd.addr)) ? mem[s_cmd.addr] : '0;
    if (STALL && s_valid && ($urandom % 16) == 0) begin
      cmd_ready <= 1'b0;
      stalls <= stalls + 1;
    end else cmd_ready <= 1'b1;
  end

  assign rd_valid = pipe_v[LAT-1];
  assign rd_data  = pipe_d[LAT-1];
endmodule
