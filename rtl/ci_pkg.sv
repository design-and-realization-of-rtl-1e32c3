// ci_pkg: constants and types shared by the multi-pulse coherent integration
// data path.
//
// The radar sample is one complex value: 12-bit I and 12-bit Q, packed as
// {I, Q} into 24 bits. Eight samples form one 192-bit memory word, sample 0 in
// the least significant bits. A frame is 680 samples (85 words, 2040 bytes)
// kept in a 2048-byte slot of the external DDR4. The 512 MiB DDR4 is split
// into 40 equal pulse regions of 6553 frame slots (about 12.8 MiB) each.
// Sample format, the 24/192/48-bit widths, the frame size and the 40 regions
// follow the document; the {I,Q} packing order and the byte addressing of the
// memory port are this design's own choices.
package ci_pkg;

  localparam int unsigned IQ_W             = 12;
  localparam int unsigned SAMPLE_W         = 2 * IQ_W;             // 24
  localparam int unsigned SAMPLES_PER_WORD = 8;
  localparam int unsigned WORD_W           = SAMPLE_W * SAMPLES_PER_WORD;  // 192
  localparam int unsigned WORD_BYTES       = WORD_W / 8;           // 24
  localparam int unsigned FRAME_SAMPLES    = 680;
  localparam int unsigned FRAME_WORDS      = FRAME_SAMPLES / SAMPLES_PER_WORD; // 85
  localparam int unsigned FRAME_BYTES      = 2048;
  localparam int unsigned MAX_PULSES       = 40;
  localparam int unsigned MEM_BYTES        = 512 * 1024 * 1024;
  localparam int unsigned MEM_ADDR_W       = 29;                   // byte address
  localparam int unsigned REGION_FRAMES    = MEM_BYTES / MAX_PULSES / FRAME_BYTES; // 6553
  localparam int unsigned REGION_BYTES     = REGION_FRAMES * FRAME_BYTES;
  localparam int unsigned MAX_DEPTH        = 18823;                // configurable frame depth limit
  localparam int unsigned PULSE_W          = 6;                    // holds 1..40
  localparam int unsigned DEPTH_W          = 15;                   // holds 1..18823
  localparam int unsigned ACC_W            = 24;                   // one summed I or Q
  localparam int unsigned SUM_W            = 2 * ACC_W;            // 48-bit output sample

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [WORD_W-1:0]   word_t;
  typedef logic [SUM_W-1:0]    sum_t;

  // One command to the external memory controller. Reads return their data
  // in command order on a separate valid-qualified bus.
  typedef struct packed {
    logic                  we;     // 1: write wdata, 0: read
    logic [MEM_ADDR_W-1:0] addr;   // byte address of a 192-bit word
    word_t                 wdata;
  } mem_cmd_t;

  // Configuration set by the processor through the AXI4-Lite registers.
  typedef struct packed {
    logic               enable;    // run acquisition and integration
    logic [PULSE_W-1:0] pulses;    // N, 1..40
    logic [DEPTH_W-1:0] depth;     // M frames per pulse, 1..18823
  } ci_cfg_t;

  // Split a sample into its signed parts.
  function automatic logic signed [IQ_W-1:0] sample_i(sample_t s);
    return s[SAMPLE_W-1:IQ_W];
  endfunction
  function automatic logic signed [IQ_W-1:0] sample_q(sample_t s);
    return s[IQ_W-1:0];
  endfunction

endpackage
