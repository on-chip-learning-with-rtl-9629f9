// onn_pkg -- constants and types shared by the digital oscillatory neural
// network (ONN) and its AXI4-Lite register interface.
//
// The network size (15 neurons, a 5x3 image), the 16-clock oscillation period,
// the 5-bit signed weights (-15..+15), the 32-bit AXI4-Lite data word and the
// packing of six weights per word (38 words for 225 weights) follow the
// design description. The register map below is this design's own choice.
package onn_pkg;

  localparam int unsigned N_NEURONS        = 15;  // 5x3 image
  localparam int unsigned PHASE_W          = 4;   // 16 phase steps = 16-clock period
  localparam int unsigned WEIGHT_W         = 5;   // signed, -15..+15
  localparam int unsigned AXI_DATA_W       = 32;
  localparam int unsigned AXI_ADDR_W       = 12;
  localparam int unsigned WEIGHTS_PER_WORD = AXI_DATA_W / WEIGHT_W;  // 6
  localparam int unsigned STABLE_PERIODS   = 2;   // quiet periods that end a run
  localparam int unsigned MAX_PERIODS      = 255; // run limit (timeout)

  // Number of 32-bit words needed for an n x n weight matrix.
  function automatic int unsigned weight_words(input int unsigned n);
    return (n * n + WEIGHTS_PER_WORD - 1) / WEIGHTS_PER_WORD;
  endfunction

  // Register map (byte addresses on the AXI4-Lite bus).
  localparam logic [AXI_ADDR_W-1:0] REG_CTRL        = 12'h000; // [0] learn mode, [1] start (W1P)
  localparam logic [AXI_ADDR_W-1:0] REG_STATUS      = 12'h004; // [0] busy [1] done [2] timeout [15:8] periods
  localparam logic [AXI_ADDR_W-1:0] REG_PHASE_IN0   = 12'h008; // neurons 0..7, 4 bits each
  localparam logic [AXI_ADDR_W-1:0] REG_PHASE_IN1   = 12'h00C; // neurons 8..15
  localparam logic [AXI_ADDR_W-1:0] REG_PHASE_OUT0  = 12'h010; // neurons 0..7
  localparam logic [AXI_ADDR_W-1:0] REG_PHASE_OUT1  = 12'h014; // neurons 8..15
  localparam logic [AXI_ADDR_W-1:0] REG_PATTERN_OUT = 12'h018; // 1 bit per neuron, relative to neuron 0
  localparam logic [AXI_ADDR_W-1:0] REG_WEIGHT_BASE = 12'h100; // weight word k at 0x100 + 4k

  // Phase step decided by a neuron's phase controller at the end of a period.
  typedef enum logic [1:0] {
    STEP_HOLD    = 2'd0,
    STEP_DELAY   = 2'd1,  // phase + 1: the oscillation moves one clock later
    STEP_ADVANCE = 2'd2   // phase - 1: the oscillation moves one clock earlier
  } phase_step_e;

  // Network run state.
  typedef enum logic [1:0] {
    ONN_IDLE = 2'd0,
    ONN_LOAD = 2'd1,
    ONN_RUN  = 2'd2,
    ONN_DONE = 2'd3
  } onn_state_e;

  // AXI response codes used by the slave.
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_SLVERR = 2'b10
  } axi_resp_e;

endpackage
