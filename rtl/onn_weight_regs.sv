// onn_weight_regs -- the synapse weight registers of the ONN.
//
// N*N signed weights of WW bits (225 weights of 5 bits, -15..+15, for the
// 15-neuron network) are held in flip-flops so that every synapse sees its
// weight at all times. The host writes them over a 32-bit bus six at a time,
// as the design description does: word k carries weights 6k .. 6k+5, weight
// 6k+m in bits [5m+4 : 5m] (bits 31:30 unused), and weight n is the coupling
// w[i][j] with n = i*N + j (row i = receiving neuron). 225 weights need 38
// words; the unused slots of the last word are ignored. All weights reset to
// zero, matching the description's untrained start. Word k can be read back
// combinationally on the read port. The bit order inside a word and the
// row-major numbering are this design's own choices.
//
// Timing: a write with `wr_en` is visible on `weights` from the next clock.
module onn_weight_regs
  import onn_pkg::*;
#(
  parameter int unsigned N     = N_NEURONS,
  parameter int unsigned WW    = WEIGHT_W,
  parameter int unsigned DW    = AXI_DATA_W,
  parameter int unsigned PER   = DW / WW,                 // weights per word
  parameter int unsigned WORDS = (N * N + PER - 1) / PER, // 38
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_word,
  input  logic [DW-1:0]        wr_data,
  input  logic [AW-1:0]        rd_word,
  output logic [DW-1:0]        rd_data,
  output logic signed [WW-1:0] weights [N][N]
);

  localparam int unsigned NW = N * N;

  logic signed [WW-1:0] w_flat [NW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned n = 0; n < NW; n++) w_flat[n] <= '0;
    end else if (wr_en) begin
      for (int unsigned m = 0; m < PER; m++) begin
        if (32'(wr_word) * PER + m < NW)
          w_flat[32'(wr_word) * PER + m] <= wr_data[m*WW +: WW];
      end
    end
  end

  always_comb begin
    rd_data = '0;
    for (int unsigned m = 0; m < PER; m++) begin
      if (32'(rd_word) * PER + m < NW)
        rd_data[m*WW +: WW] = w_flat[32'(rd_word) * PER + m];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      assign weights[i][j] = w_flat[i*N + j];
    end
  end

endmodule
