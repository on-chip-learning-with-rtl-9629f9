// onn_top -- programmable-logic part of an on-chip learning system built
// around a 15-neuron digital oscillatory neural network (ONN).
//
// A processor runs the learning rules (Hebbian or Storkey) in software and
// drives this block over AXI4-Lite: it writes an input image as initial
// oscillator phases, starts the network, and reads back the retrieved
// pattern; to learn, it sets learning mode (the network stops), writes the
// new 225-weight matrix as 38 words of six 5-bit weights, and leaves learning
// mode. The block holds the AXI4-Lite slave (onn_axi_lite), the synapse
// weight registers (onn_weight_regs) and the network with its run controller
// (onn_core). Register map and timing: see onn_axi_lite and onn_core. The
// partition follows the design description; the register map and the
// network's stopping rule are this design's own.
//
// Interface: one clock `aclk` and active-low reset `aresetn` for all parts,
// the AXI4-Lite slave port, and `onn_done` (high while a finished result is
// held), which a system may use as an interrupt.
module onn_top
  import onn_pkg::*;
#(
  parameter int unsigned N      = N_NEURONS,
  parameter int unsigned STABLE = STABLE_PERIODS,
  parameter int unsigned MAXP   = MAX_PERIODS
) (
  input  logic                    aclk,
  input  logic                    aresetn,
  input  logic [AXI_ADDR_W-1:0]   s_awaddr,
  input  logic [2:0]              s_awprot,
  input  logic                    s_awvalid,
  output logic                    s_awready,
  input  logic [AXI_DATA_W-1:0]   s_wdata,
  input  logic [AXI_DATA_W/8-1:0] s_wstrb,
  input  logic                    s_wvalid,
  output logic                    s_wready,
  output logic [1:0]              s_bresp,
  output logic                    s_bvalid,
  input  logic                    s_bready,
  input  logic [AXI_ADDR_W-1:0]   s_araddr,
  input  logic [2:0]              s_arprot,
  input  logic                    s_arvalid,
  output logic                    s_arready,
  output logic [AXI_DATA_W-1:0]   s_rdata,
  output logic [1:0]              s_rresp,
  output logic                    s_rvalid,
  input  logic                    s_rready,
  output logic                    onn_done
);

  localparam int unsigned WORDS = weight_words(N);
  localparam int unsigned WAW   = $clog2(WORDS);

  logic                        learn, start, busy, done, timeout;
  logic [7:0]                  periods;
  logic [PHASE_W-1:0]          phase_in  [N];
  logic [PHASE_W-1:0]          phase_out [N];
  logic [N-1:0]                pattern_out, osc;
  logic                        w_wr_en;
  logic [WAW-1:0]              w_wr_word, w_rd_word;
  logic [AXI_DATA_W-1:0]       w_wr_data, w_rd_data;
  logic signed [WEIGHT_W-1:0]  weights [N][N];

  onn_axi_lite #(.N(N), .WORDS(WORDS), .WAW(WAW)) u_axi (
    .aclk, .aresetn,
    .s_awaddr, .s_awprot, .s_awvalid, .s_awready,
    .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready,
    .s_araddr, .s_arprot, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .learn, .start, .phase_in, .busy, .done, .timeout, .periods,
    .phase_out, .pattern_out,
    .w_wr_en, .w_wr_word, .w_wr_data, .w_rd_word, .w_rd_data
  );

  onn_weight_regs #(.N(N), .WORDS(WORDS), .AW(WAW)) u_weights (
    .clk(aclk), .rst_n(aresetn),
    .wr_en(w_wr_en), .wr_word(w_wr_word), .wr_data(w_wr_data),
    .rd_word(w_rd_word), .rd_data(w_rd_data),
    .weights
  );

  onn_core #(.N(N), .STABLE(STABLE), .MAXP(MAXP)) u_core (
    .clk(aclk), .rst_n(aresetn),
    .start, .hold(learn),
    .phase_in, .weights,
    .busy, .done, .timeout, .periods,
    .phase_out, .pattern_out, .osc_out(osc)
  );

  assign onn_done = done;

endmodule
