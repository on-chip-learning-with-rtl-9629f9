// onn_phase_ctrl -- phase controller of one neuron: an early/late phase
// detector that nudges the oscillator towards the waveform its synapses drive.
//
// Every clock the reference level is the sign of the synapse sum (positive ->
// '1', negative -> '0', zero -> the neuron's own level, i.e. no error). A
// clock where reference and own oscillation disagree is a mismatch. If the
// reference lags the oscillator by d steps (d < 8), the mismatches fall in the
// first quarter of each half cycle (local k = 0..3 and 8..11, the "late"
// window); if it leads, they fall in the last quarter of each half (k = 4..7
// and 12..15, the "early" window). Over one period the two windows are
// counted. At the end of the period (t = 15) the controller asks for one phase
// step: DELAY if late > early, ADVANCE if early > late. On a tie with more
// than half the period mismatched the reference is in anti-phase and the
// controller steps DELAY to leave that balance point; otherwise it holds.
// The description names oscillator phase control and stabilisation but not
// this mechanism; the early/late detector is this design's own choice.
//
// Interface: `en` marks running clocks; `clear` (the load cycle) empties the
// counters; `step` is valid only in the clock with t = 2**PW - 1 and en = 1;
// that clock's own sample is included. The counters restart every period.
module onn_phase_ctrl
  import onn_pkg::*;
#(
  parameter int unsigned PW = PHASE_W,
  parameter int unsigned SW = WEIGHT_W + $clog2(N_NEURONS) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 clear,
  input  logic [PW-1:0]        t,
  input  logic [PW-1:0]        local_k,
  input  logic                 osc,
  input  logic signed [SW-1:0] sum,
  output phase_step_e          step
);

  localparam int unsigned HALF = 2 ** (PW - 1);

  logic          ref_lvl, mismatch, in_early;
  logic [PW-1:0] late_cnt, early_cnt;    // each counts at most HALF
  logic [PW-1:0] late_tot, early_tot;
  logic          period_end;

  assign ref_lvl    = (sum > 0) ? 1'b1 : (sum < 0) ? 1'b0 : osc;
  assign mismatch   = ref_lvl ^ osc;
  assign in_early   = local_k[PW-2];
  assign late_tot   = late_cnt  + PW'(mismatch && !in_early);
  assign early_tot  = early_cnt + PW'(mismatch && in_early);
  assign period_end = en && (t == {PW{1'b1}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      late_cnt  <= '0;
      early_cnt <= '0;
    end else if (clear || period_end) begin
      late_cnt  <= '0;
      early_cnt <= '0;
    end else if (en) begin
      late_cnt  <= late_tot;
      early_cnt <= early_tot;
    end
  end

  always_comb begin
    step = STEP_HOLD;
    if (period_end) begin
      if (late_tot > early_tot)      step = STEP_DELAY;
      else if (early_tot > late_tot) step = STEP_ADVANCE;
      else if ((PW + 1)'(late_tot) + (PW + 1)'(early_tot) > (PW + 1)'(HALF))
                                     step = STEP_DELAY;
    end
  end

endmodule
