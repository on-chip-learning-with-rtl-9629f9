// onn_oscillator -- phase-controlled digital oscillator of one ONN neuron.
//
// The oscillator toggles between '0' and '1' with a period of 2**PHASE_W
// clocks (16 by default, as in the design description): high for the first
// half of its own cycle and low for the second half. All oscillators of the
// network share one free-running period counter `t`; each keeps only its
// phase, and its local position in the cycle is k = t - phase (mod 16), so
// the output is `~k[MSB]`. A larger phase therefore means a later rising
// edge; phase 8 is the 180-degree opposite of phase 0.
//
// Interface: `load` (one cycle) copies `load_phase` into the phase register;
// otherwise `step` (from the phase controller, valid for one cycle at the end
// of a period) moves the phase one step later (DELAY) or earlier (ADVANCE).
// `osc` and `local_k` are combinational from `t` and the phase register, so a
// phase change shows in `osc` from the next clock. The phase resets to 0.
module onn_oscillator
  import onn_pkg::*;
#(
  parameter int unsigned PW = PHASE_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] t,           // shared period counter
  input  logic          load,
  input  logic [PW-1:0] load_phase,
  input  phase_step_e   step,
  output logic [PW-1:0] phase,
  output logic [PW-1:0] local_k,     // position inside the own cycle
  output logic          osc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
    end else if (load) begin
      phase <= load_phase;
    end else begin
      unique case (step)
        STEP_DELAY:   phase <= phase + 1'b1;
        STEP_ADVANCE: phase <= phase - 1'b1;
        default:      ;
      endcase
    end
  end

  assign local_k = t - phase;
  assign osc     = ~local_k[PW-1];

endmodule
