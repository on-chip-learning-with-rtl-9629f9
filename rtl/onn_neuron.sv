// onn_neuron -- one neuron of the digital ONN: a phase-controlled oscillator,
// the synapses that couple every oscillator of the network into it, and the
// phase controller that lets that coupling shift its phase.
//
// Each period (16 clocks) the synapse sum's sign is compared with the
// neuron's own oscillation, and at the period end the phase moves at most one
// step (1/16 of a period) towards the coupled waveform. A neuron whose phase
// agrees with its coupling for a whole period holds still.
//
// Interface: `t` is the network's shared period counter, `run` marks running
// clocks, `load`/`load_phase` set the initial phase (input pixel),
// `osc_all` are all oscillator outputs (this neuron's included), `weights`
// its row of the weight matrix. `stepped` is high in a period-end clock in
// which the phase changes. The neuron structure follows the design
// description; the step rule is this design's own (see onn_phase_ctrl).
module onn_neuron
  import onn_pkg::*;
#(
  parameter int unsigned N  = N_NEURONS,
  parameter int unsigned PW = PHASE_W,
  parameter int unsigned WW = WEIGHT_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [PW-1:0]        t,
  input  logic                 run,
  input  logic                 load,
  input  logic [PW-1:0]        load_phase,
  input  logic [N-1:0]         osc_all,
  input  logic signed [WW-1:0] weights [N],
  output logic                 osc,
  output logic [PW-1:0]        phase,
  output logic                 stepped
);

  localparam int unsigned SW = WW + $clog2(N) + 1;

  logic signed [SW-1:0] sum;
  logic [PW-1:0]        local_k;
  phase_step_e          step;

  onn_oscillator #(.PW(PW)) u_osc (
    .clk, .rst_n, .t, .load, .load_phase, .step,
    .phase, .local_k, .osc
  );

  onn_synapse_row #(.N(N), .WW(WW), .SW(SW)) u_syn (
    .weights, .osc(osc_all), .sum
  );

  onn_phase_ctrl #(.PW(PW), .SW(SW)) u_pc (
    .clk, .rst_n, .en(run), .clear(load), .t, .local_k, .osc, .sum, .step
  );

  assign stepped = (step != STEP_HOLD);

endmodule
