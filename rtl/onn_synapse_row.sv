// onn_synapse_row -- the synapses feeding one neuron and their sum.
//
// Each synapse holds a signed weight w_j (5 bits, -15..+15, as in the design
// description) and passes +w_j when the source oscillator j is high and -w_j
// when it is low, i.e. it multiplies the weight by the oscillation taken as
// +1/-1. The N contributions are added in one combinational adder; the sign
// of the sum is the waveform the coupling pulls the neuron towards. The +1/-1
// multiplication and the single-cycle adder are this design's own choices.
//
// Interface: `weights` is the neuron's row of the weight matrix, `osc` the
// outputs of all N oscillators, `sum` the signed total. Purely combinational.
module onn_synapse_row
  import onn_pkg::*;
#(
  parameter int unsigned N  = N_NEURONS,
  parameter int unsigned WW = WEIGHT_W,
  parameter int unsigned SW = WW + $clog2(N) + 1  // sum width
) (
  input  logic signed [WW-1:0] weights [N],
  input  logic        [N-1:0]  osc,
  output logic signed [SW-1:0] sum
);

  always_comb begin
    sum = '0;
    for (int unsigned j = 0; j < N; j++) begin
      if (osc[j]) sum = sum + SW'(weights[j]);
      else        sum = sum - SW'(weights[j]);
    end
  end

endmodule
