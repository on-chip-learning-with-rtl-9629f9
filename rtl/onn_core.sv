// onn_core -- fully connected digital oscillatory neural network (ONN) used
// as an auto-associative memory, with its run controller.
//
// N neurons (15 for a 5x3 image) oscillate with a 16-clock period. A run
// starts from the input image: each pixel sets its neuron's initial phase
// (0 = 0 degrees ... 8 = 180 degrees, grey levels in between). The neurons
// then shift their phases under the coupling of the weight matrix until the
// network is stable, and the final phases are the retrieved pattern.
//
// Controller: IDLE --start--> LOAD (one clock: phases loaded, counters
// cleared) --> RUN (the shared period counter t counts 0..15 repeatedly).
// At the end of every period the run ends (DONE) when no neuron has changed
// phase for STABLE periods in a row, or, with `timeout` set, when MAXP
// periods have passed. A run therefore takes 1 + 16 * periods clocks.
// `hold` (learning mode: the weights are being rewritten) stops the network:
// a run in progress is abandoned and `start` is ignored, which keeps the
// oscillators from computing with a half-written matrix. DONE keeps the
// result until the next start or hold.
//
// Outputs: `phase_out` are the final phases; `pattern_out[i]` is 1 when
// neuron i is closer to anti-phase than to in-phase with neuron 0 (circular
// distance above a quarter period), the binary image up to global inversion.
// The period, phase encoding and weight format follow the design
// description; the stopping rule, the timeout and the binary read-out are
// this design's own choices.
module onn_core
  import onn_pkg::*;
#(
  parameter int unsigned N      = N_NEURONS,
  parameter int unsigned PW     = PHASE_W,
  parameter int unsigned WW     = WEIGHT_W,
  parameter int unsigned STABLE = STABLE_PERIODS,
  parameter int unsigned MAXP   = MAX_PERIODS,
  parameter int unsigned CW     = 8              // width of the period count
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 hold,
  input  logic [PW-1:0]        phase_in  [N],
  input  logic signed [WW-1:0] weights   [N][N],
  output logic                 busy,
  output logic                 done,
  output logic                 timeout,
  output logic [CW-1:0]        periods,
  output logic [PW-1:0]        phase_out [N],
  output logic [N-1:0]         pattern_out,
  output logic [N-1:0]         osc_out
);

  localparam int unsigned HALF    = 2 ** (PW - 1);
  localparam int unsigned QUARTER = 2 ** (PW - 2);

  onn_state_e    state;
  logic [PW-1:0] t;
  logic [CW-1:0] stable_cnt;
  logic          run, load, period_end, any_step;
  logic [N-1:0]  stepped;

  assign run        = (state == ONN_RUN);
  assign load       = (state == ONN_LOAD);
  assign period_end = run && (t == {PW{1'b1}});
  assign any_step   = |stepped;

  for (genvar i = 0; i < N; i++) begin : g_neuron
    onn_neuron #(.N(N), .PW(PW), .WW(WW)) u_neuron (
      .clk, .rst_n, .t, .run, .load,
      .load_phase (phase_in[i]),
      .osc_all    (osc_out),
      .weights    (weights[i]),
      .osc        (osc_out[i]),
      .phase      (phase_out[i]),
      .stepped    (stepped[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ONN_IDLE;
      t          <= '0;
      stable_cnt <= '0;
      periods    <= '0;
      timeout    <= 1'b0;
    end else if (hold) begin
      state <= ONN_IDLE;
      t     <= '0;
    end else begin
      unique case (state)
        ONN_IDLE, ONN_DONE: begin
          if (start) begin
            state      <= ONN_LOAD;
            t          <= '0;
            stable_cnt <= '0;
            periods    <= '0;
            timeout    <= 1'b0;
          end
        end
        ONN_LOAD: state <= ONN_RUN;
        ONN_RUN: begin
          t <= t + 1'b1;
          if (period_end) begin
            periods    <= periods + 1'b1;
            stable_cnt <= any_step ? '0 : stable_cnt + 1'b1;
            if (!any_step && (32'(stable_cnt) + 1 >= STABLE)) begin
              state <= ONN_DONE;
            end else if (32'(periods) + 1 >= MAXP) begin
              state   <= ONN_DONE;
              timeout <= 1'b1;
            end
          end
        end
        default: state <= ONN_IDLE;
      endcase
    end
  end

  assign busy = load || run;
  assign done = (state == ONN_DONE);

  // Binary read-out relative to neuron 0.
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      logic [PW-1:0] diff;
      logic [PW-1:0] pdist;
      diff = phase_out[i] - phase_out[0];
      pdist = (diff < PW'(HALF)) ? diff : PW'(0) - diff;
      pattern_out[i] = (pdist > PW'(QUARTER));
    end
  end

  initial begin
    assert (MAXP < 2 ** CW) else $error("MAXP does not fit the period counter");
    assert (STABLE >= 1)    else $error("STABLE must be at least 1");
  end

endmodule
