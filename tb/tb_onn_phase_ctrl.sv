// tb_onn_phase_ctrl -- checks the early/late phase detector. The neuron sits
// at phase 0; the synapse sum is a +/-5 square wave lagging it by d clocks.
// Expected decision at the end of the period: d = 0 hold, d = 1..7 delay,
// d = 8 (anti-phase) delay, d = 9..15 (a lead of 7..1) advance. A zero sum
// gives no error and holds, and no step may appear before t = 15.
module tb_onn_phase_ctrl;
  import onn_pkg::*;

  logic             clk = 0, rst_n = 0;
  logic             en = 0, clear = 0, osc;
  logic [3:0]       t = 0, local_k;
  logic signed [9:0] sum;
  phase_step_e      step;
  int checks = 0, failures = 0;
  int lag;
  bit zero_sum;

  onn_phase_ctrl dut (.*);

  always #5 clk = ~clk;

  assign local_k = t;                // own phase 0
  assign osc     = ~t[3];
  always_comb begin
    if (zero_sum) sum = '0;
    else          sum = (((int'(t) - lag) & 15) < 8) ? 10'sd5 : -10'sd5;
  end

  function automatic phase_step_e expected(input int d);
    if (d == 0) return STEP_HOLD;
    if (d <= 8) return STEP_DELAY;
    return STEP_ADVANCE;
  endfunction

  task automatic one_period(input phase_step_e exp_step);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      checks++;
      if (k < 15 && step != STEP_HOLD) begin
        failures++;
        $display("FAIL early step at t=%0d lag=%0d", t, lag);
      end
      if (k == 15 && step != exp_step) begin
        failures++;
        $display("FAIL lag=%0d zero=%0b step=%s exp %s", lag, zero_sum, step.name(), exp_step.name());
      end
      @(posedge clk);
      t <= t + 1'b1;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lag = 0; zero_sum = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    en = 1;
    for (int d = 0; d < 16; d++) begin
      lag = d;
      one_period(expected(d));
    end
    zero_sum = 1;
    one_period(STEP_HOLD);
    zero_sum = 0;
    // counters must not carry over from a stopped, cleared period
    lag = 3;
    for (int k = 0; k < 8; k++) begin @(posedge clk); t <= t + 1'b1; end
    en = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    @(posedge clk); t <= 0;
    lag = 0; en = 1;
    one_period(STEP_HOLD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
