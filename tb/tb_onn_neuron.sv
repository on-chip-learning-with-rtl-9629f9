// tb_onn_neuron -- one neuron of a 3-neuron network. Neurons 1 and 2 are
// square waves at phase 8 driven by the testbench. With weights +15 the
// neuron, loaded at phase 0, must move one step later every period
// (0 -> 8, eight periods) and then hold; with weights -15 (anti-phase
// coupling) it must stay at phase 0.
module tb_onn_neuron;
  localparam int N = 3;
  logic             clk = 0, rst_n = 0;
  logic [3:0]       t = 0, load_phase = 0, phase;
  logic             run = 0, load = 0, osc, stepped;
  logic [N-1:0]     osc_all;
  logic signed [4:0] weights [N];
  int checks = 0, failures = 0;
  int steps_seen;

  onn_neuron #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  logic [3:0] nk;  // neighbours' position in their cycle (phase 8)
  always_ff @(posedge clk) t <= run ? t + 1'b1 : 4'd0;
  assign nk      = t - 4'd8;
  assign osc_all = {~nk[3], ~nk[3], osc};

  task automatic run_case(input int w, input int exp_final, input int exp_steps);
    @(negedge clk);
    weights[0] = 0; weights[1] = 5'(w); weights[2] = 5'(w);
    load = 1; load_phase = 0;
    @(negedge clk);
    load = 0; run = 1;
    steps_seen = 0;
    for (int p = 0; p < 12; p++) begin
      int exp_p;
      repeat (16) begin
        @(posedge clk);
        if (stepped) steps_seen++;
      end
      @(negedge clk);
      exp_p = (w > 0) ? ((p + 1 < 8) ? p + 1 : 8) : 0;
      checks++;
      if (int'(phase) != exp_p) begin
        failures++;
        $display("FAIL w=%0d period %0d phase=%0d exp %0d", w, p, phase, exp_p);
      end
    end
    run = 0;
    checks++;
    if (int'(phase) != exp_final || steps_seen != exp_steps) begin
      failures++;
      $display("FAIL w=%0d final %0d steps %0d", w, phase, steps_seen);
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < N; j++) weights[j] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_case(15, 8, 8);
    run_case(-15, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
