// tb_onn_core -- runs the 15-neuron network on the weight matrices the host
// would compute (Hebbian learning of the digits 0, 1, 2, one, two and three
// patterns) for all 15 test images, and compares final phases, the binary
// read-out, the number of periods and the timeout flag with the reference
// model. Also checks that a run lasts 1 + 16 * periods clocks, that a single
// learned pattern is retrieved from its corrupted copies, that `hold` stops a
// run and blocks `start`, and that a run with no coupling stops after the
// minimum two quiet periods.
module tb_onn_core;
  import onn_ref_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic              start = 0, hold = 0;
  logic [3:0]        phase_in  [N];
  logic signed [4:0] weights   [N][N];
  logic              busy, done, timeout;
  logic [7:0]        periods;
  logic [3:0]        phase_out [N];
  logic [N-1:0]      pattern_out, osc_out;
  int checks = 0, failures = 0;

  onn_core dut (.*);

  always #5 clk = ~clk;

  task automatic set_weights(input mat_t w);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) weights[i][j] = 5'(w[i][j]);
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Run one image and compare with the model; returns the read-out.
  task automatic run_image(input mat_t w, input phases_t img, output logic [N-1:0] pat);
    phases_t exp_ph;
    int      exp_periods, busy_clocks;
    bit      exp_tmo;
    onn_simulate(w, img, 2, 255, exp_ph, exp_periods, exp_tmo);
    @(negedge clk);
    for (int i = 0; i < N; i++) phase_in[i] = 4'(img[i]);
    start = 1;
    @(negedge clk);
    start = 0;
    busy_clocks = 0;
    while (!done) begin
      if (busy) busy_clocks++;
      @(negedge clk);
    end
    for (int i = 0; i < N; i++)
      check(int'(phase_out[i]) == exp_ph[i], $sformatf("phase %0d = %0d, model %0d", i, phase_out[i], exp_ph[i]));
    check(pattern_out == pattern_of(exp_ph), "read-out pattern");
    check(int'(periods) == exp_periods, $sformatf("periods %0d, model %0d", periods, exp_periods));
    check(timeout == exp_tmo, "timeout flag");
    check(busy_clocks == 1 + 16 * exp_periods, $sformatf("run took %0d clocks for %0d periods", busy_clocks, exp_periods));
    pat = pattern_out;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rmat_t        rw;
    mat_t         w;
    logic [N-1:0] pat;
    int           correct;
    for (int i = 0; i < N; i++) begin
      phase_in[i] = 0;
      for (int j = 0; j < N; j++) begin weights[i][j] = 0; rw[i][j] = 0.0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // no coupling: nothing moves, two quiet periods end the run
    w = quantise(rw);
    run_image(w, test_image(1), pat);
    check(periods == 8'd2, "uncoupled run length");

    for (int np = 1; np <= NP; np++) begin
      hebbian_learn(rw, digit(np - 1));
      w = quantise(rw);
      set_weights(w);
      correct = 0;
      for (int t = 0; t < NT; t++) begin
        run_image(w, test_image(t), pat);
        if (pat == relative(digit(t / 5))) correct++;
        if (np == NP && t % 5 == 0)
          check(pat == relative(digit(t / 5)), $sformatf("clean digit %0d retrieved", t / 5));
      end
      $display("Hebbian, %0d pattern(s): %0d of %0d test images retrieved", np, correct, NT);
      if (np == 1) begin
        // one stored pattern: every copy of digit 0 must come back
        for (int t = 0; t < 5; t++) begin
          run_image(w, test_image(t), pat);
          check(pat == relative(digit(0)), $sformatf("retrieval of image %0d", t));
        end
      end
    end

    // hold stops a run and keeps start from starting one
    @(negedge clk);
    for (int i = 0; i < N; i++) phase_in[i] = 4'(test_image(6)[i]);
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (5) @(negedge clk);
    check(busy, "busy during run");
    hold = 1;
    @(negedge clk);
    check(!busy && !done, "hold stops the run");
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (3) @(negedge clk);
    check(!busy && !done, "start ignored under hold");
    hold = 0;
    @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
