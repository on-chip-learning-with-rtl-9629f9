// tb_onn_oscillator -- checks the phase-controlled oscillator: the output is
// high for the first 8 of every 16 clocks counted from its phase, a load sets
// the phase, and DELAY / ADVANCE steps move it by one clock (with wrap).
module tb_onn_oscillator;
  import onn_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [3:0]  t = 0, load_phase = 0, phase, local_k;
  logic        load = 0, osc;
  phase_step_e step = STEP_HOLD;
  int checks = 0, failures = 0;
  int exp_phase;

  onn_oscillator dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) t <= t + 1'b1;

  task automatic check_wave(input int p, input int n);
    repeat (n) begin
      @(negedge clk);
      checks++;
      if (osc !== (((int'(t) - p) & 15) < 8) || phase !== 4'(p)) begin
        failures++;
        $display("FAIL t=%0d phase=%0d exp %0d osc=%b", t, phase, p, osc);
      end
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_wave(0, 20);
    for (int trial = 0; trial < 40; trial++) begin
      exp_phase = $urandom_range(0, 15);
      @(negedge clk);
      load = 1; load_phase = 4'(exp_phase);
      @(negedge clk);
      load = 0;
      check_wave(exp_phase, 17);
      // one step later or earlier
      step = (trial % 2) ? STEP_DELAY : STEP_ADVANCE;
      @(negedge clk);
      step = STEP_HOLD;
      exp_phase = (trial % 2) ? (exp_phase + 1) & 15 : (exp_phase + 15) & 15;
      check_wave(exp_phase, 17);
    end
    // load has priority over a step
    @(negedge clk);
    load = 1; load_phase = 4'd9; step = STEP_DELAY;
    @(negedge clk);
    load = 0; step = STEP_HOLD;
    check_wave(9, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
