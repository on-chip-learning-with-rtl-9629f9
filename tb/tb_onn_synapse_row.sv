// tb_onn_synapse_row -- checks the synapse sum of one neuron: for random
// 5-bit weights in -15..+15 and random oscillator levels the output must be
// sum_j (osc_j ? +w_j : -w_j), including the all-high and all-low extremes.
module tb_onn_synapse_row;
  localparam int N = 15;
  logic signed [4:0] weights [N];
  logic [N-1:0]      osc;
  logic signed [9:0] sum;
  int checks = 0, failures = 0;

  onn_synapse_row dut (.weights, .osc, .sum);

  task automatic check();
    int e;
    #1;
    e = 0;
    for (int j = 0; j < N; j++) e += osc[j] ? int'(weights[j]) : -int'(weights[j]);
    checks++;
    if (int'(sum) != e) begin
      failures++;
      $display("FAIL osc=%b sum=%0d exp %0d", osc, sum, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 500; trial++) begin
      for (int j = 0; j < N; j++) weights[j] = 5'(int'($urandom_range(0, 30)) - 15);
      osc = N'($urandom);
      check();
    end
    for (int j = 0; j < N; j++) weights[j] = 5'sd15;
    osc = '1; check();
    osc = '0; check();
    for (int j = 0; j < N; j++) weights[j] = -5'sd15;
    osc = '1; check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
