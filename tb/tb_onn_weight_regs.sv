// tb_onn_weight_regs -- checks the synapse weight registers: all weights are
// zero after reset; 38 words of six 5-bit weights land on w[i][j] with
// n = i*15 + j = 6k + m from bits [5m+4:5m] of word k; the unused slots of
// the last word are ignored; read-back returns what was written.
module tb_onn_weight_regs;
  localparam int N = 15, WORDS = 38;
  logic              clk = 0, rst_n = 0;
  logic              wr_en = 0;
  logic [5:0]        wr_word = 0, rd_word = 0;
  logic [31:0]       wr_data = 0, rd_data;
  logic signed [4:0] weights [N][N];
  logic [31:0]       words [WORDS];
  int checks = 0, failures = 0;

  onn_weight_regs dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] valid_bits(input int k);
    logic [31:0] m;
    m = '0;
    for (int s = 0; s < 6; s++) if (k * 6 + s < N * N) m[s*5 +: 5] = 5'h1F;
    return m;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      checks++;
      if (weights[i][j] !== 5'sd0) begin failures++; $display("FAIL reset w[%0d][%0d]", i, j); end
    end
    for (int round = 0; round < 3; round++) begin
      for (int k = 0; k < WORDS; k++) begin
        words[k] = $urandom;
        @(negedge clk);
        wr_en = 1; wr_word = 6'(k); wr_data = words[k];
      end
      @(negedge clk);
      wr_en = 0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        int n;
        n = i * N + j;
        checks++;
        if (weights[i][j] !== words[n / 6][(n % 6) * 5 +: 5]) begin
          failures++;
          $display("FAIL w[%0d][%0d]=%0d", i, j, weights[i][j]);
        end
      end
      for (int k = 0; k < WORDS; k++) begin
        rd_word = 6'(k);
        #1;
        checks++;
        if (rd_data !== (words[k] & valid_bits(k))) begin
          failures++;
          $display("FAIL readback word %0d: %h", k, rd_data);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
