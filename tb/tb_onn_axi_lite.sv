// tb_onn_axi_lite -- checks the AXI4-Lite slave and its register map with a
// modelled network and weight store: input phases written and read back and
// presented to the network; START gives exactly one start pulse and is
// ignored in learning mode; weight words are passed to the weight store only
// in learning mode, and answered with SLVERR otherwise; STATUS, PHASE_OUT and
// PATTERN_OUT show the network outputs; weight words read back; unmapped
// addresses answer SLVERR. A write takes 3 clocks from VALID to response.
module tb_onn_axi_lite;
  import onn_pkg::*;
  localparam int N = 15;

  logic         clk = 0, rst_n = 0;
  axi_lite_if   bus (clk);
  logic         learn, start;
  logic [3:0]   phase_in  [N];
  logic         busy = 0, done = 0, timeout = 0;
  logic [7:0]   periods = 0;
  logic [3:0]   phase_out [N];
  logic [N-1:0] pattern_out = 0;
  logic         w_wr_en;
  logic [5:0]   w_wr_word, w_rd_word;
  logic [31:0]  w_wr_data, w_rd_data;
  int checks = 0, failures = 0;
  int starts = 0, wr_count = 0;
  logic [5:0]   last_wr_word;
  logic [31:0]  last_wr_data;

  onn_axi_lite dut (
    .aclk(clk), .aresetn(rst_n),
    .s_awaddr(bus.awaddr), .s_awprot(bus.awprot), .s_awvalid(bus.awvalid), .s_awready(bus.awready),
    .s_wdata(bus.wdata), .s_wstrb(bus.wstrb), .s_wvalid(bus.wvalid), .s_wready(bus.wready),
    .s_bresp(bus.bresp), .s_bvalid(bus.bvalid), .s_bready(bus.bready),
    .s_araddr(bus.araddr), .s_arprot(bus.arprot), .s_arvalid(bus.arvalid), .s_arready(bus.arready),
    .s_rdata(bus.rdata), .s_rresp(bus.rresp), .s_rvalid(bus.rvalid), .s_rready(bus.rready),
    .learn, .start, .phase_in, .busy, .done, .timeout, .periods, .phase_out, .pattern_out,
    .w_wr_en, .w_wr_word, .w_wr_data, .w_rd_word, .w_rd_data
  );

  always #5 clk = ~clk;
  assign w_rd_data = 32'h1234_0000 | 32'(w_rd_word);

  always_ff @(posedge clk) begin
    if (start) starts <= starts + 1;
    if (w_wr_en) begin
      wr_count     <= wr_count + 1;
      last_wr_word <= w_wr_word;
      last_wr_data <= w_wr_data;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [11:0] a, input logic [31:0] d, input logic [1:0] exp_resp);
    logic [1:0] resp;
    int clocks;
    bus.write(a, d, resp, clocks);
    check(resp == exp_resp, $sformatf("write %h resp %0d", a, resp));
    check(clocks == 3, $sformatf("write %h took %0d clocks", a, clocks));
  endtask

  task automatic rd(input logic [11:0] a, input logic [31:0] exp_d, input logic [1:0] exp_resp);
    logic [31:0] d;
    logic [1:0]  resp;
    bus.read(a, d, resp);
    check(resp == exp_resp && d == exp_d, $sformatf("read %h = %h/%0d, exp %h/%0d", a, d, resp, exp_d, exp_resp));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p0, p1;
    bus.idle();
    for (int i = 0; i < N; i++) phase_out[i] = 4'(i);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // input phases
    p0 = 32'h8080_4808; p1 = 32'h0878_8008;
    wr(REG_PHASE_IN0, p0, RESP_OKAY);
    wr(REG_PHASE_IN1, p1, RESP_OKAY);
    rd(REG_PHASE_IN0, p0, RESP_OKAY);
    rd(REG_PHASE_IN1, p1 & 32'h0FFF_FFFF, RESP_OKAY);
    for (int i = 0; i < N; i++)
      check(phase_in[i] == (i < 8 ? p0[i*4 +: 4] : p1[(i-8)*4 +: 4]), $sformatf("phase_in %0d", i));

    // start: one pulse
    wr(REG_CTRL, 32'h2, RESP_OKAY);
    repeat (3) @(posedge clk);
    check(starts == 1, $sformatf("%0d start pulses", starts));
    rd(REG_CTRL, 32'h0, RESP_OKAY);

    // weight write outside learning mode is refused
    wr(REG_WEIGHT_BASE + 12'h8, 32'hDEAD_BEEF, RESP_SLVERR);
    check(wr_count == 0, "weight written outside learning mode");

    // learning mode: weights pass, start is ignored
    wr(REG_CTRL, 32'h1, RESP_OKAY);
    check(learn, "learn set");
    wr(REG_CTRL, 32'h3, RESP_OKAY);
    repeat (3) @(posedge clk);
    check(starts == 1, "start ignored in learning mode");
    for (int k = 0; k < 38; k++) begin
      wr(REG_WEIGHT_BASE + 12'(4 * k), 32'h0A00_0000 + k, RESP_OKAY);
      @(posedge clk);
      check(last_wr_word == 6'(k) && last_wr_data == 32'h0A00_0000 + k, $sformatf("weight word %0d", k));
    end
    check(wr_count == 38, $sformatf("%0d weight words", wr_count));
    wr(REG_WEIGHT_BASE + 12'(4 * 38), 32'h1, RESP_SLVERR);   // past the last word
    check(wr_count == 38, "write past the weights");
    rd(REG_WEIGHT_BASE + 12'd20, 32'h1234_0005, RESP_OKAY);
    rd(REG_WEIGHT_BASE + 12'd148, 32'h1234_0025, RESP_OKAY);
    wr(REG_CTRL, 32'h0, RESP_OKAY);
    check(!learn, "learn cleared");

    // status and outputs
    busy = 0; done = 1; timeout = 1; periods = 8'd37; pattern_out = 15'h5A5A;
    rd(REG_STATUS, 32'h0000_2506, RESP_OKAY);
    rd(REG_PHASE_OUT0, 32'h7654_3210, RESP_OKAY);
    rd(REG_PHASE_OUT1, 32'h0EDC_BA98, RESP_OKAY);
    rd(REG_PATTERN_OUT, 32'h0000_5A5A, RESP_OKAY);
    busy = 1; done = 0; timeout = 0;
    rd(REG_STATUS, 32'h0000_2501, RESP_OKAY);

    // unmapped
    rd(12'h01C, 32'h0, RESP_SLVERR);
    wr(12'h004, 32'h1, RESP_SLVERR);   // STATUS is read-only
    wr(12'h0F0, 32'h1, RESP_SLVERR);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
