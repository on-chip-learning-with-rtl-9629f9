// tb_onn_top_full -- the whole system at its default size (15 neurons,
// 225 weights, 38 weight words, 255-period limit): the testbench acts as the
// processor, learns the digits 0, 1, 2 one at a time with the Hebbian and
// then the Storkey rule, uploads the weights after every learning step and
// runs all 15 test images, comparing every result with the reference model
// and requiring the clean digits to be retrieved once all three are learned.
module tb_onn_top_full;
  import onn_pkg::*;
  import onn_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  axi_lite_if bus  (clk);
  logic done1;
  int checks = 0, failures = 0;
  int n_upload = 0, n_readback = 0, n_stable = 0, n_timeout = 0;

  onn_top dut (
    .aclk(clk), .aresetn(rst_n),
    .s_awaddr(bus.awaddr), .s_awprot(bus.awprot), .s_awvalid(bus.awvalid), .s_awready(bus.awready),
    .s_wdata(bus.wdata), .s_wstrb(bus.wstrb), .s_wvalid(bus.wvalid), .s_wready(bus.wready),
    .s_bresp(bus.bresp), .s_bvalid(bus.bvalid), .s_bready(bus.bready),
    .s_araddr(bus.araddr), .s_arprot(bus.arprot), .s_arvalid(bus.arvalid), .s_arready(bus.arready),
    .s_rdata(bus.rdata), .s_rresp(bus.rresp), .s_rvalid(bus.rvalid), .s_rready(bus.rready),
    .onn_done(done1)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(virtual axi_lite_if vif, input logic [11:0] a, input logic [31:0] d,
                    output logic [1:0] resp);
    int clocks;
    vif.write(a, d, resp, clocks);
  endtask

  task automatic rd(virtual axi_lite_if vif, input logic [11:0] a, output logic [31:0] d);
    logic [1:0] resp;
    vif.read(a, d, resp);
    check(resp == RESP_OKAY, $sformatf("read %h response", a));
  endtask

  // Learning step: learning mode, 38 weight words, back to inference.
  task automatic upload(virtual axi_lite_if vif, input mat_t w);
    logic [1:0]  resp;
    logic [31:0] d;
    wr(vif, REG_CTRL, 32'h1, resp);
    for (int k = 0; k < weight_words(N); k++) begin
      wr(vif, REG_WEIGHT_BASE + 12'(4 * k), pack_word(w, k), resp);
      check(resp == RESP_OKAY, "weight write in learning mode");
      n_upload++;
    end
    rd(vif, REG_WEIGHT_BASE + 12'(4 * 17), d);
    check(d == pack_word(w, 17), "weight read-back");
    n_readback++;
    wr(vif, REG_CTRL, 32'h0, resp);
  endtask

  // Inference: write the image, start, wait, read and compare.
  task automatic infer(virtual axi_lite_if vif, input mat_t w, input phases_t img,
                       input int maxp, output logic [N-1:0] pat);
    logic [1:0]  resp;
    logic [31:0] d, p0, p1;
    phases_t     exp_ph;
    int          exp_periods;
    bit          exp_tmo;
    p0 = '0; p1 = '0;
    for (int i = 0; i < N; i++)
      if (i < 8) p0[i*4 +: 4] = 4'(img[i]); else p1[(i-8)*4 +: 4] = 4'(img[i]);
    wr(vif, REG_PHASE_IN0, p0, resp);
    wr(vif, REG_PHASE_IN1, p1, resp);
    wr(vif, REG_CTRL, 32'h2, resp);
    do rd(vif, REG_STATUS, d); while (!d[1]);
    onn_simulate(w, img, STABLE_PERIODS, maxp, exp_ph, exp_periods, exp_tmo);
    check(int'(d[15:8]) == exp_periods && d[2] == exp_tmo,
          $sformatf("status %h, model %0d periods timeout %0b", d, exp_periods, exp_tmo));
    if (d[2]) n_timeout++; else n_stable++;
    rd(vif, REG_PHASE_OUT0, p0);
    rd(vif, REG_PHASE_OUT1, p1);
    for (int i = 0; i < N; i++)
      check(int'(i < 8 ? p0[i*4 +: 4] : p1[(i-8)*4 +: 4]) == exp_ph[i], $sformatf("phase %0d", i));
    rd(vif, REG_PATTERN_OUT, d);
    pat = N'(d);
    check(pat == pattern_of(exp_ph), "read-out pattern");
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rmat_t        rw;
    mat_t         w;
    logic [N-1:0] pat;
    logic [1:0]   resp;
    logic [31:0]  d;
    int           correct;
    bus.idle();
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int rule = 0; rule < 2; rule++) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) rw[i][j] = 0.0;
      for (int np = 1; np <= NP; np++) begin
        if (rule == 0) hebbian_learn(rw, digit(np - 1));
        else           storkey_learn(rw, digit(np - 1));
        w = quantise(rw);
        upload(bus, w);
        correct = 0;
        for (int t = 0; t < NT; t++) begin
          infer(bus, w, test_image(t), MAX_PERIODS, pat);
          if (pat == relative(digit(t / 5))) correct++;
          if (np == NP && t % 5 == 0)
            check(pat == relative(digit(t / 5)), $sformatf("clean digit %0d retrieved", t / 5));
        end
        $display("%s, %0d pattern(s): %0d of %0d test images retrieved",
                 rule == 0 ? "Hebbian" : "Storkey", np, correct, NT);
      end
    end

    $display("runs ended by stability %0d, by timeout %0d", n_stable, n_timeout);
    check(n_stable == 2 * NP * NT, "all runs ended");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
