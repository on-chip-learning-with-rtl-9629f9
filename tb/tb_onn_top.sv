// tb_onn_top -- end-to-end test of the on-chip learning system. The
// testbench plays the processor: it keeps the weight matrix in floating
// point, learns the digits 0, 1, 2 one at a time with the Hebbian and then
// (from zero weights again) the Storkey rule, and after each learning step
// enters learning mode, uploads all 38 weight words, leaves learning mode and
// runs the 15 test images through the network over AXI4-Lite. Phases,
// read-out and period counts are compared with the reference model. It also
// makes each mechanism of the design happen and counts it: weight upload in
// learning mode, a weight write refused outside it, a start ignored in
// learning mode, a run abandoned when learning mode is entered, weight
// read-back, runs ended by stability and (on a second instance with a
// 3-period limit) runs ended by the timeout.
module tb_onn_top;
  import onn_pkg::*;
  import onn_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  axi_lite_if bus  (clk);
  axi_lite_if bus2 (clk);
  logic done1, done2;
  int checks = 0, failures = 0;
  int n_upload = 0, n_refused = 0, n_start_ignored = 0, n_abort = 0;
  int n_readback = 0, n_stable = 0, n_timeout = 0;

  onn_top dut (
    .aclk(clk), .aresetn(rst_n),
    .s_awaddr(bus.awaddr), .s_awprot(bus.awprot), .s_awvalid(bus.awvalid), .s_awready(bus.awready),
    .s_wdata(bus.wdata), .s_wstrb(bus.wstrb), .s_wvalid(bus.wvalid), .s_wready(bus.wready),
    .s_bresp(bus.bresp), .s_bvalid(bus.bvalid), .s_bready(bus.bready),
    .s_araddr(bus.araddr), .s_arprot(bus.arprot), .s_arvalid(bus.arvalid), .s_arready(bus.arready),
    .s_rdata(bus.rdata), .s_rresp(bus.rresp), .s_rvalid(bus.rvalid), .s_rready(bus.rready),
    .onn_done(done1)
  );

  onn_top #(.MAXP(3)) dut_short (
    .aclk(clk), .aresetn(rst_n),
    .s_awaddr(bus2.awaddr), .s_awprot(bus2.awprot), .s_awvalid(bus2.awvalid), .s_awready(bus2.awready),
    .s_wdata(bus2.wdata), .s_wstrb(bus2.wstrb), .s_wvalid(bus2.wvalid), .s_wready(bus2.wready),
    .s_bresp(bus2.bresp), .s_bvalid(bus2.bvalid), .s_bready(bus2.bready),
    .s_araddr(bus2.araddr), .s_arprot(bus2.arprot), .s_arvalid(bus2.arvalid), .s_arready(bus2.arready),
    .s_rdata(bus2.rdata), .s_rresp(bus2.rresp), .s_rvalid(bus2.rvalid), .s_rready(bus2.rready),
    .onn_done(done2)
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
    bus2.idle();
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

    check(done1, "done output holds the finished result");

    // weight write outside learning mode is refused and changes nothing
    wr(bus, REG_WEIGHT_BASE + 12'(4 * 17), 32'h0, resp);
    check(resp == RESP_SLVERR, "weight write outside learning mode refused");
    rd(bus, REG_WEIGHT_BASE + 12'(4 * 17), d);
    check(d == pack_word(w, 17), "refused write left the weights");
    if (resp == RESP_SLVERR) n_refused++;

    // start in learning mode is ignored
    wr(bus, REG_CTRL, 32'h1, resp);
    wr(bus, REG_CTRL, 32'h3, resp);
    repeat (4) @(posedge clk);
    rd(bus, REG_STATUS, d);
    check(d[1:0] == 2'b00, "no run in learning mode");
    if (d[1:0] == 2'b00) n_start_ignored++;
    wr(bus, REG_CTRL, 32'h0, resp);

    // a run is abandoned when learning mode is entered
    wr(bus, REG_PHASE_IN0, 32'h0808_0808, resp);
    wr(bus, REG_CTRL, 32'h2, resp);
    rd(bus, REG_STATUS, d);
    check(d[0], "run in progress");
    wr(bus, REG_CTRL, 32'h1, resp);
    rd(bus, REG_STATUS, d);
    check(d[1:0] == 2'b00, "run abandoned");
    if (d[1:0] == 2'b00) n_abort++;
    check(!done1, "done output cleared by the abandoned run");
    wr(bus, REG_CTRL, 32'h0, resp);

    // timeout on the instance limited to 3 periods: an image that needs more
    upload(bus2, w);
    for (int t = 0; t < NT; t++) infer(bus2, w, test_image(t), 3, pat);

    $display("mechanisms: weight words %0d, refused %0d, start ignored %0d, aborted %0d, read-back %0d, stable ends %0d, timeouts %0d",
             n_upload, n_refused, n_start_ignored, n_abort, n_readback, n_stable, n_timeout);
    check(n_upload > 0 && n_refused > 0 && n_start_ignored > 0 && n_abort > 0 &&
          n_readback > 0 && n_stable > 0 && n_timeout > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
