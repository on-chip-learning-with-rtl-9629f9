// axi_lite_if -- AXI4-Lite bus bundle with a simple master (the processor
// side) for the ONN testbenches: one write or read at a time, VALID held
// until READY, response accepted at once. The tasks return the response
// code and the number of clocks the transfer took.
interface axi_lite_if (input logic aclk);
  logic [11:0] awaddr;
  logic [2:0]  awprot;
  logic        awvalid;
  logic        awready;
  logic [31:0] wdata;
  logic [3:0]  wstrb;
  logic        wvalid;
  logic        wready;
  logic [1:0]  bresp;
  logic        bvalid;
  logic        bready;
  logic [11:0] araddr;
  logic [2:0]  arprot;
  logic        arvalid;
  logic        arready;
  logic [31:0] rdata;
  logic [1:0]  rresp;
  logic        rvalid;
  logic        rready;

  task automatic idle();
    awaddr = '0; awprot = '0; awvalid = 0; wdata = '0; wstrb = 4'hF;
    wvalid = 0; bready = 0; araddr = '0; arprot = '0; arvalid = 0; rready = 0;
  endtask

  task automatic write(input logic [11:0] addr, input logic [31:0] data,
                       output logic [1:0] resp, output int clocks);
    bit aw_done, w_done;
    clocks  = 0;
    @(posedge aclk);
    awaddr  <= addr;
    awvalid <= 1;
    wdata   <= data;
    wvalid  <= 1;
    bready  <= 1;
    aw_done = 0;
    w_done  = 0;
    do begin
      @(posedge aclk);
      clocks++;
      if (awvalid && awready) begin aw_done = 1; awvalid <= 0; end
      if (wvalid && wready)   begin w_done = 1;  wvalid  <= 0; end
    end while (!(aw_done && w_done));
    while (!bvalid) begin @(posedge aclk); clocks++; end
    resp = bresp;
    // bready was high in this clock: the response is taken here
    @(posedge aclk);
    bready <= 0;
  endtask

  task automatic read(input logic [11:0] addr, output logic [31:0] data,
                      output logic [1:0] resp);
    @(posedge aclk);
    araddr  <= addr;
    arvalid <= 1;
    rready  <= 1;
    do @(posedge aclk); while (!(arvalid && arready));
    arvalid <= 0;
    while (!rvalid) @(posedge aclk);
    data = rdata;
    resp = rresp;
    @(posedge aclk);
    rready <= 0;
  endtask
endinterface
