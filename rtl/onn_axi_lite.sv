// onn_axi_lite -- AXI4-Lite slave through which the processor controls the
// ONN: it writes input images, starts runs, reads the retrieved phases and,
// in learning mode, rewrites the weight matrix.
//
// The processor is the bus master and this block the slave, with 32-bit data
// words, as in the design description. Register map (byte addresses):
//   0x000 CTRL        rw  [0] LEARN: learning mode, network stopped, weight
//                         writes allowed; [1] START: writing 1 starts a run
//                         (reads as 0, ignored while LEARN is set)
//   0x004 STATUS      ro  [0] busy [1] done [2] timeout [15:8] periods used
//   0x008 PHASE_IN0   rw  initial phase of neurons 0..7, 4 bits each
//   0x00C PHASE_IN1   rw  neurons 8..N-1
//   0x010 PHASE_OUT0  ro  final phase of neurons 0..7
//   0x014 PHASE_OUT1  ro  neurons 8..N-1
//   0x018 PATTERN_OUT ro  binary pattern, bit i = neuron i
//   0x100+4k WEIGHT k rw  six 5-bit weights (see onn_weight_regs); a write
//                         while LEARN is clear gets SLVERR and is dropped
// Any other address answers SLVERR (reads return 0). The map, the rule that
// weights are only written in learning mode, and the response codes are
// this design's own; the description says only that the network stops
// computing while new weights are stored. Write strobes are not used: every
// write replaces the whole word.
//
// Handshakes: the write address and write data are taken independently (a
// one-entry buffer each); when both are present the register is written and
// the response raised the next clock, held until BREADY. A read address is
// taken when no read response is pending; data follow one clock later and
// are held until RREADY. One transaction of each kind is in flight at most.
module onn_axi_lite
  import onn_pkg::*;
#(
  parameter int unsigned N     = N_NEURONS,
  parameter int unsigned PW    = PHASE_W,
  parameter int unsigned AW    = AXI_ADDR_W,
  parameter int unsigned DW    = AXI_DATA_W,
  parameter int unsigned WORDS = weight_words(N_NEURONS),
  parameter int unsigned WAW   = $clog2(WORDS),
  parameter int unsigned CW    = 8
) (
  input  logic           aclk,
  input  logic           aresetn,
  // AXI4-Lite write address / data / response
  input  logic [AW-1:0]  s_awaddr,
  input  logic [2:0]     s_awprot,
  input  logic           s_awvalid,
  output logic           s_awready,
  input  logic [DW-1:0]  s_wdata,
  input  logic [DW/8-1:0] s_wstrb,
  input  logic           s_wvalid,
  output logic           s_wready,
  output logic [1:0]     s_bresp,
  output logic           s_bvalid,
  input  logic           s_bready,
  // AXI4-Lite read address / data
  input  logic [AW-1:0]  s_araddr,
  input  logic [2:0]     s_arprot,
  input  logic           s_arvalid,
  output logic           s_arready,
  output logic [DW-1:0]  s_rdata,
  output logic [1:0]     s_rresp,
  output logic           s_rvalid,
  input  logic           s_rready,
  // ONN control
  output logic           learn,
  output logic           start,
  output logic [PW-1:0]  phase_in [N],
  input  logic           busy,
  input  logic           done,
  input  logic           timeout,
  input  logic [CW-1:0]  periods,
  input  logic [PW-1:0]  phase_out [N],
  input  logic [N-1:0]   pattern_out,
  // weight registers
  output logic           w_wr_en,
  output logic [WAW-1:0] w_wr_word,
  output logic [DW-1:0]  w_wr_data,
  output logic [WAW-1:0] w_rd_word,
  input  logic [DW-1:0]  w_rd_data
);

  localparam int unsigned PPW = DW / PW;  // phases per word (8)

  // ---------------- write channel ----------------
  logic          aw_full, w_full;
  logic [AW-1:0] aw_addr;
  logic [DW-1:0] w_data;
  logic          do_write;

  assign s_awready = !aw_full;
  assign s_wready  = !w_full;
  assign do_write  = aw_full && w_full && !s_bvalid;

  function automatic logic is_weight(input logic [AW-1:0] a);
    return (a >= REG_WEIGHT_BASE) && (32'(a) < 32'(REG_WEIGHT_BASE) + 4 * WORDS);
  endfunction

  function automatic logic [WAW-1:0] weight_index(input logic [AW-1:0] a);
    logic [AW-1:0] off;
    off = a - REG_WEIGHT_BASE;
    return WAW'(off >> 2);
  endfunction

  logic [AW-1:0] wa;  // word-aligned write address
  assign wa = {aw_addr[AW-1:2], 2'b00};

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      aw_full  <= 1'b0;
      w_full   <= 1'b0;
      aw_addr  <= '0;
      w_data   <= '0;
      s_bvalid <= 1'b0;
      s_bresp  <= RESP_OKAY;
      learn    <= 1'b0;
      start    <= 1'b0;
      for (int unsigned i = 0; i < N; i++) phase_in[i] <= '0;
    end else begin
      start <= 1'b0;
      if (s_awvalid && s_awready) begin
        aw_full <= 1'b1;
        aw_addr <= s_awaddr;
      end
      if (s_wvalid && s_wready) begin
        w_full <= 1'b1;
        w_data <= s_wdata;
      end
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (do_write) begin
        aw_full  <= 1'b0;
        w_full   <= 1'b0;
        s_bvalid <= 1'b1;
        s_bresp  <= RESP_OKAY;
        if (is_weight(wa)) begin
          if (!learn) s_bresp <= RESP_SLVERR;
        end else begin
          unique case (wa)
            REG_CTRL: begin
              learn <= w_data[0];
              start <= w_data[1] && !w_data[0];
            end
            REG_PHASE_IN0: begin
              for (int unsigned i = 0; i < PPW; i++)
                if (i < N) phase_in[i] <= w_data[i*PW +: PW];
            end
            REG_PHASE_IN1: begin
              for (int unsigned i = 0; i < PPW; i++)
                if (PPW + i < N) phase_in[PPW + i] <= w_data[i*PW +: PW];
            end
            default: s_bresp <= RESP_SLVERR;
          endcase
        end
      end
    end
  end

  assign w_wr_en   = do_write && is_weight(wa) && learn;
  assign w_wr_word = weight_index(wa);
  assign w_wr_data = w_data;

  // ---------------- read channel ----------------
  logic [AW-1:0] ra;
  logic [DW-1:0] rd_value;
  logic [1:0]    rd_resp;

  assign s_arready = !s_rvalid;
  assign ra        = {s_araddr[AW-1:2], 2'b00};
  assign w_rd_word = weight_index(ra);

  always_comb begin
    rd_value = '0;
    rd_resp  = RESP_OKAY;
    if (is_weight(ra)) begin
      rd_value = w_rd_data;
    end else begin
      unique case (ra)
        REG_CTRL:   rd_value = DW'(learn);
        REG_STATUS: rd_value = DW'({periods, 5'b0, timeout, done, busy});
        REG_PHASE_IN0:
          for (int unsigned i = 0; i < PPW; i++)
            if (i < N) rd_value[i*PW +: PW] = phase_in[i];
        REG_PHASE_IN1:
          for (int unsigned i = 0; i < PPW; i++)
            if (PPW + i < N) rd_value[i*PW +: PW] = phase_in[PPW + i];
        REG_PHASE_OUT0:
          for (int unsigned i = 0; i < PPW; i++)
            if (i < N) rd_value[i*PW +: PW] = phase_out[i];
        REG_PHASE_OUT1:
          for (int unsigned i = 0; i < PPW; i++)
            if (PPW + i < N) rd_value[i*PW +: PW] = phase_out[PPW + i];
        REG_PATTERN_OUT: rd_value = DW'(pattern_out);
        default: rd_resp = RESP_SLVERR;
      endcase
    end
  end

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
      s_rresp  <= RESP_OKAY;
    end else begin
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rd_value;
        s_rresp  <= rd_resp;
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  // ---------------- bus rules (checked in simulation) ----------------
  // A master keeps VALID and its payload until the slave takes it; the slave
  // keeps its responses until the master takes them.
  a_aw_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_awvalid && !s_awready |=> s_awvalid && $stable(s_awaddr));
  a_w_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_wvalid && !s_wready |=> s_wvalid && $stable(s_wdata));
  a_ar_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_arvalid && !s_arready |=> s_arvalid && $stable(s_araddr));
  a_b_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_bvalid && !s_bready |=> s_bvalid && $stable(s_bresp));
  a_r_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
