// axil_regs: AXI-Lite slave holding NREGS 32-bit configuration registers.
//
// Used by the AudioVoice, Sequencer and TempoGenerator to take their
// parameters from the processor. A write is accepted in the cycle where both
// AWVALID and WVALID are high and no write response is pending; the addressed
// word is updated byte by byte under WSTRB and an OKAY response follows on the
// next cycle. Reads return the register contents one cycle after ARVALID.
// Addresses index words with bits [ADDR_LSB+:IDX_W]; bits above the register
// window are ignored (an interconnect decodes them), and words beyond NREGS
// read as zero and ignore writes. All registers reset to zero.
// The register set is from the design; the readable registers, the
// one-transaction-at-a-time handshake and the reset values are this
// implementation's choices.
module axil_regs
  import musilinx_pkg::*;
#(
  parameter int NREGS    = 8,
  parameter int ADDR_LSB = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  axil_req_t          req,
  output axil_rsp_t          rsp,
  output logic [AXIL_DW-1:0] regs [NREGS]
);

  localparam int IDX_W = (NREGS > 1) ? $clog2(NREGS) : 1;

  logic             bvalid_q, rvalid_q;
  logic [AXIL_DW-1:0] rdata_q;
  logic             wr_fire, rd_fire;
  logic [IDX_W-1:0] widx, ridx;

  assign widx    = req.awaddr[ADDR_LSB +: IDX_W];
  assign ridx    = req.araddr[ADDR_LSB +: IDX_W];
  assign wr_fire = req.awvalid && req.wvalid && !bvalid_q;
  assign rd_fire = req.arvalid && !rvalid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      if (wr_fire) begin
        bvalid_q <= 1'b1;
        if (32'(widx) < NREGS)
          for (int b = 0; b < AXIL_DW/8; b++)
            if (req.wstrb[b]) regs[widx][8*b +: 8] <= req.wdata[8*b +: 8];
      end else if (req.bready) begin
        bvalid_q <= 1'b0;
      end
      if (rd_fire) begin
        rvalid_q <= 1'b1;
        rdata_q  <= (32'(ridx) < NREGS) ? regs[ridx] : '0;
      end else if (req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  always_comb begin
    rsp         = '0;
    rsp.awready = wr_fire;
    rsp.wready  = wr_fire;
    rsp.bvalid  = bvalid_q;
    rsp.bresp   = AXI_RESP_OKAY;
    rsp.arready = rd_fire;
    rsp.rvalid  = rvalid_q;
    rsp.rdata   = rdata_q;
    rsp.rresp   = AXI_RESP_OKAY;
  end

endmodule
