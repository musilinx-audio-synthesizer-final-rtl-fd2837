// axil_decoder: one AXI-Lite master fanned out to NSLAVES slaves.
//
// Connects the processor's AXI-Lite port to the register files of the voices,
// the sequencer and the tempo generator. Slave k owns the 2**SPAN_BITS-byte
// window starting at k << SPAN_BITS; the slave index is address bits
// [SPAN_BITS +: SEL_W]. One write and one read may be outstanding at a time:
// AW/W are routed combinationally to the addressed slave, the selected index is
// remembered until its B (or R) response has been taken, and new requests are
// held off meanwhile. An address with no slave behind it is answered by the
// decoder with DECERR. The design names no interconnect; this one is the
// simplest that gives every block its own address range.
module axil_decoder
  import musilinx_pkg::*;
#(
  parameter int NSLAVES   = 34,
  parameter int SPAN_BITS = 5
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t m_req,
  output axil_rsp_t m_rsp,
  output axil_req_t s_req [NSLAVES],
  input  axil_rsp_t s_rsp [NSLAVES]
);

  localparam int SEL_W = (NSLAVES > 1) ? $clog2(NSLAVES) : 1;

  logic [SEL_W-1:0] wsel, rsel, wsel_q, rsel_q;
  logic             wvalid_sel, rvalid_sel;   // address hits a slave
  logic             wbusy_q, rbusy_q;         // response outstanding
  logic             werr_q, rerr_q;           // outstanding response is DECERR

  assign wsel       = m_req.awaddr[SPAN_BITS +: SEL_W];
  assign rsel       = m_req.araddr[SPAN_BITS +: SEL_W];
  assign wvalid_sel = (32'(wsel) < NSLAVES) &&
                      (m_req.awaddr >> (SPAN_BITS + SEL_W)) == '0;
  assign rvalid_sel = (32'(rsel) < NSLAVES) &&
                      (m_req.araddr >> (SPAN_BITS + SEL_W)) == '0;

  logic wfire_ok, wfire_err, rfire_ok, rfire_err;

  always_comb begin
    m_rsp = '0;
    wfire_ok  = 1'b0;
    wfire_err = 1'b0;
    rfire_ok  = 1'b0;
    rfire_err = 1'b0;
    for (int k = 0; k < NSLAVES; k++) begin
      s_req[k]         = m_req;
      s_req[k].awvalid = 1'b0;
      s_req[k].wvalid  = 1'b0;
      s_req[k].bready  = 1'b0;
      s_req[k].arvalid = 1'b0;
      s_req[k].rready  = 1'b0;
    end
    // write address/data
    if (!wbusy_q && m_req.awvalid && m_req.wvalid) begin
      if (wvalid_sel) begin
        s_req[wsel].awvalid = 1'b1;
        s_req[wsel].wvalid  = 1'b1;
        m_rsp.awready = s_rsp[wsel].awready;
        m_rsp.wready  = s_rsp[wsel].wready;
        wfire_ok      = s_rsp[wsel].awready && s_rsp[wsel].wready;
      end else begin
        m_rsp.awready = 1'b1;
        m_rsp.wready  = 1'b1;
        wfire_err     = 1'b1;
      end
    end
    // write response
    if (wbusy_q) begin
      if (werr_q) begin
        m_rsp.bvalid = 1'b1;
        m_rsp.bresp  = AXI_RESP_DECERR;
      end else begin
        m_rsp.bvalid = s_rsp[wsel_q].bvalid;
        m_rsp.bresp  = s_rsp[wsel_q].bresp;
        s_req[wsel_q].bready = m_req.bready;
      end
    end
    // read address
    if (!rbusy_q && m_req.arvalid) begin
      if (rvalid_sel) begin
        s_req[rsel].arvalid = 1'b1;
        m_rsp.arready = s_rsp[rsel].arready;
        rfire_ok      = s_rsp[rsel].arready;
      end else begin
        m_rsp.arready = 1'b1;
        rfire_err     = 1'b1;
      end
    end
    // read data
    if (rbusy_q) begin
      if (rerr_q) begin
        m_rsp.rvalid = 1'b1;
        m_rsp.rresp  = AXI_RESP_DECERR;
      end else begin
        m_rsp.rvalid = s_rsp[rsel_q].rvalid;
        m_rsp.rdata  = s_rsp[rsel_q].rdata;
        m_rsp.rresp  = s_rsp[rsel_q].rresp;
        s_req[rsel_q].rready = m_req.rready;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbusy_q <= 1'b0; rbusy_q <= 1'b0;
      werr_q  <= 1'b0; rerr_q  <= 1'b0;
      wsel_q  <= '0;   rsel_q  <= '0;
    end else begin
      if (wfire_ok || wfire_err) begin
        wbusy_q <= 1'b1;
        werr_q  <= wfire_err;
        wsel_q  <= wsel;
      end else if (m_rsp.bvalid && m_req.bready) begin
        wbusy_q <= 1'b0;
      end
      if (rfire_ok || rfire_err) begin
        rbusy_q <= 1'b1;
        rerr_q  <= rfire_err;
        rsel_q  <= rsel;
      end else if (m_rsp.rvalid && m_req.rready) begin
        rbusy_q <= 1'b0;
      end
    end
  end

endmodule
