// AXI4Lite interconnect from the processing system to the register ports
// of the programmable logic.
//
// One master, NSLV slaves, each owning a 2^REGION_BITS-byte window:
// slave index = address bits [REGION_BITS +: 5]. One transaction is in
// flight at a time. A write is forwarded once AW and W are both present
// and ends when the slave's B is taken; a read ends with its R. An access
// to an index without a slave is answered directly with DECERR.
// The document only names this interconnect; the decoding and the
// single-transaction scheme are this design's choice.
module axil_interconnect
  import qc_pkg::*;
#(
  parameter int NSLV        = 17,
  parameter int REGION_BITS = 18
) (
  input  logic      clk,
  input  logic      rst,
  input  axil_req_t s_req,
  output axil_rsp_t s_rsp,
  output axil_req_t m_req [NSLV],
  input  axil_rsp_t m_rsp [NSLV]
);

  typedef enum logic [2:0] {IDLE, WR, RD, WERR, RERR} state_e;
  state_e     state;
  logic [4:0] sel;

  wire [4:0] aw_idx = s_req.awaddr[REGION_BITS +: 5];
  wire [4:0] ar_idx = s_req.araddr[REGION_BITS +: 5];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      sel   <= '0;
    end else begin
      unique case (state)
        IDLE:
          if (s_req.arvalid) begin
            sel   <= ar_idx;
            state <= int'(ar_idx) < NSLV ? RD : RERR;
          end else if (s_req.awvalid && s_req.wvalid) begin
            sel   <= aw_idx;
            state <= int'(aw_idx) < NSLV ? WR : WERR;
          end
        WR:   if (m_rsp[sel].bvalid && s_req.bready) state <= IDLE;
        RD:   if (m_rsp[sel].rvalid && s_req.rready) state <= IDLE;
        WERR: if (s_req.bready) state <= IDLE;
        RERR: if (s_req.rready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // forward the selected slave; the address channels stay valid until taken
  logic aw_done, w_done, ar_done;
  always_ff @(posedge clk) begin
    if (rst || state == IDLE) begin
      aw_done <= 1'b0; w_done <= 1'b0; ar_done <= 1'b0;
    end else begin
      if (state == WR && m_rsp[sel].awready) aw_done <= 1'b1;
      if (state == WR && m_rsp[sel].wready)  w_done  <= 1'b1;
      if (state == RD && m_rsp[sel].arready) ar_done <= 1'b1;
    end
  end

  always_comb begin
    for (int k = 0; k < NSLV; k++) begin
      m_req[k] = s_req;
      m_req[k].awvalid = state == WR && sel == 5'(k) && !aw_done && s_req.awvalid;
      m_req[k].wvalid  = state == WR && sel == 5'(k) && !w_done && s_req.wvalid;
      m_req[k].arvalid = state == RD && sel == 5'(k) && !ar_done && s_req.arvalid;
      m_req[k].bready  = state == WR && sel == 5'(k) && s_req.bready;
      m_req[k].rready  = state == RD && sel == 5'(k) && s_req.rready;
    end
    s_rsp = '0;
    unique case (state)
      WR: begin
        s_rsp.awready = m_rsp[sel].awready && !aw_done;
        s_rsp.wready  = m_rsp[sel].wready && !w_done;
        s_rsp.bvalid  = m_rsp[sel].bvalid;
        s_rsp.bresp   = m_rsp[sel].bresp;
      end
      RD: begin
        s_rsp.arready = m_rsp[sel].arready && !ar_done;
        s_rsp.rvalid  = m_rsp[sel].rvalid;
        s_rsp.rdata   = m_rsp[sel].rdata;
        s_rsp.rresp   = m_rsp[sel].rresp;
      end
      WERR: begin
        s_rsp.awready = 1'b1; s_rsp.wready = 1'b1;
        s_rsp.bvalid  = 1'b1; s_rsp.bresp  = 2'b11;
      end
      RERR: begin
        s_rsp.arready = 1'b1;
        s_rsp.rvalid  = 1'b1; s_rsp.rresp  = 2'b11;
      end
      default: ;
    endcase
  end

endmodule
