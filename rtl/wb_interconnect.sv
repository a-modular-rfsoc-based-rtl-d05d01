// Deterministic 2-master, 7-slave Wishbone interconnect of the digital unit cell.
//
// Master 0 is the sequencer and always wins; master 1 is the AXI4Lite
// bridge. A request is decoded by adr[15:13]: 0..6 select one slave, 3'b111
// is a broadcast that reaches every slave in the same cycle (used to write
// the trigger word into all broadcast registers at once).
//
// Pipeline, one request per cycle, no stall for the sequencer:
//   cycle 0  sequencer drives stb
//   cycle 1  registered request at the selected slave(s)
//   cycle 3  slave answers (fixed 2-cycle slave latency)
//   cycle 4  registered ack and read data at the sequencer
// The bridge request first lands in a one-entry holding register and is
// passed on in the first cycle the sequencer is not requesting, so an
// undisturbed bridge access takes 5 cycles and the bridge sees stall while
// the entry is occupied. Because every slave answers after exactly two
// cycles, the interconnect tracks in-flight accesses with a tag shift
// register and generates the ack itself; read data is taken from the slave
// the tag names (zero for broadcast reads). Unoccupied slave slots
// therefore still answer, with zero data.
// The latencies, priority, broadcast code and slave count follow the
// document; the holding register and tag pipeline are this design's way of
// meeting them.
module wb_interconnect
  import qc_pkg::*;
#(
  parameter int          NS = NSLAVES,
  parameter logic [NS-1:0] PRESENT = '1   // slots with a slave behind them
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_req_t m_seq_req,
  output wb_rsp_t m_seq_rsp,
  input  wb_req_t m_brg_req,
  output wb_rsp_t m_brg_rsp,
  output wb_req_t s_req [NS],
  input  wb_rsp_t s_rsp [NS]
);

  typedef struct packed {
    logic       vld;
    logic       we;
    logic       from_brg;
    logic       bcast;
    logic [2:0] sel;
  } tag_t;

  // bridge holding register
  wb_req_t pend;
  logic    pend_vld;
  logic    fwd_brg;

  assign fwd_brg = pend_vld & ~m_seq_req.stb;

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_vld <= 1'b0;
      pend     <= WB_REQ_IDLE;
    end else if (!pend_vld || fwd_brg) begin
      pend_vld <= m_brg_req.stb;
      pend     <= m_brg_req;
    end
  end

  // issue stage
  wb_req_t iss;
  tag_t    iss_tag;
  always_comb begin
    iss = WB_REQ_IDLE;
    if (m_seq_req.stb)  iss = m_seq_req;
    else if (fwd_brg)   iss = pend;
    iss_tag.vld      = iss.stb;
    iss_tag.we       = iss.we;
    iss_tag.from_brg = ~m_seq_req.stb & fwd_brg;
    iss_tag.bcast    = (iss.adr[15:13] == SEL_BCAST);
    iss_tag.sel      = iss.adr[15:13];
  end

  tag_t t1, t2, t3;
  always_ff @(posedge clk) begin
    if (rst) begin
      t1 <= '0; t2 <= '0; t3 <= '0;
      for (int k = 0; k < NS; k++) s_req[k] <= WB_REQ_IDLE;
    end else begin
      t1 <= iss_tag; t2 <= t1; t3 <= t2;
      for (int k = 0; k < NS; k++) begin
        s_req[k]     <= iss;
        s_req[k].stb <= iss.stb & (iss_tag.bcast | (iss_tag.sel == 3'(k)));
      end
    end
  end

  // response stage: t3 is the tag of the access the slaves answer now
  logic [31:0] rdat;
  always_comb begin
    rdat = '0;
    for (int k = 0; k < NS; k++)
      if (!t3.bcast && t3.sel == 3'(k) && PRESENT[k]) rdat = s_rsp[k].dat;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      m_seq_rsp <= WB_RSP_IDLE;
      m_brg_rsp.ack <= 1'b0;
      m_brg_rsp.dat <= '0;
    end else begin
      m_seq_rsp.ack   <= t3.vld & ~t3.from_brg;
      m_seq_rsp.stall <= 1'b0;
      m_seq_rsp.dat   <= (t3.vld & ~t3.from_brg & ~t3.we) ? rdat : '0;
      m_brg_rsp.ack   <= t3.vld & t3.from_brg;
      m_brg_rsp.dat   <= (t3.vld & t3.from_brg & ~t3.we) ? rdat : '0;
    end
  end
  assign m_brg_rsp.stall = pend_vld & ~fwd_brg;

  // every present slave must answer exactly two cycles after its request
  for (genvar k = 0; k < NS; k++) begin : g_chk
    if (PRESENT[k]) begin : g_p
      a_fixed_latency: assert property (@(posedge clk) disable iff (rst)
        (t3.vld && (t3.bcast || t3.sel == 3'(k))) |-> s_rsp[k].ack);
    end
  end

endmodule
