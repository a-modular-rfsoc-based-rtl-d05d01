// Digital unit cell: everything needed to control and read out one qubit.
//
// Inside, a Wishbone bus with two masters and six slaves:
//   masters  0 sequencer (priority), 1 AXI4Lite bridge from the PS
//   slaves   0 sequencer, 1 readout signal generator, 2 control signal
//            generator, 3 signal recorder, 4 data storage, 5 digital
//            trigger, 6 free (answers with zero); 7 = broadcast
// The sequencer runs the experiment program and starts every action by
// broadcasting trigger words; the signal generators play pulses onto their
// output streams; the signal recorder demodulates the input stream, hands
// results and states to the data storage and reports each state straight
// to the sequencer (SYNC-EXT), which can branch on it within a few cycles.
// The processing system configures everything through the bridge. The cell
// byte address map is slave * 0x8000 + register * 4.
// Structure and slave list follow the document's cell architecture; the
// slot numbering is this design's choice.
module digital_unit_cell
  import qc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  axil_req_t axil_req,
  output axil_rsp_t axil_rsp,
  input  logic      start,
  output logic      running,
  output beat_t     sg_read_tdata,
  output logic      sg_read_tvalid,
  output beat_t     sg_ctrl_tdata,
  output logic      sg_ctrl_tvalid,
  input  beat_t     adc_tdata,
  input  logic      adc_tvalid,
  output logic [7:0] dig_out
);

  wb_req_t seq_m_req, brg_req;
  wb_rsp_t seq_m_rsp, brg_rsp;
  wb_req_t s_req [NSLAVES];
  wb_rsp_t s_rsp [NSLAVES];

  axil2wb_bridge u_bridge (
    .clk, .rst,
    .s_awaddr(axil_req.awaddr), .s_awvalid(axil_req.awvalid), .s_awready(axil_rsp.awready),
    .s_wdata(axil_req.wdata), .s_wstrb(axil_req.wstrb), .s_wvalid(axil_req.wvalid),
    .s_wready(axil_rsp.wready), .s_bresp(axil_rsp.bresp), .s_bvalid(axil_rsp.bvalid),
    .s_bready(axil_req.bready), .s_araddr(axil_req.araddr), .s_arvalid(axil_req.arvalid),
    .s_arready(axil_rsp.arready), .s_rdata(axil_rsp.rdata), .s_rresp(axil_rsp.rresp),
    .s_rvalid(axil_rsp.rvalid), .s_rready(axil_req.rready),
    .wb_req(brg_req), .wb_rsp(brg_rsp));

  wb_interconnect #(.NS(NSLAVES), .PRESENT(7'b0111111)) u_ic (
    .clk, .rst, .m_seq_req(seq_m_req), .m_seq_rsp(seq_m_rsp),
    .m_brg_req(brg_req), .m_brg_rsp(brg_rsp), .s_req, .s_rsp);

  logic       sr_res_valid, sr_state_valid;
  logic [31:0] sr_res_i, sr_res_q;
  logic [2:0] sr_state;
  logic       sr_busy, sgr_busy, sgc_busy;

  sequencer u_seq (
    .clk, .rst, .start, .ext_valid(sr_state_valid), .ext_state(sr_state),
    .wbm_req(seq_m_req), .wbm_rsp(seq_m_rsp),
    .wbs_req(s_req[SEL_SEQ]), .wbs_rsp(s_rsp[SEL_SEQ]), .running);

  signal_generator #(.TRIG_LSB(TF_SG_READ), .SLAVE_ID(16'h4752)) u_sg_read (
    .clk, .rst, .wb_req(s_req[SEL_SG_READ]), .wb_rsp(s_rsp[SEL_SG_READ]),
    .m_axis_tdata(sg_read_tdata), .m_axis_tvalid(sg_read_tvalid), .busy(sgr_busy));

  signal_generator #(.TRIG_LSB(TF_SG_CTRL), .SLAVE_ID(16'h4743)) u_sg_ctrl (
    .clk, .rst, .wb_req(s_req[SEL_SG_CTRL]), .wb_rsp(s_rsp[SEL_SG_CTRL]),
    .m_axis_tdata(sg_ctrl_tdata), .m_axis_tvalid(sg_ctrl_tvalid), .busy(sgc_busy));

  signal_recorder u_sr (
    .clk, .rst, .wb_req(s_req[SEL_SR]), .wb_rsp(s_rsp[SEL_SR]),
    .s_axis_tdata(adc_tdata), .s_axis_tvalid(adc_tvalid),
    .res_valid(sr_res_valid), .res_i(sr_res_i), .res_q(sr_res_q),
    .state_valid(sr_state_valid), .state(sr_state), .busy(sr_busy));

  data_storage u_ds (
    .clk, .rst, .wb_req(s_req[SEL_DS]), .wb_rsp(s_rsp[SEL_DS]),
    .res_valid(sr_res_valid), .res_i(sr_res_i), .res_q(sr_res_q),
    .st_valid(sr_res_valid), .st(sr_state));

  digital_trigger u_dt (
    .clk, .rst, .wb_req(s_req[SEL_DT]), .wb_rsp(s_rsp[SEL_DT]), .dout(dig_out));

  // slot 6 is free: the interconnect answers it itself
  assign s_rsp[6] = WB_RSP_IDLE;

  logic unused;
  assign unused = ^{s_req[6], sr_busy, sgr_busy, sgc_busy};

endmodule
