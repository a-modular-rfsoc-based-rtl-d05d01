// Programmable-logic design of the RFSoC qubit controller.
//
// NCELLS digital unit cells, each able to drive and read one
// superconducting qubit, run side by side on one 250 MHz clock (no clock
// domain crossings, so every action is cycle-exact). Around them:
//   cell coordinator          starts any subset of the cells' sequencers in
//                             the same cycle
//   sample combiner/splitter  adds generator streams onto the NDAC complex
//                             DAC channels and feeds ADC channels to the
//                             recorders
//   AXI4Lite interconnect     gives the processing system register access;
//                             window k (256 kB each) is cell k, window
//                             NCELLS the coordinator, NCELLS+1 the combiner
// The processors, the data converters and the analog front end are outside
// this design: their AXI4Lite port, sample streams (4 complex samples of
// 16-bit I/Q per cycle per channel, i.e. 1 GS/s) and the digital trigger
// outputs are the ports of this module.
// dac_tvalid is constant 1: the signal generators stream without pause.
// The default of 15 cells and 4 complex DAC/ADC channels (8 converters
// used as I/Q pairs) follow the document.
module qc_pl_top
  import qc_pkg::*;
#(
  parameter int NCELLS = 15,
  parameter int NDAC   = 4,
  parameter int NADC   = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  axil_req_t  s_axil_req,
  output axil_rsp_t  s_axil_rsp,
  output beat_t      dac_tdata [NDAC],
  output logic       dac_tvalid,
  input  beat_t      adc_tdata [NADC],
  input  logic       adc_tvalid,
  output logic [7:0] dig_out   [NCELLS],
  output logic [NCELLS-1:0] cell_running
);

  localparam int NSLV = NCELLS + 2;

  axil_req_t a_req [NSLV];
  axil_rsp_t a_rsp [NSLV];

  axil_interconnect #(.NSLV(NSLV), .REGION_BITS(18)) u_axil (
    .clk, .rst, .s_req(s_axil_req), .s_rsp(s_axil_rsp), .m_req(a_req), .m_rsp(a_rsp));

  logic [NCELLS-1:0] start;
  beat_t sg_read [NCELLS];
  beat_t sg_ctrl [NCELLS];
  beat_t sr_in   [NCELLS];
  logic [NCELLS-1:0] v_read, v_ctrl;

  for (genvar c = 0; c < NCELLS; c++) begin : g_cell
    digital_unit_cell u_cell (
      .clk, .rst, .axil_req(a_req[c]), .axil_rsp(a_rsp[c]),
      .start(start[c]), .running(cell_running[c]),
      .sg_read_tdata(sg_read[c]), .sg_read_tvalid(v_read[c]),
      .sg_ctrl_tdata(sg_ctrl[c]), .sg_ctrl_tvalid(v_ctrl[c]),
      .adc_tdata(sr_in[c]), .adc_tvalid(adc_tvalid),
      .dig_out(dig_out[c]));
  end

  // cell coordinator
  wb_req_t cc_req;
  wb_rsp_t cc_rsp;
  axil_wb_port u_cc_port (.clk, .rst, .axil_req(a_req[NCELLS]), .axil_rsp(a_rsp[NCELLS]),
                          .wb_req(cc_req), .wb_rsp(cc_rsp));
  cell_coordinator #(.NCELLS(NCELLS)) u_coord (
    .clk, .rst, .wb_req(cc_req), .wb_rsp(cc_rsp), .busy(cell_running), .start);

  // sample combiner / splitter
  wb_req_t cs_req;
  wb_rsp_t cs_rsp;
  axil_wb_port u_cs_port (.clk, .rst, .axil_req(a_req[NCELLS+1]), .axil_rsp(a_rsp[NCELLS+1]),
                          .wb_req(cs_req), .wb_rsp(cs_rsp));
  sample_combiner_splitter #(.NCELLS(NCELLS), .NDAC(NDAC), .NADC(NADC)) u_comb (
    .clk, .rst, .wb_req(cs_req), .wb_rsp(cs_rsp),
    .sg_read, .sg_ctrl, .dac(dac_tdata), .adc(adc_tdata), .sr_in);

  assign dac_tvalid = &{v_read, v_ctrl};

endmodule
