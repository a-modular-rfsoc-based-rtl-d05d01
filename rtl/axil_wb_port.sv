// AXI4Lite register port for a single Wishbone register slave: the
// AXI4Lite-to-Wishbone bridge with the bundled AXI4Lite structs, for the
// blocks that sit outside the unit cells (cell coordinator, sample
// combiner/splitter). A slave with the fixed 2-cycle response never stalls,
// so no interconnect is needed between bridge and slave.
// The bridge follows the document's AXI4Lite-to-Wishbone translation; using it
// for the coordinator and combiner is this design's choice.
module axil_wb_port
  import qc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  axil_req_t axil_req,
  output axil_rsp_t axil_rsp,
  output wb_req_t   wb_req,
  input  wb_rsp_t   wb_rsp
);

  axil2wb_bridge u_bridge (
    .clk, .rst,
    .s_awaddr(axil_req.awaddr), .s_awvalid(axil_req.awvalid), .s_awready(axil_rsp.awready),
    .s_wdata(axil_req.wdata), .s_wstrb(axil_req.wstrb), .s_wvalid(axil_req.wvalid),
    .s_wready(axil_rsp.wready), .s_bresp(axil_rsp.bresp), .s_bvalid(axil_rsp.bvalid),
    .s_bready(axil_req.bready), .s_araddr(axil_req.araddr), .s_arvalid(axil_req.arvalid),
    .s_arready(axil_rsp.arready), .s_rdata(axil_rsp.rdata), .s_rresp(axil_rsp.rresp),
    .s_rvalid(axil_rsp.rvalid), .s_rready(axil_req.rready),
    .wb_req, .wb_rsp);

endmodule
