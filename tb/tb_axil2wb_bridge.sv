// Self-checking test of the AXI4Lite-to-Wishbone bridge: byte-to-register
// address translation, writes and reads, and holding the request while the
// Wishbone side stalls. The Wishbone side is a small memory model that
// answers 2 cycles after accepting a request and can be told to stall.
// Expected values come from the behaviour the document describes where it
// gives it, and from this design's own choices (encodings, register maps,
// latencies) elsewhere; stimuli and sizes are test choices.
module tb_axil2wb_bridge;
  import qc_pkg::*;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  logic [31:0] awaddr = 0, wdata = 0, araddr = 0, rdata;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  wb_req_t wq;
  wb_rsp_t ws;

  axil2wb_bridge dut (.clk, .rst, .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready),
    .s_wdata(wdata), .s_wstrb(4'hF), .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp),
    .s_bvalid(bvalid), .s_bready(bready), .s_araddr(araddr), .s_arvalid(arvalid),
    .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid), .s_rready(rready),
    .wb_req(wq), .wb_rsp(ws));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] mem [logic [15:0]];
  logic stall_en = 0;
  wb_req_t d1, d2;
  logic [15:0] last_adr;
  assign ws.stall = stall_en;
  always @(posedge clk) begin
    d1 <= (wq.stb && !stall_en) ? wq : WB_REQ_IDLE;
    d2 <= d1;
    ws.ack <= d2.stb;
    ws.dat <= (d2.stb && !d2.we && mem.exists(d2.adr)) ? mem[d2.adr] : 32'd0;
    if (d2.stb && d2.we) mem[d2.adr] = d2.dat;
    if (wq.stb && !stall_en) last_adr <= wq.adr;
  end

  task automatic axi_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); awaddr = a; wdata = d; awvalid = 1; wvalid = 1; bready = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    check(bresp == 2'b00, "write OKAY");
    @(negedge clk); bready = 0;
  endtask
  task automatic axi_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); araddr = a; arvalid = 1; rready = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    check(rresp == 2'b00, "read OKAY");
    @(negedge clk); rready = 0;
  endtask

  logic [31:0] r;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    axi_write(32'h0000_800C, 32'h11112222);
    check(last_adr == 16'h2003, "byte 0x800C -> register 0x2003");
    check(mem[16'h2003] == 32'h11112222, "write data");
    axi_write(32'h0003_FFFC, 32'h33334444);
    check(last_adr == 16'hFFFF, "top register");
    axi_read(32'h0000_800C, r);
    check(r == 32'h11112222, "read back");
    // stalled bus
    stall_en = 1;
    fork
      axi_read(32'h0003_FFFC, r);
      begin repeat (10) @(negedge clk); check(wq.stb, "request held while stalled"); stall_en = 0; end
    join
    check(r == 32'h33334444, "read after stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
