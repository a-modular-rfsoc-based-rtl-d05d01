// Self-checking test of the AXI4-Lite interconnect with three small memory
// slaves that answer after random delays: writes and reads must reach the
// slave selected by the address region, and addresses beyond the last
// slave must return DECERR. Slave models and region size are test choices.
// The checked behaviour follows the document where it describes it; the
// register maps and encodings used are this design's own.
module tb_axil_interconnect;
  import qc_pkg::*;

  localparam int NSLV = 3;
  localparam int RB = 8;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  axil_req_t s_req;
  axil_rsp_t s_rsp;
  axil_req_t m_req [NSLV];
  axil_rsp_t m_rsp [NSLV];

  axil_interconnect #(.NSLV(NSLV), .REGION_BITS(RB)) dut (.clk, .rst, .s_req, .s_rsp, .m_req, .m_rsp);

  // memory slave models: 64 words each, random ready delays
  logic [31:0] mem [NSLV][64];
  int hits [NSLV];
  for (genvar g = 0; g < NSLV; g++) begin : g_slv
    logic aw_ok, w_ok;
    logic [7:0] awa;
    logic [31:0] wd;
    always_ff @(posedge clk) begin
      if (rst) begin
        m_rsp[g] <= '0; aw_ok <= 0; w_ok <= 0;
      end else begin
        m_rsp[g].awready <= 0; m_rsp[g].wready <= 0; m_rsp[g].arready <= 0;
        if (m_req[g].awvalid && !m_rsp[g].awready && !aw_ok && ($urandom % 3 == 0)) begin
          m_rsp[g].awready <= 1; aw_ok <= 1; awa <= m_req[g].awaddr[7:0];
        end
        if (m_req[g].wvalid && !m_rsp[g].wready && !w_ok && ($urandom % 3 == 0)) begin
          m_rsp[g].wready <= 1; w_ok <= 1; wd <= m_req[g].wdata;
        end
        if (aw_ok && w_ok && !m_rsp[g].bvalid) begin
          mem[g][awa[7:2]] <= wd; hits[g]++;
          m_rsp[g].bvalid <= 1; m_rsp[g].bresp <= 0;
        end
        if (m_rsp[g].bvalid && m_req[g].bready) begin
          m_rsp[g].bvalid <= 0; aw_ok <= 0; w_ok <= 0;
        end
        if (m_req[g].arvalid && !m_rsp[g].arready && !m_rsp[g].rvalid && ($urandom % 3 == 0)) begin
          m_rsp[g].arready <= 1; m_rsp[g].rvalid <= 1; m_rsp[g].rresp <= 0;
          m_rsp[g].rdata <= mem[g][m_req[g].araddr[7:2]];
          hits[g]++;
        end
        if (m_rsp[g].rvalid && m_req[g].rready) m_rsp[g].rvalid <= 0;
      end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic axi_wr(input logic [31:0] a, input logic [31:0] d, output logic [1:0] resp);
    bit aw = 0, w = 0;
    @(negedge clk);
    s_req.awaddr = a; s_req.awvalid = 1; s_req.wdata = d; s_req.wvalid = 1; s_req.wstrb = 4'hf;
    s_req.bready = 1;
    forever begin
      @(posedge clk);
      if (s_rsp.awready) aw = 1;
      if (s_rsp.wready) w = 1;
      if (s_rsp.bvalid) begin resp = s_rsp.bresp; break; end
      @(negedge clk);
      if (aw) s_req.awvalid = 0;
      if (w) s_req.wvalid = 0;
    end
    @(negedge clk);
    s_req.awvalid = 0; s_req.wvalid = 0; s_req.bready = 0;
  endtask

  task automatic axi_rd(input logic [31:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    s_req.araddr = a; s_req.arvalid = 1; s_req.rready = 1;
    forever begin
      @(posedge clk);
      if (s_rsp.rvalid) begin d = s_rsp.rdata; resp = s_rsp.rresp; break; end
      if (s_rsp.arready) begin @(negedge clk); s_req.arvalid = 0; end
    end
    @(negedge clk);
    s_req.arvalid = 0; s_req.rready = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] r;
    logic [31:0] d;
    logic [31:0] expv [NSLV][64];
    s_req = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 40; n++) begin
      int s, w;
      logic [31:0] v;
      s = $urandom % NSLV; w = $urandom % 64; v = $urandom;
      axi_wr(32'(s << RB) | 32'(w * 4), v, r);
      expv[s][w] = v;
      check(r == 2'b00, "write OKAY");
      check(mem[s][w] == v, "write reached the selected slave");
    end
    for (int s = 0; s < NSLV; s++)
      for (int w = 0; w < 64; w++)
        if (mem[s][w] === expv[s][w] && expv[s][w] !== 'x) begin
          axi_rd(32'(s << RB) | 32'(w * 4), d, r);
          check(r == 2'b00 && d == expv[s][w], "read back from the selected slave");
        end
    axi_wr(32'(5 << RB), 32'h1234, r);
    check(r == 2'b11, "write DECERR beyond last slave");
    axi_rd(32'(3 << RB) | 32'h10, d, r);
    check(r == 2'b11, "read DECERR beyond last slave");
    axi_rd(32'(1 << RB), d, r);
    check(r == 2'b00, "slave usable after DECERR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
