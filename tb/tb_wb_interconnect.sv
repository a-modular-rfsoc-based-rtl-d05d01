// Self-checking test of the Wishbone interconnect: sequencer latency (4),
// bridge latency (5), sequencer priority with the bridge held back,
// back-to-back pipelined reads, and broadcast writes that reach all seven
// slaves in the same cycle. Slaves are models with the fixed 2-cycle answer.
// Expected values come from the behaviour the document describes where it
// gives it, and from this design's own choices (encodings, register maps,
// latencies) elsewhere; stimuli and sizes are test choices.
module tb_wb_interconnect;
  import qc_pkg::*;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  wb_req_t sq, bq;
  wb_rsp_t sr, br;
  wb_req_t s_req [NSLAVES];
  wb_rsp_t s_rsp [NSLAVES];

  wb_interconnect dut (.clk, .rst, .m_seq_req(sq), .m_seq_rsp(sr), .m_brg_req(bq), .m_brg_rsp(br),
                       .s_req, .s_rsp);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // slave models: data = {slave, 3'b0, adr[12:0]} + 0x1000_0000
  int wr_cyc [NSLAVES];
  logic [31:0] wr_dat [NSLAVES];
  for (genvar k = 0; k < NSLAVES; k++) begin : g_s
    wb_req_t d1;
    always @(posedge clk) begin
      d1 <= s_req[k];
      s_rsp[k].ack   <= d1.stb;
      s_rsp[k].stall <= 1'b0;
      s_rsp[k].dat   <= d1.stb ? {8'h10, 5'(k), 6'd0, d1.adr[12:0]} : 32'd0;
      if (s_req[k].stb && s_req[k].we) begin wr_cyc[k] = cyc; wr_dat[k] = s_req[k].dat; end
    end
  end

  // response monitors
  int sack_cyc [$];
  logic [31:0] sack_dat [$];
  int back_cyc [$];
  logic [31:0] back_dat [$];
  always @(posedge clk) begin
    if (!rst && sr.ack) begin sack_cyc.push_back(cyc); sack_dat.push_back(sr.dat); end
    if (!rst && br.ack) begin back_cyc.push_back(cyc); back_dat.push_back(br.dat); end
  end

  int t0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sq = WB_REQ_IDLE; bq = WB_REQ_IDLE;
    repeat (3) @(posedge clk);
    rst = 0;
    // 1: sequencer read, 4 cycles
    @(negedge clk); sq = '{stb: 1, we: 0, adr: {3'd3, 13'd5}, dat: 0}; t0 = cyc;
    @(negedge clk); sq = WB_REQ_IDLE;
    repeat (8) @(negedge clk);
    check(sack_cyc.size() == 1 && sack_cyc[0] - t0 == 4, "sequencer read latency 4");
    check(sack_dat[0] == {8'h10, 5'd3, 6'd0, 13'd5}, "sequencer read data from slave 3");
    // 2: bridge read, 5 cycles
    @(negedge clk); bq = '{stb: 1, we: 0, adr: {3'd2, 13'd9}, dat: 0}; t0 = cyc;
    @(negedge clk); check(!br.stall, "bridge not stalled on idle bus"); bq = WB_REQ_IDLE;
    repeat (8) @(negedge clk);
    check(back_cyc.size() == 1 && back_cyc[0] - t0 == 5, $sformatf("bridge read latency 5 (%0d)", back_cyc[0] - t0));
    check(back_dat[0] == {8'h10, 5'd2, 6'd0, 13'd9}, "bridge read data");
    // 3: conflict, sequencer keeps bus for 3 cycles; bridge stalls
    sack_cyc.delete(); sack_dat.delete(); back_cyc.delete(); back_dat.delete();
    @(negedge clk);
    sq = '{stb: 1, we: 0, adr: {3'd1, 13'd1}, dat: 0};
    bq = '{stb: 1, we: 0, adr: {3'd4, 13'd7}, dat: 0}; t0 = cyc;
    @(negedge clk); sq.adr = {3'd1, 13'd2}; bq = WB_REQ_IDLE;   // bridge request taken into holding
    @(negedge clk); sq.adr = {3'd1, 13'd3};
    @(negedge clk); sq = WB_REQ_IDLE;
    repeat (10) @(negedge clk);
    check(sack_cyc.size() == 3, "three pipelined sequencer reads");
    check(sack_cyc[0] - t0 == 4 && sack_cyc[1] - t0 == 5 && sack_cyc[2] - t0 == 6, "one answer per cycle, fixed latency");
    check(sack_dat[2] == {8'h10, 5'd1, 6'd0, 13'd3}, "pipelined data in order");
    check(back_cyc.size() == 1 && back_cyc[0] - t0 == 7, $sformatf("bridge waits for sequencer (%0d)", back_cyc[0] - t0));
    check(back_dat[0] == {8'h10, 5'd4, 6'd0, 13'd7}, "bridge data after conflict");
    // 4: stall seen by the bridge while its holding entry waits
    @(negedge clk);
    sq = '{stb: 1, we: 0, adr: {3'd0, 13'd0}, dat: 0};
    bq = '{stb: 1, we: 1, adr: {3'd5, 13'd8}, dat: 32'h1234};
    @(negedge clk);
    bq = '{stb: 1, we: 1, adr: {3'd6, 13'd8}, dat: 32'h5678};
    #0.5 check(br.stall, "second bridge request stalled");
    @(negedge clk); sq = WB_REQ_IDLE;
    #0.5 check(!br.stall, "stall released");
    @(negedge clk); bq = WB_REQ_IDLE;
    repeat (10) @(negedge clk);
    check(wr_dat[5] == 32'h1234 && wr_dat[6] == 32'h5678, "both bridge writes delivered");
    // 5: broadcast write
    for (int k = 0; k < NSLAVES; k++) wr_cyc[k] = 0;
    @(negedge clk); sq = '{stb: 1, we: 1, adr: {3'b111, 13'd3}, dat: 32'hABCDE000}; t0 = cyc;
    @(negedge clk); sq = WB_REQ_IDLE;
    repeat (8) @(negedge clk);
    for (int k = 0; k < NSLAVES; k++)
      check(wr_cyc[k] == t0 + 1 && wr_dat[k] == 32'hABCDE000, $sformatf("broadcast reaches slave %0d", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
