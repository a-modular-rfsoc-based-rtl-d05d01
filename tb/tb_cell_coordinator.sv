// Self-checking test of the cell coordinator: a start mask produces one
// start pulse in the same cycle on exactly the selected cells; the busy
// vector and the last mask read back.
// Expected values come from the behaviour the document describes where it
// gives it, and from this design's own choices (encodings, register maps,
// latencies) elsewhere; stimuli and sizes are test choices.
module tb_cell_coordinator;
  import qc_pkg::*;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  wb_req_t req;
  wb_rsp_t rsp;
  logic [14:0] busy = 15'h0, start;
  cell_coordinator dut (.clk, .rst, .wb_req(req), .wb_rsp(rsp), .busy, .start);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int first [15], npulse [15];
  always @(posedge clk) for (int c = 0; c < 15; c++) if (!rst && start[c]) begin
    if (npulse[c] == 0) first[c] = cyc;
    npulse[c]++;
  end

  logic [31:0] r;
  int t0;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = WB_REQ_IDLE;
    for (int c = 0; c < 15; c++) npulse[c] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk); req = '{stb: 1, we: 1, adr: 16'd4, dat: 32'h0000_4A05}; t0 = cyc;
    @(negedge clk); req = WB_REQ_IDLE;
    repeat (6) @(negedge clk);
    for (int c = 0; c < 15; c++)
      if (32'h4A05 & (1 << c)) check(npulse[c] == 1 && first[c] == first[0], $sformatf("cell %0d started once, in step", c));
      else                     check(npulse[c] == 0, $sformatf("cell %0d not started", c));
    check(first[0] - t0 == 2, $sformatf("start pulse 2 cycles after the request (%0d)", first[0] - t0));
    busy = 15'h0A05;
    @(negedge clk); req = '{stb: 1, we: 0, adr: 16'd5, dat: 0};
    @(negedge clk); req = WB_REQ_IDLE;
    @(negedge clk); check(rsp.dat == 32'h0A05, "busy vector");
    @(negedge clk); req = '{stb: 1, we: 0, adr: 16'd1, dat: 0};
    @(negedge clk); req = WB_REQ_IDLE;
    @(negedge clk); check(rsp.dat == 32'h1, "status: some cell busy");
    @(negedge clk); req = '{stb: 1, we: 0, adr: 16'd6, dat: 0};
    @(negedge clk); req = WB_REQ_IDLE;
    @(negedge clk); check(rsp.dat == 32'h4A05, "last mask");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
