// Self-checking test of the common slave register interface: fixed 2-cycle
// ack, info/control read-back, the trigger word strobe from a write to
// register 3, and the module register port (modelled by a small register
// file in this bench).
// Expected values come from the behaviour the document describes where it
// gives it, and from this design's own choices (encodings, register maps,
// latencies) elsewhere; stimuli and sizes are test choices.
module tb_wb_reg_slave;
  import qc_pkg::*;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  wb_req_t req;
  wb_rsp_t rsp;
  logic [31:0] status = 32'h0000_00A5, control;
  logic ctrl_wr, trig_valid, reg_wr, reg_rd;
  logic [19:0] trig_word;
  logic [12:0] ram_addr, reg_addr;
  logic [31:0] reg_wdata, reg_rdata;

  wb_reg_slave #(.SLAVE_ID(16'hBEEF), .VERSION(16'h0042)) dut (
    .clk, .rst, .wb_req(req), .wb_rsp(rsp), .status, .control, .ctrl_wr, .trig_valid,
    .trig_word, .ram_addr, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata);

  logic [31:0] regs [16];
  always @(posedge clk) if (reg_wr) regs[reg_addr[3:0]] <= reg_wdata;
  assign reg_rdata = regs[reg_addr[3:0]];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int trig_n = 0, trig_cyc;
  logic [19:0] trig_last;
  always @(posedge clk) if (trig_valid) begin trig_n++; trig_cyc = cyc; trig_last = trig_word; end

  int t0;
  task automatic access(input logic we, input logic [15:0] adr, input logic [31:0] dat,
                        output logic [31:0] rd);
    @(negedge clk); req = '{stb: 1, we: we, adr: adr, dat: dat}; t0 = cyc;
    @(negedge clk); req = WB_REQ_IDLE;
    check(!rsp.ack, "no ack after 1 cycle");
    @(negedge clk);
    check(rsp.ack, "ack after exactly 2 cycles");
    rd = rsp.dat;
    @(negedge clk);
    check(!rsp.ack, "single ack");
  endtask

  logic [31:0] r;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = WB_REQ_IDLE;
    for (int i = 0; i < 16; i++) regs[i] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    access(0, 16'h0000, 0, r); check(r == 32'hBEEF0042, "info register");
    access(0, 16'h0001, 0, r); check(r == 32'h000000A5, "status register");
    access(1, 16'h0002, 32'h1357, r);
    check(control == 32'h1357, "control written");
    access(0, 16'h0002, 0, r); check(r == 32'h1357, "control read-back");
    access(1, 16'hE003, 32'hABCDE123, r);
    check(trig_n == 1 && trig_last == 20'hABCDE, "trigger word strobe from bits 31:12");
    check(trig_cyc == t0 + 1, "trigger strobe one cycle after the request");
    access(1, 16'h0007, 32'hCAFE0001, r);
    check(regs[7] == 32'hCAFE0001, "module register written");
    access(0, 16'h0007, 0, r); check(r == 32'hCAFE0001, "module register read");
    check(trig_n == 1, "no spurious trigger");
    // back-to-back requests: one ack per cycle
    @(negedge clk); req = '{stb: 1, we: 1, adr: 16'd5, dat: 32'd55};
    @(negedge clk); req = '{stb: 1, we: 0, adr: 16'd5, dat: 0};
    @(negedge clk); req = WB_REQ_IDLE; check(rsp.ack, "first of two acks");
    @(negedge clk); check(rsp.ack && rsp.dat == 32'd55, "pipelined read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
