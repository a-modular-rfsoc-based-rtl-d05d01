// Self-checking test of the sequencer: runs a program that uses ALU, MUL,
// branches, JAL, loads/stores, TRIG, every WAIT form and both SYNC forms,
// and checks the Wishbone traffic it produces, the cycle distance between
// bus requests (instruction cycle counts), and the final register values.
// The master port sees a bus model with the interconnect's fixed 4-cycle
// read latency.
// Expected values come from the behaviour the document describes where it
// gives it, and from this design's own choices (encodings, register maps,
// latencies) elsewhere; stimuli and sizes are test choices.
module tb_sequencer;
  import qc_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic start = 0, ext_valid = 0;
  logic [2:0] ext_state = 0;
  wb_req_t m_req, s_req;
  wb_rsp_t m_rsp, s_rsp;
  logic running;

  sequencer dut (.clk, .rst, .start, .ext_valid, .ext_state, .wbm_req(m_req), .wbm_rsp(m_rsp),
                 .wbs_req(s_req), .wbs_rsp(s_rsp), .running);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // bus model: ack and read data 4 cycles after each request
  logic [31:0] bmem [logic [15:0]];
  wb_req_t pipe [4];
  int      n_req = 0;
  int      req_cyc [64];
  wb_req_t req_log [64];
  always @(posedge clk) begin
    m_rsp.ack   <= pipe[3].stb && !rst;
    m_rsp.stall <= 1'b0;
    m_rsp.dat   <= (pipe[3].stb && !pipe[3].we && bmem.exists(pipe[3].adr)) ? bmem[pipe[3].adr] : 32'd0;
    if (pipe[3].stb && pipe[3].we) bmem[pipe[3].adr] = pipe[3].dat;
    pipe[3] <= pipe[2]; pipe[2] <= pipe[1]; pipe[1] <= m_req;
    if (rst) begin pipe[1].stb <= 1'b0; pipe[2].stb <= 1'b0; pipe[3].stb <= 1'b0; end
    if (m_req.stb && !rst) begin
      req_cyc[n_req] = cyc;
      req_log[n_req] = m_req;
      n_req++;
    end
  end

  task automatic s_write(input logic [15:0] adr, input logic [31:0] dat);
    @(negedge clk); s_req = '{stb: 1, we: 1, adr: adr, dat: dat};
    @(negedge clk); s_req = WB_REQ_IDLE;
    @(negedge clk);
  endtask
  task automatic s_read(input logic [15:0] adr, output logic [31:0] dat);
    @(negedge clk); s_req = '{stb: 1, we: 0, adr: adr, dat: 0};
    @(negedge clk); s_req = WB_REQ_IDLE;
    @(posedge clk); #1 check(s_rsp.ack, "slave ack after 2 cycles");
    dat = s_rsp.dat;
  endtask

  logic [31:0] prog [32];
  int start_cyc, v_cyc;
  logic [31:0] r;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) pipe[k] = WB_REQ_IDLE;
    s_req = WB_REQ_IDLE;
    bmem[16'h0101] = 32'hDEADBEEF;
    prog[0]  = ADDI(1, 0, 5);
    prog[1]  = ADDI(2, 0, 7);
    prog[2]  = MUL(3, 1, 2);
    prog[3]  = TRIG(20'h00011);
    prog[4]  = TRIG(20'h00022);
    prog[5]  = WAIT_IMM(10);
    prog[6]  = TRIG(20'h00033);
    prog[7]  = ADDI(4, 0, 3);
    prog[8]  = WAIT_REG(4);
    prog[9]  = TRIG(20'h00044);
    prog[10] = WAIT_REG_TRIG(4);
    prog[11] = TRIG(20'h00055);
    prog[12] = SW_I(3, 0, 'h100);
    prog[13] = LW_I(5, 0, 'h101);
    prog[14] = BEQ(0, 0, 8);
    prog[15] = ADDI(6, 0, 99);
    prog[16] = SYNC_EXT(7);
    prog[17] = TRIG(20'h00066);
    prog[18] = ADDI(8, 8, 1);
    prog[19] = BNE(8, 1, -4);
    prog[20] = JAL(9, 8);
    prog[21] = ADDI(6, 0, 98);
    prog[22] = SW_I(8, 0, 'h102);
    prog[23] = SW_I(9, 0, 'h103);
    prog[24] = SW_I(5, 0, 'h104);
    prog[25] = SUB(10, 0, 1);          // -5
    prog[26] = SRAI(11, 10, 1);        // -3
    prog[27] = SLT(12, 10, 1);         // 1
    prog[28] = LUI(13, 20'hABCDE);
    prog[29] = SYNC_START();
    prog[30] = 32'h0;
    prog[31] = 32'h0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) s_write(16'h0400 + 16'(i), prog[i]);
    s_read(16'h0400 + 16'd2, r);
    check(r == prog[2], "program memory read-back");
    s_read(16'h0000, r);
    check(r[31:16] == 16'h5351, "info register");

    @(negedge clk); start = 1; start_cyc = cyc;
    @(negedge clk); start = 0;
    check(running, "running after start");

    // wait for the load, then deliver a qubit state 20 cycles later
    wait (n_req == 7);
    repeat (20) @(posedge clk);
    @(negedge clk); ext_valid = 1; ext_state = 3'd1; v_cyc = cyc;
    @(negedge clk); ext_valid = 0;
    wait (!running);
    repeat (10) @(posedge clk);

    check(n_req == 11, $sformatf("bus requests %0d", n_req));
    // trigger words
    check(req_log[0].adr == 16'hE003 && req_log[0].we && req_log[0].dat == 32'h00011000, "TRIG 1 broadcast write");
    check(req_log[1].dat == 32'h00022000, "TRIG 2");
    check(req_log[2].dat == 32'h00033000, "TRIG 3");
    check(req_log[3].dat == 32'h00044000, "TRIG 4");
    check(req_log[4].dat == 32'h00055000, "TRIG 5");
    check(req_log[7].dat == 32'h00066000, "TRIG 6");
    // cycle counts: 2 ALU + MUL(6) + fetch/start 2 -> first TRIG on bus 11 cycles after start
    check(req_cyc[0] - start_cyc == 11, $sformatf("start..TRIG1 %0d (MUL 6 cycles)", req_cyc[0] - start_cyc));
    check(req_cyc[1] - req_cyc[0] == 1, "back-to-back TRIG every cycle");
    check(req_cyc[2] - req_cyc[1] == 11, $sformatf("WAIT-IMM 10: %0d", req_cyc[2] - req_cyc[1]));
    check(req_cyc[3] - req_cyc[2] == 5, $sformatf("ADDI + WAIT-REG 3: %0d", req_cyc[3] - req_cyc[2]));
    check(req_cyc[4] - req_cyc[3] == 3, $sformatf("WAIT-REG-TRIG 3: %0d", req_cyc[4] - req_cyc[3]));
    check(req_cyc[5] - req_cyc[4] == 6, $sformatf("SW waits for trigger ack: %0d", req_cyc[5] - req_cyc[4]));
    check(req_cyc[6] - req_cyc[5] == 8, $sformatf("SW takes 8 cycles: %0d", req_cyc[6] - req_cyc[5]));
    check(req_cyc[7] - v_cyc == 3, $sformatf("SYNC-EXT release: %0d", req_cyc[7] - v_cyc));
    check(req_cyc[8] - req_cyc[7] == 22, $sformatf("loop (branch 3 cycles) + JAL: %0d", req_cyc[8] - req_cyc[7]));
    check(req_cyc[9] - req_cyc[8] == 8 && req_cyc[10] - req_cyc[9] == 8, "stores 8 cycles apart");
    // stored data
    check(req_log[5].we && req_log[5].adr == 16'h0100 && req_log[5].dat == 32'd35, "MUL result stored");
    check(!req_log[6].we && req_log[6].adr == 16'h0101, "LW address");
    check(req_log[8].dat == 32'd5, "loop counter");
    check(req_log[9].dat == 32'd84, "JAL link address");
    check(req_log[10].dat == 32'hDEADBEEF, "LW data");
    // register file through the slave port
    s_read(16'd32 + 16'd7, r);  check(r == 32'd1, "SYNC-EXT wrote the state");
    s_read(16'd32 + 16'd6, r);  check(r == 32'd0, "skipped instructions not executed");
    s_read(16'd32 + 16'd10, r); check(r == 32'hFFFFFFFB, "SUB");
    s_read(16'd32 + 16'd11, r); check(r == 32'hFFFFFFFD, "SRAI");
    s_read(16'd32 + 16'd12, r); check(r == 32'd1, "SLT");
    s_read(16'd32 + 16'd13, r); check(r == 32'hABCDE000, "LUI");
    s_read(16'd1, r);           check(r[0] == 1'b0, "status: stopped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
