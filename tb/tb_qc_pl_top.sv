// End-to-end test of the full-size controller (15 cells, 4 DAC / 4 ADC
// channels, all parameters at their defaults) with every DAC channel looped
// back to the ADC channel of the same number.
//
// Workload: a Ramsey sequence on five qubits (cells 0..4) started together
// by the cell coordinator. Each iteration plays two 13-cycle (52 ns) pi/2
// pulses separated by a delay that grows by 4 cycles, then a frequency-
// multiplexed readout pulse (all five readout tones share DAC channel 0),
// waits for the state (SYNC-EXT), stores it and fires a digital trigger.
// The readout is calibrated first: one measurement per cell sets the state
// axis. Readout pulses alternate between phase 0 and 180 degrees so the
// expected states alternate 1,0,1,0,...
// At the same time cell 5 keeps its sequencer issuing trigger writes while
// the processing system reads from it (bus stall), then records in
// CONTINUOUS mode until STOP, overflowing one data storage channel and
// wrapping a circular one, and finishes with a ONESHOT measurement.
//
// Each mechanism is counted; one that never happens is a failure. The
// loopback, the program and all settings are test choices.
// The checked behaviour follows the document where it describes it; the
// register maps and encodings used are this design's own.
module tb_qc_pl_top;
  import qc_pkg::*;
  import rv_asm_pkg::*;

  localparam int NQ = 5;          // Ramsey cells
  localparam int NIT = 6;         // Ramsey points per cell
  localparam int CW = 15;         // cell used for stall / modes tests: index 5
  localparam int C5 = 5;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  axil_req_t  s_axil_req;
  axil_rsp_t  s_axil_rsp;
  beat_t      dac_tdata [4];
  logic       dac_tvalid;
  beat_t      adc_tdata [4];
  logic [7:0] dig_out [15];
  logic [14:0] cell_running;

  qc_pl_top dut (
    .clk, .rst, .s_axil_req, .s_axil_rsp, .dac_tdata, .dac_tvalid,
    .adc_tdata, .adc_tvalid(dac_tvalid), .dig_out, .cell_running);

  assign adc_tdata = dac_tdata;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic axi_wr(input logic [31:0] a, input logic [31:0] d, output logic [1:0] resp);
    bit aw = 0, w = 0;
    @(negedge clk);
    s_axil_req.awaddr = a; s_axil_req.awvalid = 1; s_axil_req.wdata = d; s_axil_req.wvalid = 1;
    s_axil_req.wstrb = 4'hf; s_axil_req.bready = 1;
    forever begin
      @(posedge clk);
      if (s_axil_rsp.awready) aw = 1;
      if (s_axil_rsp.wready) w = 1;
      if (s_axil_rsp.bvalid) begin resp = s_axil_rsp.bresp; break; end
      @(negedge clk);
      if (aw) s_axil_req.awvalid = 0;
      if (w) s_axil_req.wvalid = 0;
    end
    @(negedge clk);
    s_axil_req.awvalid = 0; s_axil_req.wvalid = 0; s_axil_req.bready = 0;
  endtask
  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic [1:0] r;
    axi_wr(a, d, r);
  endtask

  task automatic axi_rd(input logic [31:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    s_axil_req.araddr = a; s_axil_req.arvalid = 1; s_axil_req.rready = 1;
    forever begin
      @(posedge clk);
      if (s_axil_rsp.rvalid) begin d = s_axil_rsp.rdata; resp = s_axil_rsp.rresp; break; end
      if (s_axil_rsp.arready) begin @(negedge clk); s_axil_req.arvalid = 0; end
    end
    @(negedge clk);
    s_axil_req.arvalid = 0; s_axil_req.rready = 0;
  endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    logic [1:0] r;
    axi_rd(a, d, r);
  endtask

  // byte address of register r of slave s in cell c; coordinator and combiner
  function automatic logic [31:0] ca(input int c, input int s, input int r);
    return 32'((c << 18) + s * 'h8000 + r * 4);
  endfunction
  function automatic logic [31:0] coord(input int r); return 32'((15 << 18) + r * 4); endfunction
  function automatic logic [31:0] comb(input int r);  return 32'((16 << 18) + r * 4); endfunction

  // ---------------- mechanism counters ----------------
  // (monitors start a few cycles after reset)
  int since_rst = 0;
  always @(posedge clk) since_rst <= rst ? 0 : since_rst + 1;
  int n_stall = 0, n_bcast = 0, n_syncwait = 0, n_comb = 0, n_lockstep = 0;
  int n_single = 0, n_cont = 0, n_oneshot = 0, n_stop = 0, n_ovf = 0, n_circ = 0;
  int n_decerr = 0, n_dig = 0, n_ramsey_gap = 0, n_states = 0;

  always @(posedge clk) begin
    if (since_rst > 2 && dut.g_cell[C5].u_cell.brg_rsp.stall) n_stall++;
    if (since_rst > 2 && dut.g_cell[0].u_cell.u_sg_read.trig_valid && dut.g_cell[0].u_cell.u_sr.trig_valid &&
        dut.g_cell[0].u_cell.u_sg_read.trig_word[TF_SG_READ +: 4] != 0 &&
        dut.g_cell[0].u_cell.u_sr.trig_word[TF_SR +: 4] != 0) n_bcast++;
    if (since_rst > 2 && dut.g_cell[0].u_cell.u_seq.status[1]) n_syncwait++;
  end

  // a state reported to the sequencer of cell 5 while the recorder is in ONESHOT mode
  bit oneshot_seen = 0;
  always @(posedge clk)
    if (since_rst > 2 && dut.g_cell[C5].u_cell.sr_state_valid && !dut.g_cell[C5].u_cell.sr_res_valid) oneshot_seen = 1;

  // combiner: DAC 0 = saturated sum of the readout generators of cells 0..4
  beat_t rd_q [NQ];
  always @(posedge clk) begin
    if (since_rst > 2) begin
      bit any, ok;
      any = 0; ok = 1;
      for (int k = 0; k < 4; k++) begin
        int si, sq;
        si = 0; sq = 0;
        for (int c = 0; c < NQ; c++) begin
          si += int'($signed(rd_q[c][k].i)); sq += int'($signed(rd_q[c][k].q));
        end
        if (si != 0) any = 1;
        si = si > 32767 ? 32767 : (si < -32768 ? -32768 : si);
        sq = sq > 32767 ? 32767 : (sq < -32768 ? -32768 : sq);
        if (dac_tdata[0][k].i != 16'(si) || dac_tdata[0][k].q != 16'(sq)) begin
          ok = 0;
          if (failures < 3) $display("lane %0d: %h %h exp %h %h", k, dac_tdata[0][k].i, dac_tdata[0][k].q, 16'(si), 16'(sq));
        end
      end
      if (any) begin
        n_comb++;
        check(ok, $sformatf("DAC 0 carries the sum of the readout streams %h %h %h", dac_tdata[0][0], rd_q[0][0], rd_q[1][0]));
      end
    end
    for (int c = 0; c < NQ; c++) rd_q[c] <= dut.sg_read[c];
  end

  // control pulse starts per cell (lock step and Ramsey delays)
  int ctrl_start [NQ][$];
  logic [NQ-1:0] busy_q;
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    busy_q[0] <= dut.g_cell[0].u_cell.sgc_busy;
    busy_q[1] <= dut.g_cell[1].u_cell.sgc_busy;
    busy_q[2] <= dut.g_cell[2].u_cell.sgc_busy;
    busy_q[3] <= dut.g_cell[3].u_cell.sgc_busy;
    busy_q[4] <= dut.g_cell[4].u_cell.sgc_busy;
    if (since_rst > 2 && dut.g_cell[0].u_cell.sgc_busy && !busy_q[0]) ctrl_start[0].push_back(cyc);
    if (since_rst > 2 && dut.g_cell[1].u_cell.sgc_busy && !busy_q[1]) ctrl_start[1].push_back(cyc);
    if (since_rst > 2 && dut.g_cell[2].u_cell.sgc_busy && !busy_q[2]) ctrl_start[2].push_back(cyc);
    if (since_rst > 2 && dut.g_cell[3].u_cell.sgc_busy && !busy_q[3]) ctrl_start[3].push_back(cyc);
    if (since_rst > 2 && dut.g_cell[4].u_cell.sgc_busy && !busy_q[4]) ctrl_start[4].push_back(cyc);
  end

  // digital trigger output 0 of each Ramsey cell
  int dig_rise [NQ];
  logic [NQ-1:0] dig_q;
  always @(posedge clk) begin
    for (int c = 0; c < NQ; c++) begin
      dig_q[c] <= dig_out[c][0];
      if (since_rst > 2 && dig_out[c][0] && !dig_q[c]) dig_rise[c]++;
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ramsey [24];
  logic [31:0] p5 [75];

  initial begin
    logic [31:0] d, ri, rq;
    logic [1:0] r;
    s_axil_req = '0;
    for (int c = 0; c < NQ; c++) dig_rise[c] = 0;
    repeat (5) @(posedge clk);
    rst = 0;

    // ---------------- combiner ----------------
    wr(comb(4), 32'h155);                 // DAC 0: readout of cells 0..4
    wr(comb(5), 32'h2AA);                 // DAC 1: control of cells 0..4
    for (int c = 0; c < 15; c++) wr(comb(16 + c), 0);   // every recorder <- ADC 0
    rd(comb(5), d);
    check(d == 32'h2AA, "combiner mask read back");

    // ---------------- Ramsey cells ----------------
    for (int c = 0; c < NQ; c++) begin
      // readout generator: tone (c+1)*4 periods per 128 samples
      wr(ca(c, SEL_SG_READ, 4), 32'(c + 1) << 27);
      wr(ca(c, SEL_SG_READ, 5), {16'd16384, 16'd16384});
      for (int w = 0; w < 96; w++) wr(ca(c, SEL_SG_READ, 'h800 + w), {16'd8000, 16'd8000});
      for (int s = 1; s <= 2; s++) begin
        wr(ca(c, SEL_SG_READ, 64 + 4 * s), 32'd48);
        wr(ca(c, SEL_SG_READ, 64 + 4 * s + 1), {16'h4000, s == 1 ? 16'h0 : 16'h8000});
        wr(ca(c, SEL_SG_READ, 64 + 4 * s + 2), 32'd0);
      end
      // control generator: 13-cycle pi/2 pulse
      wr(ca(c, SEL_SG_CTRL, 4), 32'(c + 3) << 26);
      wr(ca(c, SEL_SG_CTRL, 5), {16'd16384, 16'd16384});
      for (int w = 0; w < 26; w++) wr(ca(c, SEL_SG_CTRL, 'h800 + w), {16'd8000, 16'd8000});
      wr(ca(c, SEL_SG_CTRL, 68), 32'd13);
      wr(ca(c, SEL_SG_CTRL, 69), {16'h4000, 16'h0});
      wr(ca(c, SEL_SG_CTRL, 70), 32'd0);
      // recorder: same tone, 32-cycle window inside the pulse
      wr(ca(c, SEL_SR, 4), 0);
      wr(ca(c, SEL_SR, 5), 32'd16384);
      wr(ca(c, SEL_SR, 6), 32'd16384 << 16);
      wr(ca(c, SEL_SR, 7), 32'(c + 1) << 27);
      wr(ca(c, SEL_SR, 8), 12);
      wr(ca(c, SEL_SR, 9), 32);
      wr(ca(c, SEL_SR, 10), 32'h0000_7fff);
      wr(ca(c, SEL_SR, 11), 0);
      // data storage: 0 result I, 1 state, 2 written by the sequencer
      wr(ca(c, SEL_DS, 4), 1);
      wr(ca(c, SEL_DS, 5), 3);
      wr(ca(c, SEL_DS, 6), 6);
      // digital trigger set 1: output 0 for 4 cycles
      wr(ca(c, SEL_DT, 17), {8'd0, 16'd4, 8'h01});
      // calibration program: one readout with phase 0
      wr(ca(c, SEL_SEQ, 'h400), TRIG(20'h00114));
      wr(ca(c, SEL_SEQ, 'h401), SYNC_EXT(5));
      wr(ca(c, SEL_SEQ, 'h402), SYNC_START());
    end
    wr(coord(4), 32'h1F);
    repeat (4) @(posedge clk);
    wait (cell_running[NQ-1:0] == 0);
    repeat (10) @(posedge clk);
    // state axis of each cell along its calibration result
    for (int c = 0; c < NQ; c++) begin
      real fi, fq, mag;
      rd(ca(c, SEL_SR, 12), ri);
      rd(ca(c, SEL_SR, 13), rq);
      fi = real'($signed(ri)); fq = real'($signed(rq));
      mag = $sqrt(fi * fi + fq * fq);
      check(mag > 300000.0, $sformatf("cell %0d readout magnitude %0f", c, mag));
      if (mag < 1.0) mag = 1.0;
      wr(ca(c, SEL_SR, 10), {16'($rtoi(32767.0 * fq / mag)), 16'($rtoi(32767.0 * fi / mag))});
      wr(ca(c, SEL_DS, 2), 1);             // clear the data storage
    end

    // Ramsey program
    ramsey[0]  = ADDI(1, 0, 1);
    ramsey[1]  = ADDI(2, 0, NIT / 2);
    ramsey[2]  = LUI(10, 20'h00008);
    ramsey[3]  = TRIG(20'h01000);
    ramsey[4]  = WAIT_IMM(13);
    ramsey[5]  = WAIT_REG(1);
    ramsey[6]  = TRIG(20'h01000);
    ramsey[7]  = WAIT_IMM(13);
    ramsey[8]  = TRIG(20'h10114);
    ramsey[9]  = SYNC_EXT(5);
    ramsey[10] = SW_I(5, 10, 14);
    ramsey[11] = ADDI(1, 1, 4);
    ramsey[12] = TRIG(20'h01000);
    ramsey[13] = WAIT_IMM(13);
    ramsey[14] = WAIT_REG(1);
    ramsey[15] = TRIG(20'h01000);
    ramsey[16] = WAIT_IMM(13);
    ramsey[17] = TRIG(20'h10124);
    ramsey[18] = SYNC_EXT(6);
    ramsey[19] = SW_I(6, 10, 14);
    ramsey[20] = ADDI(1, 1, 4);
    ramsey[21] = ADDI(2, 2, -1);
    ramsey[22] = BNE(2, 0, -76);
    ramsey[23] = SYNC_START();
    for (int c = 0; c < NQ; c++)
      for (int i = 0; i < 24; i++) wr(ca(c, SEL_SEQ, 'h400 + i), ramsey[i]);

    // cell 5: bus load, continuous recording with overflow, stop, oneshot
    wr(ca(C5, SEL_SR, 8), 0);
    wr(ca(C5, SEL_SR, 9), 2);
    wr(ca(C5, SEL_DS, 4), 1);              // channel 0: result I, stops when full
    wr(ca(C5, SEL_DS, 5), 32'h8 | 2);      // channel 1: result Q, circular
    p5[0] = ADDI(2, 0, 4);
    for (int i = 1; i <= 64; i++) p5[i] = TRIG(20'h00000);
    p5[65] = ADDI(2, 2, -1);
    p5[66] = BNE(2, 0, -260);
    p5[67] = TRIG(20'h00300);              // recorder CONTINUOUS
    p5[68] = WAIT_IMM(1500);
    p5[69] = WAIT_IMM(1500);
    p5[70] = TRIG(20'h00400);              // STOP
    p5[71] = WAIT_IMM(50);
    p5[72] = TRIG(20'h00200);              // ONESHOT
    p5[73] = SYNC_EXT(5);
    p5[74] = SYNC_START();
    for (int i = 0; i < 75; i++) wr(ca(C5, SEL_SEQ, 'h400 + i), p5[i]);

    // start all six cells in the same cycle
    for (int c = 0; c < NQ; c++) ctrl_start[c].delete();
    wr(coord(4), 32'h3F);
    repeat (3) @(posedge clk);
    check(cell_running[5:0] == 6'h3F, "six cells running");
    // read from cell 5 while its sequencer floods the bus with trigger writes
    for (int n = 0; n < 30; n++) begin
      rd(ca(C5, SEL_SEQ, 'h400 + 66), d);
      check(d == p5[66], "program word read while the sequencer writes");
    end
    wait (cell_running[5:0] == 0);
    repeat (20) @(posedge clk);

    // ---------------- results ----------------
    for (int c = 0; c < NQ; c++) begin
      check(ctrl_start[c].size() == 2 * NIT, $sformatf("cell %0d control pulses %0d", c, ctrl_start[c].size()));
      if (c > 0 && ctrl_start[c].size() == ctrl_start[0].size()) begin
        bit same;
        same = 1;
        foreach (ctrl_start[c][k]) if (ctrl_start[c][k] != ctrl_start[0][k]) same = 0;
        check(same, $sformatf("cell %0d pulses in lock step with cell 0", c));
        if (same) n_lockstep++;
      end
      check(dig_rise[c] == NIT, $sformatf("cell %0d digital trigger pulses %0d", c, dig_rise[c]));
      if (dig_rise[c] > 0) n_dig++;
      for (int m = 0; m < 3; m++) begin
        rd(ca(c, SEL_DS, 8 + m), d);
        check(d[15:0] == NIT, $sformatf("cell %0d channel %0d entries %0d", c, m, d[15:0]));
      end
      for (int k = 0; k < NIT; k++) begin
        logic [31:0] st, sw;
        rd(ca(c, SEL_DS, 'h1000 + 1024 + k), st);
        rd(ca(c, SEL_DS, 'h1000 + 2048 + k), sw);
        check(st == 32'((k + 1) % 2) && sw == st, $sformatf("cell %0d point %0d state %0d/%0d", c, k, st, sw));
        if (st == 32'((k + 1) % 2)) n_states++;
      end
    end
    for (int k = 0; k + 2 < 2 * NIT; k += 2) begin
      int g0, g1;
      g0 = ctrl_start[0][k + 1] - ctrl_start[0][k];
      g1 = ctrl_start[0][k + 3] - ctrl_start[0][k + 2];
      check(g1 - g0 == 4, $sformatf("Ramsey delay step %0d (%0d %0d)", g1 - g0, g0, g1));
      if (g1 - g0 == 4) n_ramsey_gap++;
    end
    rd(ca(0, SEL_SR, 15), d);
    if (d >= NIT) n_single++;
    check(d == NIT + 1, $sformatf("cell 0 recorder results %0d", d));

    // cell 5
    rd(ca(C5, SEL_SR, 15), d);
    check(d > 1200 && d < 1600, $sformatf("continuous results %0d", d));
    if (d > 1024) n_cont++;
    rd(ca(C5, SEL_SR, 1), d);
    check(d[2] == 1'b0, "continuous mode ended by STOP");
    if (!d[2]) n_stop++;
    rd(ca(C5, SEL_DS, 8), d);
    check(d[15:0] == 1024 && d[18] && d[17], $sformatf("channel 0 full with overflow %h", d));
    if (d[18]) n_ovf++;
    rd(ca(C5, SEL_DS, 9), d);
    check(d[15:0] == 1024 && !d[18], $sformatf("circular channel never overflows %h", d));
    if (d[17] && !d[18]) n_circ++;
    rd(ca(C5, SEL_SEQ, 1), d);
    check(d[0] == 1'b0, "cell 5 got its ONESHOT state and ended");
    if (!d[0] && oneshot_seen) n_oneshot++;

    // decode error beyond the last window
    axi_rd(32'(20 << 18), d, r);
    check(r == 2'b11, "read beyond the last window gives DECERR");
    if (r == 2'b11) n_decerr++;
    axi_wr(32'(31 << 18), 0, r);
    check(r == 2'b11, "write beyond the last window gives DECERR");
    rd(coord(6), d);
    check(d == 32'h3F, "coordinator last start mask");

    // ---------------- every mechanism must have happened ----------------
    $display("mechanisms: stall=%0d broadcast=%0d syncwait=%0d combine=%0d lockstep=%0d single=%0d",
             n_stall, n_bcast, n_syncwait, n_comb, n_lockstep, n_single);
    $display("            continuous=%0d stop=%0d overflow=%0d circular=%0d oneshot=%0d decerr=%0d",
             n_cont, n_stop, n_ovf, n_circ, n_oneshot, n_decerr);
    $display("            digital=%0d ramsey_delay=%0d states=%0d", n_dig, n_ramsey_gap, n_states);
    check(n_stall > 0, "bridge stalled by the sequencer");
    check(n_bcast > 0, "one trigger word reached generator and recorder");
    check(n_syncwait > 0, "sequencer waited in SYNC-EXT");
    check(n_comb > 0, "streams combined");
    check(n_lockstep > 0, "cells in lock step");
    check(n_single > 0, "SINGLE measurements");
    check(n_cont > 0, "CONTINUOUS measurements");
    check(n_stop > 0, "STOP");
    check(n_ovf > 0, "data storage overflow");
    check(n_circ > 0, "circular data storage");
    check(n_oneshot > 0, "ONESHOT measurement");
    check(n_decerr > 0, "AXI decode error");
    check(n_dig > 0, "digital trigger outputs");
    check(n_ramsey_gap > 0, "register-timed waits");
    check(n_states > 0, "qubit states stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
