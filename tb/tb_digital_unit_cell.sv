// Self-checking test of one digital unit cell with the readout generator
// looped back to the recorder input. The processing system side (AXI4-Lite)
// configures every module and loads a program; the sequencer then plays a
// pulse of phase 0 and one of phase 180 degrees, records each, branches on
// the reported qubit state (SYNC-EXT) to fire one of two digital trigger
// outputs and stores both states in the data storage. Checked: generator
// output, recorder results and states, the branch outcome on the digital
// outputs, data storage contents and the sequencer stopping. The loopback
// and the test program are test choices.
// The checked behaviour follows the document where it describes it; the
// register maps and encodings used are this design's own.
module tb_digital_unit_cell;
  import qc_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  axil_req_t axil_req;
  axil_rsp_t axil_rsp;
  logic      start = 0, running;
  beat_t     sg_read_tdata, sg_ctrl_tdata;
  logic      sg_read_tvalid, sg_ctrl_tvalid;
  logic [7:0] dig_out;

  digital_unit_cell dut (
    .clk, .rst, .axil_req, .axil_rsp, .start, .running,
    .sg_read_tdata, .sg_read_tvalid, .sg_ctrl_tdata, .sg_ctrl_tvalid,
    .adc_tdata(sg_read_tdata), .adc_tvalid(sg_read_tvalid), .dig_out);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic axi_wr(input logic [31:0] a, input logic [31:0] d);
    bit aw = 0, w = 0;
    @(negedge clk);
    axil_req.awaddr = a; axil_req.awvalid = 1; axil_req.wdata = d; axil_req.wvalid = 1;
    axil_req.wstrb = 4'hf; axil_req.bready = 1;
    forever begin
      @(posedge clk);
      if (axil_rsp.awready) aw = 1;
      if (axil_rsp.wready) w = 1;
      if (axil_rsp.bvalid) break;
      @(negedge clk);
      if (aw) axil_req.awvalid = 0;
      if (w) axil_req.wvalid = 0;
    end
    @(negedge clk);
    axil_req.awvalid = 0; axil_req.wvalid = 0; axil_req.bready = 0;
  endtask

  task automatic axi_rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    axil_req.araddr = a; axil_req.arvalid = 1; axil_req.rready = 1;
    forever begin
      @(posedge clk);
      if (axil_rsp.rvalid) begin d = axil_rsp.rdata; break; end
      if (axil_rsp.arready) begin @(negedge clk); axil_req.arvalid = 0; end
    end
    @(negedge clk);
    axil_req.arvalid = 0; axil_req.rready = 0;
  endtask

  function automatic logic [31:0] ra(input int slave, input int regw);
    return 32'(slave * 'h8000 + regw * 4);
  endfunction

  // generator output and digital output monitors
  int pos_beats = 0, neg_beats = 0;
  int d0_rise = 0, d1_rise = 0;
  logic [7:0] dig_q;
  int since_rst = 0;
  always @(posedge clk) since_rst <= rst ? 0 : since_rst + 1;
  always @(posedge clk) if (since_rst > 2) begin
    if (sg_read_tvalid && $signed(sg_read_tdata[0].i) > 6000) pos_beats++;
    if (sg_read_tvalid && $signed(sg_read_tdata[0].i) < -6000) neg_beats++;
    dig_q <= dig_out;
    if (dig_out[0] && !dig_q[0]) d0_rise++;
    if (dig_out[1] && !dig_q[1]) d1_rise++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [16];
  initial begin
    logic [31:0] d, r0, r1;
    axil_req = '0;
    repeat (4) @(posedge clk);
    rst = 0;
    // readout generator: DC (frequency 0), unity gains, two sets
    axi_wr(ra(SEL_SG_READ, 4), 0);
    axi_wr(ra(SEL_SG_READ, 5), {16'd16384, 16'd16384});
    for (int w = 0; w < 32; w++)            // rows 0..7 = 8000, rows 8..15 = 0
      axi_wr(ra(SEL_SG_READ, 'h800 + w), w < 16 ? {16'd8000, 16'd8000} : 32'd0);
    for (int s = 1; s <= 2; s++) begin
      axi_wr(ra(SEL_SG_READ, 64 + 4 * s), 32'd8);                          // 8 cycles
      axi_wr(ra(SEL_SG_READ, 64 + 4 * s + 1), {16'h7fff, s == 1 ? 16'h0 : 16'h8000});
      axi_wr(ra(SEL_SG_READ, 64 + 4 * s + 2), {16'd8, 16'd0});               // I row 0, Q row 8
    end
    // recorder: identity conditioning, frequency 0, window of 8 cycles
    axi_wr(ra(SEL_SR, 4), 0);
    axi_wr(ra(SEL_SR, 5), 32'd16384);
    axi_wr(ra(SEL_SR, 6), 32'd16384 << 16);
    axi_wr(ra(SEL_SR, 7), 0);
    axi_wr(ra(SEL_SR, 8), 6);
    axi_wr(ra(SEL_SR, 9), 8);
    axi_wr(ra(SEL_SR, 10), 32'h0000_7fff);
    axi_wr(ra(SEL_SR, 11), 0);
    // data storage: channel 0 result I, channel 1 state, channel 2 written by the sequencer
    axi_wr(ra(SEL_DS, 4), 1);
    axi_wr(ra(SEL_DS, 5), 3);
    axi_wr(ra(SEL_DS, 6), 6);
    // digital trigger: set 1 -> output 0, set 2 -> output 1, 4 cycles each
    axi_wr(ra(SEL_DT, 17), {8'd0, 16'd4, 8'h01});
    axi_wr(ra(SEL_DT, 18), {8'd0, 16'd4, 8'h02});
    // program
    prog[0]  = TRIG(20'h00110);          // SG read set 1 + SR single
    prog[1]  = SYNC_EXT(5);
    prog[2]  = BEQ(5, 0, 12);            // state 0 -> pc 5
    prog[3]  = TRIG(20'h10000);          // DT set 1
    prog[4]  = JAL(0, 8);                // -> pc 6
    prog[5]  = TRIG(20'h20000);          // DT set 2
    prog[6]  = TRIG(20'h00120);          // SG read set 2 + SR single
    prog[7]  = SYNC_EXT(6);
    prog[8]  = BEQ(6, 0, 12);            // -> pc 11
    prog[9]  = TRIG(20'h10000);
    prog[10] = JAL(0, 8);                // -> pc 12
    prog[11] = TRIG(20'h20000);
    prog[12] = LUI(10, 20'h00008);       // x10 = data storage base
    prog[13] = SW_I(5, 10, 14);          // append x5 to channel 2
    prog[14] = SW_I(6, 10, 14);
    prog[15] = SYNC_START();
    for (int i = 0; i < 16; i++) axi_wr(ra(SEL_SEQ, 'h400 + i), prog[i]);
    axi_rd(ra(SEL_SEQ, 'h400 + 13), d);
    check(d == prog[13], "program memory read back");
    axi_rd(ra(SEL_SG_READ, 0), d);
    check(d[31:16] == 16'h4752, "readout generator info register");
    // start the run through the sequencer control register
    axi_wr(ra(SEL_SEQ, 2), 1);
    repeat (2) @(posedge clk);
    check(running, "sequencer running after start");
    wait (!running);
    repeat (20) @(posedge clk);
    check(pos_beats >= 7 && pos_beats <= 9, $sformatf("positive pulse beats %0d", pos_beats));
    check(neg_beats >= 7 && neg_beats <= 9, $sformatf("negative pulse beats %0d", neg_beats));
    check(d0_rise == 1 && d1_rise == 1, $sformatf("branch outcome on outputs %0d %0d", d0_rise, d1_rise));
    axi_rd(ra(SEL_SR, 15), d);
    check(d == 2, $sformatf("recorder result count %0d", d));
    axi_rd(ra(SEL_SEQ, 32 + 5), d);
    check(d == 1, "first state (x5) = 1");
    axi_rd(ra(SEL_SEQ, 32 + 6), d);
    check(d == 0, "second state (x6) = 0");
    for (int m = 0; m < 3; m++) begin
      axi_rd(ra(SEL_DS, 8 + m), d);
      check(d[15:0] == 2, $sformatf("data storage channel %0d size %0d", m, d[15:0]));
    end
    axi_rd(ra(SEL_DS, 'h1000), r0);
    axi_rd(ra(SEL_DS, 'h1000 + 1), r1);
    check($signed(r0) > 100000 && $signed(r1) < -100000, $sformatf("stored results %0d %0d", $signed(r0), $signed(r1)));
    axi_rd(ra(SEL_DS, 'h1000 + 1024), r0);
    axi_rd(ra(SEL_DS, 'h1000 + 1025), r1);
    check(r0 == 1 && r1 == 0, "stored states");
    axi_rd(ra(SEL_DS, 'h1000 + 2048), r0);
    axi_rd(ra(SEL_DS, 'h1000 + 2049), r1);
    check(r0 == 1 && r1 == 0, "states stored by the sequencer");
    axi_rd(ra(6, 0), d);
    check(d == 0, "free slot reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
