// Self-checking test of the digital trigger: checks, cycle by cycle, the
// rise time (offset) and pulse length (duration) of each output, the
// output mask of a set, inversion, continuous mode and its switch-off, and
// the reset bit.
// Expected values come from the behaviour the document describes where it
// gives it, and from this design's own choices (encodings, register maps,
// latencies) elsewhere; stimuli and sizes are test choices.
module tb_digital_trigger;
  import qc_pkg::*;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  wb_req_t req;
  wb_rsp_t rsp;
  logic [7:0] dout;
  digital_trigger dut (.clk, .rst, .wb_req(req), .wb_rsp(rsp), .dout);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic [15:0] adr, input logic [31:0] dat);
    @(negedge clk); req = '{stb: 1, we: 1, adr: adr, dat: dat};
    @(negedge clk); req = WB_REQ_IDLE;
  endtask

  // record each output's rise and fall cycles
  int rise [8], fall [8];
  logic [7:0] prev = 0;
  always @(negedge clk) begin
    for (int o = 0; o < 8; o++) begin
      if (dout[o] && !prev[o]) rise[o] = cyc;
      if (!dout[o] && prev[o]) fall[o] = cyc;
    end
    prev = dout;
  end

  int t0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = WB_REQ_IDLE;
    repeat (3) @(posedge clk);
    rst = 0;
    wr(16'd8 + 16'd0, 32'd0);      // output 0: no offset
    wr(16'd8 + 16'd1, 32'd5);      // output 1: offset 5
    wr(16'd8 + 16'd6, 32'd2);      // output 6: offset 2
    wr(16'd17, {7'd0, 1'b0, 16'd4, 8'b0000_0011});   // set 1: outputs 0,1 for 4 cycles
    wr(16'd18, {7'd0, 1'b1, 16'd0, 8'b0100_0000});   // set 2: output 6 continuous
    wr(16'd19, {7'd0, 1'b0, 16'd0, 8'b0100_0000});   // set 3: output 6 off
    for (int o = 0; o < 8; o++) begin rise[o] = -1; fall[o] = -1; end
    @(negedge clk); req = '{stb: 1, we: 1, adr: 16'hE003, dat: {20'h10000, 12'h0}}; t0 = cyc;
    @(negedge clk); req = WB_REQ_IDLE;
    repeat (15) @(negedge clk);
    check(rise[0] == t0 + 2 && fall[0] == t0 + 6, $sformatf("output 0: rise %0d fall %0d", rise[0] - t0, fall[0] - t0));
    check(rise[1] == t0 + 7 && fall[1] == t0 + 11, $sformatf("output 1 offset 5: rise %0d fall %0d", rise[1] - t0, fall[1] - t0));
    check(rise[2] == -1 && rise[6] == -1, "outputs outside the mask stay low");
    // continuous output 6
    @(negedge clk); req = '{stb: 1, we: 1, adr: 16'hE003, dat: {20'h20000, 12'h0}}; t0 = cyc;
    @(negedge clk); req = WB_REQ_IDLE;
    repeat (40) @(negedge clk);
    check(rise[6] == t0 + 4 && dout[6], "continuous output rises after its offset and stays high");
    wr(16'hE003, {20'h30000, 12'h0});
    repeat (5) @(negedge clk);
    check(!dout[6], "set with duration 0 switches the output off");
    // inversion
    wr(16'd4, 32'h0000_0081);
    @(negedge clk);
    check(dout == 8'h81, "inverted idle level");
    wr(16'hE003, {20'h10000, 12'h0});
    repeat (2) @(negedge clk);
    check(dout[0] == 1'b0 && dout[7] == 1'b1, "inverted output goes low while active");
    // reset bit
    wr(16'hE003, {20'h20000, 12'h0});
    repeat (5) @(negedge clk);
    check(dout[6], "continuous again");
    wr(16'hE003, {20'h00001, 12'h0});
    @(negedge clk);
    check(dout == 8'h81, "reset bit clears all outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
