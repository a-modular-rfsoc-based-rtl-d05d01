// Self-checking test of the sample combiner/splitter with 3 cells and
// 2 DAC / 2 ADC channels: DAC outputs are the saturated sums of the
// selected generator streams, and each recorder receives the ADC channel
// chosen for it, one cycle later.
// Expected values come from the behaviour the document describes where it
// gives it, and from this design's own choices (encodings, register maps,
// latencies) elsewhere; stimuli and sizes are test choices.
module tb_sample_combiner_splitter;
  import qc_pkg::*;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  wb_req_t req;
  wb_rsp_t rsp;
  beat_t sg_read [3];
  beat_t sg_ctrl [3];
  beat_t dac [2];
  beat_t adc [2];
  beat_t sr_in [3];

  sample_combiner_splitter #(.NCELLS(3), .NDAC(2), .NADC(2)) dut (
    .clk, .rst, .wb_req(req), .wb_rsp(rsp), .sg_read, .sg_ctrl, .dac, .adc, .sr_in);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic wr(input logic [15:0] adr, input logic [31:0] dat);
    @(negedge clk); req = '{stb: 1, we: 1, adr: adr, dat: dat};
    @(negedge clk); req = WB_REQ_IDLE;
  endtask
  function automatic int sat(input int v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

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
    wr(16'd4, 32'b010101);     // DAC 0: readout generators of cells 0,1,2
    wr(16'd5, 32'b101010);     // DAC 1: control generators of cells 0,1,2
    wr(16'd16, 32'd1);         // cell 0 <- ADC 1
    wr(16'd17, 32'd0);
    wr(16'd18, 32'd1);
    for (int t = 0; t < 50; t++) begin
      int ei0, eq0, ei1, eq1;
      @(negedge clk);
      for (int c = 0; c < 3; c++)
        for (int k = 0; k < 4; k++) begin
          sg_read[c][k].i = 16'($urandom_range(0, 40000) - 20000);
          sg_read[c][k].q = 16'($urandom_range(0, 40000) - 20000);
          sg_ctrl[c][k].i = 16'($urandom_range(0, 2000) - 1000);
          sg_ctrl[c][k].q = 16'($urandom_range(0, 2000) - 1000);
        end
      for (int a = 0; a < 2; a++)
        for (int k = 0; k < 4; k++) begin
          adc[a][k].i = 16'($urandom); adc[a][k].q = 16'($urandom);
        end
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        ei0 = sat(int'(sg_read[0][k].i) + int'(sg_read[1][k].i) + int'(sg_read[2][k].i));
        eq0 = sat(int'(sg_read[0][k].q) + int'(sg_read[1][k].q) + int'(sg_read[2][k].q));
        ei1 = sat(int'(sg_ctrl[0][k].i) + int'(sg_ctrl[1][k].i) + int'(sg_ctrl[2][k].i));
        eq1 = sat(int'(sg_ctrl[0][k].q) + int'(sg_ctrl[1][k].q) + int'(sg_ctrl[2][k].q));
        check(dac[0][k].i == 16'(ei0) && dac[0][k].q == 16'(eq0), "readout sum with saturation");
        check(dac[1][k].i == 16'(ei1) && dac[1][k].q == 16'(eq1), "control sum");
      end
      check(sr_in[0] == adc[1] && sr_in[1] == adc[0] && sr_in[2] == adc[1], "ADC routing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
