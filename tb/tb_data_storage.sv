// Self-checking test of the data storage (memories shrunk to 16 words so
// that full, overflow and wrap-around are reached quickly). Covered: result
// I/Q sources, append-until-full with overflow flag, circular mode, state
// packing 32 x 1 bit and 10 x 3 bits, single states, the Wishbone append
// register, direct Wishbone access to the memories, and clearing.
// Expected values come from the behaviour the document describes where it
// gives it, and from this design's own choices (encodings, register maps,
// latencies) elsewhere; stimuli and sizes are test choices.
module tb_data_storage;
  import qc_pkg::*;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;

  wb_req_t req;
  wb_rsp_t rsp;
  logic res_valid = 0, st_valid = 0;
  logic [31:0] res_i = 0, res_q = 0;
  logic [2:0] st = 0;

  localparam int D = 16;
  data_storage #(.NMEM(4), .DEPTH(D)) dut (.clk, .rst, .wb_req(req), .wb_rsp(rsp),
    .res_valid, .res_i, .res_q, .st_valid, .st);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic [15:0] adr, input logic [31:0] dat);
    @(negedge clk); req = '{stb: 1, we: 1, adr: adr, dat: dat};
    @(negedge clk); req = WB_REQ_IDLE;
  endtask
  task automatic rd(input logic [15:0] adr, output logic [31:0] dat);
    @(negedge clk); req = '{stb: 1, we: 0, adr: adr, dat: 0};
    @(negedge clk); req = WB_REQ_IDLE;
    @(negedge clk); dat = rsp.dat;
  endtask

  logic [31:0] vi [64], vq [64];
  logic [2:0]  sv [64];
  logic [31:0] r;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = WB_REQ_IDLE;
    repeat (3) @(posedge clk);
    rst = 0;
    wr(16'd4, 32'd1);             // mem0: result I
    wr(16'd5, 32'd2 | 32'd8);     // mem1: result Q, circular
    wr(16'd6, 32'd4);             // mem2: 32 states per word
    wr(16'd7, 32'd5);             // mem3: 10 states per word
    rd(16'd8, r);
    check(r == 32'h0001_0000, "empty after reset");
    for (int n = 0; n < 64; n++) begin
      vi[n] = $urandom; vq[n] = $urandom; sv[n] = 3'($urandom);
      @(negedge clk);
      res_valid = n < 20; st_valid = 1; res_i = vi[n]; res_q = vq[n]; st = sv[n];
      @(negedge clk);
      res_valid = 0; st_valid = 0;
    end
    repeat (3) @(negedge clk);
    rd(16'd8, r);
    check(r[15:0] == 16 && r[17] && r[18], $sformatf("mem0 full with overflow: %h", r));
    rd(16'd9, r);
    check(r[15:0] == 16 && r[17] && !r[18], $sformatf("mem1 circular: full, no overflow: %h", r));
    for (int i = 0; i < D; i++) begin
      rd(16'h1000 + 16'(i), r);
      check(r == vi[i], $sformatf("mem0[%0d] keeps the first values", i));
      rd(16'h1000 + 16'(D + i), r);
      check(r == (i < 4 ? vq[i + 16] : vq[i]), $sformatf("mem1[%0d] wrapped", i));
    end
    rd(16'd10, r);
    check(r[15:0] == 2, "two packed 32-state words");
    for (int w = 0; w < 2; w++) begin
      logic [31:0] e;
      for (int b = 0; b < 32; b++) e[b] = sv[32 * w + b][0];
      rd(16'h1000 + 16'(2 * D + w), r);
      check(r == e, $sformatf("packed 1-bit word %0d", w));
    end
    rd(16'd11, r);
    check(r[15:0] == 6, "six packed 10-state words");
    for (int w = 0; w < 6; w++) begin
      logic [31:0] e;
      e = '0;
      for (int b = 0; b < 10; b++) e[3 * b +: 3] = sv[10 * w + b];
      rd(16'h1000 + 16'(3 * D + w), r);
      check(r == e, $sformatf("packed 3-bit word %0d", w));
    end
    // clear, then WB append and single states
    wr(16'd2, 32'd1);
    rd(16'd8, r);
    check(r == 32'h0001_0000, "cleared by control bit 0");
    wr(16'd4, 32'd6);             // mem0: WB append register
    wr(16'd7, 32'd3);             // mem3: single states
    wr(16'd12, 32'hAAAA0001);
    wr(16'd12, 32'hAAAA0002);
    wr(16'd13, 32'hBBBB0000);     // mem1 is not a WB source: ignored
    @(negedge clk); st_valid = 1; st = 3'd5;
    @(negedge clk); st_valid = 0;
    rd(16'd8, r);  check(r[15:0] == 2, "two appended words");
    rd(16'h1000, r); check(r == 32'hAAAA0001, "appended word 0");
    rd(16'h1001, r); check(r == 32'hAAAA0002, "appended word 1");
    rd(16'd9, r);  check(r[15:0] == 0, "append register of another source ignored");
    rd(16'h1000 + 16'(3 * D), r); check(r == 32'd5, "single state stored");
    // direct memory write through the second port
    wr(16'h1000 + 16'(2 * D + 7), 32'h12345678);
    rd(16'h1000 + 16'(2 * D + 7), r); check(r == 32'h12345678, "direct memory access");
    // trigger reset bit clears as well
    wr(16'hE003, 32'h0000_1000);
    rd(16'd8, r);  check(r == 32'h0001_0000, "cleared by the reset trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
