// Self-checking test of the complex multiplier: random operands, plain and
// conjugated second operand, compared with an integer reference including
// the Q1.15 shift and saturation; one cycle of latency.
// Expected values come from the behaviour the document describes where it
// gives it, and from this design's own choices (encodings, register maps,
// latencies) elsewhere; stimuli and sizes are test choices.
module tb_cmult;
  import qc_pkg::*;
  logic clk = 0;
  always #2 clk = ~clk;
  iq_t a, b, y;
  logic conj_b;
  cmult dut (.clk, .conj_b, .a, .b, .y);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      longint ai, aq, bi, bq, ri, rq;
      @(negedge clk);
      a.i = 16'($urandom); a.q = 16'($urandom); b.i = 16'($urandom); b.q = 16'($urandom);
      if (t == 0) begin a.i = -16'sd32768; a.q = -16'sd32768; b.i = -16'sd32768; b.q = 16'sd32767; end
      conj_b = t[0];
      ai = a.i; aq = a.q; bi = b.i; bq = conj_b ? -longint'(b.q) : longint'(b.q);
      ri = (ai * bi - aq * bq) >>> 15;
      rq = (ai * bq + aq * bi) >>> 15;
      @(negedge clk);
      check(y.i == 16'(sat(ri)) && y.q == 16'(sat(rq)),
            $sformatf("t%0d: got %0d,%0d want %0d,%0d", t, y.i, y.q, sat(ri), sat(rq)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
