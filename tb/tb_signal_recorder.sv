// Self-checking test of the signal recorder. The input stream is a known
// function of the cycle number, so the bench computes, independently of
// the design, which samples fall into a measurement window (trigger offset
// and length), their conditioned values (offset subtraction and 2x2 matrix)
// and the accumulated result. Covered: SINGLE, ONESHOT, CONTINUOUS + STOP,
// RESET, result timing, state estimate and threshold, time trace, averaging,
// and coherent down-conversion of a tone by the NCO.
// Expected values come from the behaviour the document describes where it
// gives it, and from this design's own choices (encodings, register maps,
// latencies) elsewhere; stimuli and sizes are test choices.
module tb_signal_recorder;
  import qc_pkg::*;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  wb_req_t req;
  wb_rsp_t rsp;
  beat_t   din;
  logic    res_valid, state_valid, busy;
  logic [31:0] res_i, res_q;
  logic [2:0]  state;

  signal_recorder dut (.clk, .rst, .wb_req(req), .wb_rsp(rsp), .s_axis_tdata(din), .s_axis_tvalid(1'b1),
                       .res_valid, .res_i, .res_q, .state_valid, .state, .busy);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // input stream
  bit tone = 0;
  localparam logic [31:0] FREQ = 32'd85899346;   // 20 MHz
  function automatic int xi(input int c, input int k); return (c * 7) % 200 - 100 + 10 * k; endfunction
  function automatic int xq(input int c, input int k); return 50 - (c * 3) % 100 - k; endfunction
  always @(negedge clk) begin
    for (int k = 0; k < 4; k++) begin
      if (tone) begin
        real ph;
        ph = 6.283185307179586 * real'(FREQ) * real'(4 * cyc + k) / 4294967296.0;
        din[k].i = 16'($rtoi(8000.0 * $cos(ph)));
        din[k].q = 16'($rtoi(8000.0 * $sin(ph)));
      end else begin
        din[k].i = 16'(xi(cyc, k));
        din[k].q = 16'(xq(cyc, k));
      end
    end
  end

  // conditioning model
  int oi = 0, oq = 0, m00 = 16384, m01 = 0, m10 = 0, m11 = 16384;
  function automatic int sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction
  function automatic int ci(input int c, input int k);
    return sat((longint'(xi(c, k) - oi) * m00 + longint'(xq(c, k) - oq) * m01) >>> 14);
  endfunction
  function automatic int cq(input int c, input int k);
    return sat((longint'(xi(c, k) - oi) * m10 + longint'(xq(c, k) - oq) * m11) >>> 14);
  endfunction
  // window covering input cycles first..first+w-1; NCO at 0 Hz multiplies by 32767/32768
  function automatic longint sum_i(input int first, input int w);
    longint s = 0;
    for (int c = first; c < first + w; c++)
      for (int k = 0; k < 4; k++) s += (longint'(ci(c, k)) * 32767) >>> 15;
    return s;
  endfunction
  function automatic longint sum_q(input int first, input int w);
    longint s = 0;
    for (int c = first; c < first + w; c++)
      for (int k = 0; k < 4; k++) s += (longint'(cq(c, k)) * 32767) >>> 15;
    return s;
  endfunction

  // result monitor
  int          n_res = 0, n_state = 0;
  int          res_cyc [$];
  logic [31:0] ri_q [$], rq_q [$];
  logic [2:0]  st_last;
  always @(posedge clk) begin
    if (!rst && res_valid) begin n_res++; res_cyc.push_back(cyc); ri_q.push_back(res_i); rq_q.push_back(res_q); end
    if (!rst && state_valid) begin n_state++; st_last = state; end
  end

  task automatic wr(input logic [15:0] adr, input logic [31:0] dat);
    @(negedge clk); req = '{stb: 1, we: 1, adr: adr, dat: dat};
    @(negedge clk); req = WB_REQ_IDLE;
  endtask
  task automatic rd(input logic [15:0] adr, output logic [31:0] dat);
    @(negedge clk); req = '{stb: 1, we: 0, adr: adr, dat: 0};
    @(negedge clk); req = WB_REQ_IDLE;
    @(negedge clk); dat = rsp.dat;
  endtask
  task automatic trig(input logic [3:0] v, output int t0);
    @(negedge clk); req = '{stb: 1, we: 1, adr: 16'hE003, dat: {8'h0, v, 8'h0, 12'h0}}; t0 = cyc;
    @(negedge clk); req = WB_REQ_IDLE;
  endtask

  int t0;
  logic [31:0] r, r2;
  longint ei, eq, avg_i, avg_q;
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
    // ---- SINGLE, offset 5, window 10
    wr(16'd8, 32'd5);
    wr(16'd9, 32'd10);
    trig(4'd1, t0);
    wait (n_res == 1);
    ei = sum_i(t0 + 6, 10); eq = sum_q(t0 + 6, 10);
    check(res_cyc[0] - t0 == 5 + 10 + 4, $sformatf("result timing %0d", res_cyc[0] - t0));
    check(ri_q[0] == 32'(ei) && rq_q[0] == 32'(eq), $sformatf("SINGLE result %0d,%0d want %0d,%0d",
          $signed(ri_q[0]), $signed(rq_q[0]), ei, eq));
    check(st_last == 3'(ei > 0), "state from threshold 0");
    avg_i = ei; avg_q = eq;
    rd(16'h1000, r);
    check(r == {16'(cq(t0 + 6, 0)), 16'(ci(t0 + 6, 0))}, "time trace holds the first window sample");
    rd(16'h1000 + 16'd39, r);
    check(r == {16'(cq(t0 + 15, 3)), 16'(ci(t0 + 15, 3))}, "time trace last sample");
    rd(16'd20, r);
    check(r == 32'd40, "trace length");

    // ---- ONESHOT: state only, threshold above the result
    wr(16'd11, 32'h7fff_ffff);
    repeat (2) @(negedge clk);
    trig(4'd2, t0);
    repeat (30) @(negedge clk);
    check(n_res == 1 && n_state == 2, "ONESHOT reports a state but stores nothing");
    check(st_last == 3'd0, "state 0 above threshold");
    wr(16'd11, 32'h0);

    // ---- CONTINUOUS, offset 0, window 6, STOP after two results
    wr(16'd8, 32'd0);
    wr(16'd9, 32'd6);
    trig(4'd3, t0);
    wait (n_res == 3);
    @(negedge clk);
    trig(4'd4, r2);
    repeat (40) @(negedge clk);
    check(n_res == 4, $sformatf("STOP lets the running window finish (%0d results)", n_res));
    for (int n = 0; n < 3; n++) begin
      ei = sum_i(t0 + 1 + 6 * n, 6); eq = sum_q(t0 + 1 + 6 * n, 6);
      check(ri_q[1 + n] == 32'(ei) && rq_q[1 + n] == 32'(eq), $sformatf("continuous window %0d", n));
      check(res_cyc[1 + n] - t0 == 6 * n + 10, "continuous windows back to back");
      avg_i += ei; avg_q += eq;
    end
    rd(16'd16, r); rd(16'd17, r2);
    check({r2, r} == 64'(avg_i), "averaged I");
    rd(16'd18, r); rd(16'd19, r2);
    check({r2, r} == 64'(avg_q), "averaged Q");

    // ---- conditioning: offsets and matrix
    oi = 17; oq = -23; m00 = 20000; m01 = -3000; m10 = 4000; m11 = 15000;
    wr(16'd4, {16'(oq), 16'(oi)});
    wr(16'd5, {16'(m01), 16'(m00)});
    wr(16'd6, {16'(m11), 16'(m10)});
    wr(16'd9, 32'd12);
    trig(4'd1, t0);
    wait (n_res == 5);
    ei = sum_i(t0 + 1, 12); eq = sum_q(t0 + 1, 12);
    check(ri_q[4] == 32'(ei) && rq_q[4] == 32'(eq), $sformatf("conditioned result (offset and matrix) %0d %0d want %0d %0d", $signed(ri_q[4]), $signed(rq_q[4]), ei, eq));

    // ---- RESET clears results and averages
    trig(4'd5, t0);
    rd(16'd16, r); rd(16'd15, r2);
    check(r == 0 && r2 == 0, "RESET clears averages and count");

    // ---- tone: coherent demodulation by the NCO
    wr(16'd4, 32'd0); wr(16'd5, 32'd16384); wr(16'd6, 32'h4000_0000);
    wr(16'd7, FREQ);
    wr(16'd9, 32'd50);
    tone = 1;
    wr(16'hE003, 32'h0000_4000);        // NCO sync
    trig(4'd1, t0);
    wait (n_res == 6);
    begin
      real a, b, mag;
      a = real'($signed(ri_q[5])); b = real'($signed(rq_q[5]));
      mag = $sqrt(a * a + b * b);
      check(mag > 0.97 * 200.0 * 8000.0 && mag < 1.01 * 200.0 * 8000.0,
            $sformatf("tone demodulated to DC: |result| %f", mag));
    end
    wr(16'd7, 32'd0);
    trig(4'd1, t0);
    wait (n_res == 7);
    begin
      real a, b;
      a = real'($signed(ri_q[6])); b = real'($signed(rq_q[6]));
      check($sqrt(a * a + b * b) < 0.2 * 200.0 * 8000.0, "untuned NCO leaves the tone off DC");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
