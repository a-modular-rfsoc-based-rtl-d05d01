// Self-checking test of the signal generator. It loads envelopes and trigger
// sets over Wishbone, plays pulses and compares every output sample with a
// floating-point model (envelope * amplitude * e^{j phase} * gain), within
// the NCO table's resolution. Covered: start latency (6 cycles from the
// Wishbone request), pulse duration, I/Q envelope addressing, amplitude,
// phase offset, calibration gains, hold of the last value, persistent phase
// (virtual Z) and reset.
// Expected values come from the behaviour the document describes where it
// gives it, and from this design's own choices (encodings, register maps,
// latencies) elsewhere; stimuli and sizes are test choices.
module tb_signal_generator;
  import qc_pkg::*;

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  wb_req_t req;
  wb_rsp_t rsp;
  beat_t   out;
  logic    tvalid, busy;

  signal_generator dut (.clk, .rst, .wb_req(req), .wb_rsp(rsp), .m_axis_tdata(out),
                        .m_axis_tvalid(tvalid), .busy);

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

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic int envv(input int n);
    return 2000 + 311 * (n % 64) - 9000;
  endfunction

  localparam logic [31:0] FREQ = 32'd107374182;   // 25 MHz
  localparam real TWO_PI = 6.283185307179586;
  localparam int GI = 16384, GQ = 12000;

  // compare beat m of a pulse: rows ri/rq, amplitude a, phase (16-bit), nco acc
  task automatic cmp_beat(input int m, input int ri, input int rq, input int a,
                          input logic [15:0] ph, input logic [31:0] acc, input string tag);
    for (int k = 0; k < 4; k++) begin
      real ei, eq, phr, yi, yq, tol;
      logic [31:0] p;
      ei = $floor(real'(envv(4*(ri+m)+k) * a) / 32768.0);
      eq = $floor(real'(envv(4*(rq+m)+k) * a) / 32768.0);
      p = acc + 32'(k) * FREQ + {ph, 16'h0};
      phr = TWO_PI * real'(p) / 4294967296.0;
      yi = (ei * $cos(phr) - eq * $sin(phr)) * real'(GI) / 16384.0;
      yq = (ei * $sin(phr) + eq * $cos(phr)) * real'(GQ) / 16384.0;
      tol = 0.012 * ($sqrt(ei*ei + eq*eq)) + 4.0;
      check(fabs(real'(out[k].i) - yi) < tol && fabs(real'(out[k].q) - yq) < tol,
            $sformatf("%s beat %0d lane %0d: got %0d,%0d want %f,%f", tag, m, k, out[k].i, out[k].q, yi, yq));
    end
  endtask

  function automatic bit zero(input beat_t b);
    for (int k = 0; k < 4; k++) if (b[k].i != 0 || b[k].q != 0) return 0;
    return 1;
  endfunction

  int t0, first;
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
    // envelope memory: samples 0..255
    for (int w = 0; w < 128; w++)
      wr(16'h0800 + 16'(w), {16'(envv(2*w+1)), 16'(envv(2*w))});
    rd(16'h0800 + 16'd5, r);
    check(r == {16'(envv(11)), 16'(envv(10))}, "envelope read-back");
    wr(16'd4, FREQ);
    wr(16'd5, {16'(GQ), 16'(GI)});
    // set 1: 8 cycles, phase 0x1000, amplitude 0x6000, I rows 2, Q rows 20
    wr(16'd68, 32'd8);
    wr(16'd69, {16'h6000, 16'h1000});
    wr(16'd70, {16'd20, 16'd2});
    // set 2: 4 cycles with hold, amplitude 0x7fff, rows 5/5
    wr(16'd72, 32'd4 | (1 << 16));
    wr(16'd73, {16'h7fff, 16'h0000});
    wr(16'd74, {16'd5, 16'd5});
    // set 3: duration 0, persist phase 0x4000 (virtual Z by 90 degrees)
    wr(16'd76, 32'd0 | (1 << 17));
    wr(16'd77, {16'h0000, 16'h4000});
    rd(16'd69, r);
    check(r == {16'h6000, 16'h1000}, "trigger set read-back");

    // pulse 1 with NCO sync
    repeat (5) @(negedge clk);
    check(zero(out), "idle output is zero");
    @(negedge clk); req = '{stb: 1, we: 1, adr: 16'hE003, dat: {20'h00014, 12'h0}}; t0 = cyc;
    @(negedge clk); req = WB_REQ_IDLE;
    first = -1;
    for (int n = 1; n < 30; n++) begin
      if (first < 0 && !zero(out)) first = cyc;
      if (first >= 0 && cyc - first < 8) cmp_beat(cyc - first, 2, 20, 'h6000, 16'h1000, 32'(4 * (cyc - first)) * FREQ, "pulse1");
      if (first >= 0 && cyc - first >= 8) check(zero(out), "output zero after the pulse");
      @(negedge clk);
    end
    check(first - t0 == 6, $sformatf("latency request->first sample %0d", first - t0));

    // virtual Z then pulse 1 again (phase 0x5000)
    wr(16'hE003, {20'h00034, 12'h0});          // set 3 + sync
    rd(16'd6, r);
    check(r == 32'h4000, "phase reference advanced by the persistent offset");
    @(negedge clk); req = '{stb: 1, we: 1, adr: 16'hE003, dat: {20'h00014, 12'h0}}; t0 = cyc;
    @(negedge clk); req = WB_REQ_IDLE;
    repeat (5) @(negedge clk);
    for (int m = 0; m < 8; m++) begin
      cmp_beat(m, 2, 20, 'h6000, 16'h5000, 32'(4 * m) * FREQ, "pulse after virtual Z");
      @(negedge clk);
    end

    // hold: set 2, last value stays after 4 cycles
    @(negedge clk); req = '{stb: 1, we: 1, adr: 16'hE003, dat: {20'h00024, 12'h0}}; t0 = cyc;
    @(negedge clk); req = WB_REQ_IDLE;
    repeat (5) @(negedge clk);
    for (int m = 0; m < 4; m++) begin
      cmp_beat(m, 5, 5, 'h7fff, 16'h4000, 32'(4 * m) * FREQ, "hold pulse");
      @(negedge clk);
    end
    repeat (20) @(negedge clk);
    check(!zero(out), "held value still played 20 cycles after the pulse");
    rd(16'd1, r);
    check(r[1] == 1'b1, "status: holding");
    begin
      real mag, want;
      mag = $sqrt(real'(out[0].i) ** 2 + (real'(out[0].q) * 16384.0 / GQ) ** 2);
      want = $sqrt(2.0) * fabs($floor(real'(envv(4*8+3)) * 32767.0 / 32768.0));
      check(fabs(mag - want) < 0.03 * want + 4, $sformatf("held magnitude %f want %f", mag, want));
    end
    // reset trigger stops everything and clears the phase reference
    wr(16'hE003, {20'h00001, 12'h0});
    repeat (6) @(negedge clk);
    check(zero(out), "reset silences the output");
    rd(16'd6, r);
    check(r == 32'h0, "reset clears the phase reference");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
