// Self-checking test of the NCO: every lane's cosine and sine follow
// 32767*cos/sin of the expected phase (within the table's resolution),
// consecutive lanes advance by one phase step, a phase offset shifts all
// lanes, and sync restarts the accumulator at zero.
// Expected values come from the behaviour the document describes where it
// gives it, and from this design's own choices (encodings, register maps,
// latencies) elsewhere; stimuli and sizes are test choices.
module tb_nco;
  logic clk = 0, rst = 1, sync = 0;
  always #2 clk = ~clk;
  logic [31:0] freq = 0, poff = 0, acc;
  logic signed [15:0] c [4];
  logic signed [15:0] s [4];

  nco dut (.clk, .rst, .sync, .freq, .phase_off(poff), .acc, .cos_o(c), .sin_o(s));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam real TWO_PI = 6.283185307179586;
  // tolerance: 10-bit table, error up to 2*pi/1024 of full scale
  function automatic bit near(input int got, input real want);
    return (got - want) < 220.0 && (want - got) < 220.0;
  endfunction

  logic [31:0] acc_d [3];
  always @(posedge clk) begin acc_d[0] <= acc; acc_d[1] <= acc_d[0]; acc_d[2] <= acc_d[1]; end

  int n_ok;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    freq = 32'd42949673;   // 10 MHz at 1 GS/s
    poff = 32'h2000_0000;  // 45 degrees
    repeat (10) @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        logic [31:0] ph;
        real a;
        ph = acc_d[1] + 32'(k) * freq + poff;
        a = TWO_PI * real'(ph) / 4294967296.0;
        if (t % 20 == 0) begin
          check(near(c[k], 32767.0 * $cos(a)), $sformatf("cos lane %0d t %0d: %0d vs %f", k, t, c[k], 32767.0 * $cos(a)));
          check(near(s[k], 32767.0 * $sin(a)), $sformatf("sin lane %0d t %0d: %0d vs %f", k, t, s[k], 32767.0 * $sin(a)));
        end
      end
    end
    // sync: accumulator restarts at zero
    @(negedge clk); sync = 1;
    @(negedge clk); sync = 0;
    check(acc == 32'd0, "sync clears the phase accumulator");
    @(negedge clk); check(acc == 32'd4 * freq, "accumulator advances by 4 steps per cycle");
    poff = 0;
    repeat (2) @(negedge clk);
    check(near(c[0], 32767.0 * $cos(TWO_PI * real'(acc_d[1]) / 4294967296.0)), "phase after sync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
