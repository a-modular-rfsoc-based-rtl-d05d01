// Numerically controlled oscillator producing LANES complex samples per cycle.
//
// A 32-bit phase accumulator advances by LANES*freq every clock (freq is
// the phase step per 1 ns sample; 2^32 is one full turn). Lane k uses the
// phase acc + k*freq + phase_off, whose top TABLE_BITS bits index a cosine
// table; the sine is read from the same table a quarter turn earlier
// (sin x = cos(x - pi/2)). Output amplitude is 32767. The table is computed
// at elaboration from cos(), so no data file is needed.
// sync (one cycle) restarts the accumulator at zero so that every NCO in a
// cell, synchronised by the same trigger bit, holds the same phase.
// Latency: the sample for accumulator value A appears two cycles after
// A is in the register. The document only says the modules contain an NCO;
// the table-based construction and its size are this design's choice.
module nco
  import qc_pkg::*;
#(
  parameter int NL         = LANES,
  parameter int TABLE_BITS = 10
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              sync,
  input  logic [31:0]       freq,
  input  logic [31:0]       phase_off,
  output logic [31:0]       acc,
  output logic signed [15:0] cos_o [NL],
  output logic signed [15:0] sin_o [NL]
);

  localparam int N = 1 << TABLE_BITS;
  typedef logic signed [15:0] tab_t [N];

  function automatic tab_t make_cos();
    tab_t t;
    for (int i = 0; i < N; i++)
      t[i] = 16'($rtoi($floor($cos(6.283185307179586 * i / N) * 32767.0 + 0.5)));
    return t;
  endfunction

  localparam tab_t COS_TAB = make_cos();

  logic [TABLE_BITS-1:0] a_cos [NL];
  logic [TABLE_BITS-1:0] a_sin [NL];

  always_ff @(posedge clk) begin
    if (rst || sync) acc <= '0;
    else             acc <= acc + 32'(NL) * freq;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < NL; k++) begin
      automatic logic [31:0] ph = acc + 32'(k) * freq + phase_off;
      a_cos[k] <= ph[31 -: TABLE_BITS];
      a_sin[k] <= ph[31 -: TABLE_BITS] - TABLE_BITS'(N / 4);
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < NL; k++) begin
      cos_o[k] <= COS_TAB[a_cos[k]];
      sin_o[k] <= COS_TAB[a_sin[k]];
    end
  end

endmodule
