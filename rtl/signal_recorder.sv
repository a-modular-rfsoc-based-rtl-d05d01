// Signal recorder of the digital unit cell: digital down-conversion and
// qubit state estimation for one readout channel.
//
// Continuous path, 4 samples per cycle:
//   conditioning   out = M * (in - offset), M a 2x2 matrix in Q2.14, to
//                  correct I/Q amplitude and phase imbalance and DC offset
//   mixing         conditioned sample times the conjugate NCO oscillation,
//                  which moves the readout carrier to DC
// Triggered path:
//   trigger control  the 4-bit recorder field of the trigger word selects
//                    SINGLE (1), ONESHOT (2), CONTINUOUS (3), STOP (4) or
//                    RESET (5); a measurement window opens after the
//                    programmable trigger offset (the round-trip electrical
//                    delay) and lasts `duration` cycles
//   time trace       conditioned samples of the window are written to a
//                    memory (up to TRACE_SAMPLES from the trigger on)
//   accumulator      boxcar integrator: sums all mixed samples in the window
//   state estimate   projects the result (I,Q) on a programmable axis and
//                    compares it with a threshold, giving state 0 or 1
//   averaging        sums every stored result until the module is reset
// SINGLE sends result and state to the data storage, ONESHOT only reports
// the state to the sequencer, CONTINUOUS starts a new window right after
// each one until STOP, after which the running window still completes.
// Trigger word bits [0] reset and [2] NCO sync act as in every module.
//
// Register map (word addresses, 0..3 common):
//   4 offsets I [15:0], Q [31:16]      5 M00 [15:0], M01 [31:16]
//   6 M10 [15:0], M11 [31:16]          7 NCO phase step per sample
//   8 trigger offset (cycles)          9 window length (cycles)
//  10 state axis cos [15:0], sin [31:16] (Q1.15)   11 threshold (signed)
//  12/13 last result I/Q  14 last state  15 result count
//  16/17 average sum I lo/hi  18/19 average sum Q lo/hi  20 trace length
//  0x1000.. time trace, one {Q,I} sample per word
// Status: [0] window open, [1] waiting for offset, [2] continuous mode.
//
// Latency: result and state leave three cycles after the last window cycle.
// From the document: equation (1), time trace, NCO down-conversion,
// boxcar accumulation, trigger offset, state estimate to sequencer and data
// storage, averaging and the four modes plus STOP. This design's choices:
// the mode encodings, the projection-and-threshold estimator (the document
// does not say how the state is obtained), formats, sizes and register map.
module signal_recorder
  import qc_pkg::*;
#(
  parameter int TRACE_SAMPLES = 4096
) (
  input  logic        clk,
  input  logic        rst,
  input  wb_req_t     wb_req,
  output wb_rsp_t     wb_rsp,
  input  beat_t       s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        res_valid,
  output logic [31:0] res_i,
  output logic [31:0] res_q,
  output logic        state_valid,
  output logic [2:0]  state,
  output logic        busy
);

  localparam int ROWS = TRACE_SAMPLES / LANES;
  localparam int RB   = $clog2(ROWS);

  logic [31:0] status, control;
  logic        ctrl_wr, trig_valid, reg_wr, reg_rd;
  logic [TRIG_W-1:0] trig_word;
  logic [12:0] ram_addr, reg_addr;
  logic [31:0] reg_wdata, reg_rdata;

  wb_reg_slave #(.SLAVE_ID(16'h5352), .VERSION(16'h0001)) u_regs (
    .clk, .rst, .wb_req, .wb_rsp, .status, .control, .ctrl_wr,
    .trig_valid, .trig_word, .ram_addr, .reg_wr, .reg_rd, .reg_addr,
    .reg_wdata, .reg_rdata);

  // ---------------- configuration ----------------
  logic signed [15:0] off_i, off_q, m00, m01, m10, m11, ax_c, ax_s;
  logic [31:0] freq, trig_off, win_len;
  logic signed [31:0] thresh;

  always_ff @(posedge clk) begin
    if (rst) begin
      off_i <= '0; off_q <= '0;
      m00 <= 16'sd16384; m01 <= '0; m10 <= '0; m11 <= 16'sd16384;
      freq <= '0; trig_off <= '0; win_len <= 32'd1;
      ax_c <= 16'sh7fff; ax_s <= '0; thresh <= '0;
    end else if (reg_wr) begin
      unique case (reg_addr)
        13'd4:  {off_q, off_i} <= reg_wdata;
        13'd5:  {m01, m00}     <= reg_wdata;
        13'd6:  {m11, m10}     <= reg_wdata;
        13'd7:  freq           <= reg_wdata;
        13'd8:  trig_off       <= reg_wdata;
        13'd9:  win_len        <= reg_wdata;
        13'd10: {ax_s, ax_c}   <= reg_wdata;
        13'd11: thresh         <= reg_wdata;
        default: ;
      endcase
    end
  end

  // ---------------- conditioning (C1) ----------------
  beat_t cond;
  always_ff @(posedge clk) begin
    for (int k = 0; k < LANES; k++) begin
      logic signed [47:0] di, dq;
      di = 48'(s_axis_tdata[k].i) - 48'(off_i);
      dq = 48'(s_axis_tdata[k].q) - 48'(off_q);
      if (!s_axis_tvalid) begin di = '0; dq = '0; end
      cond[k].i <= sat16((di * 48'(m00) + dq * 48'(m01)) >>> 14);
      cond[k].q <= sat16((di * 48'(m10) + dq * 48'(m11)) >>> 14);
    end
  end

  // ---------------- down-conversion (C2) ----------------
  wire t_reset = trig_valid & (trig_word[TB_RESET] | (trig_word[TF_SR +: 4] == SR_RESET));
  wire t_sync  = trig_valid & trig_word[TB_SYNC];
  sr_trig_e tmode;
  assign tmode = sr_trig_e'(trig_valid ? trig_word[TF_SR +: 4] : SR_NOP);

  logic [31:0]        nco_acc;
  logic signed [15:0] nco_c [LANES];
  logic signed [15:0] nco_s [LANES];
  nco #(.NL(LANES)) u_nco (
    .clk, .rst, .sync(t_sync), .freq, .phase_off(32'd0),
    .acc(nco_acc), .cos_o(nco_c), .sin_o(nco_s));

  beat_t mixed;
  for (genvar k = 0; k < LANES; k++) begin : g_mix
    cmult u_cm (.clk, .conj_b(1'b1), .a(cond[k]),
                .b('{q: nco_s[k], i: nco_c[k]}), .y(mixed[k]));
  end

  // ---------------- trigger control ----------------
  logic        pend, win, cont, oneshot, stop_req;
  logic [31:0] ocnt, wcnt;
  logic [RB:0] tptr;
  wire         win_last = win & (wcnt == 32'd1);

  always_ff @(posedge clk) begin
    if (rst || t_reset) begin
      pend <= 1'b0; win <= 1'b0; cont <= 1'b0; oneshot <= 1'b0; stop_req <= 1'b0;
      ocnt <= '0; wcnt <= '0;
      tptr <= '0;
    end else begin
      if (tmode == SR_SINGLE || tmode == SR_ONESHOT || tmode == SR_CONTINUOUS) begin
        pend     <= trig_off != 32'd0;
        win      <= trig_off == 32'd0;
        ocnt     <= trig_off;
        wcnt     <= win_len == 32'd0 ? 32'd1 : win_len;
        cont     <= tmode == SR_CONTINUOUS;
        oneshot  <= tmode == SR_ONESHOT;
        stop_req <= 1'b0;
        tptr     <= '0;
      end else begin
        if (tmode == SR_STOP) stop_req <= 1'b1;
        if (pend) begin
          ocnt <= ocnt - 32'd1;
          if (ocnt == 32'd1) begin
            pend <= 1'b0;
            win  <= 1'b1;
          end
        end
        if (win) begin
          wcnt <= wcnt - 32'd1;
          if (win_last) begin
            if (cont && !stop_req && tmode != SR_STOP) wcnt <= win_len == 32'd0 ? 32'd1 : win_len;
            else begin
              win  <= 1'b0;
              cont <= 1'b0;
            end
          end
        end
      end
      if (win && !tptr[RB]) tptr <= tptr + 1'b1;
    end
  end

  // time trace memory
  logic [127:0] trace [ROWS];
  logic [127:0] trace_rd;
  always_ff @(posedge clk) begin
    if (win && !tptr[RB]) trace[tptr[RB-1:0]] <= cond;
    trace_rd <= trace[ram_addr[RB+1:2]];
  end

  // ---------------- accumulator (aligned with C2) ----------------
  logic               win_d, last_d, store_d;
  logic signed [47:0] acc_i, acc_q;
  logic               rvld;
  logic signed [47:0] r_i, r_q;
  logic               r_store;

  always_ff @(posedge clk) begin
    if (rst || t_reset) begin
      win_d <= 1'b0; last_d <= 1'b0; store_d <= 1'b0;
      acc_i <= '0; acc_q <= '0;
      rvld <= 1'b0; r_i <= '0; r_q <= '0; r_store <= 1'b0;
    end else begin
      logic signed [47:0] si, sq;
      si = '0; sq = '0;
      for (int k = 0; k < LANES; k++) begin
        si = si + 48'(mixed[k].i);
        sq = sq + 48'(mixed[k].q);
      end
      win_d   <= win;
      last_d  <= win_last;
      store_d <= ~oneshot;
      rvld    <= 1'b0;
      if (win_d) begin
        if (last_d) begin
          r_i     <= acc_i + si;
          r_q     <= acc_q + sq;
          rvld    <= 1'b1;
          r_store <= store_d;
          acc_i   <= '0;
          acc_q   <= '0;
        end else begin
          acc_i <= acc_i + si;
          acc_q <= acc_q + sq;
        end
      end
    end
  end

  function automatic logic [31:0] sat32(input logic signed [47:0] v);
    if (v > 48'sh0000_7fff_ffff)       return 32'h7fff_ffff;
    else if (v < -48'sh0000_8000_0000) return 32'h8000_0000;
    else                               return v[31:0];
  endfunction

  // ---------------- state estimate and outputs ----------------
  logic [31:0] cnt_res;
  logic signed [63:0] avg_i, avg_q;
  always_ff @(posedge clk) begin
    if (rst || t_reset) begin
      res_valid <= 1'b0; res_i <= '0; res_q <= '0;
      state_valid <= 1'b0; state <= '0;
      cnt_res <= '0; avg_i <= '0; avg_q <= '0;
    end else begin
      logic signed [31:0] ri, rq;
      logic signed [63:0] proj;
      ri = sat32(r_i);
      rq = sat32(r_q);
      proj = (64'(ri) * 64'(ax_c) + 64'(rq) * 64'(ax_s)) >>> 15;
      res_valid   <= rvld & r_store;
      state_valid <= rvld;
      if (rvld) begin
        res_i <= ri;
        res_q <= rq;
        state <= {2'b00, proj > 64'(thresh)};
        cnt_res <= cnt_res + 32'd1;
        if (r_store) begin
          avg_i <= avg_i + 64'(ri);
          avg_q <= avg_q + 64'(rq);
        end
      end
    end
  end

  assign busy   = pend | win | win_d | rvld;
  assign status = {29'd0, cont, pend, win};

  always_comb begin
    reg_rdata = '0;
    if (reg_addr[12]) reg_rdata = trace_rd[32*reg_addr[1:0] +: 32];
    else unique case (reg_addr)
      13'd4:  reg_rdata = {off_q, off_i};
      13'd5:  reg_rdata = {m01, m00};
      13'd6:  reg_rdata = {m11, m10};
      13'd7:  reg_rdata = freq;
      13'd8:  reg_rdata = trig_off;
      13'd9:  reg_rdata = win_len;
      13'd10: reg_rdata = {ax_s, ax_c};
      13'd11: reg_rdata = thresh;
      13'd12: reg_rdata = res_i;
      13'd13: reg_rdata = res_q;
      13'd14: reg_rdata = {29'd0, state};
      13'd15: reg_rdata = cnt_res;
      13'd16: reg_rdata = avg_i[31:0];
      13'd17: reg_rdata = avg_i[63:32];
      13'd18: reg_rdata = avg_q[31:0];
      13'd19: reg_rdata = avg_q[63:32];
      13'd20: reg_rdata = 32'(tptr) * 32'(LANES);
      default: reg_rdata = '0;
    endcase
  end

  logic unused;
  assign unused = ^{control, ctrl_wr, reg_rd, nco_acc, ram_addr, trig_word};

endmodule
