// Signal generator of the digital unit cell (one for readout, one for control pulses).
//
// A pulse is started by a trigger word whose 4-bit field at TRIG_LSB
// selects one of 15 trigger sets (0 means no operation). A trigger set holds
// the pulse duration in cycles, a phase offset, an amplitude scale, the
// start rows of the I and Q envelopes in the envelope memory, a hold flag
// (keep the last envelope value after the pulse until the next trigger,
// for continuous-wave or trapezoid pulses) and a persist flag (add the
// phase offset permanently to the global phase reference: a virtual Z
// rotation). The sample player reads one row (4 samples) of I and of Q
// envelope per cycle, the complex envelope is scaled by the amplitude, turned
// by the NCO (frequency from a register, phase = global reference + offset),
// calibrated per quadrature and sent out as a stream beat of 4 I/Q samples.
//
// Trigger word bits: [0] reset (stop the pulse, clear the phase reference),
// [2] sync (restart the NCO). The stream never stops (tvalid = 1).
//
// Register map (word addresses; 0..3 are the common registers):
//   4        NCO phase step per sample (2^32 = one turn)
//   5        calibration gains: [15:0] I, [31:16] Q, 16384 = 1.0
//   6        global phase reference (read only, upper 16 bits of the phase)
//   64+4s+0  set s: [15:0] duration (cycles), [16] hold, [17] persist phase
//   64+4s+1  set s: [15:0] phase offset (1/65536 turn), [31:16] amplitude (Q1.15)
//   64+4s+2  set s: [9:0] I envelope row, [25:16] Q envelope row
//   0x800..  envelope memory, two 16-bit samples per word (low half first)
// Status: [0] pulse playing, [1] holding the last value.
//
// Latency: the first sample of a pulse leaves five cycles after the trigger
// strobe inside the module (six after the Wishbone request).
// From the document: 15 trigger sets, the set properties, the 8 kB / 4096
// sample envelope memory, the NCO, the complex multiplier and the I/Q
// calibration. This design's choices: the register map, the encodings, row
// (4-sample) granularity of envelope addresses, and the gain formats.
module signal_generator
  import qc_pkg::*;
#(
  parameter int          TRIG_LSB    = TF_SG_READ,
  parameter int          NSETS       = 15,
  parameter int          ENV_SAMPLES = 4096,
  parameter logic [15:0] SLAVE_ID    = 16'h5347
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_req_t wb_req,
  output wb_rsp_t wb_rsp,
  output beat_t   m_axis_tdata,
  output logic    m_axis_tvalid,
  output logic    busy
);

  localparam int ROWS = ENV_SAMPLES / LANES;
  localparam int RB   = $clog2(ROWS);

  // ---------------- register front end ----------------
  logic [31:0] status, control;
  logic        ctrl_wr, trig_valid, reg_wr, reg_rd;
  logic [TRIG_W-1:0] trig_word;
  logic [12:0] ram_addr, reg_addr;
  logic [31:0] reg_wdata, reg_rdata;

  wb_reg_slave #(.SLAVE_ID(SLAVE_ID), .VERSION(16'h0001)) u_regs (
    .clk, .rst, .wb_req, .wb_rsp, .status, .control, .ctrl_wr,
    .trig_valid, .trig_word, .ram_addr, .reg_wr, .reg_rd, .reg_addr,
    .reg_wdata, .reg_rdata);

  // ---------------- configuration ----------------
  logic [31:0] freq;
  logic [15:0] gain_i, gain_q;
  logic [15:0] set_dur   [NSETS+1];
  logic        set_hold  [NSETS+1];
  logic        set_pers  [NSETS+1];
  logic [15:0] set_phase [NSETS+1];
  logic signed [15:0] set_amp [NSETS+1];
  logic [RB-1:0] set_ri  [NSETS+1];
  logic [RB-1:0] set_rq  [NSETS+1];

  logic [63:0] env_mem [ROWS];
  logic [63:0] env_rd_wb;

  wire        in_env   = reg_addr[12:11] == 2'b01;             // 0x800..0xFFF
  wire        in_set   = reg_addr[12:6] == 7'd1;                // 64..127
  wire [3:0]  set_sel  = reg_addr[5:2];
  wire [1:0]  set_word = reg_addr[1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      freq   <= '0;
      gain_i <= 16'd16384;
      gain_q <= 16'd16384;
      for (int s = 0; s <= NSETS; s++) begin
        set_dur[s] <= '0; set_hold[s] <= 1'b0; set_pers[s] <= 1'b0;
        set_phase[s] <= '0; set_amp[s] <= '0; set_ri[s] <= '0; set_rq[s] <= '0;
      end
    end else if (reg_wr && !in_env) begin
      if (reg_addr == 13'd4) freq <= reg_wdata;
      if (reg_addr == 13'd5) {gain_q, gain_i} <= reg_wdata;
      if (in_set && int'(set_sel) >= 1 && int'(set_sel) <= NSETS) begin
        unique case (set_word)
          2'd0: begin
            set_dur[set_sel]  <= reg_wdata[15:0];
            set_hold[set_sel] <= reg_wdata[16];
            set_pers[set_sel] <= reg_wdata[17];
          end
          2'd1: begin
            set_phase[set_sel] <= reg_wdata[15:0];
            set_amp[set_sel]   <= reg_wdata[31:16];
          end
          2'd2: begin
            set_ri[set_sel] <= reg_wdata[RB-1:0];
            set_rq[set_sel] <= reg_wdata[16 +: RB];
          end
          default: ;
        endcase
      end
    end
  end

  // envelope memory: WB port writes one half-row, reads early (ram_addr)
  always_ff @(posedge clk) begin
    if (reg_wr && in_env)
      env_mem[reg_addr[RB:1]][32*reg_addr[0] +: 32] <= reg_wdata;
    env_rd_wb <= env_mem[ram_addr[RB:1]];
  end

  // ---------------- trigger handling and sample player ----------------
  wire [3:0] tval      = trig_word[TRIG_LSB +: 4];
  wire       t_reset   = trig_valid & trig_word[TB_RESET];
  wire       t_sync    = trig_valid & trig_word[TB_SYNC];
  wire       t_pulse   = trig_valid & (tval != 4'd0) & (int'(tval) <= NSETS);

  logic          active, hold_en;
  logic [15:0]   cnt;
  logic [RB-1:0] row_i, row_q;
  logic [15:0]   gphase;           // global phase reference
  logic [15:0]   pphase;           // phase of the current pulse
  logic signed [15:0] amp;

  always_ff @(posedge clk) begin
    if (rst || t_reset) begin
      active  <= 1'b0;
      hold_en <= 1'b0;
      cnt     <= '0;
      row_i   <= '0;
      row_q   <= '0;
      gphase  <= '0;
      pphase  <= '0;
      amp     <= '0;
    end else if (t_pulse) begin
      active  <= set_dur[tval] != 16'd0;
      hold_en <= set_hold[tval];
      cnt     <= set_dur[tval];
      row_i   <= set_ri[tval];
      row_q   <= set_rq[tval];
      amp     <= set_amp[tval];
      pphase  <= gphase + set_phase[tval];
      if (set_pers[tval]) gphase <= gphase + set_phase[tval];
    end else if (active) begin
      row_i  <= row_i + 1'b1;
      row_q  <= row_q + 1'b1;
      cnt    <= cnt - 1'b1;
      if (cnt == 16'd1) active <= 1'b0;
    end
  end

  // S1: envelope rows out of the memory
  logic [63:0] d_i, d_q;
  logic        p1_vld, p1_last, p1_hold;
  logic        holding;
  logic signed [15:0] held_i, held_q;

  always_ff @(posedge clk) begin
    d_i <= env_mem[row_i];
    d_q <= env_mem[row_q];
  end

  always_ff @(posedge clk) begin
    if (rst || t_reset) begin
      p1_vld  <= 1'b0;
      p1_last <= 1'b0;
      p1_hold <= 1'b0;
      holding <= 1'b0;
      held_i  <= '0;
      held_q  <= '0;
    end else begin
      p1_vld  <= active;
      p1_last <= active & (cnt == 16'd1);
      p1_hold <= hold_en;
      if (t_pulse) holding <= 1'b0;
      else if (p1_vld && p1_last && p1_hold) begin
        holding <= 1'b1;
        held_i  <= d_i[63:48];
        held_q  <= d_q[63:48];
      end
    end
  end

  // S2: envelope times amplitude
  beat_t env_s2;
  always_ff @(posedge clk) begin
    for (int k = 0; k < LANES; k++) begin
      logic signed [15:0] ei, eq;
      if (p1_vld) begin
        ei = d_i[16*k +: 16];
        eq = d_q[16*k +: 16];
      end else if (holding) begin
        ei = held_i;
        eq = held_q;
      end else begin
        ei = '0;
        eq = '0;
      end
      env_s2[k].i <= sat16((48'(ei) * 48'(amp)) >>> 15);
      env_s2[k].q <= sat16((48'(eq) * 48'(amp)) >>> 15);
    end
  end

  // NCO and complex multiplier (S3)
  logic [31:0]        nco_acc;
  logic signed [15:0] nco_c [LANES];
  logic signed [15:0] nco_s [LANES];

  nco #(.NL(LANES)) u_nco (
    .clk, .rst, .sync(t_sync), .freq, .phase_off({pphase, 16'h0}),
    .acc(nco_acc), .cos_o(nco_c), .sin_o(nco_s));

  beat_t mix;
  for (genvar k = 0; k < LANES; k++) begin : g_mix
    cmult u_cm (.clk, .conj_b(1'b0), .a(env_s2[k]),
                .b('{q: nco_s[k], i: nco_c[k]}), .y(mix[k]));
  end

  // S4: calibration
  always_ff @(posedge clk) begin
    for (int k = 0; k < LANES; k++) begin
      m_axis_tdata[k].i <= sat16((48'(mix[k].i) * 48'(signed'({1'b0, gain_i}))) >>> 14);
      m_axis_tdata[k].q <= sat16((48'(mix[k].q) * 48'(signed'({1'b0, gain_q}))) >>> 14);
    end
  end
  assign m_axis_tvalid = 1'b1;

  // ---------------- status and read-back ----------------
  assign busy   = active;
  assign status = {30'd0, holding, active};

  always_comb begin
    reg_rdata = '0;
    if (in_env)                    reg_rdata = env_rd_wb[32*reg_addr[0] +: 32];
    else if (reg_addr == 13'd4)    reg_rdata = freq;
    else if (reg_addr == 13'd5)    reg_rdata = {gain_q, gain_i};
    else if (reg_addr == 13'd6)    reg_rdata = {16'd0, gphase};
    else if (in_set && int'(set_sel) >= 1 && int'(set_sel) <= NSETS) begin
      unique case (set_word)
        2'd0: reg_rdata = {14'd0, set_pers[set_sel], set_hold[set_sel], set_dur[set_sel]};
        2'd1: reg_rdata = {set_amp[set_sel], set_phase[set_sel]};
        2'd2: reg_rdata = {6'd0, RB'(set_rq[set_sel]), 6'd0, RB'(set_ri[set_sel])};
        default: reg_rdata = '0;
      endcase
    end
  end

  logic unused;
  assign unused = ^{control, ctrl_wr, reg_rd, nco_acc, trig_word};

endmodule
