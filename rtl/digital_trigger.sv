// Digital trigger of the digital unit cell: timed digital outputs for
// external lab equipment (for example current sources for special gates).
//
// The 4-bit DT field of the trigger word selects one of 15 trigger sets
// (0 = no operation). A set names the outputs it drives (mask), how many
// cycles they stay asserted, and whether they stay asserted until the next
// trigger that addresses them (continuous). Every output has its own start
// offset in cycles, so external devices with different delays can be
// aligned, and its own polarity (invert). A trigger only affects the
// outputs in its mask; a set with duration 0 that is not continuous
// switches its outputs off. Trigger word bit 0 (reset) clears all outputs.
//
// Register map (word addresses, 0..3 common):
//   4        output inversion mask [NOUT-1:0]
//   8+o      start offset of output o (cycles, 16 bits)
//   16+s     set s: [7:0] output mask, [23:8] duration, [24] continuous
// Status: [NOUT-1:0] outputs currently asserted (before inversion).
// Timing: with offset 0 an output rises in the cycle after the trigger
// strobe and stays high for exactly `duration` cycles; offset d adds d.
// From the document: 15 sets, 8 outputs, duration, continuous option,
// per-output inversion and offset. Encodings and register map are this
// design's choice.
module digital_trigger
  import qc_pkg::*;
#(
  parameter int NSETS = 15,
  parameter int NOUT  = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  wb_req_t         wb_req,
  output wb_rsp_t         wb_rsp,
  output logic [NOUT-1:0] dout
);

  logic [31:0] status, control;
  logic        ctrl_wr, trig_valid, reg_wr, reg_rd;
  logic [TRIG_W-1:0] trig_word;
  logic [12:0] ram_addr, reg_addr;
  logic [31:0] reg_wdata, reg_rdata;

  wb_reg_slave #(.SLAVE_ID(16'h4454), .VERSION(16'h0001)) u_regs (
    .clk, .rst, .wb_req, .wb_rsp, .status, .control, .ctrl_wr,
    .trig_valid, .trig_word, .ram_addr, .reg_wr, .reg_rd, .reg_addr,
    .reg_wdata, .reg_rdata);

  logic [NOUT-1:0] inv;
  logic [15:0]     offs     [NOUT];
  logic [NOUT-1:0] set_mask [NSETS+1];
  logic [15:0]     set_dur  [NSETS+1];
  logic            set_cont [NSETS+1];

  always_ff @(posedge clk) begin
    if (rst) begin
      inv <= '0;
      for (int o = 0; o < NOUT; o++) offs[o] <= '0;
      for (int s = 0; s <= NSETS; s++) begin
        set_mask[s] <= '0; set_dur[s] <= '0; set_cont[s] <= 1'b0;
      end
    end else if (reg_wr) begin
      if (reg_addr == 13'd4) inv <= reg_wdata[NOUT-1:0];
      for (int o = 0; o < NOUT; o++)
        if (reg_addr == 13'(8 + o)) offs[o] <= reg_wdata[15:0];
      for (int s = 1; s <= NSETS; s++)
        if (reg_addr == 13'(16 + s)) begin
          set_mask[s] <= reg_wdata[NOUT-1:0];
          set_dur[s]  <= reg_wdata[23:8];
          set_cont[s] <= reg_wdata[24];
        end
    end
  end

  wire [3:0] tval    = trig_word[TF_DT +: 4];
  wire       t_reset = trig_valid & trig_word[TB_RESET];
  wire       t_set   = trig_valid & tval != 4'd0 & int'(tval) <= NSETS;

  logic [NOUT-1:0] pend, act, cont;
  logic [15:0]     ocnt [NOUT];
  logic [15:0]     dcnt [NOUT];

  for (genvar o = 0; o < NOUT; o++) begin : g_out
    always_ff @(posedge clk) begin
      if (rst || t_reset) begin
        pend[o] <= 1'b0; act[o] <= 1'b0; cont[o] <= 1'b0;
        ocnt[o] <= '0;   dcnt[o] <= '0;
      end else if (t_set && set_mask[tval][o]) begin
        cont[o] <= set_cont[tval];
        dcnt[o] <= set_dur[tval];
        act[o]  <= 1'b0;
        if (!set_cont[tval] && set_dur[tval] == 16'd0) begin
          pend[o] <= 1'b0;
        end else if (offs[o] == 16'd0) begin
          pend[o] <= 1'b0;
          act[o]  <= 1'b1;
        end else begin
          pend[o] <= 1'b1;
          ocnt[o] <= offs[o];
        end
      end else begin
        if (pend[o]) begin
          ocnt[o] <= ocnt[o] - 16'd1;
          if (ocnt[o] == 16'd1) begin
            pend[o] <= 1'b0;
            act[o]  <= 1'b1;
          end
        end
        if (act[o] && !cont[o]) begin
          dcnt[o] <= dcnt[o] - 16'd1;
          if (dcnt[o] == 16'd1) act[o] <= 1'b0;
        end
      end
    end
  end

  assign dout   = act ^ inv;
  assign status = 32'(act);

  always_comb begin
    reg_rdata = '0;
    if (reg_addr == 13'd4) reg_rdata = 32'(inv);
    for (int o = 0; o < NOUT; o++)
      if (reg_addr == 13'(8 + o)) reg_rdata = {16'd0, offs[o]};
    for (int s = 1; s <= NSETS; s++)
      if (reg_addr == 13'(16 + s)) reg_rdata = {7'd0, set_cont[s], set_dur[s], 8'(set_mask[s])};
  end

  logic unused;
  assign unused = ^{control, ctrl_wr, reg_rd, ram_addr, trig_word};

endmodule
