// Sample combiner and splitter between the digital unit cells and the
// data converters.
//
// Combiner: each of the NDAC complex DAC channels outputs the saturated sum
// of any set of signal-generator streams, so several frequency-multiplexed
// pulses (for example the readout pulses of all cells) share one converter
// pair. Register 4+d holds the source mask of DAC channel d: bit 2c is the
// readout generator of cell c, bit 2c+1 its control generator.
// Splitter: register 16+c selects which ADC channel feeds the signal
// recorder of cell c; one ADC channel can feed many cells.
// Timing: one register stage in each direction.
// From the document: combining (adding) generator outputs onto one DAC
// channel and distributing ADC samples to the cells. The masks and the
// register map are this design's choice.
module sample_combiner_splitter
  import qc_pkg::*;
#(
  parameter int NCELLS = 15,
  parameter int NDAC   = 4,
  parameter int NADC   = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_req_t wb_req,
  output wb_rsp_t wb_rsp,
  input  beat_t   sg_read [NCELLS],
  input  beat_t   sg_ctrl [NCELLS],
  output beat_t   dac     [NDAC],
  input  beat_t   adc     [NADC],
  output beat_t   sr_in   [NCELLS]
);

  localparam int MW = 2 * NCELLS;
  localparam int AS = (NADC > 1) ? $clog2(NADC) : 1;

  logic [31:0] status, control;
  logic        ctrl_wr, trig_valid, reg_wr, reg_rd;
  logic [TRIG_W-1:0] trig_word;
  logic [12:0] ram_addr, reg_addr;
  logic [31:0] reg_wdata, reg_rdata;

  wb_reg_slave #(.SLAVE_ID(16'h5343), .VERSION(16'h0001)) u_regs (
    .clk, .rst, .wb_req, .wb_rsp, .status, .control, .ctrl_wr,
    .trig_valid, .trig_word, .ram_addr, .reg_wr, .reg_rd, .reg_addr,
    .reg_wdata, .reg_rdata);

  logic [MW-1:0] dmask [NDAC];
  logic [AS-1:0] asel  [NCELLS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int d = 0; d < NDAC; d++) dmask[d] <= '0;
      for (int c = 0; c < NCELLS; c++) asel[c] <= '0;
    end else if (reg_wr) begin
      for (int d = 0; d < NDAC; d++)
        if (reg_addr == 13'(4 + d)) dmask[d] <= reg_wdata[MW-1:0];
      for (int c = 0; c < NCELLS; c++)
        if (reg_addr == 13'(16 + c)) asel[c] <= reg_wdata[AS-1:0];
    end
  end

  always_ff @(posedge clk) begin
    for (int d = 0; d < NDAC; d++)
      for (int k = 0; k < LANES; k++) begin
        logic signed [47:0] si, sq;
        si = '0; sq = '0;
        for (int c = 0; c < NCELLS; c++) begin
          if (dmask[d][2*c])   begin si += 48'(sg_read[c][k].i); sq += 48'(sg_read[c][k].q); end
          if (dmask[d][2*c+1]) begin si += 48'(sg_ctrl[c][k].i); sq += 48'(sg_ctrl[c][k].q); end
        end
        dac[d][k].i <= sat16(si);
        dac[d][k].q <= sat16(sq);
      end
    for (int c = 0; c < NCELLS; c++)
      sr_in[c] <= (int'(asel[c]) < NADC) ? adc[asel[c]] : '0;
  end

  assign status = '0;

  always_comb begin
    reg_rdata = '0;
    for (int d = 0; d < NDAC; d++)
      if (reg_addr == 13'(4 + d)) reg_rdata = 32'(dmask[d]);
    for (int c = 0; c < NCELLS; c++)
      if (reg_addr == 13'(16 + c)) reg_rdata = 32'(asel[c]);
  end

  logic unused;
  assign unused = ^{control, ctrl_wr, trig_valid, trig_word, reg_rd, ram_addr, reg_wdata};

endmodule
