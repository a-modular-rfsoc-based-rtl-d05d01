// Cell coordinator: starts any subset of the digital unit cells together.
//
// Writing a mask to register 4 sends a one-cycle start pulse, in the same
// clock cycle, to every cell whose bit is set, so the sequencers of those
// cells begin their programs in lock step. Register 5 reads back which
// cells are still running and register 6 the last start mask, so the
// processing system can tell when a run has ended.
// Timing: the start pulse is asserted in the cycle after the register write
// is decoded (two cycles after the Wishbone request).
// From the document: a coordinator connected to every cell that can start
// any subset simultaneously. The register interface is this design's.
module cell_coordinator
  import qc_pkg::*;
#(
  parameter int NCELLS = 15
) (
  input  logic              clk,
  input  logic              rst,
  input  wb_req_t           wb_req,
  output wb_rsp_t           wb_rsp,
  input  logic [NCELLS-1:0] busy,
  output logic [NCELLS-1:0] start
);

  logic [31:0] status, control;
  logic        ctrl_wr, trig_valid, reg_wr, reg_rd;
  logic [TRIG_W-1:0] trig_word;
  logic [12:0] ram_addr, reg_addr;
  logic [31:0] reg_wdata, reg_rdata;

  wb_reg_slave #(.SLAVE_ID(16'h4343), .VERSION(16'h0001)) u_regs (
    .clk, .rst, .wb_req, .wb_rsp, .status, .control, .ctrl_wr,
    .trig_valid, .trig_word, .ram_addr, .reg_wr, .reg_rd, .reg_addr,
    .reg_wdata, .reg_rdata);

  logic [NCELLS-1:0] last_mask;

  always_ff @(posedge clk) begin
    if (rst) begin
      start     <= '0;
      last_mask <= '0;
    end else begin
      start <= '0;
      if (reg_wr && reg_addr == 13'd4) begin
        start     <= reg_wdata[NCELLS-1:0];
        last_mask <= reg_wdata[NCELLS-1:0];
      end
    end
  end

  assign status = {31'd0, |busy};

  always_comb begin
    unique case (reg_addr)
      13'd5:   reg_rdata = 32'(busy);
      13'd6:   reg_rdata = 32'(last_mask);
      default: reg_rdata = '0;
    endcase
  end

  logic unused;
  assign unused = ^{control, ctrl_wr, trig_valid, trig_word, reg_rd, ram_addr, reg_wdata};

endmodule
