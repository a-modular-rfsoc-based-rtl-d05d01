// Common Wishbone register front end of every slave in the digital unit cell.
//
// Each slave opens its register map the same way: word 0 holds the slave ID
// (bits 31:16) and version (bits 15:0), word 1 the status, word 2 the
// control register, and word 3 the broadcast register whose bits 31:12 take
// a 20-bit trigger word. A write to word 3 strobes trig_valid with that word
// for one cycle; the module decodes the fields it owns. Words from 4 upward
// belong to the module and are passed out on the reg_* port.
//
// Timing is fixed: a request seen in cycle 0 is registered, decoded in
// cycle 1 (reg_wr, reg_addr and trig_valid are asserted then, and the module
// must drive reg_rdata combinationally for reg_addr), and acknowledged with
// its read data in cycle 2. The slave never stalls and accepts one request
// every cycle. ram_addr is the raw cycle-0 address so that a module can start
// a synchronous memory read early and have the word ready in cycle 1.
// The 2-cycle response follows the document; the register layout of words 0
// to 3 follows its register figure; the ID and version values are this
// design's own.
module wb_reg_slave
  import qc_pkg::*;
#(
  parameter logic [15:0] SLAVE_ID = 16'h0000,
  parameter logic [15:0] VERSION  = 16'h0001
) (
  input  logic              clk,
  input  logic              rst,
  input  wb_req_t           wb_req,
  output wb_rsp_t           wb_rsp,
  // common registers
  input  logic [31:0]       status,
  output logic [31:0]       control,
  output logic              ctrl_wr,
  output logic              trig_valid,
  output logic [TRIG_W-1:0] trig_word,
  // module registers (word 4 and up)
  output logic [12:0]       ram_addr,
  output logic              reg_wr,
  output logic              reg_rd,
  output logic [12:0]       reg_addr,
  output logic [31:0]       reg_wdata,
  input  logic [31:0]       reg_rdata
);

  logic        s1_vld, s1_we;
  logic [12:0] s1_adr;
  logic [31:0] s1_dat;
  logic        common;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_vld <= 1'b0;
      s1_we  <= 1'b0;
      s1_adr <= '0;
      s1_dat <= '0;
    end else begin
      s1_vld <= wb_req.stb;
      s1_we  <= wb_req.we;
      s1_adr <= wb_req.adr[12:0];
      s1_dat <= wb_req.dat;
    end
  end

  assign ram_addr  = wb_req.adr[12:0];
  assign common    = (s1_adr < 13'd4);
  assign reg_wr    = s1_vld & s1_we & ~common;
  assign reg_rd    = s1_vld & ~s1_we & ~common;
  assign reg_addr  = s1_adr;
  assign reg_wdata = s1_dat;
  assign ctrl_wr   = s1_vld & s1_we & (s1_adr == REG_CONTROL);
  assign trig_valid = s1_vld & s1_we & (s1_adr == REG_TRIGGER);
  assign trig_word  = s1_dat[31:12];

  logic [31:0] rdata;
  always_comb begin
    unique case (s1_adr)
      REG_INFO:    rdata = {SLAVE_ID, VERSION};
      REG_STATUS:  rdata = status;
      REG_CONTROL: rdata = control;
      REG_TRIGGER: rdata = '0;
      default:     rdata = reg_rdata;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      control <= '0;
      wb_rsp  <= WB_RSP_IDLE;
    end else begin
      if (ctrl_wr) control <= s1_dat;
      wb_rsp.ack   <= s1_vld;
      wb_rsp.stall <= 1'b0;
      wb_rsp.dat   <= s1_vld ? rdata : '0;
    end
  end

endmodule
