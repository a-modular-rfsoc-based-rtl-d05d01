// Shared types and constants of the qubit-control programmable logic.
//
// The digital unit cell talks over a Wishbone bus with a 16-bit register
// (word) address and 32-bit data. Every request is a single pipelined
// strobe; every slave answers exactly two cycles later with an ack, so the
// request and response structs below carry no stall or error lines on the
// slave side. The top three address bits select one of seven slaves;
// the value 3'b111 is a broadcast to all of them.
//
// The 20-bit trigger word lives in bits 31:12 of register 3 (byte offset
// 0xC) of every slave. Its fields are: [19:16] digital trigger, [15:12]
// control signal generator, [11:8] signal recorder, [7:4] readout signal
// generator, [3] reserved, [2] NCO sync, [1] start, [0] reset.
//
// Sample streams run at 1 GS/s per channel inside a 250 MHz clock, so
// every stream beat carries four complex samples of 16-bit I and Q.
// Bus widths, slave count, the broadcast prefix and the trigger word fields
// follow the document; struct layouts and enumerations are this design's.
package qc_pkg;

  localparam int WB_AW = 16;
  localparam int WB_DW = 32;
  localparam int NSLAVES = 7;

  localparam int LANES = 4;     // samples per clock cycle
  localparam int SW    = 16;    // bits per I or Q sample

  typedef struct packed {
    logic             stb;      // one-cycle request strobe (cyc implied)
    logic             we;
    logic [WB_AW-1:0] adr;      // register address
    logic [WB_DW-1:0] dat;
  } wb_req_t;

  typedef struct packed {
    logic             ack;
    logic             stall;    // only a master port of the interconnect stalls
    logic [WB_DW-1:0] dat;
  } wb_rsp_t;

  localparam wb_req_t WB_REQ_IDLE = '0;
  localparam wb_rsp_t WB_RSP_IDLE = '0;

  // Slave selection by adr[15:13]
  localparam logic [2:0] SEL_SEQ     = 3'd0;
  localparam logic [2:0] SEL_SG_READ = 3'd1;
  localparam logic [2:0] SEL_SG_CTRL = 3'd2;
  localparam logic [2:0] SEL_SR      = 3'd3;
  localparam logic [2:0] SEL_DS      = 3'd4;
  localparam logic [2:0] SEL_DT      = 3'd5;
  localparam logic [2:0] SEL_BCAST   = 3'b111;

  // Common register indices (word addresses inside a slave)
  localparam logic [12:0] REG_INFO    = 13'd0;
  localparam logic [12:0] REG_STATUS  = 13'd1;
  localparam logic [12:0] REG_CONTROL = 13'd2;
  localparam logic [12:0] REG_TRIGGER = 13'd3;

  // Trigger word fields
  localparam int TRIG_W      = 20;
  localparam int TB_RESET    = 0;
  localparam int TB_START    = 1;
  localparam int TB_SYNC     = 2;
  localparam int TF_SG_READ  = 4;   // LSB of the 4-bit field
  localparam int TF_SR       = 8;
  localparam int TF_SG_CTRL  = 12;
  localparam int TF_DT       = 16;

  // Signal recorder trigger values (field [11:8])
  typedef enum logic [3:0] {
    SR_NOP        = 4'd0,
    SR_SINGLE     = 4'd1,
    SR_ONESHOT    = 4'd2,
    SR_CONTINUOUS = 4'd3,
    SR_STOP       = 4'd4,
    SR_RESET      = 4'd5
  } sr_trig_e;

  // One complex sample and one stream beat
  typedef struct packed {
    logic signed [SW-1:0] q;
    logic signed [SW-1:0] i;
  } iq_t;

  typedef iq_t [LANES-1:0] beat_t;

  // AXI4Lite port bundled into a request (master to slave) and a response
  typedef struct packed {
    logic [31:0] awaddr;
    logic        awvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wvalid;
    logic        bready;
    logic [31:0] araddr;
    logic        arvalid;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

  function automatic logic signed [SW-1:0] sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[SW-1:0];
  endfunction

endpackage
