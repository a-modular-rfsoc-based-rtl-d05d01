// AXI4Lite slave to Wishbone master bridge.
//
// The processing system reaches each digital unit cell through AXI4Lite
// with byte addresses; the cell's Wishbone bus uses register (32-bit word)
// addresses, so the bridge drops the two low address bits
// (wb adr = axi addr[17:2]). One access is in flight at a time: a write
// needs both AW and W, a read needs AR; reads win if both arrive together.
// The bridge holds its strobe until the interconnect accepts it (stall low),
// waits for the ack and then returns B (OKAY) or R (OKAY, read data).
// Byte strobes are ignored: every write is a full 32-bit word.
// The address translation follows the document; the single-outstanding
// handshake is this design's choice.
module axil2wb_bridge
  import qc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // AXI4Lite slave
  input  logic [31:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [31:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // Wishbone master
  output wb_req_t     wb_req,
  input  wb_rsp_t     wb_rsp
);

  typedef enum logic [2:0] {IDLE, REQ, WAIT, BRESP, RRESP} state_e;
  state_e state;
  logic   is_rd;

  wire start_rd = (state == IDLE) & s_arvalid;
  wire start_wr = (state == IDLE) & ~s_arvalid & s_awvalid & s_wvalid;

  assign s_arready = start_rd;
  assign s_awready = start_wr;
  assign s_wready  = start_wr;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign s_bvalid  = (state == BRESP);
  assign s_rvalid  = (state == RRESP);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IDLE;
      wb_req  <= WB_REQ_IDLE;
      is_rd   <= 1'b0;
      s_rdata <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          if (start_rd) begin
            wb_req <= '{stb: 1'b1, we: 1'b0, adr: s_araddr[17:2], dat: '0};
            is_rd  <= 1'b1;
            state  <= REQ;
          end else if (start_wr) begin
            wb_req <= '{stb: 1'b1, we: 1'b1, adr: s_awaddr[17:2], dat: s_wdata};
            is_rd  <= 1'b0;
            state  <= REQ;
          end
        end
        REQ: if (!wb_rsp.stall) begin
          wb_req.stb <= 1'b0;
          state      <= WAIT;
        end
        WAIT: if (wb_rsp.ack) begin
          s_rdata <= wb_rsp.dat;
          state   <= is_rd ? RRESP : BRESP;
        end
        BRESP: if (s_bready) state <= IDLE;
        RRESP: if (s_rready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = ^{s_wstrb, s_awaddr[31:18], s_awaddr[1:0], s_araddr[31:18], s_araddr[1:0]};

endmodule
