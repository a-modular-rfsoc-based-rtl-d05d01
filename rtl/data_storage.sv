// Data storage of the digital unit cell: four independent result memories.
//
// Each of the NMEM memories is filled by its own data control, which
// appends 32-bit words at a write pointer and keeps the entry count and
// empty / full / overflow flags. When a memory is full it either drops new
// words and raises overflow, or, in circular mode, wraps the pointer and
// overwrites the oldest words. Each data control takes its words from one
// selectable source:
//   0 none
//   1 result I of the signal recorder      2 result Q
//   3 single qubit state (one word per state)
//   4 states packed 32 per word (1 bit each, first state in bit 0)
//   5 states packed 10 per word (3 bits each, bits 29:0)
//   6 words written to the memory's append register by sequencer or PS
// The state collection packs incoming states for sources 4 and 5; a
// partly filled word is kept until it is complete.
// The second port of every memory is mapped into the Wishbone register
// space for direct reads and writes.
//
// Register map (word addresses, 0..3 common):
//   4+m   config of memory m: [2:0] source, [3] circular
//   8+m   status of memory m: [15:0] entries, [16] empty, [17] full, [18] overflow
//   12+m  append register of memory m (write only)
//   0x1000 + m*DEPTH + i   word i of memory m (DEPTH = 1024)
// Control register bit 0 (write 1) and trigger word bit 0 (reset) clear
// all pointers, flags and partly packed states.
// Timing: a source word is written in the cycle after it arrives.
// From the document: four dual-port memories of 32-bit words filled in
// parallel, the data sources, 10 or 32 states per word, append register,
// circular mode and the status flags. This design's choices: the source
// encoding, bit order of packed states, register map and DEPTH (four 36 kb
// block RAMs, which matches the block-RAM count the document reports).
module data_storage
  import qc_pkg::*;
#(
  parameter int NMEM  = 4,
  parameter int DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  wb_req_t     wb_req,
  output wb_rsp_t     wb_rsp,
  input  logic        res_valid,
  input  logic [31:0] res_i,
  input  logic [31:0] res_q,
  input  logic        st_valid,
  input  logic [2:0]  st
);

  localparam int AB = $clog2(DEPTH);

  typedef enum logic [2:0] {
    SRC_NONE = 3'd0, SRC_RES_I = 3'd1, SRC_RES_Q = 3'd2, SRC_STATE = 3'd3,
    SRC_PACK32 = 3'd4, SRC_PACK10 = 3'd5, SRC_WB = 3'd6
  } src_e;

  logic [31:0] status, control;
  logic        ctrl_wr, trig_valid, reg_wr, reg_rd;
  logic [TRIG_W-1:0] trig_word;
  logic [12:0] ram_addr, reg_addr;
  logic [31:0] reg_wdata, reg_rdata;

  wb_reg_slave #(.SLAVE_ID(16'h4453), .VERSION(16'h0001)) u_regs (
    .clk, .rst, .wb_req, .wb_rsp, .status, .control, .ctrl_wr,
    .trig_valid, .trig_word, .ram_addr, .reg_wr, .reg_rd, .reg_addr,
    .reg_wdata, .reg_rdata);

  wire clr = (ctrl_wr & reg_wdata[0]) | (trig_valid & trig_word[TB_RESET]);

  // ---------------- state collection ----------------
  logic [31:0] pk1, pk3;
  logic [5:0]  n1;
  logic [3:0]  n3;
  logic        pk1_vld, pk3_vld;
  logic [31:0] pk1_word, pk3_word;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      pk1 <= '0; pk3 <= '0; n1 <= '0; n3 <= '0;
      pk1_vld <= 1'b0; pk3_vld <= 1'b0; pk1_word <= '0; pk3_word <= '0;
    end else begin
      pk1_vld <= 1'b0;
      pk3_vld <= 1'b0;
      if (st_valid) begin
        logic [31:0] w1, w3;
        w1 = pk1; w1[n1[4:0]] = st[0];
        w3 = pk3; w3[3*n3 +: 3] = st;
        if (n1 == 6'd31) begin
          pk1_vld <= 1'b1; pk1_word <= w1; pk1 <= '0; n1 <= '0;
        end else begin
          pk1 <= w1; n1 <= n1 + 6'd1;
        end
        if (n3 == 4'd9) begin
          pk3_vld <= 1'b1; pk3_word <= w3; pk3 <= '0; n3 <= '0;
        end else begin
          pk3 <= w3; n3 <= n3 + 4'd1;
        end
      end
    end
  end

  // ---------------- data controls and memories ----------------
  src_e        cfg_src [NMEM];
  logic        cfg_circ [NMEM];
  logic [AB:0] size [NMEM];
  logic [AB-1:0] wptr [NMEM];
  logic        ovf [NMEM];
  logic [31:0] mem_rd_m [NMEM];
  logic [1:0]  wb_m_q;

  wire in_mem = reg_addr[12];

  always_ff @(posedge clk) wb_m_q <= ram_addr[AB+1:AB];
  wire [31:0] mem_rd = mem_rd_m[wb_m_q];

  for (genvar m = 0; m < NMEM; m++) begin : g_mem
    logic        app;
    logic [31:0] app_d;
    always_comb begin
      app   = 1'b0;
      app_d = '0;
      unique case (cfg_src[m])
        SRC_RES_I:  begin app = res_valid; app_d = res_i; end
        SRC_RES_Q:  begin app = res_valid; app_d = res_q; end
        SRC_STATE:  begin app = st_valid;  app_d = {29'd0, st}; end
        SRC_PACK32: begin app = pk1_vld;   app_d = pk1_word; end
        SRC_PACK10: begin app = pk3_vld;   app_d = pk3_word; end
        SRC_WB:     begin app = reg_wr && reg_addr == 13'(12 + m); app_d = reg_wdata; end
        default: ;
      endcase
    end

    wire full = size[m] == (AB+1)'(DEPTH);

    always_ff @(posedge clk) begin
      if (rst) begin
        cfg_src[m]  <= SRC_NONE;
        cfg_circ[m] <= 1'b0;
      end else if (reg_wr && reg_addr == 13'(4 + m)) begin
        cfg_src[m]  <= src_e'(reg_wdata[2:0]);
        cfg_circ[m] <= reg_wdata[3];
      end
      if (rst || clr) begin
        size[m] <= '0;
        wptr[m] <= '0;
        ovf[m]  <= 1'b0;
      end else if (app) begin
        if (!full || cfg_circ[m]) begin
          wptr[m] <= wptr[m] + 1'b1;
          if (!full) size[m] <= size[m] + 1'b1;
        end else begin
          ovf[m] <= 1'b1;
        end
      end
    end

    // one memory per channel with a single write port (WB or append)
    logic [31:0] mem [DEPTH];
    wire wb_wr  = reg_wr && in_mem && int'(reg_addr[AB+1:AB]) == m;
    wire app_wr = !rst && !clr && app && (!full || cfg_circ[m]);
    always_ff @(posedge clk) begin
      if (app_wr)     mem[wptr[m]] <= app_d;
      else if (wb_wr) mem[reg_addr[AB-1:0]] <= reg_wdata;
      mem_rd_m[m] <= mem[ram_addr[AB-1:0]];
    end
  end

  assign status = '0;

  always_comb begin
    reg_rdata = '0;
    if (in_mem) reg_rdata = mem_rd;
    else
      for (int m = 0; m < NMEM; m++) begin
        if (reg_addr == 13'(4 + m)) reg_rdata = {28'd0, cfg_circ[m], cfg_src[m]};
        if (reg_addr == 13'(8 + m))
          reg_rdata = {13'd0, ovf[m], size[m] == (AB+1)'(DEPTH), size[m] == '0, 16'(size[m])};
      end
  end

  logic unused;
  assign unused = ^{control, reg_rd, trig_word, ram_addr[12:AB+2]};

endmodule
