// RISC-V based sequencer of the digital unit cell.
//
// The sequencer runs a user program that schedules every action of the
// cell in 4 ns clock steps. It executes a subset of RV32I, the M-extension
// MUL, and six sequencing instructions (see seq_pkg): TRIG broadcasts a
// trigger word to all slaves, the WAIT forms delay by an immediate or
// register-given number of cycles, SYNC-EXT waits for the qubit state the
// signal recorder reports, SYNC-START ends the run.
//
// Cycle counts (deterministic, so a program's timing can be computed):
//   ALU, LUI, AUIPC, not-taken branch, TRIG     1
//   taken branch, JAL, JALR                     JUMP_CYCLES (3)
//   MUL                                         MUL_CYCLES (6)
//   LW / SW over Wishbone                       LDST_CYCLES (8), after any
//                                               trigger writes still in flight
//   WAIT-IMM n / WAIT-REG x / WAIT-REG-TRIG x   n / x / x-1 (at least 1)
//   SYNC-EXT                                    1 if a state is pending, else
//                                               until the state arrives
// TRIG is a pipelined write: it puts its request on the bus and moves on
// without waiting for the acknowledge; a following LW/SW waits until all
// outstanding writes are acknowledged.
//
// Load/store addresses are Wishbone register addresses (x[rs1] + imm,
// low 16 bits). Program memory: IMEM_DEPTH words, read synchronously; the
// next program counter is computed combinationally so that straight-line
// code needs no fetch bubble.
//
// Wishbone slave registers: control [0] start, [1] stop; status [0]
// running, [1] waiting in SYNC-EXT, [25:16] program counter (words);
// 32..63 register file x0..x31 (writable while stopped); 0x400.. program
// memory. A start also comes from the start input (cell coordinator).
//
// From the document: the instruction classes and their cycle counts, the
// six sequencing instructions, 32 registers, 1024 instruction words, WB
// master and slave ports, trigger writes without waiting. This design's own
// choices: the custom encodings, the exact RV32 subset (the document counts
// 33 instructions without listing them; 38 are decoded here), register
// addressing for loads/stores, the slave register map, and keeping a state
// that arrives before SYNC-EXT until it is consumed.
module sequencer
  import qc_pkg::*;
  import seq_pkg::*;
#(
  parameter int IMEM_DEPTH  = 1024,
  parameter int MUL_CYCLES  = 6,
  parameter int JUMP_CYCLES = 3,
  parameter int LDST_CYCLES = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       ext_valid,
  input  logic [2:0] ext_state,
  output wb_req_t    wbm_req,
  input  wb_rsp_t    wbm_rsp,
  input  wb_req_t    wbs_req,
  output wb_rsp_t    wbs_rsp,
  output logic       running
);

  localparam int PB = $clog2(IMEM_DEPTH);

  // ---------------- slave register front end ----------------
  logic [31:0] status, control;
  logic        ctrl_wr, trig_valid, reg_wr, reg_rd;
  logic [TRIG_W-1:0] trig_word;
  logic [12:0] ram_addr, reg_addr;
  logic [31:0] reg_wdata, reg_rdata;

  wb_reg_slave #(.SLAVE_ID(16'h5351), .VERSION(16'h0001)) u_regs (
    .clk, .rst, .wb_req(wbs_req), .wb_rsp(wbs_rsp), .status, .control,
    .ctrl_wr, .trig_valid, .trig_word, .ram_addr, .reg_wr, .reg_rd,
    .reg_addr, .reg_wdata, .reg_rdata);

  wire do_start = start | (ctrl_wr & reg_wdata[0]);
  wire do_stop  = ctrl_wr & reg_wdata[1];

  // ---------------- program memory ----------------
  logic [31:0] imem [IMEM_DEPTH];
  logic [31:0] imem_wb_rd;
  logic [31:0] ir;
  logic [PB-1:0] pc, npc;
  wire in_imem = reg_addr >= 13'h400 && int'(reg_addr) < 'h400 + IMEM_DEPTH;

  always_ff @(posedge clk) begin
    if (reg_wr && in_imem) imem[reg_addr[PB-1:0]] <= reg_wdata;
    imem_wb_rd <= imem[ram_addr[PB-1:0]];
    ir <= imem[npc];
  end

  // ---------------- register file ----------------
  logic [31:0] xr [32];
  logic        rf_we;
  logic [4:0]  rf_wa;
  logic [31:0] rf_wd;

  // ---------------- decode ----------------
  wire [6:0]  opc    = ir[6:0];
  wire [4:0]  rd     = ir[11:7];
  wire [2:0]  f3     = ir[14:12];
  wire [4:0]  rs1    = ir[19:15];
  wire [4:0]  rs2    = ir[24:20];
  wire [6:0]  f7     = ir[31:25];
  wire [31:0] imm_i  = {{20{ir[31]}}, ir[31:20]};
  wire [31:0] imm_s  = {{20{ir[31]}}, ir[31:25], ir[11:7]};
  wire [31:0] imm_b  = {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
  wire [31:0] imm_u  = {ir[31:12], 12'd0};
  wire [31:0] imm_j  = {{11{ir[31]}}, ir[31], ir[19:12], ir[20], ir[30:21], 1'b0};
  wire [31:0] a      = xr[rs1];
  wire [31:0] b      = xr[rs2];
  wire [31:0] pcb    = {{(30-PB){1'b0}}, pc, 2'b00};   // byte address of ir

  // ---------------- control state ----------------
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_RUN, S_HOLD, S_MEM} state_e;
  state_e      state;
  logic [31:0] hold_cnt;
  logic [PB-1:0] pc_tgt;
  logic        hold_wb;         // write rd at the end of the hold
  logic [4:0]  hold_rd;
  logic [31:0] hold_val;
  logic [31:0] mul_a, mul_b;
  logic        hold_mul;
  logic [4:0]  outstanding;     // trigger/bus writes not yet acknowledged
  logic        ext_pend;
  logic [2:0]  ext_val;
  logic [3:0]  mem_cnt;
  logic        mem_ack;

  // ALU result for the current instruction (combinational)
  logic [31:0] alu;
  logic        br_taken;
  always_comb begin
    logic [31:0] op2;
    op2 = (opc == OP_REG) ? b : imm_i;
    unique case (f3)
      3'b000:  alu = (opc == OP_REG && f7[5]) ? a - op2 : a + op2;
      3'b001:  alu = a << op2[4:0];
      3'b010:  alu = {31'd0, $signed(a) < $signed(op2)};
      3'b011:  alu = {31'd0, a < op2};
      3'b100:  alu = a ^ op2;
      3'b101:  alu = f7[5] ? 32'($signed(a) >>> op2[4:0]) : a >> op2[4:0];
      3'b110:  alu = a | op2;
      default: alu = a & op2;
    endcase
    unique case (f3)
      3'b000:  br_taken = a == b;
      3'b001:  br_taken = a != b;
      3'b100:  br_taken = $signed(a) < $signed(b);
      3'b101:  br_taken = $signed(a) >= $signed(b);
      3'b110:  br_taken = a < b;
      3'b111:  br_taken = a >= b;
      default: br_taken = 1'b0;
    endcase
  end

  wire is_mul   = opc == OP_REG && f7 == 7'b0000001 && f3 == 3'b000;
  wire is_ldst  = opc == OP_LOAD || opc == OP_STORE;
  wire bus_idle = outstanding == 5'd0 && !wbm_req.stb;

  // next fetch address
  logic [PB-1:0] jump_tgt;
  always_comb begin
    jump_tgt = pc + 1'b1;
    unique case (opc)
      OP_JAL:    jump_tgt = pc + imm_j[PB+1:2];
      OP_JALR:   jump_tgt = PB'((a + imm_i) >> 2);
      OP_BRANCH: jump_tgt = br_taken ? pc + imm_b[PB+1:2] : pc + 1'b1;
      default:   ;
    endcase
  end

  // the number of cycles the instruction in ir takes (for S_RUN)
  logic [31:0] ilen;
  always_comb begin
    ilen = 32'd1;
    unique case (opc)
      OP_JAL, OP_JALR: ilen = 32'(JUMP_CYCLES);
      OP_BRANCH:       ilen = br_taken ? 32'(JUMP_CYCLES) : 32'd1;
      OP_REG:          ilen = is_mul ? 32'(MUL_CYCLES) : 32'd1;
      OP_CUST0: unique case (f3)
        C0_WAIT_IMM:      ilen = {20'd0, ir[31:20]};
        C0_WAIT_REG:      ilen = a;
        C0_WAIT_REG_TRIG: ilen = a - 32'd1;
        default:          ilen = 32'd1;
      endcase
      default: ;
    endcase
    if (ilen == 32'd0 || $signed(ilen) < 0) ilen = 32'd1;
  end

  wire run_exec = state == S_RUN && !(is_ldst && !bus_idle)
                  && !(opc == OP_CUST0 && f3 == C0_SYNC_EXT && !ext_pend)
                  && !(opc == OP_CUST0 && f3 == C0_SYNC_START);
  wire single   = run_exec && !is_ldst && ilen == 32'd1;

  always_comb begin
    npc = pc;
    if (state == S_IDLE)                          npc = '0;
    else if (single)                              npc = jump_tgt;
    else if (state == S_HOLD && hold_cnt == 32'd1) npc = pc_tgt;
    else if (state == S_MEM && mem_cnt == 4'd1)    npc = pc + 1'b1;
  end

  // register file write port
  always_comb begin
    rf_we = 1'b0;
    rf_wa = rd;
    rf_wd = '0;
    if (run_exec) begin
      unique case (opc)
        OP_LUI:          begin rf_we = 1'b1; rf_wd = imm_u; end
        OP_AUIPC:        begin rf_we = 1'b1; rf_wd = pcb + imm_u; end
        OP_JAL, OP_JALR: begin rf_we = 1'b1; rf_wd = pcb + 32'd4; end
        OP_IMM:          begin rf_we = 1'b1; rf_wd = alu; end
        OP_REG:          begin rf_we = !is_mul; rf_wd = alu; end
        OP_CUST0:        begin rf_we = f3 == C0_SYNC_EXT; rf_wd = {29'd0, ext_val}; end
        default: ;
      endcase
    end else if (state == S_HOLD && hold_cnt == 32'd1 && hold_mul) begin
      rf_we = 1'b1; rf_wa = hold_rd; rf_wd = mul_a * mul_b;   // multi-cycle path
    end else if (state == S_MEM && mem_cnt == 4'd1 && hold_wb) begin
      rf_we = 1'b1; rf_wa = hold_rd; rf_wd = hold_val;
    end
  end

  // ---------------- main sequential process ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      pc          <= '0;
      hold_cnt    <= '0;
      pc_tgt      <= '0;
      hold_wb     <= 1'b0;
      hold_rd     <= '0;
      hold_val    <= '0;
      hold_mul    <= 1'b0;
      mul_a       <= '0;
      mul_b       <= '0;
      wbm_req     <= WB_REQ_IDLE;
      outstanding <= '0;
      ext_pend    <= 1'b0;
      ext_val     <= '0;
      mem_cnt     <= '0;
      mem_ack     <= 1'b0;
      for (int r = 0; r < 32; r++) xr[r] <= '0;
    end else begin
      wbm_req.stb <= 1'b0;
      pc <= npc;

      // outstanding bus accesses
      outstanding <= outstanding + 5'(wbm_req.stb) - 5'(wbm_rsp.ack);

      if (ext_valid) begin
        ext_pend <= 1'b1;
        ext_val  <= ext_state;
      end

      unique case (state)
        S_IDLE: if (do_start) begin
          state    <= S_FETCH;
          ext_pend <= 1'b0;
        end
        S_FETCH: state <= S_RUN;   // ir now holds imem[0]
        S_RUN: begin
          if (opc == OP_CUST0 && f3 == C0_SYNC_START) begin
            state <= S_IDLE;
          end else if (run_exec) begin
            unique case (opc)
              OP_CUST1: begin
                wbm_req <= '{stb: 1'b1, we: 1'b1, adr: {SEL_BCAST, REG_TRIGGER},
                             dat: {ir[31:12], 12'd0}};
              end
              OP_CUST0: if (f3 == C0_SYNC_EXT) ext_pend <= ext_valid;
              OP_LOAD, OP_STORE: begin
                wbm_req <= '{stb: 1'b1, we: opc == OP_STORE,
                             adr: opc == OP_STORE ? 16'(a + imm_s) : 16'(a + imm_i),
                             dat: b};
              end
              default: ;
            endcase
            if (is_ldst) begin
              state   <= S_MEM;
              mem_cnt <= 4'(LDST_CYCLES - 1);
              mem_ack <= 1'b0;
              hold_wb <= opc == OP_LOAD;
              hold_rd <= rd;
            end else if (ilen != 32'd1) begin
              state    <= S_HOLD;
              hold_cnt <= ilen - 32'd1;
              pc_tgt   <= jump_tgt;
              hold_mul <= is_mul;
              hold_rd  <= rd;
              mul_a    <= a;
              mul_b    <= b;
            end
          end
        end
        S_HOLD: begin
          hold_cnt <= hold_cnt - 32'd1;
          if (hold_cnt == 32'd1) state <= S_RUN;
        end
        S_MEM: begin
          if (wbm_rsp.ack) begin
            hold_val <= wbm_rsp.dat;
            mem_ack  <= 1'b1;
          end
          mem_cnt <= mem_cnt - 4'd1;
          if (mem_cnt == 4'd1) state <= S_RUN;
        end
        default: state <= S_IDLE;
      endcase

      if (do_stop) state <= S_IDLE;

      // register file write (x0 stays zero); the bus may preset registers
      if (rf_we && rf_wa != 5'd0) xr[rf_wa] <= rf_wd;
      if (reg_wr && reg_addr >= 13'd32 && reg_addr < 13'd64 && reg_addr[4:0] != 5'd0 && state == S_IDLE)
        xr[reg_addr[4:0]] <= reg_wdata;
    end
  end

  assign running = state != S_IDLE;
  assign status  = {6'd0, 10'(pc), 14'd0, state == S_RUN && opc == OP_CUST0 && f3 == C0_SYNC_EXT && !ext_pend, running};

  always_comb begin
    reg_rdata = '0;
    if (in_imem) reg_rdata = imem_wb_rd;
    else if (reg_addr >= 13'd32 && reg_addr < 13'd64) reg_rdata = xr[reg_addr[4:0]];
  end

  // the bus answers a load or store before the instruction's last cycle
  a_ldst_ack: assert property (@(posedge clk) disable iff (rst)
    (state == S_MEM && mem_cnt == 4'd1) |-> mem_ack);

  logic unused;
  assign unused = ^{control, trig_valid, trig_word, reg_rd, wbm_rsp.stall, ram_addr[12:10],
                   imm_b[31:12], imm_b[1:0], imm_j[31:12], imm_j[1:0]};

endmodule
