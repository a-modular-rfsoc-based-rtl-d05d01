// Instruction encoders for sequencer test programs (RV32I/M subset and the
// sequencing instructions as encoded by the sequencer).
// Standard RISC-V encodings; the sequencing instructions use this design's
// own encodings (the document gives none).
package rv_asm_pkg;
  function automatic logic [31:0] r_type(input logic [6:0] f7, input logic [4:0] rs2, rs1,
                                         input logic [2:0] f3, input logic [4:0] rd);
    return {f7, rs2, rs1, f3, rd, 7'b0110011};
  endfunction
  function automatic logic [31:0] i_type(input logic [6:0] opc, input int imm, input logic [4:0] rs1,
                                         input logic [2:0] f3, input logic [4:0] rd);
    logic [11:0] i = imm[11:0];
    return {i, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] ADDI(input logic [4:0] rd, rs1, input int imm);
    return i_type(7'b0010011, imm, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] SLLI(input logic [4:0] rd, rs1, input int sh);
    return i_type(7'b0010011, sh, rs1, 3'b001, rd);
  endfunction
  function automatic logic [31:0] SRAI(input logic [4:0] rd, rs1, input int sh);
    return i_type(7'b0010011, sh | 32'h400, rs1, 3'b101, rd);
  endfunction
  function automatic logic [31:0] XORI(input logic [4:0] rd, rs1, input int imm);
    return i_type(7'b0010011, imm, rs1, 3'b100, rd);
  endfunction
  function automatic logic [31:0] ADD(input logic [4:0] rd, rs1, rs2);
    return r_type(7'd0, rs2, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] SUB(input logic [4:0] rd, rs1, rs2);
    return r_type(7'b0100000, rs2, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] SLT(input logic [4:0] rd, rs1, rs2);
    return r_type(7'd0, rs2, rs1, 3'b010, rd);
  endfunction
  function automatic logic [31:0] AND(input logic [4:0] rd, rs1, rs2);
    return r_type(7'd0, rs2, rs1, 3'b111, rd);
  endfunction
  function automatic logic [31:0] OR(input logic [4:0] rd, rs1, rs2);
    return r_type(7'd0, rs2, rs1, 3'b110, rd);
  endfunction
  function automatic logic [31:0] MUL(input logic [4:0] rd, rs1, rs2);
    return r_type(7'b0000001, rs2, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] LUI(input logic [4:0] rd, input logic [19:0] imm);
    return {imm, rd, 7'b0110111};
  endfunction
  function automatic logic [31:0] AUIPC(input logic [4:0] rd, input logic [19:0] imm);
    return {imm, rd, 7'b0010111};
  endfunction
  function automatic logic [31:0] LW_I(input logic [4:0] rd, rs1, input int imm);
    return i_type(7'b0000011, imm, rs1, 3'b010, rd);
  endfunction
  function automatic logic [31:0] SW_I(input logic [4:0] rs2, rs1, input int imm);
    logic [11:0] i = imm[11:0];
    return {i[11:5], rs2, rs1, 3'b010, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] BR(input logic [2:0] f3, input logic [4:0] rs1, rs2, input int off);
    logic [12:0] o = off[12:0];
    return {o[12], o[10:5], rs2, rs1, f3, o[4:1], o[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] BEQ(input logic [4:0] rs1, rs2, input int off); return BR(3'b000, rs1, rs2, off); endfunction
  function automatic logic [31:0] BNE(input logic [4:0] rs1, rs2, input int off); return BR(3'b001, rs1, rs2, off); endfunction
  function automatic logic [31:0] BLT(input logic [4:0] rs1, rs2, input int off); return BR(3'b100, rs1, rs2, off); endfunction
  function automatic logic [31:0] JAL(input logic [4:0] rd, input int off);
    logic [20:0] o = off[20:0];
    return {o[20], o[10:1], o[11], o[19:12], rd, 7'b1101111};
  endfunction
  function automatic logic [31:0] JALR(input logic [4:0] rd, rs1, input int imm);
    return i_type(7'b1100111, imm, rs1, 3'b000, rd);
  endfunction
  // sequencing instructions
  function automatic logic [31:0] TRIG(input logic [19:0] word);
    return {word, 5'd0, 7'b0101011};
  endfunction
  function automatic logic [31:0] WAIT_IMM(input int n);
    return i_type(7'b0001011, n, 5'd0, 3'b000, 5'd0);
  endfunction
  function automatic logic [31:0] WAIT_REG(input logic [4:0] rs1);
    return i_type(7'b0001011, 0, rs1, 3'b001, 5'd0);
  endfunction
  function automatic logic [31:0] WAIT_REG_TRIG(input logic [4:0] rs1);
    return i_type(7'b0001011, 0, rs1, 3'b010, 5'd0);
  endfunction
  function automatic logic [31:0] SYNC_EXT(input logic [4:0] rd);
    return i_type(7'b0001011, 0, 5'd0, 3'b011, rd);
  endfunction
  function automatic logic [31:0] SYNC_START();
    return i_type(7'b0001011, 0, 5'd0, 3'b100, 5'd0);
  endfunction
endpackage
