// Instruction encodings of the sequencer.
//
// Standard RV32I/M opcodes plus the six sequencing instructions, which this
// design places in the two RISC-V custom opcode spaces:
//   TRIG          custom-1 (0101011), U-type: imm[31:12] is the 20-bit
//                 trigger word, broadcast to every slave's register 3.
//   WAIT-IMM      custom-0 (0001011), funct3 000: wait imm[31:20] cycles.
//   WAIT-REG      custom-0, funct3 001: wait x[rs1] cycles.
//   WAIT-REG-TRIG custom-0, funct3 010: wait x[rs1]-1 cycles.
//   SYNC-EXT      custom-0, funct3 011: wait for a qubit state from the
//                 signal recorder and write it to x[rd].
//   SYNC-START    custom-0, funct3 100: stop and wait for the next start.
// A wait of 0 cycles still takes one cycle like any instruction.
// The sequencing instructions follow the document; their encodings in the
// RISC-V custom opcode spaces are this design's choice.
package seq_pkg;

  typedef enum logic [6:0] {
    OP_LUI    = 7'b0110111,
    OP_AUIPC  = 7'b0010111,
    OP_JAL    = 7'b1101111,
    OP_JALR   = 7'b1100111,
    OP_BRANCH = 7'b1100011,
    OP_LOAD   = 7'b0000011,
    OP_STORE  = 7'b0100011,
    OP_IMM    = 7'b0010011,
    OP_REG    = 7'b0110011,
    OP_CUST0  = 7'b0001011,
    OP_CUST1  = 7'b0101011
  } opcode_e;

  localparam logic [2:0] C0_WAIT_IMM      = 3'b000;
  localparam logic [2:0] C0_WAIT_REG      = 3'b001;
  localparam logic [2:0] C0_WAIT_REG_TRIG = 3'b010;
  localparam logic [2:0] C0_SYNC_EXT      = 3'b011;
  localparam logic [2:0] C0_SYNC_START    = 3'b100;

endpackage
