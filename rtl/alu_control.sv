// alu_control: ALU control of the decode stage.
//
// Maps opcode, funct3 and funct7 of an OP (register-register) or OP-IMM
// instruction to the ALU operation code, and also gives the code for LUI and
// AUIPC. legal is low for any other opcode or an unknown funct combination.
// The operation list is the design's ALU_op list (base integer operations, the
// multiply/divide group and the immediate forms); the funct values are those of
// the RISC-V RV64I and M specifications. On RV64 the immediate shifts take a
// 6-bit amount, so only funct7[6:1] is checked for them.
//
// Timing: combinational.
module alu_control
  import rv_pkg::*;
(
  input  logic [6:0] opcode,
  input  logic [2:0] funct3,
  input  logic [6:0] funct7,
  output alu_op_e    op,
  output logic       legal
);

  always_comb begin
    op    = ALU_ADD;
    legal = 1'b1;
    unique case (opcode)
      OP_LUI:   op = ALU_LUI;
      OP_AUIPC: op = ALU_AUIPC;
      OP_REG: begin
        if (funct7 == 7'b0000001) begin
          unique case (funct3)
            3'b000: op = ALU_MUL;
            3'b001: op = ALU_MULH;
            3'b010: op = ALU_MULHSU;
            3'b011: op = ALU_MULHU;
            3'b100: op = ALU_DIV;
            3'b101: op = ALU_DIVU;
            3'b110: op = ALU_REM;
            default: op = ALU_REMU;
          endcase
        end else if (funct7 == 7'b0000000) begin
          unique case (funct3)
            3'b000: op = ALU_ADD;
            3'b001: op = ALU_SLL;
            3'b010: op = ALU_SLT;
            3'b011: op = ALU_SLTU;
            3'b100: op = ALU_XOR;
            3'b101: op = ALU_SRL;
            3'b110: op = ALU_OR;
            default: op = ALU_AND;
          endcase
        end else if (funct7 == 7'b0100000 && funct3 == 3'b000) begin
          op = ALU_SUB;
        end else if (funct7 == 7'b0100000 && funct3 == 3'b101) begin
          op = ALU_SRA;
        end else begin
          legal = 1'b0;
        end
      end
      OP_IMM: begin
        unique case (funct3)
          3'b000: op = ALU_ADDI;
          3'b010: op = ALU_SLTI;
          3'b011: op = ALU_SLTIU;
          3'b100: op = ALU_XORI;
          3'b110: op = ALU_ORI;
          3'b111: op = ALU_ANDI;
          3'b001: begin
            op    = ALU_SLLI;
            legal = (funct7[6:1] == 6'b000000);
          end
          default: begin
            if (funct7[6:1] == 6'b000000)      op = ALU_SRLI;
            else if (funct7[6:1] == 6'b010000) op = ALU_SRAI;
            else                               legal = 1'b0;
          end
        endcase
      end
      default: legal = 1'b0;
    endcase
  end

endmodule
