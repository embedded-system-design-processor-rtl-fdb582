// control_unit: main decoder of the decode stage.
//
// Turns a 32-bit instruction into the control record that travels down the
// pipeline: source and destination registers and whether they are used, the
// immediate format, the ALU operation (from alu_control), the operand selects,
// register write, memory operation and branch/jump flags.
//
// Instructions recognised: the register and immediate ALU instructions of the
// ALU_op list (ADD..REMU, ADDI..SRAI, LUI, AUIPC), JAL, LW, SW, SD and the six
// conditional branches (BEQ, BNE, BLT, BGE, BLTU, BGEU). Loads and stores
// compute their address with the ALU's ADD. Anything else, including an all-
// zero word, decodes as a no-operation that writes nothing. SD uses the
// RISC-V store opcode; the branch set and the no-operation rule are choices of
// this implementation.
//
// Timing: combinational.
module control_unit
  import rv_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);

  logic [6:0] opcode;
  logic [2:0] funct3;
  alu_op_e    aop;
  logic       alu_legal;

  assign opcode = instr[6:0];
  assign funct3 = instr[14:12];

  alu_control u_alu_control (
    .opcode (opcode),
    .funct3 (funct3),
    .funct7 (instr[31:25]),
    .op     (aop),
    .legal  (alu_legal)
  );

  always_comb begin
    ctrl           = '0;
    ctrl.rs1       = instr[19:15];
    ctrl.rs2       = instr[24:20];
    ctrl.rd        = instr[11:7];
    ctrl.funct3    = funct3;
    ctrl.imm_fmt   = IMM_I;
    ctrl.alu_op    = ALU_ADD;
    ctrl.mem_op    = MEM_NONE;
    ctrl.wb_sel    = WB_ALU;
    unique case (opcode)
      OP_REG: if (alu_legal) begin
        ctrl.use_rs1   = 1'b1;
        ctrl.use_rs2   = 1'b1;
        ctrl.alu_op    = aop;
        ctrl.reg_write = 1'b1;
      end
      OP_IMM: if (alu_legal) begin
        ctrl.use_rs1   = 1'b1;
        ctrl.alu_op    = aop;
        ctrl.b_is_imm  = 1'b1;
        ctrl.reg_write = 1'b1;
      end
      OP_LUI: begin
        ctrl.imm_fmt   = IMM_U;
        ctrl.alu_op    = ALU_LUI;
        ctrl.b_is_imm  = 1'b1;
        ctrl.reg_write = 1'b1;
      end
      OP_AUIPC: begin
        ctrl.imm_fmt   = IMM_U;
        ctrl.alu_op    = ALU_AUIPC;
        ctrl.a_is_pc   = 1'b1;
        ctrl.b_is_imm  = 1'b1;
        ctrl.reg_write = 1'b1;
      end
      OP_LOAD: if (funct3 == F3_W) begin
        ctrl.use_rs1   = 1'b1;
        ctrl.b_is_imm  = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.mem_op    = MEM_LW;
        ctrl.wb_sel    = WB_MEM;
      end
      OP_STORE: if (funct3 == F3_W || funct3 == F3_D) begin
        ctrl.use_rs1   = 1'b1;
        ctrl.use_rs2   = 1'b1;
        ctrl.imm_fmt   = IMM_S;
        ctrl.b_is_imm  = 1'b1;
        ctrl.mem_op    = (funct3 == F3_D) ? MEM_SD : MEM_SW;
      end
      OP_BRANCH: if (funct3 != 3'b010 && funct3 != 3'b011) begin
        ctrl.use_rs1   = 1'b1;
        ctrl.use_rs2   = 1'b1;
        ctrl.imm_fmt   = IMM_B;
        ctrl.is_branch = 1'b1;
      end
      OP_JAL: begin
        ctrl.imm_fmt   = IMM_J;
        ctrl.is_jal    = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.wb_sel    = WB_PC4;
      end
      default: ;
    endcase
    if (!ctrl.use_rs1) ctrl.rs1 = '0;
    if (!ctrl.use_rs2) ctrl.rs2 = '0;
    if (!ctrl.reg_write) ctrl.rd = '0;
  end

endmodule
