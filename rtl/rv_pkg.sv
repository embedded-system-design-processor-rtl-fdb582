// rv_pkg: types and constants shared by the RV64 five-stage pipeline.
//
// Holds the ALU operation code (its order, and so its 5-bit encoding, is the
// ALU_op list of the design: ADD = 0, SUB = 1, SLL = 2, ...), the RISC-V
// opcodes used, the immediate formats, the decoded-control record that travels
// from decode to write-back, and the records held in each inter-stage FIFO.
// funct3/funct7 values follow the RISC-V base and M specifications.
package rv_pkg;

  localparam int XLEN = 64;

  // ALU operation. The order is the design's ALU_op enumeration.
  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
    ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_MUL, ALU_MULH,
    ALU_MULHSU, ALU_MULHU, ALU_DIV, ALU_DIVU, ALU_REM,
    ALU_REMU, ALU_LUI, ALU_AUIPC,
    ALU_ADDI, ALU_SLTI, ALU_SLTIU,
    ALU_XORI, ALU_ORI, ALU_ANDI,
    ALU_SLLI, ALU_SRLI, ALU_SRAI
  } alu_op_e;

  // Opcodes (instruction bits 6:0).
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_JAL    = 7'b1101111;

  // Load/store funct3.
  localparam logic [2:0] F3_W = 3'b010;
  localparam logic [2:0] F3_D = 3'b011;

  // Branch funct3.
  localparam logic [2:0] F3_BEQ  = 3'b000;
  localparam logic [2:0] F3_BNE  = 3'b001;
  localparam logic [2:0] F3_BLT  = 3'b100;
  localparam logic [2:0] F3_BGE  = 3'b101;
  localparam logic [2:0] F3_BLTU = 3'b110;
  localparam logic [2:0] F3_BGEU = 3'b111;

  typedef enum logic [2:0] {
    IMM_I, IMM_S, IMM_B, IMM_U, IMM_J
  } imm_fmt_e;

  typedef enum logic [1:0] {
    WB_ALU, WB_MEM, WB_PC4
  } wb_sel_e;

  typedef enum logic [1:0] {
    FWD_REG, FWD_MEM, FWD_WB
  } fwd_sel_e;

  typedef enum logic [1:0] {
    MEM_NONE, MEM_LW, MEM_SW, MEM_SD
  } mem_op_e;

  // Decoded controls of one instruction.
  typedef struct packed {
    logic     [4:0] rs1;
    logic     [4:0] rs2;
    logic     [4:0] rd;
    logic           use_rs1;
    logic           use_rs2;
    imm_fmt_e       imm_fmt;
    alu_op_e        alu_op;
    logic           a_is_pc;     // operand a = pc (AUIPC)
    logic           b_is_imm;    // operand b = immediate
    logic           reg_write;
    mem_op_e        mem_op;
    wb_sel_e        wb_sel;
    logic           is_branch;
    logic           is_jal;
    logic     [2:0] funct3;
  } ctrl_t;

  // IF/ID entry.
  typedef struct packed {
    logic [XLEN-1:0] pc;
    logic [31:0]     instr;
  } if_id_t;

  // ID/EX entry.
  typedef struct packed {
    logic [XLEN-1:0] pc;
    ctrl_t           ctrl;
    logic [XLEN-1:0] rs1_val;
    logic [XLEN-1:0] rs2_val;
    logic [XLEN-1:0] imm;
  } id_ex_t;

  // EX/MEM entry.
  typedef struct packed {
    logic [XLEN-1:0] pc;
    logic [4:0]      rd;
    logic            reg_write;
    mem_op_e         mem_op;
    wb_sel_e         wb_sel;
    logic [XLEN-1:0] result;     // ALU result or memory address
    logic [XLEN-1:0] store_val;
  } ex_mem_t;

  // MEM/WB entry.
  typedef struct packed {
    logic [XLEN-1:0] pc;
    logic [4:0]      rd;
    logic            reg_write;
    logic [XLEN-1:0] wdata;
  } mem_wb_t;

endpackage
