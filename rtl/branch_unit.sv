// branch_unit: branch and jump resolution in the execute stage.
//
// target = pc + imm is the branch adder of the datapath. RISC-V B and J
// immediates already carry the byte offset (bit 0 is zero), so no extra shift
// is applied. taken is set for JAL and for a conditional branch whose
// comparison of a (rs1) and b (rs2) holds: BEQ, BNE, BLT, BGE (signed), BLTU,
// BGEU (unsigned). A taken result redirects the fetch stage (the PCSrc select)
// and flushes the two younger instructions.
//
// Timing: combinational.
module branch_unit
  import rv_pkg::*;
(
  input  logic            is_branch,
  input  logic            is_jal,
  input  logic [2:0]      funct3,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [XLEN-1:0] pc,
  input  logic [XLEN-1:0] imm,
  output logic            taken,
  output logic [XLEN-1:0] target
);

  logic cond;

  assign target = pc + imm;

  always_comb begin
    unique case (funct3)
      F3_BEQ:  cond = (a == b);
      F3_BNE:  cond = (a != b);
      F3_BLT:  cond = ($signed(a) < $signed(b));
      F3_BGE:  cond = ($signed(a) >= $signed(b));
      F3_BLTU: cond = (a < b);
      F3_BGEU: cond = (a >= b);
      default: cond = 1'b0;
    endcase
  end

  assign taken = is_jal || (is_branch && cond);

endmodule
