// imm_gen: immediate generator (the sign-extend unit of the decode stage).
//
// Gathers the immediate bits of a RISC-V instruction for its format and sign-
// extends them to 64 bits:
//   I  imm[11:0]                = instr[31:20]
//   S  imm[11:5|4:0]            = instr[31:25|11:7]
//   B  imm[12|10:5|4:1|11]      = instr[31|30:25|11:8|7], imm[0] = 0
//   U  imm[31:12]               = instr[31:12], imm[11:0] = 0
//   J  imm[20|10:1|11|19:12]    = instr[31|30:21|20|19:12], imm[0] = 0
// The formats are those of the RISC-V instruction types used by the design;
// the 64-bit extension follows its 64-bit register width.
//
// Timing: combinational.
module imm_gen
  import rv_pkg::*;
(
  input  logic [31:0]     instr,
  input  imm_fmt_e        fmt,
  output logic [XLEN-1:0] imm
);

  always_comb begin
    unique case (fmt)
      IMM_I:   imm = {{(XLEN-12){instr[31]}}, instr[31:20]};
      IMM_S:   imm = {{(XLEN-12){instr[31]}}, instr[31:25], instr[11:7]};
      IMM_B:   imm = {{(XLEN-13){instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
      IMM_U:   imm = {{(XLEN-32){instr[31]}}, instr[31:12], 12'b0};
      IMM_J:   imm = {{(XLEN-21){instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};
      default: imm = '0;
    endcase
  end

endmodule
