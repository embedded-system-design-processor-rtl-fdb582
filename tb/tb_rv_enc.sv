// tb_rv_enc: RISC-V instruction encoders for the testbenches.
//
// Each function packs the fields of one instruction format as laid out by the
// RISC-V base specification (R, I, S, B, U, J), plus named helpers for the
// instructions the processor executes.
package tb_rv_enc;

  function automatic logic [31:0] enc_r(input logic [6:0] f7, input logic [4:0] rs2, input logic [4:0] rs1,
                                        input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction

  function automatic logic [31:0] enc_i(input logic [11:0] imm, input logic [4:0] rs1, input logic [2:0] f3,
                                        input logic [4:0] rd, input logic [6:0] op);
    return {imm, rs1, f3, rd, op};
  endfunction

  function automatic logic [31:0] enc_s(input logic [11:0] imm, input logic [4:0] rs2, input logic [4:0] rs1,
                                        input logic [2:0] f3);
    return {imm[11:5], rs2, rs1, f3, imm[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] enc_b(input logic [12:0] imm, input logic [4:0] rs2, input logic [4:0] rs1,
                                        input logic [2:0] f3);
    return {imm[12], imm[10:5], rs2, rs1, f3, imm[4:1], imm[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] enc_u(input logic [19:0] imm, input logic [4:0] rd, input logic [6:0] op);
    return {imm, rd, op};
  endfunction

  function automatic logic [31:0] enc_j(input logic [20:0] imm, input logic [4:0] rd);
    return {imm[20], imm[10:1], imm[11], imm[19:12], rd, 7'b1101111};
  endfunction

  function automatic logic [31:0] i_add(input int rd, input int rs1, input int rs2);
    return enc_r(7'h00, 5'(rs2), 5'(rs1), 3'd0, 5'(rd), 7'b0110011);
  endfunction
  function automatic logic [31:0] i_sub(input int rd, input int rs1, input int rs2);
    return enc_r(7'h20, 5'(rs2), 5'(rs1), 3'd0, 5'(rd), 7'b0110011);
  endfunction
  function automatic logic [31:0] i_mul(input int rd, input int rs1, input int rs2);
    return enc_r(7'h01, 5'(rs2), 5'(rs1), 3'd0, 5'(rd), 7'b0110011);
  endfunction
  function automatic logic [31:0] i_div(input int rd, input int rs1, input int rs2);
    return enc_r(7'h01, 5'(rs2), 5'(rs1), 3'd4, 5'(rd), 7'b0110011);
  endfunction
  function automatic logic [31:0] i_addi(input int rd, input int rs1, input int imm);
    return enc_i(12'(imm), 5'(rs1), 3'd0, 5'(rd), 7'b0010011);
  endfunction
  function automatic logic [31:0] i_slli(input int rd, input int rs1, input int sh);
    return enc_i({6'd0, 6'(sh)}, 5'(rs1), 3'd1, 5'(rd), 7'b0010011);
  endfunction
  function automatic logic [31:0] i_lw(input int rd, input int rs1, input int imm);
    return enc_i(12'(imm), 5'(rs1), 3'd2, 5'(rd), 7'b0000011);
  endfunction
  function automatic logic [31:0] i_sw(input int rs2, input int rs1, input int imm);
    return enc_s(12'(imm), 5'(rs2), 5'(rs1), 3'd2);
  endfunction
  function automatic logic [31:0] i_sd(input int rs2, input int rs1, input int imm);
    return enc_s(12'(imm), 5'(rs2), 5'(rs1), 3'd3);
  endfunction
  function automatic logic [31:0] i_beq(input int rs1, input int rs2, input int imm);
    return enc_b(13'(imm), 5'(rs2), 5'(rs1), 3'd0);
  endfunction
  function automatic logic [31:0] i_bne(input int rs1, input int rs2, input int imm);
    return enc_b(13'(imm), 5'(rs2), 5'(rs1), 3'd1);
  endfunction
  function automatic logic [31:0] i_blt(input int rs1, input int rs2, input int imm);
    return enc_b(13'(imm), 5'(rs2), 5'(rs1), 3'd4);
  endfunction
  function automatic logic [31:0] i_jal(input int rd, input int imm);
    return enc_j(21'(imm), 5'(rd));
  endfunction
  function automatic logic [31:0] i_lui(input int rd, input int imm20);
    return enc_u(20'(imm20), 5'(rd), 7'b0110111);
  endfunction
  function automatic logic [31:0] i_auipc(input int rd, input int imm20);
    return enc_u(20'(imm20), 5'(rd), 7'b0010111);
  endfunction

endpackage
