// tb_imm_gen: self-checking test of the immediate generator.
//
// Builds instructions from a chosen immediate for each format (placing the bits
// as the RISC-V formats lay them out) and checks that the generator returns the
// sign-extended immediate; also a few hand-encoded instructions.
module tb_imm_gen;
  import rv_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] instr;
  imm_fmt_e fmt;
  logic [63:0] imm;

  imm_gen dut (.*);

  task automatic try(input imm_fmt_e f, input logic [31:0] ins, input logic [63:0] e);
    fmt = f; instr = ins;
    #1;
    checks++;
    if (imm !== e) begin failures++; $display("FAIL %s instr=%h imm=%h exp=%h", f.name(), ins, imm, e); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r, v;
    // hand-encoded: addi x1,x0,-1 ; sw x2,8(x0) ; jal x3,+4 ; beq x0,x0,-8 ; lui x5,0x80000
    try(IMM_I, 32'hFFF00093, '1);
    try(IMM_S, 32'h00202423, 64'd8);
    try(IMM_J, 32'h004001EF, 64'd4);
    try(IMM_B, 32'hFE000CE3, 64'(-8));
    try(IMM_U, 32'h800002B7, 64'hFFFF_FFFF_8000_0000);
    repeat (500) begin
      r = $urandom;
      v = $urandom;
      // I: 12-bit
      try(IMM_I, {v[11:0], r[19:0]}, {{52{v[11]}}, v[11:0]});
      // S
      try(IMM_S, {v[11:5], r[24:12], v[4:0], r[6:0]}, {{52{v[11]}}, v[11:0]});
      // B: 13-bit, bit 0 zero
      try(IMM_B, {v[12], v[10:5], r[24:12], v[4:1], v[11], r[6:0]}, {{51{v[12]}}, v[12:1], 1'b0});
      // U
      try(IMM_U, {v[31:12], r[11:0]}, {{32{v[31]}}, v[31:12], 12'd0});
      // J: 21-bit, bit 0 zero
      try(IMM_J, {v[20], v[10:1], v[11], v[19:12], r[11:0]}, {{43{v[20]}}, v[20:1], 1'b0});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
