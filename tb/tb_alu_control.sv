// tb_alu_control: self-checking test of the ALU control.
//
// Walks a table of (opcode, funct3, funct7) for every ALU instruction, written
// from the RISC-V RV64I/M encoding, and checks the operation code and legal;
// also checks that undefined funct combinations and other opcodes are flagged
// illegal and that RV64 shift immediates ignore funct7[0] (shamt bit 5).
module tb_alu_control;
  import rv_pkg::*;
  int checks = 0, failures = 0;
  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  alu_op_e op;
  logic legal;

  alu_control dut (.*);

  task automatic try(input logic [6:0] oc, input logic [2:0] f3, input logic [6:0] f7,
                     input bit el, input alu_op_e eo);
    opcode = oc; funct3 = f3; funct7 = f7;
    #1;
    checks++;
    if (legal !== el || (el && op !== eo)) begin
      failures++;
      $display("FAIL oc=%b f3=%b f7=%b op=%s legal=%b exp %s %b", oc, f3, f7, op.name(), legal, eo.name(), el);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(7'b0110011, 3'd0, 7'h00, 1, ALU_ADD);
    try(7'b0110011, 3'd0, 7'h20, 1, ALU_SUB);
    try(7'b0110011, 3'd1, 7'h00, 1, ALU_SLL);
    try(7'b0110011, 3'd2, 7'h00, 1, ALU_SLT);
    try(7'b0110011, 3'd3, 7'h00, 1, ALU_SLTU);
    try(7'b0110011, 3'd4, 7'h00, 1, ALU_XOR);
    try(7'b0110011, 3'd5, 7'h00, 1, ALU_SRL);
    try(7'b0110011, 3'd5, 7'h20, 1, ALU_SRA);
    try(7'b0110011, 3'd6, 7'h00, 1, ALU_OR);
    try(7'b0110011, 3'd7, 7'h00, 1, ALU_AND);
    try(7'b0110011, 3'd0, 7'h01, 1, ALU_MUL);
    try(7'b0110011, 3'd1, 7'h01, 1, ALU_MULH);
    try(7'b0110011, 3'd2, 7'h01, 1, ALU_MULHSU);
    try(7'b0110011, 3'd3, 7'h01, 1, ALU_MULHU);
    try(7'b0110011, 3'd4, 7'h01, 1, ALU_DIV);
    try(7'b0110011, 3'd5, 7'h01, 1, ALU_DIVU);
    try(7'b0110011, 3'd6, 7'h01, 1, ALU_REM);
    try(7'b0110011, 3'd7, 7'h01, 1, ALU_REMU);
    try(7'b0110111, 3'd3, 7'h55, 1, ALU_LUI);
    try(7'b0010111, 3'd3, 7'h55, 1, ALU_AUIPC);
    try(7'b0010011, 3'd0, 7'h7F, 1, ALU_ADDI);
    try(7'b0010011, 3'd2, 7'h40, 1, ALU_SLTI);
    try(7'b0010011, 3'd3, 7'h00, 1, ALU_SLTIU);
    try(7'b0010011, 3'd4, 7'h12, 1, ALU_XORI);
    try(7'b0010011, 3'd6, 7'h00, 1, ALU_ORI);
    try(7'b0010011, 3'd7, 7'h00, 1, ALU_ANDI);
    try(7'b0010011, 3'd1, 7'h00, 1, ALU_SLLI);
    try(7'b0010011, 3'd1, 7'h01, 1, ALU_SLLI);
    try(7'b0010011, 3'd5, 7'h00, 1, ALU_SRLI);
    try(7'b0010011, 3'd5, 7'h21, 1, ALU_SRAI);
    try(7'b0010011, 3'd1, 7'h20, 0, ALU_ADD);
    try(7'b0110011, 3'd1, 7'h20, 0, ALU_ADD);
    try(7'b0110011, 3'd0, 7'h02, 0, ALU_ADD);
    try(7'b0000011, 3'd2, 7'h00, 0, ALU_ADD);
    try(7'b1101111, 3'd0, 7'h00, 0, ALU_ADD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
