// tb_control_unit: self-checking test of the main decoder.
//
// Decodes hand-picked instructions of every class (register, immediate, LUI,
// AUIPC, LW, SW, SD, branch, JAL, unknown) and checks each control field
// against the values expected for that class.
module tb_control_unit;
  import rv_pkg::*;
  import tb_rv_enc::*;
  int checks = 0, failures = 0;
  logic [31:0] instr;
  ctrl_t ctrl;

  control_unit dut (.*);

  task automatic expect_f(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (instr=%h)", what, instr); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = i_sub(5, 0, 1); #1;
    expect_f("SUB", ctrl.alu_op == ALU_SUB && ctrl.rd == 5 && ctrl.rs1 == 0 && ctrl.rs2 == 1 &&
             ctrl.use_rs1 && ctrl.use_rs2 && ctrl.reg_write && !ctrl.b_is_imm && ctrl.mem_op == MEM_NONE &&
             ctrl.wb_sel == WB_ALU && !ctrl.is_branch && !ctrl.is_jal);
    instr = i_div(7, 3, 4); #1;
    expect_f("DIV", ctrl.alu_op == ALU_DIV && ctrl.reg_write && ctrl.use_rs2);
    instr = i_addi(2, 1, -5); #1;
    expect_f("ADDI", ctrl.alu_op == ALU_ADDI && ctrl.b_is_imm && ctrl.imm_fmt == IMM_I && ctrl.use_rs1 &&
             !ctrl.use_rs2 && ctrl.rs2 == 0 && ctrl.reg_write && ctrl.rd == 2);
    instr = i_lui(9, 20'h12345); #1;
    expect_f("LUI", ctrl.alu_op == ALU_LUI && ctrl.imm_fmt == IMM_U && ctrl.b_is_imm && !ctrl.use_rs1 && ctrl.reg_write);
    instr = i_auipc(9, 1); #1;
    expect_f("AUIPC", ctrl.alu_op == ALU_AUIPC && ctrl.a_is_pc && ctrl.b_is_imm && ctrl.imm_fmt == IMM_U);
    instr = i_lw(3, 2, 16); #1;
    expect_f("LW", ctrl.mem_op == MEM_LW && ctrl.wb_sel == WB_MEM && ctrl.reg_write && ctrl.alu_op == ALU_ADD &&
             ctrl.b_is_imm && ctrl.imm_fmt == IMM_I && ctrl.use_rs1 && !ctrl.use_rs2);
    instr = i_sw(4, 2, 16); #1;
    expect_f("SW", ctrl.mem_op == MEM_SW && !ctrl.reg_write && ctrl.rd == 0 && ctrl.imm_fmt == IMM_S &&
             ctrl.use_rs1 && ctrl.use_rs2 && ctrl.b_is_imm);
    instr = i_sd(4, 2, 16); #1;
    expect_f("SD", ctrl.mem_op == MEM_SD && !ctrl.reg_write);
    instr = i_bne(1, 2, -8); #1;
    expect_f("BNE", ctrl.is_branch && !ctrl.is_jal && ctrl.funct3 == 3'd1 && ctrl.imm_fmt == IMM_B &&
             !ctrl.reg_write && ctrl.use_rs1 && ctrl.use_rs2 && ctrl.mem_op == MEM_NONE);
    instr = i_jal(1, 64); #1;
    expect_f("JAL", ctrl.is_jal && ctrl.reg_write && ctrl.rd == 1 && ctrl.wb_sel == WB_PC4 && ctrl.imm_fmt == IMM_J &&
             !ctrl.use_rs1 && !ctrl.use_rs2);
    instr = 32'h0000_0000; #1;
    expect_f("zero word is a no-op", !ctrl.reg_write && ctrl.mem_op == MEM_NONE && !ctrl.is_branch && !ctrl.is_jal &&
             !ctrl.use_rs1 && !ctrl.use_rs2);
    instr = enc_i(12'd0, 5'd1, 3'd3, 5'd2, 7'b0000011); #1;  // LD is not in the instruction set
    expect_f("LD is a no-op", !ctrl.reg_write && ctrl.mem_op == MEM_NONE);
    instr = enc_r(7'h20, 5'd1, 5'd2, 3'd1, 5'd3, 7'b0110011); #1;  // undefined funct
    expect_f("bad funct is a no-op", !ctrl.reg_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
