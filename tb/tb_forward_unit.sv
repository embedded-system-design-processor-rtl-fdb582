// tb_forward_unit: self-checking test of operand forwarding selection.
//
// Random register numbers (often colliding) and valid/write flags; the
// expected source of each operand is the youngest writer of that register
// (EX/MEM before MEM/WB), the register file otherwise, never for x0.
module tb_forward_unit;
  import rv_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] rs1, rs2, mem_rd, wb_rd;
  logic mem_valid, mem_reg_write, wb_valid, wb_reg_write;
  fwd_sel_e fwd_a, fwd_b;

  forward_unit dut (.*);

  function automatic fwd_sel_e model(input logic [4:0] r);
    if (r != 0 && mem_valid && mem_reg_write && mem_rd == r) return FWD_MEM;
    if (r != 0 && wb_valid && wb_reg_write && wb_rd == r) return FWD_WB;
    return FWD_REG;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nm = 0, nw = 0;
    repeat (4000) begin
      rs1 = 5'($urandom_range(0, 3)); rs2 = 5'($urandom_range(0, 3));
      mem_rd = 5'($urandom_range(0, 3)); wb_rd = 5'($urandom_range(0, 3));
      {mem_valid, mem_reg_write, wb_valid, wb_reg_write} = 4'($urandom);
      #1;
      checks++;
      if (fwd_a !== model(rs1) || fwd_b !== model(rs2)) begin
        failures++;
        $display("FAIL rs1=%0d rs2=%0d a=%s b=%s", rs1, rs2, fwd_a.name(), fwd_b.name());
      end
      if (fwd_a == FWD_MEM) nm++;
      if (fwd_a == FWD_WB) nw++;
    end
    checks++; if (nm == 0 || nw == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
