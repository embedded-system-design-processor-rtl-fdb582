// tb_hazard_unit: self-checking test of load-use detection.
//
// Exhaustive over the valid/load/use flags and a small set of register numbers
// (including x0), comparing stall with the load-use rule.
module tb_hazard_unit;
  int checks = 0, failures = 0;
  logic ex_valid, ex_mem_read, id_use_rs1, id_use_rs2, stall;
  logic [4:0] ex_rd, id_rs1, id_rs2;

  hazard_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] regs [3] = '{5'd0, 5'd3, 5'd17};
    bit e;
    for (int f = 0; f < 16; f++)
      foreach (regs[i]) foreach (regs[j]) foreach (regs[k]) begin
        {ex_valid, ex_mem_read, id_use_rs1, id_use_rs2} = 4'(f);
        ex_rd = regs[i]; id_rs1 = regs[j]; id_rs2 = regs[k];
        #1;
        e = 0;
        if (ex_valid && ex_mem_read && ex_rd != 0) begin
          if (id_use_rs1 && id_rs1 == ex_rd) e = 1;
          if (id_use_rs2 && id_rs2 == ex_rd) e = 1;
        end
        checks++;
        if (stall !== e) begin failures++; $display("FAIL f=%b rd=%0d rs1=%0d rs2=%0d", f, ex_rd, id_rs1, id_rs2); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
