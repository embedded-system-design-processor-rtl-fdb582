// tb_regfile: self-checking test of the register file.
//
// Random writes and reads on all ports compared with an array model: x0 stays
// zero, reset clears every register, a read of the register being written in
// the same cycle returns the new value, and the debug port returns stored
// values.
module tb_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we;
  logic [4:0] raddr1, raddr2, waddr, dbg_addr;
  logic [63:0] rdata1, rdata2, wdata, dbg_data;
  logic [63:0] model [32];

  regfile #(.XLEN(64), .NREGS(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [63:0] exp_rd(input logic [4:0] a);
    if (a == 0) return '0;
    if (we && waddr == a) return wdata;
    return model[a];
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr1 = 0; raddr2 = 0; waddr = 0; wdata = 0; dbg_addr = 0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      dbg_addr = 5'(i); #1; check(dbg_data == 0, "reset value");
    end
    repeat (3000) begin
      we = $urandom_range(0, 1); waddr = 5'($urandom); wdata = {$urandom, $urandom};
      raddr1 = ($urandom_range(0, 3) == 0) ? waddr : 5'($urandom);
      raddr2 = 5'($urandom); dbg_addr = 5'($urandom);
      #1;
      check(rdata1 == exp_rd(raddr1), "read port 1");
      check(rdata2 == exp_rd(raddr2), "read port 2");
      check(dbg_data == ((dbg_addr == 0) ? 64'd0 : model[dbg_addr]), "debug port");
      if (we && waddr != 0) model[waddr] = wdata;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
