// tb_fetch_unit: self-checking test of the PC logic.
//
// Checks that nothing is fetched before start, that start enables fetching at
// PC 0, that the PC steps by 4 for each fetch and holds when the IF/ID FIFO is
// full, that a redirect loads the target and suppresses that cycle's fetch, and
// that halt stops fetching. The expected PC is tracked by a model in the
// testbench over 500 random cycles.
module tb_fetch_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start, halt, can_fetch, redirect, running, fetch;
  logic [63:0] redirect_pc, pc;

  fetch_unit #(.XLEN(64)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s pc=%h", msg, pc); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp_pc;
    start = 0; halt = 0; can_fetch = 1; redirect = 0; redirect_pc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!running && !fetch, "idle before start");
    start = 1;
    @(negedge clk); start = 0;
    check(running && fetch && pc == 64'd0, "start at 0");
    exp_pc = 0;
    repeat (500) begin
      can_fetch   = ($urandom_range(0, 3) != 0);
      redirect    = ($urandom_range(0, 9) == 0);
      redirect_pc = {32'd0, $urandom} & ~64'd3;
      #1;
      check(fetch == (can_fetch && !redirect), "fetch enable");
      check(pc == exp_pc, "pc sequence");
      if (redirect) exp_pc = redirect_pc;
      else if (can_fetch) exp_pc = exp_pc + 4;
      @(negedge clk);
    end
    redirect = 0; can_fetch = 1;
    halt = 1;
    @(negedge clk); halt = 0;
    check(!running && !fetch, "halt stops fetching");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
