// tb_rv64_full: the processor at its default sizes running the two example
// programs of the design, with cycle-exact timing checks.
//
// Program A is the twelve-instruction sequence (LW, LW, ADD) x 4: each ADD
// adds the two words loaded just before it, so every group has one load-use
// dependence. Program B is the five-instruction example LW, ADD, SW, SUB, JAL.
// Register numbers are chosen here (the examples name R0 as a load target,
// which RISC-V hard-wires to zero, so x1 is used instead). Data words are
// placed in the data memory directly before each run.
//
// For every instruction the testbench records the cycle (counted from the
// start pulse) in which it is fetched, decoded, executed and written back,
// prints them as a table, and checks them against the pipeline's timing rule:
// instruction i is fetched in cycle i + b(i) (cycle 0 is the one after the
// start pulse) and written back three cycles
// after it is decoded, where b(i) is the number of load-use bubbles before it
// (one for each instruction that reads the result of the load just before it),
// and decode follows fetch by one cycle plus its own bubble. Results are
// checked through the retire port, the debug register port and the data
// memory. It also checks the cycle, instruction and stall counters.
module tb_rv64_full;
  import rv_pkg::*;
  import tb_rv_enc::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic load_en = 0, start = 0, halt = 0, busy;
  logic [63:0] load_addr = '0;
  logic [31:0] load_instr = '0;
  logic retire_valid, retire_we;
  logic [63:0] retire_pc, retire_data, dbg_reg_data;
  logic [4:0] retire_rd, dbg_reg_addr = '0;
  logic [63:0] cycles, instret, stalls, flushes;

  rv64_pipeline dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stage timestamps per instruction index (pc / 4)
  int t_if [64], t_id [64], t_ex [64], t_wb [64];
  int cyc;
  always @(negedge clk) begin
    if (dut.fetch)  t_if[int'(dut.pc[7:2])] = cyc;
    if (dut.fire_d) t_id[int'(dut.fd_q.pc[7:2])] = cyc;
    if (dut.fire_x) t_ex[int'(dut.de_q.pc[7:2])] = cyc;
    if (dut.mw_ne)  t_wb[int'(dut.mw_q.pc[7:2])] = cyc;
  end
  always @(posedge clk) cyc <= start ? 0 : cyc + 1;

  task automatic set_word(input int byte_addr, input logic [31:0] v);
    for (int k = 0; k < 4; k++) dut.u_dmem.g_bank[0].mem[byte_addr / 8][(byte_addr % 8) + k] = v[8 * k +: 8];
  endtask

  function automatic logic [31:0] get_word(input int byte_addr);
    logic [31:0] v;
    for (int k = 0; k < 4; k++) v[8 * k +: 8] = dut.u_dmem.g_bank[0].mem[byte_addr / 8][(byte_addr % 8) + k];
    return v;
  endfunction

  // Runs prog (ending in a jump-to-self at index n_run) and checks timing of
  // the first n_run instructions.
  task automatic run(input string name, input logic [31:0] prog [$], input int n_run);
    int b = 0;
    int e_if, e_id;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      load_en = 1; load_addr = 64'(4 * i); load_instr = prog[i];
      @(negedge clk);
    end
    load_en = 0;
    foreach (t_if[i]) begin t_if[i] = -1; t_id[i] = -1; t_ex[i] = -1; t_wb[i] = -1; end
    start = 1;
    @(negedge clk);
    start = 0;
    while (t_wb[n_run - 1] < 0) @(negedge clk);
    halt = 1;
    @(negedge clk);
    halt = 0;
    while (busy) @(negedge clk);
    $display("%s: cycle of each stage, counted from start", name);
    $display("  instr      fetch decode execute writeback");
    for (int i = 0; i < n_run; i++) begin
      bit lu;
      // load-use bubble: reads the destination of a LW directly before it
      lu = (i > 0) && prog[i - 1][6:0] == OP_LOAD && prog[i - 1][11:7] != 0 &&
           ((prog[i][19:15] == prog[i - 1][11:7] && prog[i][6:0] inside {OP_REG, OP_IMM, OP_LOAD, OP_STORE, OP_BRANCH}) ||
            (prog[i][24:20] == prog[i - 1][11:7] && prog[i][6:0] inside {OP_REG, OP_STORE, OP_BRANCH}));
      e_if = i + b;
      if (lu) b++;
      e_id = i + b + 1;
      $display("  %08h  %5d %6d %7d %9d", prog[i], t_if[i], t_id[i], t_ex[i], t_wb[i]);
      check(t_if[i] == e_if, $sformatf("%s #%0d fetch cycle %0d, expected %0d", name, i, t_if[i], e_if));
      check(t_id[i] == e_id, $sformatf("%s #%0d decode cycle %0d, expected %0d", name, i, t_id[i], e_id));
      check(t_ex[i] == e_id + 1, $sformatf("%s #%0d execute cycle", name, i));
      check(t_wb[i] == e_id + 3, $sformatf("%s #%0d write-back cycle", name, i));
    end
  endtask

  initial begin
    logic [31:0] pa [$], pb [$];
    logic [31:0] d [8];
    repeat (3) @(negedge clk);

    // ---------------- program A: (LW, LW, ADD) x 4
    foreach (d[i]) begin d[i] = $urandom; set_word(4 * i, d[i]); end
    for (int g = 0; g < 4; g++) begin
      pa.push_back(i_lw(3 * g + 1, 0, 8 * g));
      pa.push_back(i_lw(3 * g + 2, 0, 8 * g + 4));
      pa.push_back(i_add(3 * g + 3, 3 * g + 1, 3 * g + 2));
    end
    pa.push_back(i_jal(0, 0));
    run("(LW, LW, ADD) x 4", pa, 12);
    for (int g = 0; g < 4; g++) begin
      logic [63:0] s;
      s = 64'($signed(d[2 * g])) + 64'($signed(d[2 * g + 1]));
      dbg_reg_addr = 5'(3 * g + 3);
      #1 check(dbg_reg_data == s, $sformatf("group %0d sum %h, expected %h", g, dbg_reg_data, s));
    end
    check(stalls == 64'd4, $sformatf("stall counter %0d, expected 4", stalls));
    check(instret >= 64'd12, "instret");
    check(cycles >= 64'd12 + 64'd4 + 64'd4, "cycle counter");

    // ---------------- program B: LW, ADD, SW, SUB, JAL
    set_word(4, 32'd1000);
    set_word(0, 32'hDEAD_BEEF);
    pb.push_back(i_lw(1, 0, 4));       // x1 = mem[4]
    pb.push_back(i_add(2, 0, 1));      // x2 = x0 + x1   (load-use)
    pb.push_back(i_sw(2, 0, 0));       // mem[0] = x2    (forward from EX/MEM)
    pb.push_back(i_sub(5, 0, 1));      // x5 = x0 - x1
    pb.push_back(i_jal(3, 8));         // x3 = pc + 4, skip one word
    pb.push_back(i_addi(6, 0, 1));     // skipped
    pb.push_back(i_jal(0, 0));
    run("LW, ADD, SW, SUB, JAL", pb, 5);
    dbg_reg_addr = 5'd2; #1 check(dbg_reg_data == 64'd1000, "program B: ADD");
    dbg_reg_addr = 5'd5; #1 check(dbg_reg_data == 64'(-1000), "program B: SUB");
    dbg_reg_addr = 5'd3; #1 check(dbg_reg_data == 64'd20, "program B: JAL link");
    dbg_reg_addr = 5'd6; #1 check(dbg_reg_data == 64'd0, "program B: skipped instruction");
    check(get_word(0) == 32'd1000, "program B: SW");
    check(flushes >= 64'd1, "program B: JAL flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
