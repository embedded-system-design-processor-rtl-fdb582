// tb_rv64_pipeline: end-to-end test of the processor against a reference model.
//
// First runs a directed counted loop (backward branch, multiply, SD then LW
// of the same word). Then generates random programs (all ALU operations
// including multiply/divide, LUI, AUIPC, LW, SW, SD, forward branches,
// forward JALs, and undefined words that execute as no-operations), loads each through the load port, starts
// the processor and compares every instruction leaving write-back (its PC,
// destination and value) with an instruction-set model stepping the same
// program. Each program ends in a jump-to-self; once the model reaches it the
// testbench raises halt, waits for the pipeline to drain, and compares all
// registers (debug port) and the data memory with the model.
//
// Registers x1..x8 are used heavily so that back-to-back dependences, load-use
// pairs and forwarding from both later stages occur often; x31 holds a data
// base address. The testbench counts how often each mechanism of the pipeline
// occurred (load-use stall, forwarding from EX/MEM and MEM/WB, register-file
// write-through, taken and not-taken branches, JAL, IF/ID back-pressure on
// fetch, SW, SD, LW, multiply, divide, no-operation, halt with drain) and
// counts a failure for any that never did. It also checks the counter ports
// against its own counts. Memories are reduced to 8 KiB each to keep the run
// short.
module tb_rv64_pipeline;
  import rv_pkg::*;
  import tb_rv_enc::*;
  import tb_rv_iss::*;

  localparam longint unsigned IB = 8192;
  localparam longint unsigned DB = 8192;
  localparam int NPROG = 100;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic load_en = 0, start = 0, halt = 0, busy;
  logic [63:0] load_addr = '0;
  logic [31:0] load_instr = '0;
  logic retire_valid, retire_we;
  logic [63:0] retire_pc, retire_data, dbg_reg_data;
  logic [4:0] retire_rd, dbg_reg_addr = '0;
  logic [63:0] cycles, instret, stalls, flushes;

  rv64_pipeline #(.IMEM_BYTES(IB), .DMEM_BYTES(DB)) dut (.*);

  always #5 clk = ~clk;

  rv_iss iss;
  bit    checking = 0;
  longint n_retired = 0;

  // mechanism counters
  int n_stall, n_fwd_mem, n_fwd_wb, n_rf_bypass, n_taken, n_not_taken, n_jal,
      n_backpressure, n_sw, n_sd, n_lw, n_mul, n_div, n_nop, n_halt_drain;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Retire monitor: compare with the model, one instruction at a time.
  always @(negedge clk) begin
    if (checking && retire_valid) begin
      logic [4:0]  erd;
      logic [63:0] ev, epc;
      bit          ew;
      epc = iss.pc;
      ew  = iss.step(erd, ev);
      n_retired++;
      check(retire_pc == epc, $sformatf("retire pc %h, model %h", retire_pc, epc));
      check((retire_we && retire_rd != 0) == ew, $sformatf("write flag at pc %h", epc));
      if (ew) check(retire_rd == erd && retire_data == ev,
                    $sformatf("pc %h wrote x%0d=%h, model x%0d=%h", epc, retire_rd, retire_data, erd, ev));
    end
  end

  // Mechanism monitor (observes the datapath from outside).
  always @(negedge clk) begin
    if (rst_n) begin
      if (dut.fd_ne && dut.hazard && dut.de_nf && !dut.redirect) n_stall++;
      if (dut.fire_x && ((dut.de_q.ctrl.use_rs1 && dut.fwd_a == FWD_MEM) ||
                         (dut.de_q.ctrl.use_rs2 && dut.fwd_b == FWD_MEM))) n_fwd_mem++;
      if (dut.fire_x && ((dut.de_q.ctrl.use_rs1 && dut.fwd_a == FWD_WB) ||
                         (dut.de_q.ctrl.use_rs2 && dut.fwd_b == FWD_WB))) n_fwd_wb++;
      if (dut.fire_d && dut.wb_we && dut.mw_q.rd != 0 &&
          ((dut.ctrl.use_rs1 && dut.ctrl.rs1 == dut.mw_q.rd) ||
           (dut.ctrl.use_rs2 && dut.ctrl.rs2 == dut.mw_q.rd))) n_rf_bypass++;
      if (dut.fire_x && dut.de_q.ctrl.is_branch) begin
        if (dut.br_taken) n_taken++; else n_not_taken++;
      end
      if (dut.fire_x && dut.de_q.ctrl.is_jal) n_jal++;
      if (dut.running && dut.fd_ne && !dut.fd_nf) n_backpressure++;
      if (dut.fire_m && dut.em_q.mem_op == MEM_SW) n_sw++;
      if (dut.fire_m && dut.em_q.mem_op == MEM_SD) n_sd++;
      if (dut.fire_m && dut.em_q.mem_op == MEM_LW) n_lw++;
      if (dut.fire_x && dut.de_q.ctrl.alu_op inside {ALU_MUL, ALU_MULH, ALU_MULHSU, ALU_MULHU}) n_mul++;
      if (dut.fire_x && dut.de_q.ctrl.alu_op inside {ALU_DIV, ALU_DIVU, ALU_REM, ALU_REMU}) n_div++;
    end
  end

  // Random program generation.
  function automatic logic [31:0] rand_instr(int idx, int n);
    int rd = $urandom_range(1, 8), rs1 = $urandom_range(0, 8), rs2 = $urandom_range(0, 8);
    int kind = $urandom_range(0, 99);
    logic [2:0] f3;
    int off;
    if (kind < 30) begin
      // register-register, including M extension
      logic [3:0] sel = 4'($urandom_range(0, 17));
      case (sel)
        0: return enc_r(7'h00, 5'(rs2), 5'(rs1), 3'd0, 5'(rd), OP_REG);
        1: return enc_r(7'h20, 5'(rs2), 5'(rs1), 3'd0, 5'(rd), OP_REG);
        2: return enc_r(7'h20, 5'(rs2), 5'(rs1), 3'd5, 5'(rd), OP_REG);
        default: begin
          f3 = 3'($urandom);
          return enc_r(($urandom_range(0, 1) == 0) ? 7'h00 : 7'h01, 5'(rs2), 5'(rs1), f3, 5'(rd), OP_REG);
        end
      endcase
    end else if (kind < 50) begin
      f3 = 3'($urandom);
      if (f3 == 3'd1) return i_slli(rd, rs1, $urandom_range(0, 63));
      if (f3 == 3'd5) return enc_i({($urandom_range(0, 1) == 0) ? 6'b000000 : 6'b010000, 6'($urandom)},
                                   5'(rs1), 3'd5, 5'(rd), OP_IMM);
      return enc_i(12'($urandom), 5'(rs1), f3, 5'(rd), OP_IMM);
    end else if (kind < 53) begin
      return i_lui(rd, $urandom);
    end else if (kind < 55) begin
      return i_auipc(rd, $urandom_range(0, 15));
    end else if (kind < 68) begin
      return i_lw(rd, ($urandom_range(0, 1) == 0) ? 0 : 31, 4 * $urandom_range(0, 60));
    end else if (kind < 76) begin
      return i_sw(rs2, ($urandom_range(0, 1) == 0) ? 0 : 31, 4 * $urandom_range(0, 60));
    end else if (kind < 82) begin
      return i_sd(rs2, ($urandom_range(0, 1) == 0) ? 0 : 31, 8 * $urandom_range(0, 30));
    end else if (kind < 92) begin
      off = 4 * $urandom_range(1, 4);
      if (idx + off / 4 > n) off = 4;
      f3 = 3'($urandom);
      if (f3 inside {3'd2, 3'd3}) f3 = 3'd0;
      return enc_b(13'(off), 5'(rs2), 5'(rs1), f3);
    end else if (kind < 97) begin
      off = 4 * $urandom_range(1, 4);
      if (idx + off / 4 > n) off = 4;
      return i_jal(($urandom_range(0, 1) == 0) ? 0 : rd, off);
    end else begin
      return 32'h0000_0000 | 32'($urandom_range(0, 3) << 12);  // undefined: no-operation
    end
  endfunction

  task automatic run_program(input int n);
    logic [31:0] prog [$];
    // x31 = 256: base address used by some loads and stores
    prog.push_back(i_addi(31, 0, 256));
    for (int i = 0; i < 4; i++) prog.push_back(i_addi(i + 1, 0, $urandom_range(0, 2047) - 1024));
    for (int i = 0; i < n; i++) prog.push_back(rand_instr(prog.size(), prog.size() - i + n));
    prog.push_back(i_jal(0, 0));                 // jump to self: end of program
    run_code(prog);
  endtask

  // Loads prog (whose last instruction is a jump to self), runs it to that
  // instruction, halts, and compares registers and data memory with the model.
  task automatic run_code(input logic [31:0] prog [$]);
    int end_idx;
    end_idx = prog.size() - 1;
    foreach (prog[i]) if (prog[i] == 32'h0 || prog[i][6:0] == 7'b0) n_nop++;

    // reset, load, copy data memory into the model
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    iss = new(int'(IB / 4), int'(DB));
    foreach (prog[i]) begin
      load_en = 1; load_addr = 64'(4 * i); load_instr = prog[i];
      iss.imem[i] = prog[i];
      @(negedge clk);
    end
    load_en = 0;
    for (int w = 0; w < int'(DB / 8); w++)
      for (int k = 0; k < 8; k++) iss.dmem[8 * w + k] = dut.u_dmem.g_bank[0].mem[w][k];

    // run
    n_retired = 0;
    checking = 1;
    start = 1;
    @(negedge clk);
    start = 0;
    while (iss.pc != 64'(4 * end_idx)) @(negedge clk);
    halt = 1;
    @(negedge clk);
    halt = 0;
    while (busy) @(negedge clk);
    n_halt_drain++;
    checking = 0;
    check(instret == 64'(n_retired), $sformatf("instret %0d, retired %0d", instret, n_retired));
    check(cycles >= instret, "cycle count below instruction count");

    for (int r = 0; r < 32; r++) begin
      dbg_reg_addr = 5'(r);
      #1;
      check(dbg_reg_data == iss.x[r], $sformatf("x%0d = %h, model %h", r, dbg_reg_data, iss.x[r]));
    end
    for (int w = 0; w < int'(DB / 8); w++)
      for (int k = 0; k < 8; k++)
        if (dut.u_dmem.g_bank[0].mem[w][k] != iss.dmem[8 * w + k]) begin
          check(0, $sformatf("dmem byte %0d", 8 * w + k));
          break;
        end
    checks++;
  endtask

  initial begin
    int stall_total = 0, flush_total = 0;
    {n_stall, n_fwd_mem, n_fwd_wb, n_rf_bypass, n_taken, n_not_taken, n_jal,
     n_backpressure, n_sw, n_sd, n_lw, n_mul, n_div, n_nop, n_halt_drain} = '0;
    repeat (3) @(negedge clk);
    // directed: a counted loop with a backward branch, multiply and a store
    // followed by a load of the same word
    begin
      logic [31:0] lp [$];
      lp.push_back(i_addi(1, 0, 10));      // x1 = 10
      lp.push_back(i_addi(2, 0, 0));       // x2 = 0
      lp.push_back(i_addi(4, 0, 1));       // x4 = 1
      lp.push_back(i_add(2, 2, 1));        // loop: x2 += x1
      lp.push_back(i_mul(4, 4, 1));        //       x4 *= x1
      lp.push_back(i_addi(1, 1, -1));      //       x1 -= 1
      lp.push_back(i_bne(1, 0, -12));      //       while x1 != 0
      lp.push_back(i_sd(4, 0, 16));
      lp.push_back(i_lw(3, 0, 16));
      lp.push_back(i_add(5, 3, 2));        // load-use on x3
      lp.push_back(i_jal(0, 0));
      run_code(lp);
      dbg_reg_addr = 5'd2; #1 check(dbg_reg_data == 64'd55, "loop: sum 1..10");
      dbg_reg_addr = 5'd4; #1 check(dbg_reg_data == 64'd3628800, "loop: 10!");
      dbg_reg_addr = 5'd5; #1 check(dbg_reg_data == 64'd3628855, "loop: load-use after store");
      // 9 taken loop branches plus at least one pass of the final jump-to-self
      check(flushes >= 64'd10, $sformatf("loop: %0d taken branches and jumps, expected 9 + 1 or more", flushes));
    end
    for (int p = 0; p < NPROG; p++) begin
      int s0;
      s0 = n_stall;
      run_program(40 + 8 * p);
      check(stalls == 64'(n_stall - s0), $sformatf("stall counter %0d, seen %0d", stalls, n_stall - s0));
    end
    $display("mechanisms: load-use stalls %0d, fwd EX/MEM %0d, fwd MEM/WB %0d, rf write-through %0d",
             n_stall, n_fwd_mem, n_fwd_wb, n_rf_bypass);
    $display("            branches taken %0d / not taken %0d, JAL %0d, fetch back-pressure %0d",
             n_taken, n_not_taken, n_jal, n_backpressure);
    $display("            SW %0d, SD %0d, LW %0d, MUL %0d, DIV %0d, no-op words %0d, halts %0d",
             n_sw, n_sd, n_lw, n_mul, n_div, n_nop, n_halt_drain);
    check(n_stall > 0, "no load-use stall");
    check(n_fwd_mem > 0, "no EX/MEM forwarding");
    check(n_fwd_wb > 0, "no MEM/WB forwarding");
    check(n_rf_bypass > 0, "no register-file write-through");
    check(n_taken > 0, "no taken branch");
    check(n_not_taken > 0, "no not-taken branch");
    check(n_jal > 0, "no JAL");
    check(n_backpressure > 0, "no fetch back-pressure");
    check(n_sw > 0 && n_sd > 0 && n_lw > 0, "no memory access of some kind");
    check(n_mul > 0 && n_div > 0, "no multiply or divide");
    check(n_nop > 0, "no no-operation word");
    check(n_halt_drain == NPROG + 1, "halt did not drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
