// rv64_pipeline: five-stage pipelined RV64 processor (top level).
//
// Stages IF, ID, EX, MEM and WB are each one "rule": a block of logic that
// fires in a cycle when its input FIFO holds an instruction and its output
// FIFO can take one, takes the first entry, and enqueues its result. The four
// inter-stage registers (IF/ID, ID/EX, EX/MEM, MEM/WB) are one-entry pipeline
// FIFOs (pipe_fifo), so a full pipeline still moves every cycle.
//
//   IF  : fetch_unit holds the PC; imem is read at the PC and {pc, instr} is
//         enqueued into IF/ID.
//   ID  : control_unit (with alu_control) decodes, imm_gen builds the
//         immediate, the register file is read. hazard_unit holds ID for one
//         cycle when the instruction needs the result of a load now in EX.
//   EX  : forward_unit picks each operand from the register read, EX/MEM or
//         MEM/WB; alu computes; branch_unit resolves JAL and branches. A taken
//         one redirects the PC and flushes IF/ID and the fetch of that cycle
//         (two bubbles). JAL's result is pc+4.
//   MEM : dmem is read (LW, sign-extended) or written (SW, SD).
//   WB  : the register file is written; the retire_* ports show every
//         instruction as it leaves the pipeline.
//
// Operation: write a program with load_en/load_addr/load_instr (one
// instruction per cycle, byte addresses, program starts at address 0), pulse
// start, and watch retire_*; pulse halt to stop fetching, after which busy
// falls once the pipeline has drained. dbg_reg_addr/dbg_reg_data read a
// register at any time. cycles (the clock register), instret, stalls and
// flushes count from start.
//
// Timing: a stream without dependences retires one instruction per cycle; the
// first instruction retires 5 cycles after start (4 FIFO hops plus the write
// cycle). A load followed by a user of its result costs one bubble; a taken
// branch or jump costs two. Instruction set: see control_unit. The stage set,
// the FIFOs between stages, forwarding, the load-use check and the 4 GiB
// memory sizes follow the design; the port form of load/start/halt/result is
// a choice of this implementation.
module rv64_pipeline
  import rv_pkg::*;
#(
  parameter longint unsigned IMEM_BYTES = 64'd4294967296,
  parameter longint unsigned DMEM_BYTES = 64'd4294967296
) (
  input  logic            clk,
  input  logic            rst_n,
  // Program load
  input  logic            load_en,
  input  logic [XLEN-1:0] load_addr,
  input  logic [31:0]     load_instr,
  // Run control
  input  logic            start,
  input  logic            halt,
  output logic            busy,
  // Results
  output logic            retire_valid,
  output logic [XLEN-1:0] retire_pc,
  output logic            retire_we,
  output logic [4:0]      retire_rd,
  output logic [XLEN-1:0] retire_data,
  input  logic [4:0]      dbg_reg_addr,
  output logic [XLEN-1:0] dbg_reg_data,
  // Clock register and event counters
  output logic [63:0]     cycles,
  output logic [63:0]     instret,
  output logic [63:0]     stalls,
  output logic [63:0]     flushes
);

  // ---------------------------------------------------------------- FIFOs
  logic    fd_enq, fd_deq, fd_clear, fd_ne, fd_nf;
  if_id_t  fd_in, fd_q;
  logic    de_enq, de_deq, de_ne, de_nf;
  id_ex_t  de_in, de_q;
  logic    em_enq, em_deq, em_ne, em_nf;
  ex_mem_t em_in, em_q;
  logic    mw_enq, mw_deq, mw_ne, mw_nf;
  mem_wb_t mw_in, mw_q;

  pipe_fifo #(.T(if_id_t)) u_if_id (
    .clk, .rst_n, .enq(fd_enq), .enq_data(fd_in), .deq(fd_deq), .clear(fd_clear),
    .not_empty(fd_ne), .not_full(fd_nf), .first(fd_q));
  pipe_fifo #(.T(id_ex_t)) u_id_ex (
    .clk, .rst_n, .enq(de_enq), .enq_data(de_in), .deq(de_deq), .clear(1'b0),
    .not_empty(de_ne), .not_full(de_nf), .first(de_q));
  pipe_fifo #(.T(ex_mem_t)) u_ex_mem (
    .clk, .rst_n, .enq(em_enq), .enq_data(em_in), .deq(em_deq), .clear(1'b0),
    .not_empty(em_ne), .not_full(em_nf), .first(em_q));
  pipe_fifo #(.T(mem_wb_t)) u_mem_wb (
    .clk, .rst_n, .enq(mw_enq), .enq_data(mw_in), .deq(mw_deq), .clear(1'b0),
    .not_empty(mw_ne), .not_full(mw_nf), .first(mw_q));

  // ---------------------------------------------------------------- IF
  logic            running, fetch, redirect;
  logic [XLEN-1:0] pc, redirect_pc;
  logic [31:0]     instr;

  fetch_unit #(.XLEN(XLEN)) u_fetch (
    .clk, .rst_n, .start, .halt, .can_fetch(fd_nf), .redirect, .redirect_pc,
    .running, .fetch, .pc);

  imem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .we(load_en), .waddr(load_addr), .wdata(load_instr), .raddr(pc), .rdata(instr));

  assign fd_enq   = fetch;
  assign fd_in    = '{pc: pc, instr: instr};
  assign fd_clear = redirect;

  // ---------------------------------------------------------------- ID
  ctrl_t           ctrl;
  logic [XLEN-1:0] imm, rs1_val, rs2_val;
  logic            hazard, fire_d;
  logic            wb_we;

  control_unit u_ctrl (.instr(fd_q.instr), .ctrl);

  imm_gen u_imm (.instr(fd_q.instr), .fmt(ctrl.imm_fmt), .imm);

  regfile #(.XLEN(XLEN), .NREGS(32)) u_rf (
    .clk, .rst_n,
    .raddr1(ctrl.rs1), .rdata1(rs1_val),
    .raddr2(ctrl.rs2), .rdata2(rs2_val),
    .we(wb_we), .waddr(mw_q.rd), .wdata(mw_q.wdata),
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data));

  hazard_unit u_hazard (
    .ex_valid(de_ne), .ex_mem_read(de_q.ctrl.mem_op == MEM_LW), .ex_rd(de_q.ctrl.rd),
    .id_rs1(ctrl.rs1), .id_use_rs1(ctrl.use_rs1),
    .id_rs2(ctrl.rs2), .id_use_rs2(ctrl.use_rs2),
    .stall(hazard));

  assign fire_d = fd_ne && de_nf && !hazard && !redirect;
  assign fd_deq = fire_d;
  assign de_enq = fire_d;
  assign de_in  = '{pc: fd_q.pc, ctrl: ctrl, rs1_val: rs1_val, rs2_val: rs2_val, imm: imm};

  // ---------------------------------------------------------------- EX
  fwd_sel_e        fwd_a, fwd_b;
  logic [XLEN-1:0] opa_reg, opb_reg, alu_a, alu_b, alu_y, br_target;
  logic            fire_x, br_taken;

  forward_unit u_fwd (
    .rs1(de_q.ctrl.rs1), .rs2(de_q.ctrl.rs2),
    .mem_valid(em_ne), .mem_reg_write(em_q.reg_write), .mem_rd(em_q.rd),
    .wb_valid(mw_ne), .wb_reg_write(mw_q.reg_write), .wb_rd(mw_q.rd),
    .fwd_a, .fwd_b);

  always_comb begin
    unique case (fwd_a)
      FWD_MEM: opa_reg = em_q.result;
      FWD_WB:  opa_reg = mw_q.wdata;
      default: opa_reg = de_q.rs1_val;
    endcase
    unique case (fwd_b)
      FWD_MEM: opb_reg = em_q.result;
      FWD_WB:  opb_reg = mw_q.wdata;
      default: opb_reg = de_q.rs2_val;
    endcase
  end

  assign alu_a = de_q.ctrl.a_is_pc  ? de_q.pc  : opa_reg;
  assign alu_b = de_q.ctrl.b_is_imm ? de_q.imm : opb_reg;

  alu u_alu (.op(de_q.ctrl.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  branch_unit u_branch (
    .is_branch(de_q.ctrl.is_branch), .is_jal(de_q.ctrl.is_jal), .funct3(de_q.ctrl.funct3),
    .a(opa_reg), .b(opb_reg), .pc(de_q.pc), .imm(de_q.imm),
    .taken(br_taken), .target(br_target));

  assign fire_x      = de_ne && em_nf;
  assign de_deq      = fire_x;
  assign em_enq      = fire_x;
  assign redirect    = fire_x && br_taken;
  assign redirect_pc = br_target;
  assign em_in = '{pc:        de_q.pc,
                   rd:        de_q.ctrl.rd,
                   reg_write: de_q.ctrl.reg_write,
                   mem_op:    de_q.ctrl.mem_op,
                   wb_sel:    de_q.ctrl.wb_sel,
                   result:    (de_q.ctrl.wb_sel == WB_PC4) ? de_q.pc + XLEN'(4) : alu_y,
                   store_val: opb_reg};

  // ---------------------------------------------------------------- MEM
  logic            fire_m, dm_we;
  logic [7:0]      dm_wstrb;
  logic [XLEN-1:0] dm_wdata, dm_rdata, ld_val;
  logic [31:0]     ld_word;

  assign fire_m = em_ne && mw_nf;
  assign em_deq = fire_m;
  assign dm_we  = fire_m && (em_q.mem_op == MEM_SW || em_q.mem_op == MEM_SD);

  always_comb begin
    if (em_q.mem_op == MEM_SD) begin
      dm_wstrb = 8'hFF;
      dm_wdata = em_q.store_val;
    end else begin
      dm_wstrb = em_q.result[2] ? 8'hF0 : 8'h0F;
      dm_wdata = {2{em_q.store_val[31:0]}};
    end
  end

  dmem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .addr(em_q.result), .we(dm_we), .wstrb(dm_wstrb), .wdata(dm_wdata), .rdata(dm_rdata));

  assign ld_word = em_q.result[2] ? dm_rdata[63:32] : dm_rdata[31:0];
  assign ld_val  = {{(XLEN-32){ld_word[31]}}, ld_word};

  assign mw_enq = fire_m;
  assign mw_in  = '{pc:        em_q.pc,
                    rd:        em_q.rd,
                    reg_write: em_q.reg_write,
                    wdata:     (em_q.wb_sel == WB_MEM) ? ld_val : em_q.result};

  // ---------------------------------------------------------------- WB
  assign mw_deq = mw_ne;
  assign wb_we  = mw_ne && mw_q.reg_write;

  assign retire_valid = mw_ne;
  assign retire_pc    = mw_q.pc;
  assign retire_we    = wb_we;
  assign retire_rd    = mw_q.rd;
  assign retire_data  = mw_q.wdata;

  // ---------------------------------------------------------------- status
  assign busy = running || fd_ne || de_ne || em_ne || mw_ne;

  perf_counters #(.W(64)) u_perf (
    .clk, .rst_n, .clear(start), .running(busy), .retire(mw_ne),
    .stall(fd_ne && hazard && de_nf && !redirect), .flush(redirect),
    .cycles, .instret, .stalls, .flushes);

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("rv64_pipeline: start while busy");

endmodule
