// fetch_unit: program counter and next-PC logic of the instruction-fetch stage.
//
// The PC register feeds the instruction memory. Each cycle that fetching is
// enabled and the IF/ID FIFO can take an entry, one instruction is fetched and
// the PC moves to pc+4; a taken branch or jump resolved in EX instead loads the
// branch target (the PCSrc select) and squashes the fetch of that cycle.
// start clears the PC to RESET_PC and enables fetching; halt disables it, after
// which the instructions in flight drain out of the pipeline. The +4 adder and
// the PCSrc mux follow the datapath of the design; the start/halt pair, the
// reset PC and the squash rule are choices of this implementation.
//
// Timing: pc and running are registers; fetch is combinational in can_fetch
// and redirect. start and halt act at the next rising edge.
module fetch_unit #(
  parameter int unsigned XLEN = 64,
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            halt,
  input  logic            can_fetch,
  input  logic            redirect,
  input  logic [XLEN-1:0] redirect_pc,
  output logic            running,
  output logic            fetch,
  output logic [XLEN-1:0] pc
);

  logic [XLEN-1:0] pc_plus4;

  assign pc_plus4 = pc + XLEN'(4);
  assign fetch    = running && can_fetch && !redirect;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      pc      <= RESET_PC;
    end else begin
      if (start) begin
        running <= 1'b1;
        pc      <= RESET_PC;
      end else begin
        if (halt) running <= 1'b0;
        if (redirect)   pc <= redirect_pc;
        else if (fetch) pc <= pc_plus4;
      end
    end
  end

endmodule
