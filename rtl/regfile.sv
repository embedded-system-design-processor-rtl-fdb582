// regfile: the 32 x 64-bit integer register file.
//
// Two combinational read ports feed the decode stage, one write port is driven
// by write-back, and a third read port (dbg) returns results to the outside.
// Register x0 always reads zero and ignores writes. A write in the same cycle
// as a read of the same register is passed straight to the read port, which is
// the register file's "write in the first half, read in the second" of a
// classic five-stage pipeline: write-back therefore never needs a forwarding
// path into decode. All registers are cleared by reset (a choice of this
// implementation; the design does not state a reset value).
//
// Timing: write at the rising edge; reads combinational.
module regfile #(
  parameter int unsigned XLEN  = 64,
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] raddr1,
  output logic [XLEN-1:0]          rdata1,
  input  logic [$clog2(NREGS)-1:0] raddr2,
  output logic [XLEN-1:0]          rdata2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [XLEN-1:0]          wdata,
  input  logic [$clog2(NREGS)-1:0] dbg_addr,
  output logic [XLEN-1:0]          dbg_data
);

  localparam int unsigned AW = $clog2(NREGS);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  function automatic logic [XLEN-1:0] rd_port(input logic [AW-1:0] a);
    if (a == '0)                 return '0;
    else if (we && waddr == a)   return wdata;
    else                         return regs[a];
  endfunction

  assign rdata1   = rd_port(raddr1);
  assign rdata2   = rd_port(raddr2);
  assign dbg_data = (dbg_addr == '0) ? '0 : regs[dbg_addr];

endmodule
