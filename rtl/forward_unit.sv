// forward_unit: operand forwarding for the execute stage.
//
// For each source register of the instruction in EX it picks the newest value:
// the EX/MEM entry's result if that instruction writes the register, else the
// MEM/WB entry's write data, else the value read in decode. x0 is never
// forwarded. A load in EX/MEM is never the source, because the hazard unit
// keeps its consumer out of EX for that cycle.
//
// Timing: combinational.
module forward_unit
  import rv_pkg::*;
(
  input  logic [4:0] rs1,
  input  logic [4:0] rs2,
  input  logic       mem_valid,
  input  logic       mem_reg_write,
  input  logic [4:0] mem_rd,
  input  logic       wb_valid,
  input  logic       wb_reg_write,
  input  logic [4:0] wb_rd,
  output fwd_sel_e   fwd_a,
  output fwd_sel_e   fwd_b
);

  function automatic fwd_sel_e pick(input logic [4:0] rs);
    if (rs == 5'd0)                                       return FWD_REG;
    else if (mem_valid && mem_reg_write && mem_rd == rs)  return FWD_MEM;
    else if (wb_valid && wb_reg_write && wb_rd == rs)     return FWD_WB;
    else                                                  return FWD_REG;
  endfunction

  assign fwd_a = pick(rs1);
  assign fwd_b = pick(rs2);

endmodule
