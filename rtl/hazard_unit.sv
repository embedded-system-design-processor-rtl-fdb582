// hazard_unit: load-use hazard detection.
//
// A load's data is known only after the memory stage, one cycle too late to be
// forwarded to an instruction that follows it directly. When the ID/EX FIFO
// holds a load (MemRead) whose destination is a register (not x0) that the
// instruction in decode reads, stall is raised: decode does not fire, so the
// dependent instruction waits one cycle and the load moves on, leaving a bubble
// in EX. The value then reaches it through the MEM/WB forwarding path.
//
// Timing: combinational.
module hazard_unit (
  input  logic       ex_valid,
  input  logic       ex_mem_read,
  input  logic [4:0] ex_rd,
  input  logic [4:0] id_rs1,
  input  logic       id_use_rs1,
  input  logic [4:0] id_rs2,
  input  logic       id_use_rs2,
  output logic       stall
);

  assign stall = ex_valid && ex_mem_read && (ex_rd != 5'd0) &&
                 ((id_use_rs1 && id_rs1 == ex_rd) || (id_use_rs2 && id_rs2 == ex_rd));

endmodule
