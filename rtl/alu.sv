// alu: the execute-stage arithmetic and logic unit.
//
// Computes y = op(a, b) for every operation of the ALU_op list: add, subtract,
// shifts, set-less-than, logic, the multiply group (low product and the three
// high-half forms) and the divide group (signed/unsigned quotient and
// remainder), plus LUI (y = b) and AUIPC (y = a + b, with a = pc). The
// immediate forms share the register forms' logic with b = immediate; shifts
// use the low 6 bits of b. The width is the package's XLEN (64). All
// operations complete in one cycle.
//
// One multiplier with operands sign- or zero-extended to 128 bits (per
// operation) serves all four multiplies; its product is kept to 128 bits.
// Division by zero and signed overflow give the RISC-V results: quotient all
// ones (unsigned) or -1, remainder = a;
// MIN / -1 gives MIN with remainder 0. The operations and their encoding follow
// the design; single-cycle multiply/divide is a choice of this implementation.
//
// Timing: combinational.
module alu
  import rv_pkg::*;
(
  input  alu_op_e         op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);

  localparam int unsigned SW = $clog2(XLEN);

  logic [SW-1:0]        shamt;
  logic                 a_sext, b_sext;
  logic [2*XLEN-1:0]    prod;
  logic [XLEN-1:0]      quot_s, rem_s, quot_u, rem_u;
  logic [XLEN-1:0]      min_int;

  assign shamt   = b[SW-1:0];
  assign min_int = {1'b1, {(XLEN-1){1'b0}}};

  // Sign extension of the multiplier operands.
  always_comb begin
    a_sext = 1'b0;
    b_sext = 1'b0;
    unique case (op)
      ALU_MULH:   begin a_sext = a[XLEN-1]; b_sext = b[XLEN-1]; end
      ALU_MULHSU: begin a_sext = a[XLEN-1]; end
      default: ;
    endcase
  end

  assign prod = $signed({{XLEN{a_sext}}, a}) * $signed({{XLEN{b_sext}}, b});

  // Division with the RISC-V corner cases.
  always_comb begin
    if (b == '0) begin
      quot_u = '1;
      rem_u  = a;
      quot_s = '1;
      rem_s  = a;
    end else begin
      quot_u = a / b;
      rem_u  = a % b;
      if (a == min_int && b == '1) begin
        quot_s = min_int;
        rem_s  = '0;
      end else begin
        quot_s = $signed(a) / $signed(b);
        rem_s  = $signed(a) % $signed(b);
      end
    end
  end

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_ADDI, ALU_AUIPC: y = a + b;
      ALU_SUB:                      y = a - b;
      ALU_SLL, ALU_SLLI:            y = a << shamt;
      ALU_SRL, ALU_SRLI:            y = a >> shamt;
      ALU_SRA, ALU_SRAI:            y = $unsigned($signed(a) >>> shamt);
      ALU_SLT, ALU_SLTI:            y = XLEN'($signed(a) < $signed(b));
      ALU_SLTU, ALU_SLTIU:          y = XLEN'(a < b);
      ALU_XOR, ALU_XORI:            y = a ^ b;
      ALU_OR, ALU_ORI:              y = a | b;
      ALU_AND, ALU_ANDI:            y = a & b;
      ALU_MUL:                      y = prod[XLEN-1:0];
      ALU_MULH, ALU_MULHSU,
      ALU_MULHU:                    y = prod[2*XLEN-1:XLEN];
      ALU_DIV:                      y = quot_s;
      ALU_DIVU:                     y = quot_u;
      ALU_REM:                      y = rem_s;
      ALU_REMU:                     y = rem_u;
      ALU_LUI:                      y = b;
      default:                      y = '0;
    endcase
  end

endmodule
