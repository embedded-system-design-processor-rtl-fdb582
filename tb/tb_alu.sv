// tb_alu: self-checking test of the ALU.
//
// Drives every operation with directed corner values (zero, one, all ones, the
// most negative number, division by zero, MIN / -1) and with random operands,
// and compares y with a reference written here from the RISC-V definitions:
// the multiply high halves are built from 32-bit partial products and the
// signed divide from the unsigned one with sign fix-up, not from the ALU's own
// formulation. The ALU is combinational; each vector is checked 1 ns after it
// is applied.
module tb_alu;
  import rv_pkg::*;

  int checks = 0, failures = 0;
  alu_op_e op;
  logic [63:0] a, b, y;

  alu dut (.op, .a, .b, .y);

  function automatic logic [127:0] umul(input logic [63:0] x, input logic [63:0] z);
    logic [127:0] acc = '0;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++)
        acc += (128'(x[32*i +: 32]) * 128'(z[32*j +: 32])) << (32 * (i + j));
    return acc;
  endfunction

  function automatic logic [63:0] ref_hi(input alu_op_e o, input logic [63:0] x, input logic [63:0] z);
    logic [127:0] p = umul(x, z);
    logic [63:0]  hi = p[127:64];
    // signed corrections of the unsigned high half
    if (o == ALU_MULH || o == ALU_MULHSU) if (x[63]) hi -= z;
    if (o == ALU_MULH) if (z[63]) hi -= x;
    return hi;
  endfunction

  function automatic logic [63:0] ref_y(input alu_op_e o, input logic [63:0] x, input logic [63:0] z);
    logic [63:0] ax, az, q, r;
    int sh = int'(z[5:0]);
    case (o)
      ALU_ADD, ALU_ADDI, ALU_AUIPC: return x + z;
      ALU_SUB:             return x + ~z + 64'd1;
      ALU_SLL, ALU_SLLI:   return x << sh;
      ALU_SRL, ALU_SRLI:   return x >> sh;
      ALU_SRA, ALU_SRAI:   return (x >> sh) | (x[63] ? ~(64'hFFFF_FFFF_FFFF_FFFF >> sh) : 64'd0);
      ALU_SLT, ALU_SLTI:   return (x[63] != z[63]) ? 64'(x[63]) : 64'(x < z);
      ALU_SLTU, ALU_SLTIU: return 64'(x < z);
      ALU_XOR, ALU_XORI:   return x ^ z;
      ALU_OR, ALU_ORI:     return x | z;
      ALU_AND, ALU_ANDI:   return x & z;
      ALU_MUL:             return 64'(umul(x, z));
      ALU_MULH, ALU_MULHSU, ALU_MULHU: return ref_hi(o, x, z);
      ALU_DIVU:            return (z == 0) ? '1 : x / z;
      ALU_REMU:            return (z == 0) ? x : x % z;
      ALU_DIV, ALU_REM: begin
        if (z == 0) return (o == ALU_DIV) ? '1 : x;
        ax = x[63] ? -x : x;
        az = z[63] ? -z : z;
        q = ax / az;
        r = ax % az;
        if (x[63] != z[63]) q = -q;
        if (x[63]) r = -r;
        return (o == ALU_DIV) ? q : r;
      end
      ALU_LUI:             return z;
      default:             return '0;
    endcase
  endfunction

  task automatic apply(input alu_op_e o, input logic [63:0] x, input logic [63:0] z);
    logic [63:0] e;
    op = o; a = x; b = z;
    #1;
    e = ref_y(o, x, z);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL %s a=%h b=%h y=%h expected=%h", o.name(), x, z, y, e);
    end
  endtask

  localparam logic [63:0] MIN = 64'h8000_0000_0000_0000;
  logic [63:0] corner [7] = '{64'd0, 64'd1, '1, MIN, 64'h7FFF_FFFF_FFFF_FFFF, 64'd63, 64'hFFFF_FFFF_0000_0007};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e o;
    // encoding of the operation list
    checks++; if (ALU_ADD != 5'd0 || ALU_SUB != 5'd1 || ALU_SLL != 5'd2 || ALU_SRAI != 5'd28) failures++;
    o = o.first();
    forever begin
      foreach (corner[i]) foreach (corner[j]) apply(o, corner[i], corner[j]);
      repeat (200) apply(o, {$urandom, $urandom}, {$urandom, $urandom});
      repeat (50) apply(o, {$urandom, $urandom}, 64'($urandom_range(0, 40)));
      if (o == o.last()) break;
      o = o.next();
    end
    // a few fixed results worked out by hand
    apply(ALU_DIV, MIN, '1);
    checks++; if (y !== MIN) failures++;
    apply(ALU_REM, 64'(-7), 64'd2);
    checks++; if (y !== 64'(-1)) failures++;
    apply(ALU_MULHU, '1, '1);
    checks++; if (y !== 64'hFFFF_FFFF_FFFF_FFFE) failures++;
    apply(ALU_MULH, '1, '1);
    checks++; if (y !== 64'd0) failures++;
    apply(ALU_SRA, MIN, 64'd63);
    checks++; if (y !== '1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
