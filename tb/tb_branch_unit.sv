// tb_branch_unit: self-checking test of branch resolution.
//
// For random operands, including equal and sign-differing pairs, checks the
// taken decision of each branch condition, JAL (always taken), the target
// pc + imm, and that nothing is taken when neither flag is set.
module tb_branch_unit;
  import rv_pkg::*;
  int checks = 0, failures = 0;
  logic is_branch, is_jal, taken;
  logic [2:0] funct3;
  logic [63:0] a, b, pc, imm, target;

  branch_unit dut (.*);

  function automatic bit exp_taken(input logic [2:0] f, input logic [63:0] x, input logic [63:0] y);
    longint sx = x, sy = y;
    case (f)
      3'd0: return x == y;
      3'd1: return x != y;
      3'd4: return sx < sy;
      3'd5: return sx >= sy;
      3'd6: return x < y;
      3'd7: return x >= y;
      default: return 0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) begin
      is_branch = $urandom_range(0, 2) != 0;
      is_jal = !is_branch && $urandom_range(0, 1);
      funct3 = 3'($urandom);
      a = {$urandom, $urandom};
      case ($urandom_range(0, 3))
        0: b = a;
        1: b = {~a[63], a[62:0]};
        default: b = {$urandom, $urandom};
      endcase
      pc = {$urandom, $urandom} & ~64'd3;
      imm = 64'($signed(13'($urandom))) & ~64'd1;
      #1;
      checks++;
      if (taken !== (is_jal || (is_branch && exp_taken(funct3, a, b))) || target !== pc + imm) begin
        failures++;
        $display("FAIL f3=%0d a=%h b=%h taken=%b", funct3, a, b, taken);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
