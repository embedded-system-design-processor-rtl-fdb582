// tb_rv_iss: reference instruction-set model for the processor testbenches.
//
// A class that executes the processor's instruction set one instruction at a
// time, straight from the RISC-V definitions (RV64I subset, M extension, LW,
// SW, SD, branches, JAL), on its own register array and byte-array data
// memory. Instructions the processor treats as no-operations do nothing here
// either. step() returns what the instruction writes so that a testbench can
// compare it with the processor's retire port.
package tb_rv_iss;

  class rv_iss;
    logic [63:0] x [32];
    logic [63:0] pc;
    logic [31:0] imem [];
    logic [7:0]  dmem [];

    function new(int imem_words, int dmem_bytes);
      imem = new[imem_words];
      dmem = new[dmem_bytes];
      foreach (x[i]) x[i] = '0;
      pc = '0;
    endfunction

    static function logic [63:0] sx(input logic [63:0] v, input int bits);
      logic [63:0] m = 64'd1 << (bits - 1);
      v = v & ((64'd1 << bits) - 1);
      return (v ^ m) - m;
    endfunction

    static function logic [63:0] mulhi(input logic [63:0] a, input logic [63:0] b, input bit sa, input bit sb);
      logic signed [128:0] pa, pb;
      logic signed [257:0] p;
      pa = sa ? 129'($signed(a)) : 129'(a);
      pb = sb ? 129'($signed(b)) : 129'(b);
      p = 258'(pa) * 258'(pb);
      return p[127:64];
    endfunction

    function logic [63:0] ld32(input logic [63:0] addr);
      logic [31:0] w;
      int unsigned a = int'(addr) % dmem.size();
      for (int k = 0; k < 4; k++) w[8*k +: 8] = dmem[a + k];
      return sx(64'(w), 32);
    endfunction

    function void st(input logic [63:0] addr, input logic [63:0] v, input int nbytes);
      int unsigned a = int'(addr) % dmem.size();
      for (int k = 0; k < nbytes; k++) dmem[a + k] = v[8*k +: 8];
    endfunction

    // Executes the instruction at pc. Returns 1 and the destination/value if a
    // register (other than x0) is written.
    function bit step(output logic [4:0] rd_o, output logic [63:0] val_o);
      logic [31:0] ins = imem[(pc >> 2) % imem.size()];
      logic [6:0] op = ins[6:0];
      logic [2:0] f3 = ins[14:12];
      logic [6:0] f7 = ins[31:25];
      logic [4:0] rd = ins[11:7];
      logic [63:0] a = x[ins[19:15]], b = x[ins[24:20]];
      logic [63:0] ii = sx(64'(ins[31:20]), 12);
      logic [63:0] is = sx(64'({ins[31:25], ins[11:7]}), 12);
      logic [63:0] ib = sx(64'({ins[31], ins[7], ins[30:25], ins[11:8], 1'b0}), 13);
      logic [63:0] iu = sx(64'({ins[31:12], 12'd0}), 32);
      logic [63:0] ij = sx(64'({ins[31], ins[19:12], ins[20], ins[30:21], 1'b0}), 21);
      logic [63:0] npc = pc + 4;
      logic [63:0] v = '0;
      bit w = 0, ok;
      int sh;
      case (op)
        7'b0110011: begin
          w = 1;
          sh = int'(b[5:0]);
          case ({f7, f3})
            {7'h00, 3'd0}: v = a + b;
            {7'h20, 3'd0}: v = a - b;
            {7'h00, 3'd1}: v = a << sh;
            {7'h00, 3'd2}: v = 64'($signed(a) < $signed(b));
            {7'h00, 3'd3}: v = 64'(a < b);
            {7'h00, 3'd4}: v = a ^ b;
            {7'h00, 3'd5}: v = a >> sh;
            {7'h20, 3'd5}: v = $signed(a) >>> sh;
            {7'h00, 3'd6}: v = a | b;
            {7'h00, 3'd7}: v = a & b;
            {7'h01, 3'd0}: v = a * b;
            {7'h01, 3'd1}: v = mulhi(a, b, 1, 1);
            {7'h01, 3'd2}: v = mulhi(a, b, 1, 0);
            {7'h01, 3'd3}: v = mulhi(a, b, 0, 0);
            {7'h01, 3'd4}: begin
              if (b == 0) v = '1;
              else if (a == 64'h8000_0000_0000_0000 && b == '1) v = a;
              else v = $signed(a) / $signed(b);
            end
            {7'h01, 3'd5}: v = (b == 0) ? '1 : a / b;
            {7'h01, 3'd6}: begin
              if (b == 0) v = a;
              else if (a == 64'h8000_0000_0000_0000 && b == '1) v = '0;
              else v = $signed(a) % $signed(b);
            end
            {7'h01, 3'd7}: v = (b == 0) ? a : a % b;
            default: w = 0;
          endcase
        end
        7'b0010011: begin
          w = 1;
          sh = int'(ins[25:20]);
          case (f3)
            3'd0: v = a + ii;
            3'd2: v = 64'($signed(a) < $signed(ii));
            3'd3: v = 64'(a < ii);
            3'd4: v = a ^ ii;
            3'd6: v = a | ii;
            3'd7: v = a & ii;
            3'd1: if (ins[31:26] == 0) v = a << sh; else w = 0;
            default: if (ins[31:26] == 0) v = a >> sh;
                     else if (ins[31:26] == 6'b010000) v = $signed(a) >>> sh;
                     else w = 0;
          endcase
        end
        7'b0110111: begin w = 1; v = iu; end
        7'b0010111: begin w = 1; v = pc + iu; end
        7'b0000011: if (f3 == 3'd2) begin w = 1; v = ld32(a + ii); end
        7'b0100011: begin
          if (f3 == 3'd2) st(a + is, b, 4);
          if (f3 == 3'd3) st(a + is, b, 8);
        end
        7'b1100011: begin
          case (f3)
            3'd0: ok = (a == b);
            3'd1: ok = (a != b);
            3'd4: ok = ($signed(a) < $signed(b));
            3'd5: ok = ($signed(a) >= $signed(b));
            3'd6: ok = (a < b);
            3'd7: ok = (a >= b);
            default: ok = 0;
          endcase
          if (ok) npc = pc + ib;
        end
        7'b1101111: begin w = 1; v = pc + 4; npc = pc + ij; end
        default: ;
      endcase
      pc = npc;
      rd_o = rd;
      val_o = v;
      if (w && rd != 0) begin
        x[rd] = v;
        return 1;
      end
      return 0;
    endfunction
  endclass

endpackage
