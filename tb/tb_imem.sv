// tb_imem: self-checking test of the instruction memory (small size).
//
// Loads 256 random instructions at consecutive word addresses through the
// load port, then reads them all back through the fetch port, checking that
// each half of a 64-bit storage word is kept apart and that bits above the
// memory size are ignored. Banks of 256 bytes are used, so that bank
// selection is exercised.
module tb_imem;
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [63:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] ref_m [256];

  imem #(.BYTES(64'd1024), .MAX_BANK_BYTES(64'd256)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      ref_m[i] = $urandom;
      we = 1; waddr = 64'(4 * i); wdata = ref_m[i];
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 256; i++) begin
      raddr = 64'(4 * i);
      #1;
      checks++;
      if (rdata !== ref_m[i]) begin failures++; $display("FAIL addr %0d", 4 * i); end
    end
    raddr = 64'h1_0000_0000 + 64'd20;  // aliases address 20
    #1; checks++; if (rdata !== ref_m[5]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
