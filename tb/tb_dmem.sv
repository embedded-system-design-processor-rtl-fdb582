// tb_dmem: self-checking test of the data memory (small size).
//
// Writes random data with random byte strobes at random word addresses and
// compares each read with a byte-array model kept in the testbench; checks that
// words written earlier are not disturbed. Banks of 1 KiB are used, so that
// bank selection is exercised.
module tb_dmem;
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [63:0] addr, wdata, rdata;
  logic [7:0]  wstrb;
  logic [7:0]  ref_b [4096];
  logic [63:0] e;

  dmem #(.BYTES(64'd4096), .MAX_BANK_BYTES(64'd1024)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = '0; wdata = '0; wstrb = '0;
    @(negedge clk);
    // write every word once so the model is fully known
    for (int w = 0; w < 512; w++) begin
      we = 1; addr = 64'(8 * w); wstrb = 8'hFF; wdata = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) ref_b[8 * w + k] = wdata[8 * k +: 8];
      @(negedge clk);
    end
    repeat (2000) begin
      int w;
      w = $urandom_range(0, 511);
      we = ($urandom_range(0, 1) == 1); addr = 64'(8 * w) + 64'($urandom_range(0, 7));
      wstrb = 8'($urandom); wdata = {$urandom, $urandom};
      #1;
      for (int k = 0; k < 8; k++) e[8 * k +: 8] = ref_b[8 * w + k];
      checks++;
      if (rdata !== e) begin failures++; $display("FAIL read word %0d", w); end
      if (we) for (int k = 0; k < 8; k++) if (wstrb[k]) ref_b[8 * w + k] = wdata[8 * k +: 8];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
