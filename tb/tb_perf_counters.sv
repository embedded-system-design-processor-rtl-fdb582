// tb_perf_counters: self-checking test of the clock register and counters.
//
// Random event inputs for 1000 cycles, counted again in the testbench; then
// clear must zero all four counters.
module tb_perf_counters;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear, running, retire, stall, flush;
  logic [63:0] cycles, instret, stalls, flushes;

  perf_counters #(.W(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint nc = 0, ni = 0, ns = 0, nf = 0;
    {clear, running, retire, stall, flush} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (cycles != 0 || instret != 0 || stalls != 0 || flushes != 0) failures++;
    repeat (1000) begin
      {running, retire, stall, flush} = 4'($urandom);
      nc += running; ni += retire; ns += stall; nf += flush;
      @(negedge clk);
      checks++;
      if (cycles != 64'(nc) || instret != 64'(ni) || stalls != 64'(ns) || flushes != 64'(nf)) begin
        failures++; $display("FAIL counts %0d %0d %0d %0d", cycles, instret, stalls, flushes);
      end
    end
    clear = 1; running = 1; retire = 1;
    @(negedge clk); clear = 0;
    checks++; if (cycles != 0 || instret != 0 || stalls != 0 || flushes != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
