// tb_pipe_fifo: self-checking test of the one-entry pipeline FIFO.
//
// A random producer and a random consumer move 2000 numbered entries through
// the FIFO, obeying not_full/not_empty; the consumer checks that they arrive in
// order and unchanged. Directed steps check that a full FIFO accepts an enq in
// the cycle it is dequeued (full throughput), that clear empties it and beats
// enq, and that reset leaves it empty.
module tb_pipe_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic enq, deq, clear, not_empty, not_full;
  logic [63:0] enq_data, first;

  pipe_fifo #(.T(logic [63:0])) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sent = 0, got = 0, cyc = 0;
    enq = 0; deq = 0; clear = 0; enq_data = '0;
    repeat (2) @(posedge clk);
    #1 check(!not_empty && not_full, "empty after reset");
    rst_n = 1;
    // throughput: enq every cycle, deq every cycle once full
    @(negedge clk); enq = 1; enq_data = 64'd100;
    @(negedge clk); check(not_empty && first == 64'd100, "first after enq");
    deq = 1; enq_data = 64'd101;
    #1;
    check(not_full, "not_full while dequeued");
    @(negedge clk); check(not_empty && first == 64'd101, "enq+deq same cycle");
    // clear beats enq
    clear = 1; deq = 0; enq = 1; enq_data = 64'd102;
    @(negedge clk); check(!not_empty, "clear empties");
    clear = 0; enq = 0;
    // random traffic
    while (got < 2000) begin
      enq = 0; deq = 0;
      if (not_empty && ($urandom_range(0, 3) != 0)) begin
        deq = 1;
        check(first == 64'(got * 7 + 3), "order/data");
        got++;
      end
      #0;
      if (sent < 2000 && not_full && ($urandom_range(0, 3) != 0)) begin
        enq = 1; enq_data = 64'(sent * 7 + 3); sent++;
      end
      @(negedge clk);
      cyc++;
    end
    check(cyc < 4000, "throughput of random traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
