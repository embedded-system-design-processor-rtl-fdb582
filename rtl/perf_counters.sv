// perf_counters: the clock register and event counters of the processor.
//
// cycles counts clock cycles while the processor is busy (fetching or holding
// instructions in flight), instret the instructions leaving write-back, stalls
// the cycles decode was held by a load-use hazard, flushes the taken branches
// and jumps that squashed younger instructions. clear (start of a run) zeroes
// all four. The cycle counter is the design's clock register; the event
// counters and their clear are additions of this implementation.
//
// Timing: registers, updated at the rising edge; clear wins over counting.
module perf_counters #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         running,
  input  logic         retire,
  input  logic         stall,
  input  logic         flush,
  output logic [W-1:0] cycles,
  output logic [W-1:0] instret,
  output logic [W-1:0] stalls,
  output logic [W-1:0] flushes
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycles  <= '0;
      instret <= '0;
      stalls  <= '0;
      flushes <= '0;
    end else if (clear) begin
      cycles  <= '0;
      instret <= '0;
      stalls  <= '0;
      flushes <= '0;
    end else begin
      if (running) cycles  <= cycles + W'(1);
      if (retire)  instret <= instret + W'(1);
      if (stall)   stalls  <= stalls + W'(1);
      if (flush)   flushes <= flushes + W'(1);
    end
  end

endmodule
