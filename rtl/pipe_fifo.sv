// pipe_fifo: one-entry pipeline FIFO used for every inter-stage register
// (IF/ID, ID/EX, EX/MEM, MEM/WB).
//
// Each pipeline stage of the processor is a rule that takes the first entry of
// its input FIFO and enqueues its result into the next one; the stage fires only
// when the input holds an entry and the output can take one. This FIFO holds one
// entry and a valid bit. It can be written when it is empty or when its entry is
// dequeued in the same cycle (not_full depends combinationally on deq), so a
// full pipeline still moves one step per cycle, as a pipeline register does.
// clear empties it for a flush and wins over enq.
//
// Timing: enq and deq take effect at the rising clock edge; first and not_empty
// are register outputs. Enqueueing while not_full is low is a protocol error
// and is caught by an assertion. The depth of one and the clear input are
// choices of this implementation; FIFOs between stages follow the design.
module pipe_fifo #(
  parameter type T = logic [63:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enq,
  input  T     enq_data,
  input  logic deq,
  input  logic clear,
  output logic not_empty,
  output logic not_full,
  output T     first
);

  logic valid_q;
  T     data_q;

  assign not_empty = valid_q;
  assign not_full  = !valid_q || deq;
  assign first     = data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
    end else if (clear) begin
      valid_q <= 1'b0;
    end else if (enq) begin
      valid_q <= 1'b1;
    end else if (deq) begin
      valid_q <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (enq && !clear) data_q <= enq_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) enq && !clear |-> not_full)
    else $error("pipe_fifo: enq while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) deq && !clear |-> valid_q)
    else $error("pipe_fifo: deq while empty");

endmodule
