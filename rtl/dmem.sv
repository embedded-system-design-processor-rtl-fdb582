// dmem: data memory of the memory-access stage.
//
// Byte-addressed memory of BYTES bytes (default 4 GiB, the design's data
// memory size), organised as 64-bit words. A write stores the bytes of wdata
// selected by wstrb into the word holding addr; the read returns that whole
// word combinationally, and the memory stage picks the 32-bit half for LW.
// Address bits above the memory size and below bit 3 are ignored here (the
// byte position is carried by wstrb and the caller's lane select). Contents
// are not reset.
//
// The storage is split into banks of at most 1 GiB (2^27 words), selected by
// the address bits above the bank size: simulators and front ends limit the
// size of a single array, and a bank of this size is accepted by all of them.
// BYTES and MAX_BANK_BYTES must be powers of two of at least 8.
//
// Timing: write at the rising edge; read combinational.
module dmem #(
  parameter longint unsigned BYTES          = 64'd4294967296,
  parameter longint unsigned MAX_BANK_BYTES = 64'd1073741824
) (
  input  logic        clk,
  input  logic [63:0] addr,
  input  logic        we,
  input  logic [7:0]  wstrb,
  input  logic [63:0] wdata,
  output logic [63:0] rdata
);

  localparam longint unsigned BANK_BYTES = (BYTES > MAX_BANK_BYTES) ? MAX_BANK_BYTES : BYTES;
  localparam int unsigned     NBANK      = int'(BYTES / BANK_BYTES);
  localparam longint unsigned BANK_WORDS = BANK_BYTES / 8;
  localparam int unsigned     BW         = $clog2(BANK_WORDS);
  localparam int unsigned     SW         = (NBANK > 1) ? $clog2(NBANK) : 1;

  logic [BW-1:0] idx;
  logic [SW-1:0] bsel;
  logic [63:0]   bank_rdata [NBANK];

  assign idx  = addr[BW+2:3];
  assign bsel = (NBANK > 1) ? addr[BW+3 +: SW] : '0;

  for (genvar g = 0; g < int'(NBANK); g++) begin : g_bank
    logic [7:0][7:0] mem [BANK_WORDS];

    always_ff @(posedge clk) begin
      if (we && bsel == SW'(g)) begin
        for (int i = 0; i < 8; i++) begin
          if (wstrb[i]) mem[idx][i] <= wdata[8*i +: 8];
        end
      end
    end

    assign bank_rdata[g] = mem[idx];
  end

  assign rdata = bank_rdata[bsel];

endmodule
