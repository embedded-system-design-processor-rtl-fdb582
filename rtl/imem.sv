// imem: instruction memory.
//
// Byte-addressed memory of BYTES bytes (default 4 GiB, the design's
// instruction memory size) holding 32-bit instructions, stored as 64-bit words
// with two instructions each (bit 2 of the address picks the half). The load
// port writes one instruction per cycle before a program runs; the fetch port
// reads asynchronously, so the fetch stage takes one cycle. Address bits above
// the memory size are ignored and bits 1:0 are taken as zero.
//
// The storage is split into banks of at most 1 GiB (2^27 words), selected by
// the address bits above the bank size: simulators and front ends limit the
// size of a single array, and a bank of this size is accepted by all of them.
// BYTES and MAX_BANK_BYTES must be powers of two of at least 8.
//
// Timing: write at the rising edge; read combinational.
module imem #(
  parameter longint unsigned BYTES          = 64'd4294967296,
  parameter longint unsigned MAX_BANK_BYTES = 64'd1073741824
) (
  input  logic        clk,
  input  logic        we,
  input  logic [63:0] waddr,
  input  logic [31:0] wdata,
  input  logic [63:0] raddr,
  output logic [31:0] rdata
);

  localparam longint unsigned BANK_BYTES = (BYTES > MAX_BANK_BYTES) ? MAX_BANK_BYTES : BYTES;
  localparam int unsigned     NBANK      = int'(BYTES / BANK_BYTES);
  localparam longint unsigned BANK_WORDS = BANK_BYTES / 8;
  localparam int unsigned     BW         = $clog2(BANK_WORDS);
  localparam int unsigned     SW         = (NBANK > 1) ? $clog2(NBANK) : 1;

  logic [BW-1:0]    widx, ridx;
  logic [SW-1:0]    wsel, rsel;
  logic [1:0][31:0] bank_rdata [NBANK];

  assign widx = waddr[BW+2:3];
  assign ridx = raddr[BW+2:3];
  assign wsel = (NBANK > 1) ? waddr[BW+3 +: SW] : '0;
  assign rsel = (NBANK > 1) ? raddr[BW+3 +: SW] : '0;

  for (genvar g = 0; g < int'(NBANK); g++) begin : g_bank
    logic [1:0][31:0] mem [BANK_WORDS];

    always_ff @(posedge clk) begin
      if (we && wsel == SW'(g)) mem[widx][waddr[2]] <= wdata;
    end

    assign bank_rdata[g] = mem[ridx];
  end

  assign rdata = bank_rdata[rsel][raddr[2]];

endmodule
