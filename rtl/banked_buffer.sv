// banked_buffer: byte-addressed on-chip buffer split into BANKS cyclic banks.
//
// Byte address a lives in bank (a mod BANKS) at row (a div BANKS). The write
// port takes one packed word of BANKS bytes and stores all of them in one cycle
// at one row, byte 0 of the word (bits 7:0) going to bank 0. The read port reads
// one byte per cycle. This is the array partitioning of the input buffers: a
// 32-bit word from the host fills four bytes at once, while the compute loop
// still reads the single byte it needs each cycle.
//
// Timing: the read is synchronous. rdata shows the byte at raddr from the cycle
// after a cycle with re high, and holds while re is low, so a stalled pipeline
// keeps its operand. A read and a write of the same row in one cycle return the
// old byte. Contents are not reset. The split into four banks follows from the
// four-values-per-word packing; the sizes are this design's choice.
module banked_buffer #(
  parameter int unsigned BYTES = 401408,
  parameter int unsigned BANKS = 4
) (
  input  logic                         clk,
  // word write port
  input  logic                         we,
  input  logic [$clog2(BYTES/BANKS)-1:0] wrow,
  input  logic [BANKS*8-1:0]           wdata,
  // byte read port
  input  logic                         re,
  input  logic [$clog2(BYTES)-1:0]     raddr,
  output logic [7:0]                   rdata
);
  localparam int unsigned ROWS = BYTES / BANKS;
  localparam int unsigned RW   = $clog2(ROWS);
  localparam int unsigned BW   = $clog2(BANKS);

  logic [BW-1:0] rbank, rbank_q;
  logic [RW-1:0] rrow;
  logic [7:0]    bank_q [BANKS];

  assign rbank = raddr[BW-1:0];
  assign rrow  = RW'(raddr >> BW);

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [7:0] mem [ROWS];
    always_ff @(posedge clk) begin
      if (we) mem[wrow] <= wdata[b*8 +: 8];
      if (re) bank_q[b] <= mem[rrow];
    end
  end

  always_ff @(posedge clk) begin
    if (re) rbank_q <= rbank;
  end

  assign rdata = bank_q[rbank_q];

  initial begin
    assert (BANKS >= 2 && (BANKS & (BANKS - 1)) == 0)
      else $fatal(1, "banked_buffer: BANKS must be a power of two >= 2");
    assert (BYTES % BANKS == 0)
      else $fatal(1, "banked_buffer: BYTES must be a multiple of BANKS");
  end

endmodule
