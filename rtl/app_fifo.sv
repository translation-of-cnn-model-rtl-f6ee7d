// app_fifo: synchronous application FIFO between the host link and the
// accelerator.
//
// One of these sits on each side of the accelerator, as in the system diagram:
// the host side writes with wr_en/din and watches full, or reads with rd_en/dout
// and watches empty. The storage is a plain array of DEPTH words addressed by
// read and write pointers one bit wider than the index, so full and empty are
// told apart by the extra bit. DEPTH must be a power of two.
//
// Timing: with SHOW_AHEAD = 0, dout is registered and holds the popped word from
// the cycle after rd_en (the convention of the host link's FIFOs). With
// SHOW_AHEAD = 1, dout shows the head word whenever empty is low and rd_en pops
// it. A write to a full FIFO and a read from an empty one are ignored and
// flagged by assertions. Writing and reading in the same cycle is allowed.
// Reset empties the FIFO. The widths follow the 32-bit host bus; the depth and
// the two read modes are this design's choice.
module app_fifo #(
  parameter int unsigned WIDTH      = 32,
  parameter int unsigned DEPTH      = 512,
  parameter bit          SHOW_AHEAD = 1'b0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (wptr == rptr);
  assign full  = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  if (SHOW_AHEAD) begin : g_fwft
    assign dout = mem[rptr[AW-1:0]];
  end else begin : g_std
    logic [WIDTH-1:0] dout_q;
    always_ff @(posedge clk) begin
      if (rst)        dout_q <= '0;
      else if (do_rd) dout_q <= mem[rptr[AW-1:0]];
    end
    assign dout = dout_q;
  end

  // Handshake rules of the FIFO interface.
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) wr_en |-> !full)
    else $error("app_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) rd_en |-> !empty)
    else $error("app_fifo: read while empty");

endmodule
