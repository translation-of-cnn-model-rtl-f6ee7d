// byte_pack: packs 8-bit results four to a 32-bit word for the host.
//
// Each cycle with in_valid high adds in_byte to the word under construction,
// the first byte of a word going to bits 7:0. When the fourth byte arrives the
// complete word is presented on out_word with out_valid high in that same cycle
// (combinationally), so the caller writes it into the output FIFO together with
// the fourth byte. flush, given when no byte is offered, emits a partly filled
// word with its unused upper bytes zero; with nothing collected flush emits
// nothing. The caller must only offer a byte or flush while the FIFO has room.
// Packing four values per word follows the description; the byte order and the
// zero fill are this design's choice.
module byte_pack (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic [7:0]  in_byte,
  input  logic        flush,
  output logic        out_valid,
  output logic [31:0] out_word,
  output logic        pending     // some bytes are waiting for a flush
);
  logic [1:0]  cnt;
  logic [23:0] held;

  always_comb begin
    out_valid = 1'b0;
    out_word  = '0;
    if (in_valid && cnt == 2'd3) begin
      out_valid = 1'b1;
      out_word  = {in_byte, held};
    end else if (flush && !in_valid && cnt != 2'd0) begin
      out_valid = 1'b1;
      unique case (cnt)
        2'd1:    out_word = {24'd0, held[7:0]};
        2'd2:    out_word = {16'd0, held[15:0]};
        default: out_word = {8'd0, held};
      endcase
    end
  end

  assign pending = (cnt != 2'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      held <= '0;
    end else if (in_valid) begin
      cnt <= cnt + 2'd1;
      unique case (cnt)
        2'd0:    held <= {16'd0, in_byte};
        2'd1:    held[15:8]  <= in_byte;
        2'd2:    held[23:16] <= in_byte;
        default: held <= '0;
      endcase
    end else if (flush) begin
      cnt  <= '0;
      held <= '0;
    end
  end

  a_flush_alone: assert property (@(posedge clk) disable iff (rst) !(flush && in_valid))
    else $error("byte_pack: flush together with a byte");

endmodule
