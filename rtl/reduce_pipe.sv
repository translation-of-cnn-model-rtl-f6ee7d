// reduce_pipe: COMP and WRITE stages of the layer engine's pipelined loop.
//
// The controller runs the READ stage: each cycle it issues one tap of the loop
// nest to the buffers, and one cycle later the tap arrives here with the input
// byte (in_act), the weight byte (in_wgt) and its tags: first and last tap of an
// output element, and pad (a tap that falls in the zero border of a 3x3
// convolution). COMP folds the tap into the accumulator: a signed 8x8 multiply
// and add for a convolution, a running maximum for max-pool, a running sum for
// the average pool. When the last tap is folded in, the total moves to the WRITE
// stage, which turns it into one 8-bit output: for a convolution bias + sum,
// scaled down by 2^shift with rounding, optional leaky activation, saturation;
// for the average pool the sum divided by the map area, rounded; for max-pool the
// maximum itself. So each stage takes one cycle and a new tap enters every
// cycle, as in the pipelined READ/COMP/WRITE schedule.
//
// Timing: out_valid/out_byte appear two cycles after the tap's issue (one after
// in_valid). stall freezes both stages, holding out_valid and out_byte, so the
// consumer simply takes the byte on a cycle with out_valid and no stall. The
// fixed-point rules (8-bit data, 32-bit accumulator, shift, leaky slope 13/128)
// are this design's reading of the 8-bit fixed-point conversion.
module reduce_pipe
  import cnn_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        stall,
  // COMP stage input, aligned with the buffers' read data
  input  logic        in_valid,
  input  logic        in_first,
  input  logic        in_last,
  input  logic        in_pad,
  input  px_t         in_act,
  input  px_t         in_wgt,
  // layer configuration, stable during a layer
  input  layer_kind_e kind,
  input  acc_t        bias,
  input  logic [4:0]  shift,
  input  logic        leaky,
  input  logic [17:0] area,
  // WRITE stage output
  output logic        out_valid,
  output px_t         out_byte,
  output logic        busy          // a tap or a result is in the stages
);
  acc_t acc_q, acc_next, res_q;
  acc_t term;
  logic acc_live;                   // accumulator holds a partial element

  always_comb begin
    term = in_pad ? acc_t'(0) : acc_t'(in_act);
    unique case (kind)
      LK_CONV: begin
        term     = in_pad ? acc_t'(0) : acc_t'(in_act) * acc_t'(in_wgt);
        acc_next = in_first ? term : acc_q + term;
      end
      LK_MAX:  acc_next = (in_first || term > acc_q) ? term : acc_q;
      default: acc_next = in_first ? term : acc_q + term;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q     <= '0;
      acc_live  <= 1'b0;
      res_q     <= '0;
      out_valid <= 1'b0;
    end else if (!stall) begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        acc_q    <= acc_next;
        acc_live <= !in_last;
        if (in_last) res_q <= acc_next;
      end
    end
  end

  always_comb begin
    unique case (kind)
      LK_CONV: out_byte = requant(res_q, bias, shift, leaky);
      LK_MAX:  out_byte = sat8(res_q);
      default: out_byte = avg_round(res_q, area);
    endcase
  end

  assign busy = acc_live || out_valid;

  a_first_starts: assert property (@(posedge clk) disable iff (rst)
    (in_valid && !stall && !acc_live) |-> in_first)
    else $error("reduce_pipe: element started without a first tap");

endmodule
