// layer_ctrl: sequencer of the layer engine (header, loads, loop nest).
//
// It consumes the host-to-FPGA word stream of one layer in this order:
//   1. two header words (cnn_pkg::hdr0_t, hdr1_t);
//   2. the input feature map, in_ch x height x width bytes in channel, row,
//      column order, four bytes per word, the last word zero-filled;
//   3. for a convolution only, for each output channel in turn: one 32-bit bias
//      word, then the filter's in_ch x K x K weight bytes in the same packed
//      form (channel, kernel row, kernel column order).
// The map goes into the feature buffer and the filter into the weight buffer
// one word (four bytes) per cycle. Then the loop nest of the layer runs. For a
// convolution the order is output channel, output row, output column, input
// channel, kernel row, kernel column, one tap per cycle; a tap outside the map
// (3x3 kernels use one pixel of zero padding) is issued with the pad tag and no
// meaningful read. For a 2x2/2 max-pool the order is channel, output row, output
// column and the four window taps; for the global average pool it is channel
// and every pixel of that channel. This is the six-loop convolution nest with
// the loops reordered so that each output element is finished before the next
// starts, and pipelined so that a tap is issued every cycle (the READ stage);
// reduce_pipe holds the COMP and WRITE stages. After the last tap of an output
// channel the controller waits for the pipeline to drain before it loads the
// next filter, and at the end of the layer it flushes the byte packer and
// pulses layer_done. For a softmax layer (kind 3) it loads the scores as a
// 1 x 1 map and hands the feature buffer to softmax_unit (sm_start, sm_done)
// instead of running the loop nest.
//
// in_avail/in_pop follow a show-ahead FIFO: in_word is valid while in_avail is
// high and in_pop takes it. stall (the output FIFO is full) freezes the READ
// stage and the pipeline registers. The stream format and the loop order are
// this design's choice; the layer kinds, kernel sizes, strides and 8-bit data
// follow the Tiny Darknet description.
module layer_ctrl
  import cnn_pkg::*;
#(
  parameter int unsigned FMAP_BYTES = 401408,
  parameter int unsigned WBUF_BYTES = 576
) (
  input  logic        clk,
  input  logic        rst,
  // input stream (show-ahead FIFO)
  input  logic [31:0] in_word,
  input  logic        in_avail,
  output logic        in_pop,
  // feature buffer
  output logic        fb_we,
  output logic [$clog2(FMAP_BYTES/4)-1:0] fb_wrow,
  output logic        fb_re,
  output logic [$clog2(FMAP_BYTES)-1:0]   fb_raddr,
  // weight buffer
  output logic        wb_we,
  output logic [$clog2(WBUF_BYTES/4)-1:0] wb_wrow,
  output logic        wb_re,
  output logic [$clog2(WBUF_BYTES)-1:0]   wb_raddr,
  // tags of the taps read last cycle (COMP stage inputs)
  output logic        t_valid,
  output logic        t_first,
  output logic        t_last,
  output logic        t_pad,
  // layer configuration for reduce_pipe
  output layer_kind_e kind,
  output acc_t        bias,
  output logic [4:0]  shift,
  output logic        leaky,
  output logic [17:0] area,
  // pipeline and output side
  input  logic        stall,
  input  logic        pipe_busy,
  input  logic        pack_pending,
  output logic        pack_flush,
  output logic        busy,
  output logic        layer_done,
  output logic        hdr_error,     // header asks for more than the buffers hold
  // softmax unit
  output logic        sm_start,
  output logic [10:0] sm_n,
  input  logic        sm_done
);
  localparam int unsigned FAW = $clog2(FMAP_BYTES);
  localparam int unsigned WAW = $clog2(WBUF_BYTES);

  typedef enum logic [3:0] {
    S_HDR0, S_HDR1, S_LOAD_IN, S_LOAD_B, S_LOAD_W, S_RUN, S_SOFT, S_DRAIN, S_FLUSH, S_DONE
  } state_e;

  state_e state;
  hdr0_t  h0;
  hdr1_t  h1;

  // derived sizes
  logic [1:0]  ksz;           // kernel size, 1 or 3
  logic [3:0]  kk;            // K*K
  logic [17:0] hw;            // height*width
  logic [28:0] in_bytes, w_bytes;
  logic [26:0] in_words, w_words;
  logic [26:0] ld_cnt;

  // loop counters
  logic [10:0] oc, ti;
  logic [8:0]  ox, oy, tu, tv;
  logic [8:0]  lim_ox, lim_oy, lim_tu, lim_tv;
  logic [10:0] lim_ti;
  logic [WAW-1:0] w_idx;

  assign ksz      = h0.k3 ? 2'd3 : 2'd1;
  assign kk       = h0.k3 ? 4'd9 : 4'd1;
  assign hw       = h1.height * h1.width;
  assign in_bytes = h0.in_ch * hw;
  assign w_bytes  = h0.in_ch * kk;
  assign in_words = 27'((in_bytes + 29'd3) >> 2);
  assign w_words  = 27'((w_bytes + 29'd3) >> 2);
  assign kind     = h0.kind;
  assign shift    = h0.shift;
  assign leaky    = h0.leaky;
  assign area     = hw;
  assign sm_n     = h0.in_ch;

  always_comb begin
    unique case (h0.kind)
      LK_CONV: begin
        lim_ox = h1.height; lim_oy = h1.width;
        lim_ti = h0.in_ch;  lim_tu = 9'(ksz); lim_tv = 9'(ksz);
      end
      LK_MAX: begin
        lim_ox = h1.height >> 1; lim_oy = h1.width >> 1;
        lim_ti = 11'd1; lim_tu = 9'd2; lim_tv = 9'd2;
      end
      default: begin
        lim_ox = 9'd1; lim_oy = 9'd1;
        lim_ti = 11'd1; lim_tu = h1.height; lim_tv = h1.width;
      end
    endcase
  end

  // READ stage: address of the current tap
  logic        last_tv, last_tu, last_ti, last_oy, last_ox, last_oc;
  logic        tap_first, tap_last, run_last, pad;
  logic signed [10:0] r, c;
  logic [10:0] ch;
  logic        issue;

  assign last_tv   = (tv == lim_tv - 9'd1);
  assign last_tu   = (tu == lim_tu - 9'd1);
  assign last_ti   = (ti == lim_ti - 11'd1);
  assign last_oy   = (oy == lim_oy - 9'd1);
  assign last_ox   = (ox == lim_ox - 9'd1);
  assign last_oc   = (h0.kind == LK_CONV) ? 1'b1 : (oc == h0.in_ch - 11'd1);
  assign tap_first = (tv == 0) && (tu == 0) && (ti == 0);
  assign tap_last  = last_tv && last_tu && last_ti;
  assign run_last  = tap_last && last_oy && last_ox && last_oc;

  always_comb begin
    unique case (h0.kind)
      LK_CONV: begin
        r  = $signed({2'b0, ox}) + $signed({2'b0, tu}) - (h0.k3 ? 11'sd1 : 11'sd0);
        c  = $signed({2'b0, oy}) + $signed({2'b0, tv}) - (h0.k3 ? 11'sd1 : 11'sd0);
        ch = ti;
      end
      LK_MAX: begin
        r  = $signed({1'b0, ox, 1'b0}) + $signed({2'b0, tu});
        c  = $signed({1'b0, oy, 1'b0}) + $signed({2'b0, tv});
        ch = oc;
      end
      default: begin
        r  = $signed({2'b0, tu});
        c  = $signed({2'b0, tv});
        ch = oc;
      end
    endcase
    pad = (r < 0) || (c < 0) || (r >= $signed({2'b0, h1.height})) || (c >= $signed({2'b0, h1.width}));
  end

  assign issue    = (state == S_RUN) && !stall;
  assign fb_re    = issue;
  assign fb_raddr = pad ? '0 : FAW'(ch * hw + 29'(r) * h1.width + 29'(c));
  assign wb_re    = issue;
  assign wb_raddr = w_idx;

  // loads
  assign in_pop  = in_avail && (state inside {S_HDR0, S_HDR1, S_LOAD_IN, S_LOAD_B, S_LOAD_W});
  assign fb_we   = in_pop && (state == S_LOAD_IN);
  assign fb_wrow = ($clog2(FMAP_BYTES/4))'(ld_cnt);
  assign wb_we   = in_pop && (state == S_LOAD_W);
  assign wb_wrow = ($clog2(WBUF_BYTES/4))'(ld_cnt);

  assign pack_flush = (state == S_FLUSH) && pack_pending && !stall;
  assign busy       = (state != S_HDR0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_HDR0;
      h0         <= '0;
      h1         <= '0;
      bias       <= '0;
      ld_cnt     <= '0;
      oc <= '0; ti <= '0; ox <= '0; oy <= '0; tu <= '0; tv <= '0;
      w_idx      <= '0;
      t_valid    <= 1'b0;
      t_first    <= 1'b0;
      t_last     <= 1'b0;
      t_pad      <= 1'b0;
      layer_done <= 1'b0;
      hdr_error  <= 1'b0;
      sm_start   <= 1'b0;
    end else begin
      layer_done <= 1'b0;
      sm_start   <= 1'b0;
      if (!stall) begin
        t_valid <= issue;
        t_first <= tap_first;
        t_last  <= tap_last;
        t_pad   <= pad;
      end

      unique case (state)
        S_HDR0: if (in_pop) begin
          h0    <= hdr0_t'(in_word);
          state <= S_HDR1;
        end
        S_HDR1: if (in_pop) begin
          h1     <= hdr1_t'(in_word);
          ld_cnt <= '0;
          oc     <= '0;
          state  <= S_LOAD_IN;
        end
        S_LOAD_IN: begin
          if (ld_cnt == 0 && (in_bytes > 29'(FMAP_BYTES) ||
              (h0.kind == LK_CONV && w_bytes > 29'(WBUF_BYTES))))
            hdr_error <= 1'b1;
          if (in_pop) begin
            ld_cnt <= ld_cnt + 27'd1;
            if (ld_cnt == in_words - 27'd1) begin
              ld_cnt <= '0;
              unique case (h0.kind)
                LK_CONV: state <= S_LOAD_B;
                LK_SOFT: begin
                  state    <= S_SOFT;
                  sm_start <= 1'b1;
                end
                default: state <= S_RUN;
              endcase
            end
          end
        end
        S_LOAD_B: if (in_pop) begin
          bias  <= acc_t'(in_word);
          state <= S_LOAD_W;
        end
        S_LOAD_W: if (in_pop) begin
          ld_cnt <= ld_cnt + 27'd1;
          if (ld_cnt == w_words - 27'd1) begin
            ld_cnt <= '0;
            w_idx  <= '0;
            state  <= S_RUN;
          end
        end
        S_RUN: if (!stall) begin
          // step the loop nest, innermost first
          w_idx <= tap_last ? '0 : w_idx + 1'b1;
          tv <= last_tv ? '0 : tv + 9'd1;
          if (last_tv) begin
            tu <= last_tu ? '0 : tu + 9'd1;
            if (last_tu) begin
              ti <= last_ti ? '0 : ti + 11'd1;
              if (last_ti) begin
                oy <= last_oy ? '0 : oy + 9'd1;
                if (last_oy) begin
                  ox <= last_ox ? '0 : ox + 9'd1;
                  if (last_ox && h0.kind != LK_CONV)
                    oc <= last_oc ? '0 : oc + 11'd1;
                end
              end
            end
          end
          if (run_last) state <= S_DRAIN;
        end
        S_SOFT: if (sm_done) state <= S_FLUSH;
        S_DRAIN: if (!t_valid && !pipe_busy) begin
          if (h0.kind == LK_CONV && oc != h0.out_ch - 11'd1) begin
            oc    <= oc + 11'd1;
            state <= S_LOAD_B;
          end else begin
            state <= S_FLUSH;
          end
        end
        S_FLUSH: if (!pack_pending || pack_flush) state <= S_DONE;
        S_DONE: begin
          layer_done <= 1'b1;
          oc         <= '0;
          state      <= S_HDR0;
        end
        default: state <= S_HDR0;
      endcase
    end
  end

endmodule
