// cnn_pkg: types and constants shared by the Tiny Darknet layer accelerator.
//
// A layer is described to the accelerator by a two-word header at the front of
// the host-to-FPGA stream. Word 0 carries the layer kind, kernel size, activation,
// requantisation shift and the channel counts; word 1 carries the map height and
// width. Data is 8-bit signed fixed point, packed four values per 32-bit word with
// value 0 in bits 7:0. The layer kinds are the ones of the Tiny Darknet table:
// 3x3 or 1x1 stride-1 convolution, 2x2 stride-2 max-pool, global average pool
// and the final softmax.
// The header layout, the leaky slope and the rounding rule are choices of this
// design; the 8-bit data and the four-per-word packing follow the description.
package cnn_pkg;

  localparam int unsigned BYTE_W = 8;
  localparam int unsigned ACC_W  = 32;

  typedef logic signed [BYTE_W-1:0] px_t;   // one activation or weight
  typedef logic signed [ACC_W-1:0]  acc_t;  // accumulator

  typedef enum logic [1:0] {
    LK_CONV = 2'd0,   // KxK convolution, stride 1, "same" zero padding
    LK_MAX  = 2'd1,   // 2x2 max-pool, stride 2
    LK_AVG  = 2'd2,   // global average pool: one value per channel
    LK_SOFT = 2'd3    // softmax over in_ch scores (height = width = 1)
  } layer_kind_e;

  // Header word 0, bit 31 first.
  typedef struct packed {
    logic        rsvd;      // [31]
    logic [10:0] out_ch;    // [30:20] output channels (conv only)
    logic [10:0] in_ch;     // [19:9]  input channels
    logic [4:0]  shift;     // [8:4]   conv: right shift of bias + sum;
                            //         softmax: fraction bits of the scores
    logic        leaky;     // [3]     1: leaky activation, 0: linear
    logic        k3;        // [2]     1: 3x3 kernel with padding 1, 0: 1x1
    layer_kind_e kind;      // [1:0]
  } hdr0_t;

  // Header word 1.
  typedef struct packed {
    logic [13:0] rsvd;      // [31:18]
    logic [8:0]  width;     // [17:9]
    logic [8:0]  height;    // [8:0]
  } hdr1_t;

  // Leaky activation slope, 13/128 (about 0.1).
  localparam int LEAKY_NUM   = 13;
  localparam int LEAKY_SHIFT = 7;

  // Saturate a wide signed value to the 8-bit range.
  function automatic px_t sat8(input acc_t v);
    if (v > 127)       return px_t'(127);
    else if (v < -128) return px_t'(-128);
    else               return px_t'(v[7:0]);
  endfunction

  // Convolution output: (sum + bias) scaled down by 2^shift with rounding to
  // nearest (ties up), then the optional leaky activation, then saturation.
  function automatic px_t requant(input acc_t sum, input acc_t bias,
                                  input logic [4:0] shift, input logic leaky);
    logic signed [ACC_W+8:0] v;
    v = (ACC_W+9)'(sum) + (ACC_W+9)'(bias);
    if (shift != 0) v = (v + ((ACC_W+9)'(1) <<< (shift - 5'd1))) >>> shift;
    if (leaky && v < 0) v = (v * LEAKY_NUM) >>> LEAKY_SHIFT;
    if (v > 127)       return px_t'(127);
    else if (v < -128) return px_t'(-128);
    else               return px_t'(v[7:0]);
  endfunction

  // Average: sum / count rounded to nearest, ties away from zero.
  function automatic px_t avg_round(input acc_t sum, input logic [17:0] count);
    acc_t half, q, n;
    n    = acc_t'(count);
    half = n >>> 1;
    if (sum < 0) q = (sum - half) / n;
    else         q = (sum + half) / n;
    return sat8(q);
  endfunction

endpackage
