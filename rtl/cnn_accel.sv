// cnn_accel: Tiny Darknet layer accelerator behind two application FIFOs.
//
// The host (an ARM processor reaching the FIFOs through a DMA/AXI bridge core)
// keeps the network's parameters and runs the network one layer at a time. For
// each layer it writes a header, the input feature map and, for a convolution,
// the bias and weights of every filter into the host-to-FPGA FIFO as packed
// 32-bit words (four 8-bit fixed-point values each), and reads the layer's output
// map back from the FPGA-to-host FIFO in the same packed form, channel by
// channel. The layer engine inside is layer_ctrl (header, loads, loop nest, READ
// stage), two banked_buffer instances (input map and one filter's weights, each
// split into four banks so a packed word is stored in one cycle), reduce_pipe
// (COMP and WRITE stages: multiply-accumulate, max or sum, then requantisation)
// byte_pack and softmax_unit, which computes the final softmax layer from the
// scores in the feature buffer. One loop tap is processed per cycle; when the output FIFO is
// full the compute pipeline stalls until the host reads.
//
// Ports: h2f_* is the host side of the input FIFO (write strobe, data, full);
// f2h_* the host side of the output FIFO (read strobe, data one cycle later,
// empty). busy is high from the first header word to the end of the layer,
// layer_done pulses once per layer, hdr_error flags a header whose map or filter
// does not fit the buffers. The FIFO structure and 32-bit width follow the
// system description; buffer sizes are set by the largest Tiny Darknet layer
// (FMAP_BYTES: 56 x 56 x 128 input of layer 6; WBUF_BYTES: 64 x 3 x 3 filter of
// layers 15 and 17), and the stream format is this design's choice. While a
// softmax layer runs, the softmax unit owns the feature buffer's read port and
// feeds the byte packer.
module cnn_accel
  import cnn_pkg::*;
#(
  parameter int unsigned FMAP_BYTES = 401408,
  parameter int unsigned WBUF_BYTES = 576,
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        h2f_wr_en,
  input  logic [31:0] h2f_data,
  output logic        h2f_full,
  input  logic        f2h_rd_en,
  output logic [31:0] f2h_data,
  output logic        f2h_empty,
  output logic        busy,
  output logic        layer_done,
  output logic        hdr_error
);
  // input FIFO, application side
  logic [31:0] in_word;
  logic        in_empty, in_pop;
  // output FIFO, application side
  logic        out_full, out_we;
  logic [31:0] out_word;
  // buffers
  logic        fb_we, fb_re, wb_we, wb_re;
  logic [$clog2(FMAP_BYTES/4)-1:0] fb_wrow;
  logic [$clog2(FMAP_BYTES)-1:0]   fb_raddr;
  logic [$clog2(WBUF_BYTES/4)-1:0] wb_wrow;
  logic [$clog2(WBUF_BYTES)-1:0]   wb_raddr;
  logic [7:0]  fb_rdata, wb_rdata;
  // pipeline
  logic        t_valid, t_first, t_last, t_pad;
  layer_kind_e kind;
  acc_t        bias;
  logic [4:0]  shift;
  logic        leaky;
  logic [17:0] area;
  logic        stall, pipe_busy, res_valid, pack_pending, pack_flush;
  px_t         res_byte;
  // softmax
  logic        sm_start, sm_done, sm_busy, sm_re, sm_valid;
  logic [10:0] sm_n, sm_raddr;
  logic [7:0]  sm_byte;
  logic        ctrl_fb_re;
  logic [$clog2(FMAP_BYTES)-1:0] ctrl_fb_raddr;

  app_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH), .SHOW_AHEAD(1'b1)) u_in_fifo (
    .clk, .rst,
    .wr_en(h2f_wr_en), .din(h2f_data), .full(h2f_full),
    .rd_en(in_pop), .dout(in_word), .empty(in_empty)
  );

  app_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH), .SHOW_AHEAD(1'b0)) u_out_fifo (
    .clk, .rst,
    .wr_en(out_we), .din(out_word), .full(out_full),
    .rd_en(f2h_rd_en), .dout(f2h_data), .empty(f2h_empty)
  );

  assign stall = out_full;

  layer_ctrl #(.FMAP_BYTES(FMAP_BYTES), .WBUF_BYTES(WBUF_BYTES)) u_ctrl (
    .clk, .rst,
    .in_word, .in_avail(!in_empty), .in_pop,
    .fb_we, .fb_wrow, .fb_re(ctrl_fb_re), .fb_raddr(ctrl_fb_raddr),
    .wb_we, .wb_wrow, .wb_re, .wb_raddr,
    .t_valid, .t_first, .t_last, .t_pad,
    .kind, .bias, .shift, .leaky, .area,
    .stall, .pipe_busy, .pack_pending, .pack_flush,
    .busy, .layer_done, .hdr_error,
    .sm_start, .sm_n, .sm_done
  );

  softmax_unit #(.AW(11)) u_soft (
    .clk, .rst, .start(sm_start), .n(sm_n), .frac(shift), .stall,
    .re(sm_re), .raddr(sm_raddr), .rdata(fb_rdata),
    .out_valid(sm_valid), .out_byte(sm_byte), .done(sm_done), .busy(sm_busy)
  );

  // the feature buffer's read port belongs to the softmax unit while it runs
  assign fb_re    = sm_busy ? sm_re : ctrl_fb_re;
  assign fb_raddr = sm_busy ? ($clog2(FMAP_BYTES))'(sm_raddr) : ctrl_fb_raddr;

  banked_buffer #(.BYTES(FMAP_BYTES), .BANKS(4)) u_fmap (
    .clk, .we(fb_we), .wrow(fb_wrow), .wdata(in_word),
    .re(fb_re), .raddr(fb_raddr), .rdata(fb_rdata)
  );

  banked_buffer #(.BYTES(WBUF_BYTES), .BANKS(4)) u_wbuf (
    .clk, .we(wb_we), .wrow(wb_wrow), .wdata(in_word),
    .re(wb_re), .raddr(wb_raddr), .rdata(wb_rdata)
  );

  reduce_pipe u_pipe (
    .clk, .rst, .stall,
    .in_valid(t_valid), .in_first(t_first), .in_last(t_last), .in_pad(t_pad),
    .in_act(px_t'(fb_rdata)), .in_wgt(px_t'(wb_rdata)),
    .kind, .bias, .shift, .leaky, .area,
    .out_valid(res_valid), .out_byte(res_byte), .busy(pipe_busy)
  );

  byte_pack u_pack (
    .clk, .rst,
    .in_valid((res_valid || sm_valid) && !stall),
    .in_byte(sm_valid ? sm_byte : res_byte),
    .flush(pack_flush),
    .out_valid(out_we), .out_word, .pending(pack_pending)
  );

endmodule
