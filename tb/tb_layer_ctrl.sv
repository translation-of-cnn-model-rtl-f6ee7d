// tb_layer_ctrl: checks the controller's loads and its loop nest.
//
// The testbench feeds a layer's word stream through a modelled show-ahead FIFO
// with random gaps, and models the rest of the engine: the pipeline's busy flag
// (a result two cycles after a last tap) and the byte packer's pending flag.
// It checks that every map word goes to the feature buffer at consecutive rows,
// every weight word to the weight buffer, the bias register per filter, and that
// the sequence of issued taps (feature address, weight address, first/last/pad
// tags) matches the loop nest written out independently here: for a
// convolution output channel, row, column, input channel, kernel row, kernel
// column; for max-pool channel, row, column and the 2x2 window; for the
// average pool channel and all pixels. Random output stalls are applied. The
// layer must end with one flush when the byte count is not a multiple of four,
// and with one layer_done pulse. A softmax layer must load its scores, pulse
// sm_start once, leave the buffer alone until sm_done, then finish the layer.
module tb_layer_ctrl;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;

  localparam int FMAP_BYTES = 1024;
  localparam int WBUF_BYTES = 64;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [31:0] in_word;
  logic        in_avail, in_pop;
  logic        fb_we, fb_re, wb_we, wb_re;
  logic [7:0]  fb_wrow;
  logic [9:0]  fb_raddr;
  logic [3:0]  wb_wrow;
  logic [5:0]  wb_raddr;
  logic        t_valid, t_first, t_last, t_pad;
  layer_kind_e kind;
  acc_t        bias;
  logic [4:0]  shift;
  logic        leaky;
  logic [17:0] area;
  logic        stall = 0, pipe_busy, pack_pending, pack_flush, busy, layer_done, hdr_error;
  logic        sm_start, sm_done = 0;
  logic [10:0] sm_n;
  int          n_sm_start = 0;

  layer_ctrl #(.FMAP_BYTES(FMAP_BYTES), .WBUF_BYTES(WBUF_BYTES)) dut (.*);

  // modelled FIFO
  int unsigned stream [$];
  bit gap = 0;
  assign in_avail = (stream.size() != 0) && !gap;
  assign in_word  = (stream.size() != 0) ? stream[0] : 32'd0;

  // modelled pipeline and packer
  logic res_q = 0;
  int   nbytes = 0;
  assign pipe_busy    = res_q;
  assign pack_pending = (nbytes % 4) != 0;

  int checks = 0, failures = 0;
  int n_flush = 0, n_done = 0;
  // expected traffic
  int unsigned exp_fb [$], exp_wb [$];
  int exp_bias [$];
  typedef struct { int fa; int wa; int oc; bit first, last, pad; } tap_t;
  tap_t exp_tap [$], got_iss [$];
  bit   is_conv;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      gap <= ($urandom_range(5) == 0);
      if (!stall) res_q <= t_valid && t_last;
      if (res_q && !stall) nbytes++;
      if (pack_flush) begin n_flush++; nbytes = 0; end
      if (layer_done) n_done++;
      if (sm_start) n_sm_start++;
      stall <= ($urandom_range(4) == 0);
    end
  end

  // feature and weight buffer writes
  int fb_rows_seen = 0;
  always @(posedge clk) if (!rst) begin
    if (fb_we) begin
      if (exp_fb.size() == 0) check(0, "extra fb write");
      else begin
        check(in_word == exp_fb[0], $sformatf("fb word %h exp %h", in_word, exp_fb[0]));
        check(fb_wrow == 8'(fb_rows_seen), $sformatf("fb row %0d exp %0d", fb_wrow, fb_rows_seen));
        void'(exp_fb.pop_front());
        fb_rows_seen++;
      end
    end
    if (wb_we) begin
      if (exp_wb.size() == 0) check(0, "extra wb write");
      else begin
        check(in_word == exp_wb[0], $sformatf("wb word %h exp %h", in_word, exp_wb[0]));
        void'(exp_wb.pop_front());
      end
    end
    if (fb_re) begin
      tap_t t;
      check(fb_re == wb_re, "both buffers read together");
      t.fa = fb_raddr; t.wa = wb_raddr;
      got_iss.push_back(t);
    end
    if (t_valid && !stall) begin
      tap_t t, e;
      t = got_iss.pop_front();
      t.first = t_first; t.last = t_last; t.pad = t_pad;
      if (exp_tap.size() == 0) check(0, "extra tap");
      else begin
        e = exp_tap.pop_front();
        if (!e.pad) check(t.fa == e.fa, $sformatf("tap fa %0d exp %0d", t.fa, e.fa));
        if (is_conv) check(t.wa == e.wa, $sformatf("tap wa %0d exp %0d", t.wa, e.wa));
        check({t.first, t.last, t.pad} == {e.first, e.last, e.pad},
              $sformatf("tags %b exp %b", {t.first, t.last, t.pad}, {e.first, e.last, e.pad}));
        if (is_conv && t.first) begin
          check(bias == exp_bias[e.oc], $sformatf("bias of filter %0d", e.oc));
        end
      end
    end
    if (in_pop) void'(stream.pop_front());
  end

  task automatic expect_layer(layer_t L);
    int p, kk;
    kk = L.k * L.k;
    p = (L.k == 3) ? 1 : 0;
    is_conv = (L.kind == 0);
    if (L.kind == 0) begin
      for (int oc = 0; oc < L.cout; oc++)
        for (int x = 0; x < L.h; x++)
          for (int y = 0; y < L.w; y++)
            for (int i = 0; i < L.cin; i++)
              for (int u = 0; u < L.k; u++)
                for (int v = 0; v < L.k; v++) begin
                  tap_t t;
                  int r, c;
                  r = x + u - p; c = y + v - p;
                  t.pad   = !(r >= 0 && r < L.h && c >= 0 && c < L.w);
                  t.fa    = (i * L.h + r) * L.w + c;
                  t.wa    = (i * L.k + u) * L.k + v;
                  t.oc    = oc;
                  t.first = (i == 0 && u == 0 && v == 0);
                  t.last  = (i == L.cin-1 && u == L.k-1 && v == L.k-1);
                  exp_tap.push_back(t);
                end
    end else if (L.kind == 1) begin
      for (int ch = 0; ch < L.cin; ch++)
        for (int x = 0; x < L.h/2; x++)
          for (int y = 0; y < L.w/2; y++)
            for (int u = 0; u < 2; u++)
              for (int v = 0; v < 2; v++) begin
                tap_t t;
                t.pad = 0; t.wa = 0; t.oc = 0;
                t.fa = (ch * L.h + 2*x + u) * L.w + 2*y + v;
                t.first = (u == 0 && v == 0);
                t.last  = (u == 1 && v == 1);
                exp_tap.push_back(t);
              end
    end else begin
      for (int ch = 0; ch < L.cin; ch++)
        for (int j = 0; j < L.h * L.w; j++) begin
          tap_t t;
          t.pad = 0; t.wa = 0; t.oc = 0;
          t.fa = ch * L.h * L.w + j;
          t.first = (j == 0);
          t.last  = (j == L.h * L.w - 1);
          exp_tap.push_back(t);
        end
    end
  endtask

  task automatic run(layer_t L);
    bytes_t in, wts;
    int bias_v [];
    words_t q;
    int nin, nw, flush0, done0;
    in  = rand_bytes(L.cin * L.h * L.w, -128, 127);
    wts = rand_bytes(L.cout * L.cin * L.k * L.k, -128, 127);
    bias_v = new[L.cout];
    foreach (bias_v[j]) bias_v[j] = int'($urandom);
    q = build_stream(L, in, wts, bias_v);
    nin = (L.cin * L.h * L.w + 3) / 4;
    nw  = (L.cin * L.k * L.k + 3) / 4;
    for (int j = 0; j < nin; j++) exp_fb.push_back(q[2 + j]);
    if (L.kind == 0)
      for (int oc = 0; oc < L.cout; oc++) begin
        exp_bias.push_back(int'(q[2 + nin + oc * (nw + 1)]));
        for (int j = 0; j < nw; j++) exp_wb.push_back(q[2 + nin + oc * (nw + 1) + 1 + j]);
      end
    expect_layer(L);
    fb_rows_seen = 0;
    flush0 = n_flush; done0 = n_done;
    foreach (q[j]) stream.push_back(q[j]);
    @(posedge clk iff layer_done);
    @(negedge clk);
    exp_bias.delete();
    check(stream.size() == 0, "whole stream consumed");
    check(exp_fb.size() == 0 && exp_wb.size() == 0, "all buffer writes seen");
    check(exp_tap.size() == 0, "all taps issued");
    check(n_done == done0 + 1, "one layer_done");
    check(n_flush - flush0 == ((out_size(L) % 4) != 0 ? 1 : 0), "flush only for a partial word");
    check(!busy, "idle after the layer");
    check(!hdr_error, "no header error");
    check(area == 18'(L.h * L.w), "area output");
  endtask

  // softmax layer: the controller loads the scores, then hands over and waits
  task automatic run_soft(int len);
    bytes_t in;
    int bias_v [];
    words_t q;
    int s0, d0;
    layer_t L;
    L = '{kind:3, k:1, leaky:0, shift:2, cin:len, cout:len, h:1, w:1};
    in = rand_bytes(len, -128, 127);
    bias_v = new[1];
    q = build_stream(L, in, in, bias_v);
    for (int j = 0; j < (len + 3) / 4; j++) exp_fb.push_back(q[2 + j]);
    fb_rows_seen = 0;
    s0 = n_sm_start; d0 = n_done;
    foreach (q[j]) stream.push_back(q[j]);
    @(posedge clk iff sm_start);
    check(stream.size() == 0 && exp_fb.size() == 0, "scores loaded before the softmax starts");
    check(sm_n == 11'(len), "sm_n");
    repeat (20) begin
      @(posedge clk);
      check(!layer_done && !fb_re, "controller idle while the softmax runs");
    end
    @(negedge clk); sm_done = 1;
    nbytes = len;           // the softmax unit's bytes went to the packer
    @(negedge clk); sm_done = 0;
    repeat (10) @(negedge clk);
    check(n_sm_start == s0 + 1, "one sm_start");
    check(n_done == d0 + 1, "one layer_done after sm_done");
    check(!busy, "idle after the softmax layer");
  endtask

  initial begin
    layer_t L;
    repeat (3) @(negedge clk);
    rst = 0;
    L = '{kind:0, k:3, leaky:1, shift:3, cin:3, cout:3, h:5, w:6};  run(L);
    L = '{kind:1, k:1, leaky:0, shift:0, cin:3, cout:3, h:6, w:4};  run(L);
    L = '{kind:0, k:1, leaky:0, shift:2, cin:5, cout:3, h:3, w:3};  run(L);
    L = '{kind:2, k:1, leaky:0, shift:0, cin:7, cout:7, h:3, w:5};  run(L);
    run_soft(13);
    check(n_sm_start == 1, "sm_start only for the softmax layer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
