// tb_cnn_accel_net: the whole 224 x 224 Tiny Darknet inference, layers 0 to
// 21, run through the accelerator at its default sizes.
//
// The host model chains every layer: each layer's output bytes, read back from
// the output FIFO, are the next layer's input, as on the real system. Layer 1
// (max-pool of a 224 x 224 x 16 map, twice the feature buffer) is sent as two
// 8-channel halves whose outputs are joined again; every other layer is sent
// whole. Weights and biases are random 8-bit and 12-bit values, with each
// convolution's shift chosen from its fan-in so that activations keep a useful
// range through the network. Every output of every layer is compared with the
// integer model in cnn_ref_pkg (softmax: with floating point, within two 1/256
// units), and every convolution's cycle count is checked against one tap per
// cycle plus load time. The run is about 500 M clock cycles.
module tb_cnn_accel_net;
  import cnn_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        h2f_wr_en = 1'b0;
  logic [31:0] h2f_data = '0;
  logic        h2f_full;
  logic        f2h_rd_en = 1'b0;
  logic [31:0] f2h_data;
  logic        f2h_empty;
  logic        busy, layer_done, hdr_error;

  always #5 clk = ~clk;

  cnn_accel dut (
    .clk, .rst, .h2f_wr_en, .h2f_data, .h2f_full,
    .f2h_rd_en, .f2h_data, .f2h_empty, .busy, .layer_done, .hdr_error
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_layer(layer_t L, bytes_t in, bytes_t wts, int bias[],
                           output bytes_t got, output longint cycles);
    words_t q;
    int nout, nwords;
    longint t0;
    q = build_stream(L, in, wts, bias);
    nout = out_size(L);
    nwords = (nout + 3) / 4;
    got = new[nout];
    t0 = cycle;
    fork
      begin : writer
        foreach (q[j]) begin
          @(negedge clk);
          while (h2f_full) @(negedge clk);
          h2f_wr_en = 1'b1;
          h2f_data  = q[j];
          @(posedge clk);
          #1 h2f_wr_en = 1'b0;
        end
      end
      begin : reader
        int k;
        k = 0;
        while (k < nwords) begin
          @(negedge clk);
          if (!f2h_empty) begin
            f2h_rd_en = 1'b1;
            @(posedge clk);
            #1 f2h_rd_en = 1'b0;
            for (int b = 0; b < 4; b++)
              if (4*k + b < nout) got[4*k + b] = byte'(f2h_data[8*b +: 8]);
            k++;
          end
        end
      end
      begin : done_wait
        @(posedge layer_done);
      end
    join
    cycles = cycle - t0;
  endtask

  task automatic do_layer(layer_t L, ref bytes_t act, input string nm);
    bytes_t wts, got, exp;
    int bias[];
    longint cyc, taps, ideal;
    int bad;
    wts = rand_bytes((L.kind == 0) ? L.cout * L.cin * L.k * L.k : 0, -30, 30);
    bias = new[L.cout];
    foreach (bias[j]) bias[j] = int'($urandom_range(4000)) - 2000;
    exp = ref_layer(L, act, wts, bias);
    run_layer(L, act, wts, bias, got, cyc);
    bad = 0;
    foreach (exp[j]) begin
      check(out_ok(L, got[j], exp[j]), $sformatf("%s out[%0d] got %0d exp %0d", nm, j, got[j], exp[j]));
      if (!out_ok(L, got[j], exp[j])) bad++;
    end
    $display("%s: %0d outputs, %0d wrong, %0d cycles", nm, exp.size(), bad, cyc);
    if (L.kind == 0) begin
      taps  = longint'(L.cout) * L.h * L.w * L.cin * L.k * L.k;
      ideal = taps + 2 + (L.cin*L.h*L.w + 3)/4 + longint'(L.cout) * (1 + (L.cin*L.k*L.k + 3)/4);
      check(cyc >= ideal && cyc <= ideal + 8 * L.cout + 40,
            $sformatf("%s cycles %0d, expected %0d to %0d", nm, cyc, ideal, ideal + 8*L.cout + 40));
    end
    act = got;
  endtask

  // shift that keeps the output spread near the input spread for a fan-in of
  // n taps with weights uniform in [-30, 30]: about log2(17 * sqrt(n))
  function automatic int fan_shift(int n);
    return ($clog2(n * 289) + 1) / 2;
  endfunction

  task automatic conv(ref bytes_t act, input int k, int cin, int cout, int hw,
                      int leaky, int idx);
    layer_t L;
    L = '{kind:0, k:k, leaky:leaky, shift:fan_shift(cin * k * k), cin:cin, cout:cout, h:hw, w:hw};
    do_layer(L, act, $sformatf("layer %0d conv %0dx%0d %0dx%0dx%0d -> %0d", idx, k, k, hw, hw, cin, cout));
  endtask

  task automatic maxp(ref bytes_t act, input int c, int hw, int idx);
    layer_t L;
    L = '{kind:1, k:1, leaky:0, shift:0, cin:c, cout:c, h:hw, w:hw};
    do_layer(L, act, $sformatf("layer %0d max 2x2/2 %0dx%0dx%0d", idx, hw, hw, c));
  endtask

  initial begin
    layer_t L;
    bytes_t act;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (2) @(posedge clk);
    act = rand_bytes(3 * 224 * 224, -128, 127);
    conv(act, 3, 3, 16, 224, 1, 0);
    // layer 1: the host splits the 16 channels into two halves and joins the
    // two pooled halves back in channel order
    begin
      bytes_t lo, hi;
      lo = new[8 * 224 * 224];
      hi = new[8 * 224 * 224];
      foreach (lo[j]) begin lo[j] = act[j]; hi[j] = act[8*224*224 + j]; end
      maxp(lo, 8, 224, 1);
      maxp(hi, 8, 224, 1);
      act = new[16 * 112 * 112];
      foreach (lo[j]) begin act[j] = lo[j]; act[8*112*112 + j] = hi[j]; end
    end
    conv(act, 3,  16,   32, 112, 1, 2);
    maxp(act, 32, 112, 3);
    conv(act, 1,  32,   16,  56, 1, 4);
    conv(act, 3,  16,  128,  56, 1, 5);
    conv(act, 1, 128,   16,  56, 1, 6);
    conv(act, 3,  16,  128,  56, 1, 7);
    maxp(act, 128, 56, 8);
    conv(act, 1, 128,   32,  28, 1, 9);
    conv(act, 3,  32,  256,  28, 1, 10);
    conv(act, 1, 256,   32,  28, 1, 11);
    conv(act, 3,  32,  256,  28, 1, 12);
    maxp(act, 256, 28, 13);
    conv(act, 1, 256,   64,  14, 1, 14);
    conv(act, 3,  64,  512,  14, 1, 15);
    conv(act, 1, 512,   64,  14, 1, 16);
    conv(act, 3,  64,  512,  14, 1, 17);
    conv(act, 1, 512,  128,  14, 1, 18);
    conv(act, 1, 128, 1000,  14, 0, 19);
    L = '{kind:2, k:1, leaky:0, shift:0, cin:1000, cout:1000, h:14, w:14};
    do_layer(L, act, "layer 20 avg 14x14x1000 -> 1000");
    L = '{kind:3, k:1, leaky:0, shift:3, cin:1000, cout:1000, h:1, w:1};
    do_layer(L, act, "layer 21 softmax 1000");
    begin
      int best, total;
      best = 0;
      total = 0;
      foreach (act[j]) begin
        total += int'(unsigned'(act[j]));
        if (unsigned'(act[j]) > unsigned'(act[best])) best = j;
      end
      $display("top class %0d, probability %0d/256, sum of probabilities %0d/256",
               best, unsigned'(act[best]), total);
    end
    check(!hdr_error, "no header error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (700000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
