// tb_cnn_accel_full: the accelerator at its default sizes on full-size Tiny
// Darknet layers.
//
// With every parameter of cnn_accel at its default, the host model runs three
// layers of the 224 x 224 network at their real sizes: layer 0 (3x3
// convolution, 3 -> 16 channels, 224 x 224, leaky), its output through layer 1
// (2x2/2 max-pool to 112 x 112 x 16, run as two 8-channel halves because its
// input is twice the feature buffer), layer 6 (1x1 convolution whose input
// fills the feature buffer exactly), 8 of the 512 filters of layer 15 (3x3
// filters of 576 bytes, filling the weight buffer), and layer 20 (global average pool of a
// 14 x 14 x 1000 map) followed by layer 21 (softmax over the 1000 scores,
// compared with floating point within two 1/256 units). Inputs and weights are random 8-bit values; outputs are
// compared byte by byte with the integer model in cnn_ref_pkg, and the cycle
// count of layer 0 is checked against one tap per cycle plus load time.
module tb_cnn_accel_full;
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

  initial begin
    layer_t L;
    bytes_t act;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (2) @(posedge clk);
    act = rand_bytes(3 * 224 * 224, -128, 127);
    L = '{kind:0, k:3, leaky:1, shift:6, cin:3, cout:16, h:224, w:224};
    do_layer(L, act, "layer 0 conv 3x3/1 224x224x3 -> 16");
    // layer 1's input (224 x 224 x 16 bytes) is twice the feature buffer, so the
    // host runs it as two independent halves of 8 channels each
    begin
      bytes_t lo, hi;
      lo = new[8 * 224 * 224];
      hi = new[8 * 224 * 224];
      foreach (lo[j]) begin lo[j] = act[j]; hi[j] = act[8*224*224 + j]; end
      L = '{kind:1, k:1, leaky:0, shift:0, cin:8, cout:8, h:224, w:224};
      do_layer(L, lo, "layer 1 max 2x2/2, channels 0-7 -> 112x112x8");
      do_layer(L, hi, "layer 1 max 2x2/2, channels 8-15 -> 112x112x8");
      check(lo.size() == 8 * 112 * 112 && hi.size() == 8 * 112 * 112, "layer 1 output size");
    end
    // layer 6: 1x1 convolution whose input, 56 x 56 x 128, fills the feature
    // buffer exactly
    act = rand_bytes(128 * 56 * 56, -128, 127);
    L = '{kind:0, k:1, leaky:1, shift:7, cin:128, cout:16, h:56, w:56};
    do_layer(L, act, "layer 6 conv 1x1/1 56x56x128 -> 16");
    // layer 15: 3x3 convolution with 64 x 3 x 3 = 576-byte filters, filling
    // the weight buffer; the host sends 8 of its 512 filters
    act = rand_bytes(64 * 14 * 14, -128, 127);
    L = '{kind:0, k:3, leaky:1, shift:8, cin:64, cout:8, h:14, w:14};
    do_layer(L, act, "layer 15 conv 3x3/1 14x14x64 -> 8 of 512");
    act = rand_bytes(1000 * 14 * 14, -128, 127);
    L = '{kind:2, k:1, leaky:0, shift:0, cin:1000, cout:1000, h:14, w:14};
    do_layer(L, act, "layer 20 avg 14x14x1000 -> 1000");
    // layer 21: softmax over the 1000 averaged class scores (scores in Q4.3)
    L = '{kind:3, k:1, leaky:0, shift:3, cin:1000, cout:1000, h:1, w:1};
    do_layer(L, act, "layer 21 softmax 1000");
    check(!hdr_error, "no header error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
