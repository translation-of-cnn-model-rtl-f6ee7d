// tb_cnn_accel: end-to-end test of the layer accelerator on a scaled-down
// Tiny Darknet-style network.
//
// The testbench plays the host: for each layer it builds the packed word
// stream (header, map, bias and weights), writes it into the input FIFO while
// honouring h2f_full, and reads the result words back through the output FIFO
// (data one cycle after f2h_rd_en). Each layer's output becomes the next
// layer's input, as the host does when it runs the network layer by layer. The
// network covers every layer kind: 3x3 convolution with leaky activation, 2x2/2
// max-pool, 1x1 convolution, a 3x3 convolution with a linear output, and the
// global average pool, and a final softmax. Outputs are compared byte by byte
// with cnn_ref_pkg (the softmax within two 1/256 units of floating point).
// The output FIFO is made small and the reader pauses during one layer so the
// compute pipeline has to stall; the writer is faster than the engine during
// loads so the input FIFO fills. Each mechanism is counted and must occur:
// input FIFO full, output stall, padding taps, negative leaky outputs,
// saturation, partial-word flush, each layer kind. The cycle count of a
// convolution is checked against one tap per cycle plus load and drain time.
module tb_cnn_accel;
  import cnn_ref_pkg::*;

  localparam int FIFO_DEPTH = 16;

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

  cnn_accel #(.FIFO_DEPTH(FIFO_DEPTH)) dut (
    .clk, .rst, .h2f_wr_en, .h2f_data, .h2f_full,
    .f2h_rd_en, .f2h_data, .f2h_empty, .busy, .layer_done, .hdr_error
  );

  int checks = 0, failures = 0;
  int n_in_full = 0, n_stall = 0, n_pad = 0, n_leaky_neg = 0, n_sat = 0;
  int n_flush = 0, n_conv = 0, n_max = 0, n_avg = 0, n_soft = 0, n_done = 0;
  longint cycle = 0;
  bit pause_reader = 1'b0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (h2f_full && h2f_wr_en == 1'b0 && dut.u_ctrl.in_pop == 1'b0) n_in_full++;
      if (dut.stall && (dut.t_valid || dut.res_valid)) n_stall++;
      if (dut.t_valid && dut.t_pad && !dut.stall) n_pad++;
      if (dut.u_pack.flush && dut.u_pack.out_valid) n_flush++;
      if (layer_done) n_done++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // host writer and reader for one layer; returns the output bytes
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
          if (!f2h_empty && !pause_reader) begin
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
    @(negedge clk);
    check(!busy, "engine idle after the layer");
    check(f2h_empty, "no extra output words");
  endtask

  task automatic do_layer(layer_t L, ref bytes_t act, input string nm, input bit pause = 0);
    bytes_t wts, got, exp;
    int bias[];
    longint cyc, taps, ideal;
    wts = rand_bytes(L.cout * L.cin * L.k * L.k, -40, 40);
    bias = new[L.cout];
    foreach (bias[j]) bias[j] = int'($urandom_range(4000)) - 2000;
    if (L.kind != 0) wts = new[0];
    exp = ref_layer(L, act, wts, bias);
    if (pause) fork
      begin
        pause_reader = 1'b1;
        repeat (3000) @(posedge clk);
        pause_reader = 1'b0;
      end
    join_none
    run_layer(L, act, wts, bias, got, cyc);
    foreach (exp[j]) begin
      check(out_ok(L, got[j], exp[j]), $sformatf("%s out[%0d] got %0d exp %0d", nm, j, got[j], exp[j]));
      if (L.kind == 0 && L.leaky != 0 && exp[j] < 0) n_leaky_neg++;
      if (L.kind != 3 && (exp[j] == 127 || exp[j] == -128)) n_sat++;
    end
    if (L.kind == 0) n_conv++; else if (L.kind == 1) n_max++;
    else if (L.kind == 2) n_avg++; else n_soft++;
    // rate: one tap per cycle after the loads
    if (L.kind == 0 && !pause) begin
      taps  = longint'(L.cout) * L.h * L.w * L.cin * L.k * L.k;
      ideal = taps + 2 + (L.cin*L.h*L.w + 3)/4 + longint'(L.cout) * (1 + (L.cin*L.k*L.k + 3)/4);
      $display("%s: %0d cycles, %0d taps, lower bound %0d", nm, cyc, taps, ideal);
      check(cyc >= ideal, $sformatf("%s faster than one tap per cycle?", nm));
      check(cyc <= ideal + 8 * L.cout + 40, $sformatf("%s took %0d cycles, bound %0d", nm, cyc, ideal + 8*L.cout + 40));
    end
    act = got;
  endtask

  initial begin
    layer_t L;
    bytes_t act;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (2) @(posedge clk);

    act = rand_bytes(3 * 10 * 10, -128, 127);
    // conv 3x3, 3 -> 8, leaky (as layer 0)
    L = '{kind:0, k:3, leaky:1, shift:6, cin:3, cout:8, h:10, w:10};
    do_layer(L, act, "conv3x3 leaky");
    // 2x2/2 max-pool (as layer 1), reader paused: output stall
    L = '{kind:1, k:1, leaky:0, shift:0, cin:8, cout:8, h:10, w:10};
    do_layer(L, act, "maxpool", 1);
    // conv 1x1, 8 -> 5 (as layer 4), odd output count -> partial word
    L = '{kind:0, k:1, leaky:1, shift:4, cin:8, cout:5, h:5, w:5};
    do_layer(L, act, "conv1x1");
    // conv 3x3, 5 -> 7, small shift -> saturation, reader paused
    L = '{kind:0, k:3, leaky:1, shift:2, cin:5, cout:7, h:5, w:5};
    do_layer(L, act, "conv3x3 sat", 1);
    // conv 1x1, 7 -> 10 linear (as layer 19)
    L = '{kind:0, k:1, leaky:0, shift:5, cin:7, cout:10, h:5, w:5};
    do_layer(L, act, "conv1x1 linear");
    // global average pool (as layer 20)
    L = '{kind:2, k:1, leaky:0, shift:0, cin:10, cout:10, h:5, w:5};
    do_layer(L, act, "avgpool");

    // softmax over the 10 scores (as layer 21), scores read as Q5.2
    L = '{kind:3, k:1, leaky:0, shift:2, cin:10, cout:10, h:1, w:1};
    do_layer(L, act, "softmax");
    repeat (3) @(posedge clk);
    check(!hdr_error, "no header error");
    $display("mechanisms: in_full=%0d stall=%0d pad=%0d leaky_neg=%0d sat=%0d flush=%0d conv=%0d max=%0d avg=%0d soft=%0d done=%0d",
             n_in_full, n_stall, n_pad, n_leaky_neg, n_sat, n_flush, n_conv, n_max, n_avg, n_soft, n_done);
    check(n_in_full > 0, "input FIFO full happened");
    check(n_stall > 0, "output stall happened");
    check(n_pad > 0, "padding taps happened");
    check(n_leaky_neg > 0, "leaky negative outputs happened");
    check(n_sat > 0, "saturation happened");
    check(n_flush > 0, "partial-word flush happened");
    check(n_conv == 4 && n_max == 1 && n_avg == 1 && n_soft == 1, "every layer kind ran");
    check(n_done == 7, "layer_done once per layer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
