// tb_reduce_pipe: checks the COMP/WRITE stages for all three layer kinds.
//
// For each layer kind in turn, random output elements are built from random
// taps (random length, random bytes, some taps marked as padding), with random
// bias, shift and activation for convolutions and a random area for the
// average. Taps are fed one per cycle, gaps allowed, and a random stall holds
// every input the way the controller and the buffers do. Each result taken on
// out_valid without stall is compared with an integer model (cnn_ref_pkg),
// and its latency is checked: the result of an element appears the cycle
// after its last tap is accepted.
module tb_reduce_pipe;
  import cnn_pkg::*;
  import cnn_ref_pkg::floor_div;
  import cnn_ref_pkg::clip8;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        stall = 0, in_valid = 0, in_first = 0, in_last = 0, in_pad = 0;
  px_t         in_act = 0, in_wgt = 0;
  layer_kind_e kind = LK_CONV;
  acc_t        bias = 0;
  logic [4:0]  shift = 0;
  logic        leaky = 0;
  logic [17:0] area = 1;
  logic        out_valid, busy;
  px_t         out_byte;

  reduce_pipe dut (.*);

  int checks = 0, failures = 0;
  int exp_q [$];
  longint last_tap_cycle [$];
  longint cycle = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && out_valid && !stall) begin
      if (exp_q.size() == 0) check(0, "unexpected result");
      else begin
        int e;
        longint t;
        e = exp_q.pop_front();
        t = last_tap_cycle.pop_front();
        check(out_byte == px_t'(e), $sformatf("kind %0d result %0d exp %0d", kind, out_byte, e));
        check(cycle == t + 1, $sformatf("latency: result at %0d, last tap at %0d", cycle, t));
      end
    end
  end

  // present one tap, honouring stall; returns after the tap was accepted
  task automatic tap(bit first, bit last, bit pad, px_t a, px_t w);
    while ($urandom_range(4) == 0) begin
      @(negedge clk);
      stall = ($urandom_range(3) == 0);
      in_valid = 0;
    end
    in_valid = 1; in_first = first; in_last = last; in_pad = pad;
    in_act = a; in_wgt = w;
    // a stall freezes everything, including this tap
    while (1) begin
      @(posedge clk);
      if (!stall) break;
      @(negedge clk);
      stall = ($urandom_range(3) == 0);
    end
    if (last) last_tap_cycle.push_back(cycle);
    @(negedge clk);
    stall = ($urandom_range(3) == 0);
    in_valid = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int kd = 0; kd < 3; kd++) begin
      kind = layer_kind_e'(kd);
      repeat (150) begin
        int n;
        longint s, v;
        int m;
        n = $urandom_range(30, 1);
        bias  = acc_t'(int'($urandom_range(20000)) - 10000);
        shift = 5'($urandom_range(9));
        leaky = 1'($urandom);
        area  = 18'(n);
        s = 0; m = -1000;
        for (int k = 0; k < n; k++) begin
          px_t a, w;
          bit p;
          a = px_t'($urandom); w = px_t'($urandom);
          p = (kd == 0) && ($urandom_range(3) == 0);
          if (!p) begin
            s += (kd == 0) ? longint'(a) * longint'(w) : longint'(a);
            if (int'(a) > m) m = int'(a);
          end
          tap(k == 0, k == n - 1, p, a, w);
          if (k == n - 1) begin
            if (kd == 0) begin
              v = s + bias;
              if (shift > 0) v = floor_div(v + (longint'(1) << (shift - 1)), longint'(1) << shift);
              if (leaky && v < 0) v = floor_div(v * 13, 128);
              exp_q.push_back(clip8(v));
            end else if (kd == 1) begin
              exp_q.push_back(m);
            end else begin
              v = (s < 0) ? -s : s;
              v = (v + n / 2) / n;
              exp_q.push_back(clip8((s < 0) ? -v : v));
            end
          end
        end
        // bias and area may change only after the element has been written
        stall = 0;
        repeat (2) @(negedge clk);
      end
    end
    check(exp_q.size() == 0, "every element produced a result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
