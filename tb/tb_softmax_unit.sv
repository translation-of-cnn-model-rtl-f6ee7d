// tb_softmax_unit: checks the fixed-point softmax against floating point.
//
// A byte array with a one-cycle, hold-while-not-enabled read port stands in for
// the feature buffer. For random score vectors (lengths 1 to 1000, several
// fraction settings, including one dominant score and all-equal scores) the
// unit's probabilities are compared with 256 * exp(x_i - max) / sum rounded,
// allowing two units of difference; random stalls are applied in the output
// pass. Each run must produce exactly n results and one done pulse, and the
// cycle count without stalls must be about 3n plus the 41-cycle division.
module tb_softmax_unit;
  import cnn_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        start = 0, stall = 0;
  logic [10:0] n = 1;
  logic [4:0]  frac = 0;
  logic        re, out_valid, done, busy;
  logic [10:0] raddr;
  logic [7:0]  rdata;
  logic [7:0]  out_byte;

  softmax_unit #(.AW(11)) dut (.*);

  byte mem [2048];
  always @(posedge clk) if (re) rdata <= mem[raddr];

  int checks = 0, failures = 0;
  bit stall_on = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  always @(negedge clk) stall = stall_on && ($urandom_range(2) == 0);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic run(int len, int fr, int mode, bit st);
    layer_t L;
    bytes_t sc, exp;
    int got, dn;
    longint t0;
    sc = rand_bytes(len, -128, 127);
    if (mode == 1) sc[$urandom_range(len - 1)] = 8'sd127;
    if (mode == 2) foreach (sc[j]) sc[j] = 8'sd5;
    foreach (sc[j]) mem[j] = sc[j];
    L = '{kind:3, k:1, leaky:0, shift:fr, cin:len, cout:len, h:1, w:1};
    exp = ref_layer(L, sc, sc, '{0});
    stall_on = st;
    @(negedge clk);
    n = 11'(len); frac = 5'(fr); start = 1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    got = 0; dn = 0;
    while (!dn) begin
      @(posedge clk);
      if (out_valid && !stall) begin
        if (got < len)
          check(out_ok(L, byte'(out_byte), exp[got]),
                $sformatf("len %0d frac %0d p[%0d] got %0d exp %0d", len, fr, got, out_byte, 8'(exp[got])));
        got++;
      end
      if (done) dn = 1;
    end
    check(got == len, $sformatf("len %0d: %0d results", len, got));
    if (!st) check(cycle - t0 <= 3 * len + 50, $sformatf("len %0d took %0d cycles", len, cycle - t0));
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(1, 0, 0, 0);
    run(10, 2, 0, 0);
    run(10, 2, 0, 1);
    run(37, 0, 0, 1);
    run(100, 3, 1, 0);
    run(64, 4, 2, 0);
    run(1000, 4, 0, 1);
    run(1000, 5, 1, 0);
    run(200, 7, 0, 1);
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
