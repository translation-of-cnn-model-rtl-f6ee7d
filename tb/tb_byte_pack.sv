// tb_byte_pack: checks packing of bytes into words and the end-of-layer flush.
//
// Runs of random length (1 to 13 bytes) are fed with random gaps, each run
// closed by a flush. The words seen on out_valid are compared with the bytes
// of the run packed four per word, first byte in bits 7:0, last word zero
// filled, and a flush with nothing collected must emit nothing.
module tb_byte_pack;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        in_valid = 0, flush = 0;
  logic [7:0]  in_byte = 0;
  logic        out_valid, pending;
  logic [31:0] out_word;

  byte_pack dut (.*);

  int checks = 0, failures = 0;
  int unsigned exp_q [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      if (exp_q.size() == 0) check(0, "unexpected word");
      else begin
        int unsigned e;
        e = exp_q.pop_front();
        check(out_word == e, $sformatf("word %h exp %h", out_word, e));
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (200) begin
      int n;
      byte unsigned b [$];
      b.delete();
      n = $urandom_range(13, 1);
      for (int k = 0; k < n; k++) b.push_back(8'($urandom));
      for (int k = 0; k < n; k += 4) begin
        int unsigned w;
        w = 0;
        for (int j = 0; j < 4; j++) if (k + j < n) w |= 32'(b[k+j]) << (8*j);
        exp_q.push_back(w);
      end
      foreach (b[k]) begin
        while ($urandom_range(3) == 0) @(negedge clk);
        in_valid = 1; in_byte = b[k];
        @(negedge clk);
        in_valid = 0;
      end
      check(pending == (n % 4 != 0), "pending flag");
      flush = 1;
      @(negedge clk);
      flush = 0;
      check(!pending, "flush clears pending");
      @(negedge clk);
      check(exp_q.size() == 0, "all words seen");
    end
    // flush with nothing collected
    flush = 1; @(negedge clk); flush = 0; @(negedge clk);
    check(exp_q.size() == 0, "empty flush emits nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
