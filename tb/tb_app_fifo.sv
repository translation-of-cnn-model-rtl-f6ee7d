// tb_app_fifo: checks the application FIFO in both read modes against a queue.
//
// Two instances with DEPTH 8: the default registered-output mode (data the
// cycle after rd_en) and the show-ahead mode. Random writes and reads are
// applied, never writing when full nor reading when empty, and every popped
// word, the full and empty flags are compared with a queue model. The FIFO is
// also filled to exactly DEPTH words to check that full rises there.
module tb_app_fifo;
  localparam int DEPTH = 8;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        wr_en [2], rd_en [2], full [2], empty [2];
  logic [31:0] din [2], dout [2];

  app_fifo #(.WIDTH(32), .DEPTH(DEPTH), .SHOW_AHEAD(1'b0)) u_std (
    .clk, .rst, .wr_en(wr_en[0]), .din(din[0]), .full(full[0]),
    .rd_en(rd_en[0]), .dout(dout[0]), .empty(empty[0]));
  app_fifo #(.WIDTH(32), .DEPTH(DEPTH), .SHOW_AHEAD(1'b1)) u_fwft (
    .clk, .rst, .wr_en(wr_en[1]), .din(din[1]), .full(full[1]),
    .rd_en(rd_en[1]), .dout(dout[1]), .empty(empty[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int unsigned model [2][$];
    int unsigned exp_std;
    bit pending_std;
    for (int m = 0; m < 2; m++) begin wr_en[m] = 0; rd_en[m] = 0; din[m] = 0; end
    repeat (3) @(posedge clk);
    rst = 1'b0;
    pending_std = 0;
    exp_std = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // registered mode: the word popped last cycle is now on dout
      if (pending_std) check(dout[0] == exp_std, $sformatf("std dout %h exp %h", dout[0], exp_std));
      pending_std = 0;
      for (int m = 0; m < 2; m++) begin
        check(empty[m] == (model[m].size() == 0), $sformatf("empty flag mode %0d", m));
        check(full[m] == (model[m].size() == DEPTH), $sformatf("full flag mode %0d", m));
        if (m == 1 && model[1].size() != 0)
          check(dout[1] == model[1][0], $sformatf("fwft dout %h exp %h", dout[1], model[1][0]));
        // bias the mix so the FIFO spends time both full and empty
        wr_en[m] = !full[m] && ($urandom_range(99) < ((n / 500) % 2 ? 30 : 70));
        rd_en[m] = !empty[m] && ($urandom_range(99) < ((n / 500) % 2 ? 70 : 30));
        din[m]   = $urandom;
        if (rd_en[m]) begin
          if (m == 0) begin exp_std = model[0][0]; pending_std = 1; end
          void'(model[m].pop_front());
        end
        if (wr_en[m]) model[m].push_back(din[m]);
      end
    end
    @(negedge clk);
    if (pending_std) check(dout[0] == exp_std, "std last dout");
    for (int m = 0; m < 2; m++) begin wr_en[m] = 0; rd_en[m] = 0; end
    // drain, then fill to exactly DEPTH
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    for (int m = 0; m < 2; m++) model[m].delete();
    for (int k = 0; k < DEPTH; k++) begin
      check(!full[0] && !full[1], "not full before DEPTH words");
      wr_en[0] = !full[0]; wr_en[1] = !full[1]; din[0] = k; din[1] = k;
      @(negedge clk);
    end
    wr_en[0] = 0; wr_en[1] = 0;
    check(full[0] && full[1], "full after DEPTH words");
    check(dout[1] == 0, "fwft head after fill");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
