// tb_banked_buffer: checks the four-bank buffer against a byte array.
//
// Random packed words are written to random rows; random byte reads are then
// compared with a model array, one cycle after the read. Reads with re low
// must leave rdata unchanged, and a full sweep reads back every byte so that
// each bank and row is covered.
module tb_banked_buffer;
  localparam int BYTES = 256;
  localparam int BANKS = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                  we = 0, re = 0;
  logic [5:0]            wrow = 0;
  logic [31:0]           wdata = 0;
  logic [7:0]            raddr = 0;
  logic [7:0]            rdata;

  banked_buffer #(.BYTES(BYTES), .BANKS(BANKS)) dut (.*);

  int checks = 0, failures = 0;
  byte unsigned model [BYTES];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // fill every row once
    for (int r = 0; r < BYTES/BANKS; r++) begin
      @(negedge clk);
      we = 1; wrow = 6'(r); wdata = $urandom;
      for (int b = 0; b < BANKS; b++) model[r*BANKS + b] = wdata[8*b +: 8];
    end
    // random rewrites
    repeat (100) begin
      @(negedge clk);
      wrow = 6'($urandom_range(BYTES/BANKS - 1)); wdata = $urandom;
      for (int b = 0; b < BANKS; b++) model[wrow*BANKS + b] = wdata[8*b +: 8];
    end
    @(negedge clk); we = 0;
    // sweep all bytes
    for (int a = 0; a < BYTES; a++) begin
      re = 1; raddr = 8'(a);
      @(negedge clk);
      check(rdata == model[a], $sformatf("byte %0d got %h exp %h", a, rdata, model[a]));
    end
    // random reads with hold
    repeat (300) begin
      int a;
      a = $urandom_range(BYTES - 1);
      re = 1; raddr = 8'(a);
      @(negedge clk);
      check(rdata == model[a], $sformatf("rand byte %0d", a));
      re = 0; raddr = 8'($urandom);
      @(negedge clk);
      check(rdata == model[a], "rdata holds while re low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
