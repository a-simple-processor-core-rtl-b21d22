// tb_dct_ram: self-checking test of the one-port working RAM.
//
// Writes every word with a value derived from its address, reads all words
// back, then does random single-port read/write traffic against a model
// array kept in the testbench.  Checks that a write takes effect at the clock
// edge and that a read returns the addressed word in the same cycle.
module tb_dct_ram;
  logic clk = 1'b0, we = 1'b0;
  logic [7:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  dct_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("addr %0d: got %h expected %h", addr, got, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1'b1; addr = 8'(a); wdata = 16'(a * 257 ^ 16'h5a3c);
      model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      #1 check(int'(rdata), int'(model[a]));
    end
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      we = 1'($urandom);
      addr = 8'($urandom);
      wdata = 16'($urandom);
      #1;
      check(int'(rdata), int'(model[addr]));      // old value before the edge
      if (we) model[addr] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      #1 check(int'(rdata), int'(model[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
