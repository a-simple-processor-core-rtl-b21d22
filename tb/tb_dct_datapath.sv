// tb_dct_datapath: self-checking test of the shift-add datapath.
//
// Replays the two-cycle operation example of the version-2 shifter
// placement (R3 = R4>>1 - R2 then R7 = R4 + R2 with both operands kept in
// the registers), then drives random control words and random RAM data and
// compares RA, RB and BUS each cycle against a model kept in the testbench:
// arithmetic right shift of RA by 0..3, add or subtract RB, clear before
// load, mux from RAM or BUS.  A watchdog ends the run.
module tb_dct_datapath;
  import dct_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  ctrl_t ctl;
  logic signed [15:0] ram_rdata, bus, ra_q, rb_q;
  int checks = 0, failures = 0;
  int ra_m, rb_m, bus_m, sh;

  dct_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap16(input int v);
    return int'($signed(16'(v)));
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    ctl = '0;
    ram_rdata = '0;
    @(negedge clk);
    rst_n = 1'b1;
    // Example: R4 = 100, R2 = -7
    ctl = '0; ctl.latch_a = 1'b1; ram_rdata = 16'sd100;
    @(negedge clk);
    ctl = '0; ctl.latch_b = 1'b1; ram_rdata = -16'sd7;
    @(negedge clk);
    ctl = '0; ctl.shift = 2'd1; ctl.sub = 1'b1;       // T1: R3 = R4>>1 - R2
    #1 check("R3", int'(bus), 57);
    @(negedge clk);
    ctl = '0; ctl.shift = 2'd0; ctl.sub = 1'b0;       // T2: R7 = R4 + R2
    #1 check("R7", int'(bus), 93);
    @(negedge clk);
    // Random operation
    ra_m = int'(ra_q); rb_m = int'(rb_q);
    for (int it = 0; it < 3000; it++) begin
      ctl = ctrl_t'($urandom);
      ram_rdata = 16'($urandom);
      #1;
      sh = int'(ctl.shift);
      bus_m = ctl.sub ? wrap16((ra_m >>> sh) - rb_m) : wrap16((ra_m >>> sh) + rb_m);
      check("bus", int'(bus), bus_m);
      @(posedge clk);
      if (ctl.reset_a) ra_m = 0;
      else if (ctl.latch_a) ra_m = ctl.mux_a ? bus_m : int'(ram_rdata);
      if (ctl.reset_b) rb_m = 0;
      else if (ctl.latch_b) rb_m = ctl.mux_b ? bus_m : int'(ram_rdata);
      @(negedge clk);
      check("ra", int'(ra_q), ra_m);
      check("rb", int'(rb_q), rb_m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
