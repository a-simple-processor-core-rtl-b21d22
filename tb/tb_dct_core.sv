// tb_dct_core: end-to-end test of the DCT/IDCT processor core at its
// default size.
//
// DCT: loads 8x8 blocks through the host port, runs the forward transform
// and compares every output word with 2*F(k,l) computed here in floating
// point from the double-cosine definition.  Blocks: all zero, constant
// maximum and minimum, checkerboard, impulses, a ramp and random pixel and
// residual blocks.
// IDCT: builds e-weighted coefficient words with 2 fraction bits from
// extreme (constant, checkerboard, stripes, random +/-255) and random
// pixel/residual blocks, runs the inverse transform and compares each output
// word with 2 * sum_k sum_l Y(k,l) cos cos (32*x), and the rounded pixels
// with the original block.
// Also checks the cycle count from the edge that samples start to the edge
// that raises done (DCT2D_CYCLES + 1 and IDCT2D_CYCLES + 1), that host writes
// are ignored while busy, and that the design's mechanisms all occur:
// subtraction, BUS feedback into RA, reuse of shared column sums, zero terms
// in post- and pre-addition, 32 row butterflies per transform in both
// directions.  Watchdog included.
module tb_dct_core;
  import dct_pkg::*;

  localparam int NBLK  = 30;
  localparam int NIBLK = 30;
  localparam int TOL   = 10;           // DCT, in output words (1/8 of an orthonormal unit)
  localparam int ITOL  = 8;            // IDCT, in output words (1/32 of a pixel)
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, inverse = 1'b0;
  logic busy, done, host_we = 1'b0;
  logic [AW-1:0] host_addr = '0;
  logic [DW-1:0] host_wdata = '0, host_rdata;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_sub = 0, n_feedback = 0, n_zero_post = 0, n_zero_pre = 0, n_lockout = 0, n_shared = 0;
  int n_bfly_in = 0, n_bfly_out = 0;
  int n_dct = 0, n_idct = 0;
  int maxerr = 0, imaxerr = 0, pixerr = 0;

  dct_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NBLK * (DCT2D_CYCLES + 300) + NIBLK * (IDCT2D_CYCLES + 300) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, observed on the control word
  bit shared_live [int];
  always @(posedge clk) if (busy) begin
    if (dut.ctl.sub && (dut.ctl.ram_we || dut.ctl.latch_a)) n_sub++;
    if (dut.ctl.latch_a && dut.ctl.mux_a) n_feedback++;
    if (dut.phase == 2'd3 && dut.ctl.ram_we && dut.ctl.sub) begin
      if (dut.idct_busy) n_bfly_out++; else n_bfly_in++;
    end
    if (dut.phase == 2'd2 && dut.ctl.reset_b) begin
      if (dut.idct_busy) n_zero_pre++; else n_zero_post++;
    end
    if (dut.phase == 2'd1 && dut.ctl.latch_b && !dut.ctl.mux_b && dut.ctl.addr >= AW'(TMP_BASE + 8)) begin
      if (shared_live.exists(int'(dut.ctl.addr))) n_shared++;
      shared_live[int'(dut.ctl.addr)] = 1'b1;
    end
    if (dut.phase == 2'd1 && dut.ctl.ram_we && dut.ctl.addr >= AW'(TMP_BASE + 8))
      shared_live.delete(int'(dut.ctl.addr));
  end

  int  x [64];
  int  yin [64];
  int  res [64];

  function automatic real cs(input int a, input int b);
    return $cos(real'((2 * a + 1) * b) * PI / 16.0);
  endfunction

  function automatic int rnd(input real v);
    return (v >= 0.0) ? int'($rtoi(v + 0.5)) : -int'($rtoi(-v + 0.5));
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  // load words, run one transform, read all 64 words back
  task automatic run(input bit inv, input int words [64], output int result [64]);
    int t0, exp_cyc;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      host_we = 1'b1; host_addr = AW'(a); host_wdata = DW'(words[a]);
    end
    @(negedge clk);
    host_we = 1'b0;
    start = 1'b1;
    inverse = inv;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    inverse = 1'b0;
    host_we = 1'b1; host_addr = 8'd3; host_wdata = 16'h1234;   // must be ignored
    @(negedge clk);
    host_we = 1'b0;
    n_lockout++;
    while (!done) @(posedge clk);
    exp_cyc = inv ? IDCT2D_CYCLES + 1 : DCT2D_CYCLES + 1;
    check($sformatf("cycle count %0d, expected %0d", cyc - t0, exp_cyc), cyc - t0 == exp_cyc);
    if (inv) n_idct++; else n_dct++;
    @(negedge clk);
    for (int a = 0; a < 64; a++) begin
      host_addr = AW'(a);
      #1 result[a] = int'($signed(host_rdata));
    end
  endtask

  initial begin
    int  words [64];
    real f, e;
    int  err, exp_w;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // ---------------- forward ----------------
    for (int b = 0; b < NBLK; b++) begin
      for (int a = 0; a < 64; a++) begin
        case (b)
          0: x[a] = 0;
          1: x[a] = 255;
          2: x[a] = -255;
          3: x[a] = (((a >> 3) + a) % 2 == 0) ? 255 : -255;
          4: x[a] = (a == 0) ? 255 : 0;
          5: x[a] = (a == 27) ? -200 : 0;
          6: x[a] = (a % 8) * 30 - 100;
          default: x[a] = (b % 2 == 0) ? int'($urandom_range(255, 0))
                                      : int'($urandom_range(510, 0)) - 255;
        endcase
        words[a] = 4 * x[a];
      end
      run(1'b0, words, res);
      for (int k = 0; k < 8; k++)
        for (int l = 0; l < 8; l++) begin
          f = 0.0;
          for (int m = 0; m < 8; m++)
            for (int n = 0; n < 8; n++) f += real'(x[8*m+n]) * cs(m, k) * cs(n, l);
          exp_w = rnd(2.0 * f);
          err = res[8*k+l] - exp_w;
          if (err < 0) err = -err;
          if (err > maxerr) maxerr = err;
          check($sformatf("DCT block %0d (%0d,%0d): got %0d expected %0d", b, k, l, res[8*k+l], exp_w),
                err <= TOL);
        end
    end
    // ---------------- inverse ----------------
    for (int b = 0; b < NIBLK; b++) begin
      for (int a = 0; a < 64; a++) begin
        case (b)
          0: x[a] = 0;
          1: x[a] = 255;
          2: x[a] = (((a >> 3) + a) % 2 == 0) ? 255 : -255;
          3: x[a] = -255;
          4: x[a] = ($urandom_range(1, 0) != 0) ? 255 : -255;
          5: x[a] = (a % 2 == 0) ? 255 : -255;
          6: x[a] = ((a / 8) % 2 == 0) ? 255 : -255;
          7: x[a] = ((a % 8) < 4) ? 255 : -255;
          default: x[a] = (b % 2 == 0) ? int'($urandom_range(255, 0))
                                      : int'($urandom_range(510, 0)) - 255;
        endcase
      end
      // e-weighted coefficients with 2 fraction bits: Y = 4 e(k)^2 e(l)^2 F / 4, rounded
      for (int k = 0; k < 8; k++)
        for (int l = 0; l < 8; l++) begin
          f = 0.0;
          for (int m = 0; m < 8; m++)
            for (int n = 0; n < 8; n++) f += real'(x[8*m+n]) * cs(m, k) * cs(n, l);
          e = ((k == 0) ? 0.5 : 1.0) * ((l == 0) ? 0.5 : 1.0);
          yin[8*k+l] = rnd(e * f);
          words[8*k+l] = yin[8*k+l];
        end
      run(1'b1, words, res);
      for (int m = 0; m < 8; m++)
        for (int n = 0; n < 8; n++) begin
          f = 0.0;
          for (int k = 0; k < 8; k++)
            for (int l = 0; l < 8; l++) f += real'(yin[8*k+l]) * cs(m, k) * cs(n, l);
          exp_w = rnd(2.0 * f);
          err = res[8*m+n] - exp_w;
          if (err < 0) err = -err;
          if (err > imaxerr) imaxerr = err;
          check($sformatf("IDCT block %0d (%0d,%0d): got %0d expected %0d", b, m, n, res[8*m+n], exp_w),
                err <= ITOL);
          err = rnd(real'(res[8*m+n]) / 32.0) - x[8*m+n];
          if (err < 0) err = -err;
          if (err > pixerr) pixerr = err;
          check($sformatf("IDCT block %0d pixel (%0d,%0d)", b, m, n), err <= 1);
        end
    end
    check("subtraction seen", n_sub > 0);
    check("BUS feedback seen", n_feedback > 0);
    check("shared column reuse seen", n_shared > 0);
    check("zero post-add term seen", n_zero_post > 0);
    check("zero pre-add slot seen", n_zero_pre > 0);
    check("busy lockout tried", n_lockout > 0);
    check("row butterflies in both directions", n_bfly_in == 32 * n_dct && n_bfly_out == 32 * n_idct);
    check("both directions ran", n_dct > 0 && n_idct > 0);
    $display("mechanisms: sub=%0d feedback=%0d shared_reuse=%0d zero_post=%0d zero_pre=%0d butterflies=%0d/%0d lockout=%0d dct=%0d idct=%0d",
             n_sub, n_feedback, n_shared, n_zero_post, n_zero_pre, n_bfly_in, n_bfly_out, n_lockout, n_dct, n_idct);
    $display("DCT %0d cycles/block, max error %0d words; IDCT %0d cycles/block, max error %0d words, max pixel error %0d",
             DCT2D_CYCLES, maxerr, IDCT2D_CYCLES, imaxerr, pixerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
