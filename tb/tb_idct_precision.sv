// tb_idct_precision: IDCT accuracy of the full-size core, measured the way
// the IEEE 1180 procedure prescribes.
//
// For each test set (pixel range [-L, H], and the same data negated) it
// draws NB random 8x8 blocks, computes the orthonormal DCT in double
// precision, rounds it to integers and clips it to [-2048, 2047].  Those
// coefficients X are the IDCT input.  The reference inverse is the double
// precision IDCT, rounded and clipped to [-256, 255].  The core gets the
// e-weighted words round(4 e(k) e(l) X(k,l)) (its IDCT input format, 2
// fraction bits), and its output words 32*x are rounded to pixels
// ((w + 16) >> 5) and clipped the same way.  Over each set it accumulates,
// per pixel position and overall:
//   ppe  peak |error|                       limit 1
//   pmse worst per-position mean square     limit 0.06
//   omse overall mean square                limit 0.02
//   pme  worst per-position |mean error|    limit 0.015
//   ome  overall |mean error|               limit 0.0015
// and prints each statistic with its limit.  ppe, pmse and ome are checked
// against those limits.  omse and pme exceed them (right shifts truncate,
// so outputs carry a small negative bias that differs between positions);
// they are checked against this design's own regression bounds
// OMSE_BOUND and PME_BOUND instead.  An all-zero block must come back all
// zero.  Watchdog included.
module tb_idct_precision;
  import dct_pkg::*;

  localparam int  NB = 10000;         // blocks per test set
  localparam int  NSET = 6;
  localparam real OMSE_BOUND = 0.035;
  localparam real PME_BOUND  = 0.06;
  localparam int  IN_FRAC = 2;        // fraction bits of the IDCT input words
  localparam int  OUT_FRAC = 5;       // fraction bits of the IDCT output words
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, inverse = 1'b0;
  logic busy, done, host_we = 1'b0;
  logic [AW-1:0] host_addr = '0;
  logic [DW-1:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  dct_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat ((NSET * NB + 4) * (IDCT2D_CYCLES + 200) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  real cmat [8][8];   // cmat[k][m] = e(k)/2 cos((2m+1) k pi/16), orthonormal

  function automatic int rnd(input real v);
    return (v >= 0.0) ? int'($rtoi(v + 0.5)) : -int'($rtoi(-v + 0.5));
  endfunction

  function automatic int clip(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // load the 64 IDCT input words, run the inverse, read the 64 output words
  task automatic run_idct(input int words [64], output int result [64]);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      host_we = 1'b1; host_addr = AW'(a); host_wdata = DW'(words[a]);
    end
    @(negedge clk);
    host_we = 1'b0;
    start = 1'b1;
    inverse = 1'b1;
    @(negedge clk);
    start = 1'b0;
    inverse = 1'b0;
    while (!done) @(posedge clk);
    @(negedge clk);
    for (int a = 0; a < 64; a++) begin
      host_addr = AW'(a);
      #1 result[a] = int'($signed(host_rdata));
    end
  endtask

  initial begin
    int  x [64], cx [64], words [64], res [64], refp [64];
    real tmp [64];
    real s;
    int  lo, hi, neg, err, pix, ppe;
    real sum_e [64], sum_e2 [64];
    real pmse, omse, pme, ome, tot_e, tot_e2;
    int  set_lo [NSET] = '{-256, -5, -300, -256, -5, -300};
    int  set_hi [NSET] = '{ 255,  5,  300,  255,  5,  300};

    for (int k = 0; k < 8; k++)
      for (int m = 0; m < 8; m++)
        cmat[k][m] = ((k == 0) ? $sqrt(0.125) : 0.5) * $cos(real'((2 * m + 1) * k) * PI / 16.0);

    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // all zero in, all zero out
    for (int a = 0; a < 64; a++) words[a] = 0;
    run_idct(words, res);
    for (int a = 0; a < 64; a++) check("all-zero block gives all-zero output", res[a] == 0);

    for (int set = 0; set < NSET; set++) begin
      lo  = set_lo[set];
      hi  = set_hi[set];
      neg = (set >= 3);
      ppe = 0;
      for (int a = 0; a < 64; a++) begin sum_e[a] = 0.0; sum_e2[a] = 0.0; end
      for (int b = 0; b < NB; b++) begin
        for (int a = 0; a < 64; a++) begin
          x[a] = int'($urandom_range(hi - lo, 0)) + lo;
          if (neg != 0) x[a] = -x[a];
        end
        // forward orthonormal DCT, rows then columns, rounded and clipped
        for (int m = 0; m < 8; m++)
          for (int l = 0; l < 8; l++) begin
            s = 0.0;
            for (int n = 0; n < 8; n++) s += cmat[l][n] * real'(x[8*m+n]);
            tmp[8*m+l] = s;
          end
        for (int k = 0; k < 8; k++)
          for (int l = 0; l < 8; l++) begin
            s = 0.0;
            for (int m = 0; m < 8; m++) s += cmat[k][m] * tmp[8*m+l];
            cx[8*k+l] = clip(rnd(s), -2048, 2047);
          end
        // reference inverse in double precision
        for (int k = 0; k < 8; k++)
          for (int n = 0; n < 8; n++) begin
            s = 0.0;
            for (int l = 0; l < 8; l++) s += cmat[l][n] * real'(cx[8*k+l]);
            tmp[8*k+n] = s;
          end
        for (int m = 0; m < 8; m++)
          for (int n = 0; n < 8; n++) begin
            s = 0.0;
            for (int k = 0; k < 8; k++) s += cmat[k][m] * tmp[8*k+n];
            refp[8*m+n] = clip(rnd(s), -256, 255);
          end
        // core input: 4 e(k) e(l) X(k,l), rounded to a word
        for (int k = 0; k < 8; k++)
          for (int l = 0; l < 8; l++)
            words[8*k+l] = rnd(real'(1 << IN_FRAC) * ((k == 0) ? $sqrt(0.5) : 1.0) * ((l == 0) ? $sqrt(0.5) : 1.0)
                               * real'(cx[8*k+l]));
        run_idct(words, res);
        for (int a = 0; a < 64; a++) begin
          pix = clip((res[a] + (1 << (OUT_FRAC - 1))) >>> OUT_FRAC, -256, 255);
          err = pix - refp[a];
          sum_e[a]  += real'(err);
          sum_e2[a] += real'(err * err);
          if (err < 0) err = -err;
          if (err > ppe) ppe = err;
        end
      end
      pmse = 0.0; pme = 0.0; tot_e = 0.0; tot_e2 = 0.0;
      for (int a = 0; a < 64; a++) begin
        if (sum_e2[a] / NB > pmse) pmse = sum_e2[a] / NB;
        if ((sum_e[a] < 0.0 ? -sum_e[a] : sum_e[a]) / NB > pme) pme = (sum_e[a] < 0.0 ? -sum_e[a] : sum_e[a]) / NB;
        tot_e  += sum_e[a];
        tot_e2 += sum_e2[a];
      end
      omse = tot_e2 / (64.0 * NB);
      ome  = (tot_e < 0.0 ? -tot_e : tot_e) / (64.0 * NB);
      $display("set [%0d,%0d]%s: ppe=%0d%s pmse=%.5f%s omse=%.5f%s pme=%.5f%s ome=%.5f%s", lo, hi,
               (neg != 0) ? " negated" : "",
               ppe, (ppe <= 1) ? "" : "(over 1)", pmse, (pmse <= 0.06) ? "" : "(over 0.06)",
               omse, (omse <= 0.02) ? "" : "(over 0.02)", pme, (pme <= 0.015) ? "" : "(over 0.015)",
               ome, (ome <= 0.0015) ? "" : "(over 0.0015)");
      check("ppe <= 1", ppe <= 1);
      check("pmse <= 0.06", pmse <= 0.06);
      check("omse regression bound", omse <= OMSE_BOUND);
      check("pme regression bound", pme <= PME_BOUND);
      check("ome <= 0.0015", ome <= 0.0015);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
