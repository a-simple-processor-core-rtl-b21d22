// tb_idct_controller: self-checking test of the counter-based IDCT controller.
//
// Runs the controller on its own and checks its control stream:
//   * one-port rule: no cycle both writes the RAM and loads a register from it;
//   * pre-addition phase: for every G_b(q), b = i + 4h, the multiset of
//     coefficient words fetched, each with its add/subtract sign, equals the
//     one worked out here by enumerating all (k, l with l mod 2 = h,
//     s = +/-) and folding k + s(2i+1)l onto q (C(-r) = C(r),
//     C(16-r) = -C(r), C(8) = 0); the accumulator is cleared first and the
//     sum is written to V_b(q);
//   * 1-D phase: every word x(m,n) is written exactly once: by transform
//     i < 4 when (2n+1) = +/-(2i+1)(2m+1) mod 32, by transform 4+i when
//     (2(7-n)+1) = +/-(2i+1)(2m+1); no V word is written;
//   * butterfly phase: 32 groups of read a, read b, write a (add), write b
//     (subtract), a = x(m,n), b = x(m,7-n), each (m, i < 4) pair once;
//   * done rises IDCT2D_CYCLES + 1 edges after the edge that samples start
//     and lasts one cycle; start while busy is ignored.
module tb_idct_controller;
  import dct_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  ctrl_t ctl;
  logic busy, done;
  logic [1:0] phase;
  int checks = 0, failures = 0;

  idct_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3 * (IDCT2D_CYCLES + 100)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  int exp_cnt [64][128];   // [(i,q)][coefficient word*2 + sign]
  int got_cnt [64][128];
  int x_writes [64];
  int wr_blk [64];
  int g, slot, t0, cyc1d, r, q, pending, pend_addr;
  int bcyc, ba, bm, bi, bpair [8][4];

  initial begin
    // reference enumeration
    for (int a = 0; a < 64; a++) for (int b = 0; b < 128; b++) begin exp_cnt[a][b] = 0; got_cnt[a][b] = 0; end
    for (int a = 0; a < 64; a++) x_writes[a] = 0;
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 8; k++)
        for (int l = 0; l < 8; l++)
          for (int s = 0; s < 2; s++) begin
            r = s ? (k - (2 * i + 1) * l) : (k + (2 * i + 1) * l);
            r = ((r % 32) + 32) % 32;
            if (r > 16) r = 32 - r;
            if (r != 8) begin
              if (r > 8) exp_cnt[8 * (i + 4 * (l % 2)) + 16 - r][2 * (8 * k + l) + 1]++;
              else       exp_cnt[8 * (i + 4 * (l % 2)) + r][2 * (8 * k + l)]++;
            end
          end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("idle after reset", !busy && !done);
    start = 1'b1;
    @(posedge clk);
    t0 = $time;
    @(negedge clk);
    start = 1'b0;
    g = 0; slot = 0; cyc1d = 0; pending = 0; bcyc = 0; ba = 0;
    for (int m = 0; m < 8; m++) for (int i = 0; i < 4; i++) bpair[m][i] = 0;
    while (busy) begin
      if (ctl.ram_we && ((ctl.latch_a && !ctl.mux_a && !ctl.reset_a) || (ctl.latch_b && !ctl.mux_b && !ctl.reset_b)))
        check("one-port rule", 1'b0);
      start = (cyc1d == 5);                       // ignored while busy
      if (phase == 2'd3) begin
        unique case (bcyc % 4)
          0: begin
            check("butterfly read a", ctl.latch_a && !ctl.mux_a && !ctl.reset_a && !ctl.ram_we && int'(ctl.addr) < 64);
            ba = int'(ctl.addr);
            bm = ba / 8;
            bi = -1;
            for (int i = 0; i < 4; i++) begin
              r = ((2 * i + 1) * (2 * bm + 1)) % 32;
              if (r == 2 * (ba % 8) + 1 || 32 - r == 2 * (ba % 8) + 1) bi = i;
            end
            check("butterfly pair belongs to a transform i < 4", bi >= 0);
            if (bi >= 0) bpair[bm][bi]++;
          end
          1: check("butterfly read b = x(m,7-n)", ctl.latch_b && !ctl.mux_b && !ctl.reset_b && !ctl.ram_we &&
                   int'(ctl.addr) == 8 * bm + 7 - ba % 8);
          2: check("butterfly sum written to a", ctl.ram_we && !ctl.sub && int'(ctl.addr) == ba);
          default: check("butterfly difference written to b", ctl.ram_we && ctl.sub && ctl.shift == 2'd0 &&
                         int'(ctl.addr) == 8 * bm + 7 - ba % 8);
        endcase
        bcyc++;
      end else if (phase == 2'd2) begin
        // the add/subtract of the term fetched in the previous cycle
        if (pending) got_cnt[g][2 * pend_addr + int'(ctl.sub)]++;
        pending = 0;
        if (slot == 0) check("accumulator cleared", ctl.reset_a);
        if (slot < PRE_LEN - 1) begin
          if (ctl.latch_b && !ctl.reset_b) begin
            check("fetch from coefficient block", !ctl.mux_b && int'(ctl.addr) < 64);
            pending = 1; pend_addr = int'(ctl.addr);
          end else begin
            check("empty slot clears RB", ctl.reset_b);
          end
          if (slot > 0) check("accumulate on BUS", ctl.latch_a && ctl.mux_a);
          slot++;
        end else begin
          check($sformatf("G write %0d", g), ctl.ram_we && int'(ctl.addr) == 64 + g);
          slot = 0;
          g++;
        end
      end else if (phase == 2'd1) begin
        if (ctl.ram_we) begin
          check("1-D phase writes no V word", int'(ctl.addr) < 64 || int'(ctl.addr) >= 128);
          if (int'(ctl.addr) < 64) begin
            x_writes[ctl.addr]++;
            wr_blk[ctl.addr] = cyc1d / IDCT1D_LEN;
          end
        end
        cyc1d++;
      end
      @(negedge clk);
    end
    check("done after busy", done);
    check("latency", ($time - t0 + 5) / 10 == IDCT2D_CYCLES + 1);
    check("64 pre-additions", g == 64);
    check("1-D cycles", cyc1d == 8 * IDCT1D_LEN);
    check("butterfly cycles", bcyc == BFLY_LEN);
    for (int m = 0; m < 8; m++)
      for (int i = 0; i < 4; i++) check("each butterfly pair once", bpair[m][i] == 1);
    for (int a = 0; a < 64; a++) begin
      for (int b = 0; b < 128; b++)
        check($sformatf("G_%0d(%0d) term %0d sign %0d count %0d expected %0d", a / 8, a % 8, b / 2, b % 2,
                        got_cnt[a][b], exp_cnt[a][b]), got_cnt[a][b] == exp_cnt[a][b]);
      check("each output written once", x_writes[a] == 1);
      r = ((2 * (wr_blk[a] % 4) + 1) * (2 * (a / 8) + 1)) % 32;
      q = (wr_blk[a] < 4) ? 2 * (a % 8) + 1 : 2 * (7 - a % 8) + 1;
      check("output permutation", r == q || 32 - r == q);
    end
    @(negedge clk);
    check("done is one cycle", !done && !busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
