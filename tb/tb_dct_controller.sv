// tb_dct_controller: self-checking test of the counter-based DCT controller.
//
// Runs the controller on its own (no datapath or RAM) and checks the control
// stream against rules worked out here independently:
//   * one-port rule: no cycle both writes the RAM and loads a register from it;
//   * butterfly phase: 32 groups of read a, read b, write a (add), write b
//     (subtract), with a = x(m,n), b = x(m,7-n) and (2n+1) = +/-(2i+1)(2m+1)
//     mod 32 for some i < 4; every (m, i) pair occurs exactly once;
//   * 1-D phase: every input word 8*m+n is read exactly once: by transform
//     i < 4 when (2n+1) = +/-(2i+1)(2m+1) mod 32, by transform 4+i when
//     (2(7-n)+1) = +/-(2i+1)(2m+1); every result word V_b(q) is written
//     exactly once; scratch accesses stay in the scratch area;
//   * post-addition phase: for output (k,l) the terms fetched (address and
//     add/subtract) are exactly W_i(k+(2i+1)l) and W_i(k-(2i+1)l), i < 4,
//     with W_i = V_i for even l and V_{4+i} for odd l, folded with
//     C(-r) = C(r), C(16-r) = -C(r), C(8) = 0, and each output word is
//     written once;
//   * done rises DCT2D_CYCLES + 1 edges after the edge that samples start,
//     busy is high exactly in between, and start while busy is ignored.
module tb_dct_controller;
  import dct_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  ctrl_t ctl;
  logic busy, done;
  logic [1:0] phase;
  int checks = 0, failures = 0;

  dct_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3 * (DCT2D_CYCLES + 100)) @(posedge clk);
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

  int in_reads [64];
  int in_blk [64];
  int v_writes [64];
  int x_writes [64];
  int blk_of_cycle, cyc1d, t_post, out_idx;
  int got_terms [64];   // per post-add output: signature
  int exp_sig, got_sig, term_no, pending_addr, pending_neg, pending_zero;
  int kk, ll, ii, r, q, ng, zz, cnt, t0, tdone;
  int bcyc, ba, bm, bi, bpair [8][4];

  // reference term r of output (kk,ll): returns q, ng, zz
  task automatic ref_term(input int k_, input int l_, input int j, output int q_, output int n_, output int z_);
    int rr;
    rr = (j % 2 == 0) ? (k_ + (2 * (j / 2) + 1) * l_) : (k_ - (2 * (j / 2) + 1) * l_);
    rr = ((rr % 32) + 32) % 32;
    if (rr > 16) rr = 32 - rr;
    z_ = (rr == 8);
    n_ = (rr > 8);
    q_ = (rr > 8) ? 16 - rr : rr;
  endtask

  initial begin
    for (int a = 0; a < 64; a++) begin in_reads[a] = 0; v_writes[a] = 0; x_writes[a] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("idle after reset", !busy && !done);
    start = 1'b1;
    @(posedge clk);
    t0 = $time;
    @(negedge clk);
    start = 1'b0;
    cyc1d = 0;
    term_no = 0;
    out_idx = 0;
    bcyc = 0;
    ba = 0;
    for (int m = 0; m < 8; m++) for (int i = 0; i < 4; i++) bpair[m][i] = 0;
    // walk the control stream, one cycle per iteration, sampled mid-cycle
    while (busy) begin
      if (ctl.ram_we && ((ctl.latch_a && !ctl.mux_a && !ctl.reset_a) || (ctl.latch_b && !ctl.mux_b && !ctl.reset_b)))
        check("one-port rule", 1'b0);
      if (cyc1d == DCT1D_LEN * 4) start = 1'b1;      // ignored while busy
      else start = 1'b0;
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
      end else if (phase == 2'd1) begin
        blk_of_cycle = cyc1d / DCT1D_LEN;
        if (((ctl.latch_a && !ctl.mux_a && !ctl.reset_a) || (ctl.latch_b && !ctl.mux_b && !ctl.reset_b)) && int'(ctl.addr) < 64) begin
          in_reads[ctl.addr]++;
          in_blk[ctl.addr] = blk_of_cycle;
        end
        if (ctl.ram_we) begin
          if (int'(ctl.addr) >= 64 && int'(ctl.addr) < 128) v_writes[ctl.addr - 64]++;
          else if (int'(ctl.addr) < 64) check("1-D phase writes no input word", 1'b0);
        end
        if (int'(ctl.addr) >= 64 && int'(ctl.addr) < 128 && ctl.ram_we)
          check("V written by its own transform", (int'(ctl.addr) - 64) / 8 == blk_of_cycle);
        cyc1d++;
      end else if (phase == 2'd2) begin
        kk = out_idx / 8; ll = out_idx % 8;
        if (term_no < 8) begin
          // the fetch for term term_no happens in this cycle
          ref_term(kk, ll, term_no, q, ng, zz);
          if (zz) check("zero term uses Reset_B", ctl.reset_b && !ctl.latch_b);
          else check($sformatf("term (%0d,%0d) #%0d address", kk, ll, term_no),
                     ctl.latch_b && !ctl.mux_b && int'(ctl.addr) == 64 + 8 * (4 * (ll % 2) + term_no / 2) + q);
          if (term_no == 0) check("accumulator cleared", ctl.reset_a);
          else check("accumulate on BUS", ctl.latch_a && ctl.mux_a && !ctl.reset_a);
        end
        if (term_no >= 1) begin
          // the add/subtract of term term_no-1 happens in this cycle
          ref_term(kk, ll, term_no - 1, q, ng, zz);
          if (!zz) check($sformatf("term (%0d,%0d) #%0d sign", kk, ll, term_no - 1), ctl.sub == 1'(ng));
        end
        if (term_no == 8) begin
          check("output write", ctl.ram_we && int'(ctl.addr) == out_idx);
          x_writes[out_idx]++;
          term_no = 0;
          out_idx++;
        end else begin
          term_no++;
        end
      end
      @(negedge clk);
    end
    check("done after busy", done);
    tdone = $time;
    check("latency", (tdone - t0 + 5) / 10 == DCT2D_CYCLES + 1);
    check("1-D cycles", cyc1d == 8 * DCT1D_LEN);
    check("butterfly cycles", bcyc == BFLY_LEN);
    for (int m = 0; m < 8; m++)
      for (int i = 0; i < 4; i++) check("each butterfly pair once", bpair[m][i] == 1);
    check("64 outputs", out_idx == 64);
    for (int a = 0; a < 64; a++) begin
      check("each input read once", in_reads[a] == 1);
      // input x(m,n) read by transform i with (2n+1) = +/-(2i+1)(2m+1) mod 32
      r = ((2 * (in_blk[a] % 4) + 1) * (2 * (a / 8) + 1)) % 32;
      q = (in_blk[a] < 4) ? 2 * (a % 8) + 1 : 2 * (7 - a % 8) + 1;
      check("input permutation", r == q || 32 - r == q);
      check("each V written once", v_writes[a] == 1);
      check("each output written once", x_writes[a] == 1);
    end
    @(negedge clk);
    check("done is one cycle", !done && !busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
