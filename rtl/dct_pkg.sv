// dct_pkg: types, constants and elaboration-time program generation shared by
// the DCT processor core.
//
// The core computes an 8x8 2-D DCT on a single shift-add datapath
// (BUS = (RA >> s) +/- RB).  Everything that is specific to the transform
// lives in the controller's "combinational circuit": the control word it
// emits each cycle (ctrl_t) and the operand addresses.  This package holds
//   * the control word layout (one field per control line of the datapath),
//   * the RAM map of the working memory,
//   * the DCT coefficients c(i) = 1/2 cos(i*pi/16) as 16-bit fractions,
//     exactly the two's complement column of the coefficient table,
//   * functions that turn those coefficients into the 1-D DCT microprogram:
//     each coefficient is recoded into non-adjacent signed digits (CSD), the
//     digit columns of each 4x4 coefficient half-matrix become the terms of an
//     adder-based distributed-arithmetic sum, equal columns (up to sign) are
//     computed once and shared where storing them saves cycles (otherwise
//     their inputs are added straight into the accumulator), and every output is accumulated LSB column
//     first as acc = (acc >> s) +/- column, with shifts split into steps of at
//     most 3 bits,
//     The same generator, with c(i) instead of c(i)/2 and the data flow
//     reversed (columns from the inputs G(q), even/odd halves, then output
//     butterflies), produces the inverse 1-D microprogram,
//   * the index mappings of the direct 2-D algorithm (input permutation, the
//     row butterfly stage and folding of the post-addition frequencies),
//     used by the address generators of both controllers.
// The coefficient values, the 16-bit word, the 0-3 bit shifter and the
// "shifter only on RA" rule are the source design's; the RAM map, the
// control-word encoding and the exact operation schedule are this design's
// own.
package dct_pkg;

  localparam int unsigned DW = 16;           // datapath word (16-bit adder)
  localparam int unsigned AW = 8;            // RAM address bits
  localparam int unsigned RAM_WORDS = 256;   // one-port working memory

  // RAM map (physical word addresses)
  localparam int unsigned X_BASE   = 0;      // 64-word input block x(m,n) at m*8+n; outputs overwrite it
  localparam int unsigned V_BASE   = 64;     // 1-D results V_b(q) (or IDCT G_b(q)) at 64 + 8*b + q
  localparam int unsigned TMP_BASE = 128;    // scratch: butterfly sums/differences and shared columns

  // One control word per cycle, one field per control line of the datapath
  // and RAM.  'addr' is a physical address when leaving the controller; inside
  // the 1-D microprogram it is a virtual operand (class in [7:6]).
  typedef struct packed {
    logic [AW-1:0] addr;     // RAM_Addr
    logic          ram_we;   // Read/Write: 1 = write BUS into RAM[addr]
    logic          mux_a;    // MUX_A: 0 = RAM read data, 1 = BUS
    logic          latch_a;  // Latch_A
    logic          reset_a;  // Reset_A: clear RA (wins over Latch_A)
    logic          mux_b;    // MUX_B: 0 = RAM read data, 1 = BUS
    logic          latch_b;  // Latch_B
    logic          reset_b;  // Reset_B: clear RB (wins over Latch_B)
    logic [1:0]    shift;    // Shift[n]: RA >> shift (arithmetic), 0..3
    logic          sub;      // ADD/SUB: 1 = (RA>>s) - RB
  } ctrl_t;

  localparam int unsigned CW = $bits(ctrl_t);

  // Virtual operand classes of the 1-D microprogram
  localparam logic [1:0] VC_IN  = 2'd0;      // z_i(m): input sample of the current 1-D DCT
  localparam logic [1:0] VC_OUT = 2'd1;      // V_i(q): result of the current 1-D DCT
  localparam logic [1:0] VC_TMP = 2'd2;      // scratch word j

  // c(i) = 1/2 cos(i*pi/16), i = 1..7, 16 fraction bits; entry 0 is 1/2.
  localparam logic [15:0] CTAB [8] = '{
    16'h8000, 16'h7D8A, 16'h7641, 16'h6A6D, 16'h5A82, 16'h471C, 16'h30FB, 16'h18F8
  };

  localparam int unsigned PROG_MAX = 256;    // capacity of the 1-D microprogram ROM
  typedef logic [CW-1:0] prog_t [PROG_MAX];

  // ------------------------------------------------------------------
  // Index mappings of the direct 2-D algorithm
  // ------------------------------------------------------------------

  // Column n paired with row m in 1-D transform i: (2n+1) = +/-(2i+1)(2m+1) mod 32.
  function automatic logic [2:0] perm_col(input logic [2:0] i, input logic [2:0] m);
    logic [4:0] r;
    r = 5'((({2'b0, i} << 1) + 5'd1) * (({2'b0, m} << 1) + 5'd1));
    if (r > 5'd16) r = 5'd0 - r;             // 32 - r
    return 3'((r - 5'd1) >> 1);
  endfunction

  // Row butterfly stage, cycle t (0..3) of pair (i, m), i = 0..3: the two
  // words x(m, n) and x(m, 7-n), n = perm_col(i, m), are replaced by their sum
  // and difference: t0 RA <- x(m,n), t1 RB <- x(m,7-n), t2 x(m,n) <- RA+RB,
  // t3 x(m,7-n) <- RA-RB.
  function automatic ctrl_t bfly_ctrl(input logic [1:0] i, input logic [2:0] m, input logic [1:0] t);
    ctrl_t c;
    logic [2:0] n;
    n = perm_col({1'b0, i}, m);
    c = '0;
    c.addr = AW'(X_BASE) + {2'b00, m, (t[0] ? ~n : n)};
    unique case (t)
      2'd0:    c.latch_a = 1'b1;
      2'd1:    c.latch_b = 1'b1;
      2'd2:    c.ram_we  = 1'b1;
      default: begin c.ram_we = 1'b1; c.sub = 1'b1; end
    endcase
    return c;
  endfunction

  // Address of sample m of the sequence fed to 1-D transform blk: blk = i < 4
  // reads the butterfly sums at x(m, n), blk = 4 + i the differences at
  // x(m, 7-n), n = perm_col(i, m).
  function automatic logic [AW-1:0] seq_addr(input logic [2:0] blk, input logic [2:0] m);
    logic [2:0] n;
    n = perm_col({1'b0, blk[1:0]}, m);
    return AW'(X_BASE) + {2'b00, m, (blk[2] ? ~n : n)};
  endfunction

  // Folding of a 1-D frequency index r (mod 32) onto 0..7:
  // C(-r) = C(r), C(16-r) = -C(r), C(8) = 0.
  typedef struct packed {
    logic       zero;
    logic       neg;
    logic [2:0] q;
  } fold_t;

  function automatic fold_t fold_freq(input logic [4:0] r_in);
    logic [4:0] r;
    fold_t f;
    r = r_in;
    if (r > 5'd16) r = 5'd0 - r;             // 32 - r
    f.zero = (r == 5'd8);
    f.neg  = (r > 5'd8);
    f.q    = f.neg ? 3'(5'd16 - r) : r[2:0];
    return f;
  endfunction

  // ------------------------------------------------------------------
  // 1-D DCT microprogram generation (elaboration time)
  // ------------------------------------------------------------------

  // Coefficient of input m in output q: index into CTAB and sign.
  function automatic int coef_idx(input int q, input int m);
    int r;
    r = ((2 * m + 1) * q) % 32;
    if (r > 16) r = 32 - r;
    if (r > 8) r = 16 - r;
    return r;
  endfunction

  function automatic bit coef_neg(input int q, input int m);
    int r;
    r = ((2 * m + 1) * q) % 32;
    if (r > 16) r = 32 - r;
    return r > 8;
  endfunction

  // Non-adjacent-form (CSD) digit b (weight 2^b) of an unsigned value: -1, 0 or +1.
  function automatic int csd_digit(input int v, input int b);
    int x, d;
    x = v;
    d = 0;
    for (int k = 0; k <= b; k++) begin
      if (x % 2 != 0) begin
        d = 2 - (x % 4);
        x = x - d;
      end else begin
        d = 0;
      end
      x = x / 2;
    end
    return d;
  endfunction

  function automatic logic [CW-1:0] cw(input ctrl_t c);
    return c;
  endfunction

  function automatic logic [AW-1:0] vaddr(input logic [1:0] cls, input int idx);
    return {cls, 6'(idx)};
  endfunction

  // Digit of coefficient row q, column m at column weight 2^-k.  The forward
  // transform uses c/2 (weights 2^-1..2^-17), the inverse c (2^-0..2^-16).
  function automatic int coef_digit(input bit inv, input int q, input int m, input int k);
    int d;
    d = csd_digit(int'(CTAB[coef_idx(q, m)]), (inv ? 16 : 17) - k);
    return coef_neg(q, m) ? -d : d;
  endfunction

  // Builds the microprogram of one 1-D 8-point transform.
  //   forward (inv = 0): V(q) = 1/4 sum_m z(m) cos((2m+1)q pi/16), q = 0..7.
  //     Butterflies first: u_m = z(m)+z(7-m) at TMP m, w_m = z(m)-z(7-m) at
  //     TMP 4+m; then V(0,4,2,6) from u and V(1,3,5,7) from w.
  //   inverse (inv = 1): z(m) = 2 sum_q G(q) c(q,m), c(q,m) = 1/2 cos((2m+1)q pi/16)
  //     (1/2 for q = 0), G read from the V area.  The factor 2 comes from
  //     ending the final scaling shift one bit early.  E(m) from G(0,4,2,6) at
  //     TMP m, O(m) from G(1,3,5,7) at TMP 4+m; butterflies last:
  //     z(m) = E(m)+O(m), z(7-m) = E(m)-O(m).
  // Shared column sums live from TMP 8 on (reused by the second half).
  function automatic prog_t gen_prog(input bit inv);
    prog_t p;
    ctrl_t c;
    int    n;
    int    qs [4];
    int    in_opd [4];
    int    npat;
    int    pat_pos [32];
    int    pat_neg [32];
    int    pat_opd [32];
    int    pat_use [32];
    bit    pat_inl [32];   // column added into the accumulator input by input
    int    col_pat [18];
    int    col_sgn [18];
    int    op_sh  [96];
    int    op_opd [96];   // virtual address, or -1 for zero
    int    op_neg [96];
    int    nops, ntmp, kprev, d, pos, neg, first, cnt, idx, kmax;
    bit    prv;

    for (int a = 0; a < int'(PROG_MAX); a++) p[a] = '0;
    n = 0;
    kmax = inv ? 16 : 17;

    // Input butterflies (forward)
    if (!inv) begin
      for (int m = 0; m < 4; m++) begin
        c = '0; c.addr = vaddr(VC_IN, m);      c.latch_a = 1'b1; p[n] = cw(c); n++;
        c = '0; c.addr = vaddr(VC_IN, 7 - m);  c.latch_b = 1'b1; p[n] = cw(c); n++;
        c = '0; c.addr = vaddr(VC_TMP, m);     c.ram_we = 1'b1; p[n] = cw(c); n++;
        c = '0; c.addr = vaddr(VC_TMP, 4 + m); c.ram_we = 1'b1; c.sub = 1'b1; p[n] = cw(c); n++;
      end
    end

    for (int half = 0; half < 2; half++) begin
      if (half == 0) begin qs[0] = 0; qs[1] = 4; qs[2] = 2; qs[3] = 6; end
      else           begin qs[0] = 1; qs[1] = 3; qs[2] = 5; qs[3] = 7; end
      for (int j = 0; j < 4; j++)
        in_opd[j] = inv ? int'(vaddr(VC_OUT, qs[j])) : int'(vaddr(VC_TMP, half * 4 + j));
      npat = 0;
      ntmp = 8;
      // Collect the distinct digit columns (up to sign)
      for (int oi = 0; oi < 4; oi++) begin
        for (int k = 1; k <= kmax; k++) begin
          pos = 0; neg = 0;
          for (int j = 0; j < 4; j++) begin
            d = inv ? coef_digit(inv, qs[j], oi, k) : coef_digit(inv, qs[oi], j, k);
            if (d > 0) pos |= (1 << j);
            if (d < 0) neg |= (1 << j);
          end
          if ((pos | neg) != 0) begin
            first = (pos | neg) & -(pos | neg);
            if ((neg & first) != 0) begin d = pos; pos = neg; neg = d; end
            idx = -1;
            for (int j = 0; j < npat; j++)
              if (pat_pos[j] == pos && pat_neg[j] == neg) idx = j;
            if (idx < 0) begin
              pat_pos[npat] = pos; pat_neg[npat] = neg; pat_use[npat] = 1; npat++;
            end else begin
              pat_use[idx]++;
            end
          end
        end
      end
      // Compute each shared column sum once.  A column of cnt inputs used n
      // times costs cnt + 1 + n cycles when stored and n * cnt when added
      // into the accumulator input by input; the cheaper way is taken.
      for (int j = 0; j < npat; j++) begin
        cnt = 0;
        for (int m = 0; m < 4; m++) if ((((pat_pos[j] | pat_neg[j]) >> m) & 1) != 0) cnt++;
        pat_inl[j] = (cnt > 1) && ((pat_use[j] - 1) * (cnt - 1) < 2);
        pat_opd[j] = -1;
        if (pat_inl[j]) begin
          // nothing to precompute
        end else if (cnt == 1) begin
          for (int m = 0; m < 4; m++)
            if (((pat_pos[j] >> m) & 1) != 0) pat_opd[j] = in_opd[m];
        end else begin
          pat_opd[j] = int'(vaddr(VC_TMP, ntmp));
          ntmp++;
          cnt = 0;
          prv = 0;
          for (int m = 0; m < 4; m++) begin
            if ((((pat_pos[j] | pat_neg[j]) >> m) & 1) != 0) begin
              c = '0;
              c.addr = 8'(in_opd[m]);
              if (cnt == 0)      begin c.latch_a = 1'b1; end
              else if (cnt == 1) begin c.latch_b = 1'b1; end
              else begin
                c.latch_a = 1'b1; c.mux_a = 1'b1; c.latch_b = 1'b1;
                c.sub = prv;
              end
              if (cnt >= 1) prv = ((pat_neg[j] >> m) & 1) != 0;
              p[n] = cw(c); n++;
              cnt++;
            end
          end
          c = '0; c.addr = 8'(pat_opd[j]); c.ram_we = 1'b1; c.sub = prv;
          p[n] = cw(c); n++;
        end
      end
      // Accumulate each output, LSB column first
      for (int oi = 0; oi < 4; oi++) begin
        for (int k = 1; k <= kmax; k++) begin
          col_pat[k] = -1; col_sgn[k] = 0;
          pos = 0; neg = 0;
          for (int j = 0; j < 4; j++) begin
            d = inv ? coef_digit(inv, qs[j], oi, k) : coef_digit(inv, qs[oi], j, k);
            if (d > 0) pos |= (1 << j);
            if (d < 0) neg |= (1 << j);
          end
          if ((pos | neg) != 0) begin
            first = (pos | neg) & -(pos | neg);
            if ((neg & first) != 0) begin d = pos; pos = neg; neg = d; col_sgn[k] = 1; end
            for (int j = 0; j < npat; j++)
              if (pat_pos[j] == pos && pat_neg[j] == neg) col_pat[k] = j;
          end
        end
        nops = 0;
        kprev = -1;
        for (int k = kmax; k >= 1; k--) begin
          if (col_pat[k] >= 0) begin
            if (kprev < 0) d = 0; else d = kprev - k;
            while (d > 3) begin
              op_sh[nops] = 3; op_opd[nops] = -1; op_neg[nops] = 0; nops++;
              d -= 3;
            end
            idx = col_pat[k];
            if (pat_inl[idx]) begin
              for (int m = 0; m < 4; m++)
                if ((((pat_pos[idx] | pat_neg[idx]) >> m) & 1) != 0) begin
                  op_sh[nops] = d; op_opd[nops] = in_opd[m];
                  op_neg[nops] = col_sgn[k] ^ ((pat_neg[idx] >> m) & 1); nops++;
                  d = 0;
                end
            end else begin
              op_sh[nops] = d; op_opd[nops] = pat_opd[idx]; op_neg[nops] = col_sgn[k]; nops++;
            end
            kprev = k;
          end
        end
        // final scaling by 2^-k of the last (most significant) column; the
        // inverse stops one bit early (outputs carry a gain of 2)
        d = inv ? kprev - 1 : kprev;
        while (d > 0) begin
          op_sh[nops] = (d > 3) ? 3 : d; op_opd[nops] = -1; op_neg[nops] = 0; nops++;
          d -= 3;
        end
        // cycle 0: clear RA, fetch first operand into RB
        c = '0; c.reset_a = 1'b1;
        if (op_opd[0] < 0) c.reset_b = 1'b1; else begin c.addr = 8'(op_opd[0]); c.latch_b = 1'b1; end
        p[n] = cw(c); n++;
        for (int j = 0; j < nops; j++) begin
          c = '0;
          c.shift = 2'(op_sh[j]);
          c.sub   = 1'(op_neg[j]);
          if (j == nops - 1) begin
            c.addr = inv ? vaddr(VC_TMP, half * 4 + oi) : vaddr(VC_OUT, qs[oi]);
            c.ram_we = 1'b1;
          end else begin
            c.latch_a = 1'b1; c.mux_a = 1'b1;
            if (op_opd[j + 1] < 0) c.reset_b = 1'b1;
            else begin c.addr = 8'(op_opd[j + 1]); c.latch_b = 1'b1; end
          end
          p[n] = cw(c); n++;
        end
      end
    end

    // Output butterflies (inverse)
    if (inv) begin
      for (int m = 0; m < 4; m++) begin
        c = '0; c.addr = vaddr(VC_TMP, m);     c.latch_a = 1'b1; p[n] = cw(c); n++;
        c = '0; c.addr = vaddr(VC_TMP, 4 + m); c.latch_b = 1'b1; p[n] = cw(c); n++;
        c = '0; c.addr = vaddr(VC_IN, m);      c.ram_we = 1'b1; p[n] = cw(c); n++;
        c = '0; c.addr = vaddr(VC_IN, 7 - m);  c.ram_we = 1'b1; c.sub = 1'b1; p[n] = cw(c); n++;
      end
    end
    return p;
  endfunction

  // Number of microinstructions in gen_prog() (every real word is non-zero).
  function automatic int prog_len(input prog_t p);
    int l;
    l = 0;
    for (int a = 0; a < int'(PROG_MAX); a++) if (p[a] != '0) l = a + 1;
    return l;
  endfunction

  localparam prog_t DCT1D_PROG  = gen_prog(1'b0);
  localparam int    DCT1D_LEN   = prog_len(DCT1D_PROG);
  localparam prog_t IDCT1D_PROG = gen_prog(1'b1);
  localparam int    IDCT1D_LEN  = prog_len(IDCT1D_PROG);

  // Row butterfly stage: 32 pairs, 4 cycles each (read, read, write, write).
  localparam int    BFLY_LEN      = 128;
  // DCT post-addition: 8 terms per output plus one clearing cycle.
  localparam int    POST_LEN      = 9;
  localparam int    DCT2D_CYCLES  = BFLY_LEN + 8 * DCT1D_LEN + 64 * POST_LEN;
  // IDCT pre-addition: 16 candidate terms per G plus one clearing cycle.
  localparam int    PRE_LEN       = 17;
  localparam int    IDCT2D_CYCLES = 64 * PRE_LEN + 8 * IDCT1D_LEN + BFLY_LEN;

endpackage
