// dct_controller: counter-based controller of the 2-D DCT.
//
// The controller is a counter followed by a purely combinational circuit:
// no control line depends on earlier control lines, only on the counter.
// The counter runs through three phases.
//
//   Butterfly phase: fields {i, m, t}, 128 cycles.  The first butterfly
//   stage of the direct 2-D algorithm.  For i = 0..3 and each row m, the two
//   input words x(m,n) and x(m,7-n), n = perm(i,m), are replaced in place by
//   their sum (at x(m,n)) and difference (at x(m,7-n)); see
//   dct_pkg::bfly_ctrl.  Because perm(7-i,m) = 7 - perm(i,m), the sums are
//   the samples of z_i + z_{7-i} and the differences those of z_i - z_{7-i}.
//
//   1-D phase: fields {blk, step}.  Eight 1-D transforms step through the
//   1-D microprogram (dct_pkg::DCT1D_PROG, DCT1D_LEN words, generated from
//   the coefficient table at elaboration).  Its operands are virtual; the
//   address generator maps them onto the RAM: transform blk = i (0..3) takes
//   the sum sequence, blk = 4+i the difference sequence of pair i
//   (dct_pkg::seq_addr); result q goes to V_blk(q), scratch words to the
//   scratch area.
//
//   Post-addition phase: fields {k, l, t}.  With S_i = V_i and D_i = V_{4+i}
//   the output is
//       2F(k,l) = sum over i = 0..3 of W_i(k+(2i+1)l) + W_i(k-(2i+1)l),
//   W = S for even l and W = D for odd l, each index folded onto 0..7 with a
//   sign (or to zero).  t = 0 clears RA and fetches the first term, t = 1..7
//   add/subtract one term and fetch the next, t = 8 adds the last term and
//   writes the sum over x(k,l).
//
// Interface: 'start' (one cycle, ignored while busy) begins a transform;
// 'busy' is high while running; 'done' is high for the one cycle after the
// last write.  'ctl' drives the datapath and RAM with a physical address.  A
// transform occupies exactly DCT2D_CYCLES = 128 + 8*DCT1D_LEN + 64*9
// cycles, starting with the cycle after the one in which 'start' is sampled,
// so 'done' rises DCT2D_CYCLES + 1 clock edges after that sampling edge.
// 'phase' exposes the counter phase (0 idle, 1 one-dimensional, 2 post-add,
// 3 butterfly).
//
// The counter + combinational-circuit structure, the input butterfly stage
// feeding pairs of 1-D transforms, and the address-generated permutation
// follow the source design; the microprogram schedule, the post-addition
// order (one term per cycle) and the start/busy/done handshake are this
// design's.
module dct_controller
  import dct_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output ctrl_t      ctl,
  output logic       busy,
  output logic       done,
  output logic [1:0] phase
);

  typedef enum logic [1:0] {S_IDLE = 2'd0, S_1D = 2'd1, S_POST = 2'd2, S_BFLY = 2'd3} state_t;

  state_t     state;
  logic [6:0] bc;            // butterfly counter {i[1:0], m[2:0], t[1:0]}
  logic [2:0] blk;
  logic [7:0] step;
  logic [2:0] k, l;
  logic [3:0] t;

  // ---------------- counter ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      bc    <= '0;
      blk   <= '0;
      step  <= '0;
      k     <= '0;
      l     <= '0;
      t     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_BFLY;
          bc    <= '0;
        end
        S_BFLY: begin
          bc <= bc + 7'd1;
          if (bc == 7'(BFLY_LEN - 1)) begin
            state <= S_1D;
            blk   <= '0;
            step  <= '0;
          end
        end
        S_1D: begin
          if (step == 8'(DCT1D_LEN - 1)) begin
            step <= '0;
            if (blk == 3'd7) begin
              state <= S_POST;
              k <= '0; l <= '0; t <= '0;
            end else begin
              blk <= blk + 3'd1;
            end
          end else begin
            step <= step + 8'd1;
          end
        end
        S_POST: begin
          if (t == 4'(POST_LEN - 1)) begin
            t <= '0;
            l <= l + 3'd1;
            if (l == 3'd7) begin
              k <= k + 3'd1;
              if (k == 3'd7) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end
            end
          end else begin
            t <= t + 4'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy  = (state != S_IDLE);
  assign phase = state;

  // ---------------- combinational circuit ----------------

  // Post-addition term u (0..7) of output (k,l): pair i = u[2:1],
  // frequency k + (2i+1)l (u[0] = 0) or k - (2i+1)l (u[0] = 1) folded.
  function automatic fold_t post_term(input logic [2:0] kk, input logic [2:0] ll,
                                      input logic [2:0] u);
    logic [4:0] off, r;
    off = 5'(({3'b0, u[2:1]} << 1) + 5'd1) * {2'b0, ll};
    r   = u[0] ? ({2'b0, kk} - 5'(off)) : ({2'b0, kk} + 5'(off));
    return fold_freq(r);
  endfunction

  function automatic logic [AW-1:0] v_addr(input logic [2:0] i, input logic [2:0] q);
    return AW'(V_BASE) + {2'b00, i, q};
  endfunction

  ctrl_t      pw;
  fold_t      cur, nxt;
  logic [2:0] vidx;
  logic [2:0] tc, tn;

  always_comb begin
    ctl  = '0;
    pw   = DCT1D_PROG[step];
    vidx = pw.addr[2:0];
    tc   = 3'(t - 4'd1);
    tn   = t[2:0];
    cur  = post_term(k, l, tc);
    nxt  = post_term(k, l, tn);
    unique case (state)
      S_BFLY: ctl = bfly_ctrl(bc[6:5], bc[4:2], bc[1:0]);
      S_1D: begin
        ctl = pw;
        unique case (pw.addr[7:6])
          VC_IN:   ctl.addr = seq_addr(blk, vidx);
          VC_OUT:  ctl.addr = v_addr(blk, vidx);
          default: ctl.addr = AW'(TMP_BASE) + {2'b00, pw.addr[5:0]};
        endcase
      end
      S_POST: begin
        if (t == 4'd0) begin
          ctl.reset_a = 1'b1;
        end else begin
          ctl.sub = cur.neg;
        end
        if (t == 4'(POST_LEN - 1)) begin
          ctl.ram_we = 1'b1;
          ctl.addr   = AW'(X_BASE) + {2'b00, k, l};
        end else begin
          if (t != 4'd0) begin
            ctl.latch_a = 1'b1;
            ctl.mux_a   = 1'b1;
          end
          if (nxt.zero) begin
            ctl.reset_b = 1'b1;
          end else begin
            ctl.latch_b = 1'b1;
            ctl.addr    = v_addr({l[0], tn[2:1]}, nxt.q);
          end
        end
      end
      default: ctl = '0;
    endcase
  end

endmodule
