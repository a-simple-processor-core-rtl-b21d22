// idct_controller: counter-based controller of the 2-D IDCT.
//
// Same structure as the DCT controller (a counter followed by a purely
// combinational circuit) driving the same datapath and RAM, with the phases
// in the opposite order: the inverse of the direct 2-D algorithm.
//
//   Pre-addition phase: fields {blk, q, t}.  With blk = {h, i} (h = 0 even
//   columns l, h = 1 odd columns l, i = 0..3) it forms
//       G_blk(q) = sum over (k, l of parity h, s = +/-) with
//                  fold(k + s(2i+1)l) = (q, sign) of sign * Y(k,l),
//   the transpose of the DCT post-addition (fold: C(-r) = C(r),
//   C(16-r) = -C(r), C(8) = 0).  The address generator enumerates 16 slots
//   per G: the four l of that parity, s = +/-, and the two residues r = q and
//   r = -q (each paired with 16+r of opposite sign; at most one of the pair
//   lands on k = 0..7).  An empty slot, or the duplicate r = -q slot when
//   q = 0, clears RB instead of reading.  t = 0 clears RA and fetches slot 0,
//   t = 1..15 accumulate and fetch, t = 16 accumulates the last slot and
//   writes G_blk(q) at V_blk(q).
//
//   1-D phase: fields {blk, step}.  Eight inverse 1-D transforms
//   (dct_pkg::IDCT1D_PROG, IDCT1D_LEN words) read G_blk(q).  Transform i
//   writes its even part E_i(m) to x(m,n), n = perm(i,m), transform 4+i its
//   odd part O_i(m) to x(m,7-n) (dct_pkg::seq_addr).
//
//   Butterfly phase: fields {i, m, t}, 128 cycles, the same operation
//   sequence as the DCT input butterflies (dct_pkg::bfly_ctrl):
//   x(m,n) <- E + O = z_i(m) and x(m,7-n) <- E - O = z_{7-i}(m).
//
// Interface and handshake as dct_controller: 'start' (ignored while busy),
// 'busy', and a one-cycle 'done' that rises IDCT2D_CYCLES + 1 clock edges
// after the edge that samples 'start'; 'phase' is 0 idle, 1 one-dimensional,
// 2 pre-addition, 3 butterfly.
//
// A separate IDCT controller beside the DCT one, the counter-based form and
// the closing butterfly stage follow the source design; the term
// enumeration, schedule and handshake are this design's.
module idct_controller
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

  typedef enum logic [1:0] {S_IDLE = 2'd0, S_1D = 2'd1, S_PRE = 2'd2, S_BFLY = 2'd3} state_t;

  state_t     state;
  logic [2:0] blk;
  logic [7:0] step;
  logic [2:0] pb, pq;
  logic [4:0] t;
  logic [6:0] bc;            // butterfly counter {i[1:0], m[2:0], t[1:0]}

  // ---------------- counter ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      blk   <= '0;
      step  <= '0;
      pb    <= '0;
      pq    <= '0;
      t     <= '0;
      bc    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_PRE;
          pb <= '0; pq <= '0; t <= '0;
        end
        S_PRE: begin
          if (t == 5'(PRE_LEN - 1)) begin
            t  <= '0;
            pq <= pq + 3'd1;
            if (pq == 3'd7) begin
              pb <= pb + 3'd1;
              if (pb == 3'd7) begin
                state <= S_1D;
                blk   <= '0;
                step  <= '0;
              end
            end
          end else begin
            t <= t + 5'd1;
          end
        end
        S_1D: begin
          if (step == 8'(IDCT1D_LEN - 1)) begin
            step <= '0;
            if (blk == 3'd7) begin
              state <= S_BFLY;
              bc    <= '0;
            end else begin
              blk <= blk + 3'd1;
            end
          end else begin
            step <= step + 8'd1;
          end
        end
        S_BFLY: begin
          bc <= bc + 7'd1;
          if (bc == 7'(BFLY_LEN - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy  = (state != S_IDLE);
  assign phase = state;

  // ---------------- combinational circuit ----------------

  typedef struct packed {
    logic       zero;
    logic       neg;
    logic [2:0] k;
    logic [2:0] l;
  } slot_t;

  // Slot j (0..15) of G_b(q): l = {j[3:2], b[2]}, s = j[1] (1: minus),
  // residue j[0] (1: -q); pair i = b[1:0].
  function automatic slot_t pre_slot(input logic [2:0] b, input logic [2:0] q, input logic [3:0] j);
    logic [4:0] off, r, k1, k2;
    slot_t sl;
    sl.l = {j[3:2], b[2]};
    off = 5'((({3'b0, b[1:0]} << 1) + 5'd1) * {2'b0, sl.l});
    if (j[1]) off = 5'd0 - off;              // c = s (2i+1) l
    r  = j[0] ? (5'd0 - {2'b0, q}) : {2'b0, q};
    k1 = r - off;                            // fold(k + c) = +C(q)
    k2 = r + 5'd16 - off;                    // fold(k + c) = -C(q)
    sl.zero = 1'b0;
    sl.neg  = 1'b0;
    sl.k    = k1[2:0];
    if (k1 < 5'd8) begin
      sl.neg = 1'b0;
      sl.k   = k1[2:0];
    end else if (k2 < 5'd8) begin
      sl.neg = 1'b1;
      sl.k   = k2[2:0];
    end else begin
      sl.zero = 1'b1;
    end
    if (j[0] && q == 3'd0) sl.zero = 1'b1;   // r = -0 duplicates r = 0
    return sl;
  endfunction

  ctrl_t      pw;
  slot_t      cur, nxt;
  logic [2:0] vidx;

  always_comb begin
    ctl  = '0;
    pw   = IDCT1D_PROG[step];
    vidx = pw.addr[2:0];
    cur  = pre_slot(pb, pq, 4'(t - 5'd1));
    nxt  = pre_slot(pb, pq, t[3:0]);
    unique case (state)
      S_1D: begin
        ctl = pw;
        unique case (pw.addr[7:6])
          VC_IN:   ctl.addr = seq_addr(blk, vidx);
          VC_OUT:  ctl.addr = AW'(V_BASE) + {2'b00, blk, vidx};
          default: ctl.addr = AW'(TMP_BASE) + {2'b00, pw.addr[5:0]};
        endcase
      end
      S_PRE: begin
        if (t == 5'd0) begin
          ctl.reset_a = 1'b1;
        end else begin
          ctl.sub = cur.neg & ~cur.zero;
        end
        if (t == 5'(PRE_LEN - 1)) begin
          ctl.ram_we = 1'b1;
          ctl.addr   = AW'(V_BASE) + {2'b00, pb, pq};
        end else begin
          if (t != 5'd0) begin
            ctl.latch_a = 1'b1;
            ctl.mux_a   = 1'b1;
          end
          if (nxt.zero) begin
            ctl.reset_b = 1'b1;
          end else begin
            ctl.latch_b = 1'b1;
            ctl.addr    = AW'(X_BASE) + {2'b00, nxt.k, nxt.l};
          end
        end
      end
      S_BFLY: ctl = bfly_ctrl(bc[6:5], bc[4:2], bc[1:0]);
      default: ctl = '0;
    endcase
  end

endmodule
