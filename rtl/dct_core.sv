// dct_core: 8x8 2-D DCT/IDCT processor core (top level).
//
// One shift-add datapath and one one-port working RAM, sequenced by either
// of two counter-based controllers: the DCT controller (row butterflies,
// eight 1-D DCTs, then post-additions) or the IDCT controller
// (pre-additions, eight 1-D IDCTs, then row butterflies).  The host loads
// a block of 64 words, pulses 'start' with 'inverse' selecting the
// transform, waits for 'done' and reads the 64
// results back from the same addresses (the transform is in place).  While
// 'busy' is high the running controller owns the RAM port and host accesses
// are ignored; otherwise the host port drives it.
//
// Number formats (16-bit two's complement words, e(0) = 1/sqrt(2), e(k>0) = 1,
// F(k,l) = sum_m sum_n x(m,n) cos((2m+1)k pi/16) cos((2n+1)l pi/16), and X the
// orthonormal DCT, X(k,l) = e(k) e(l) F(k,l) / 4):
//   DCT  input  word 8*m+n : 4*x(m,n) (2 fraction bits), |x| <= 255;
//   DCT  output word 8*k+l : 2*F(k,l) = 8*X(k,l) / (e(k) e(l));
//   IDCT input  word 8*k+l : 4 e(k) e(l) X(k,l)  (the dequantised
//                            coefficient with the e-weights applied,
//                            2 fraction bits);
//   IDCT output word 8*m+n : 32*x(m,n) (5 fraction bits).
// The extra fraction bits of the IDCT keep its truncation bias small enough
// for a peak error of one pixel on IEEE 1180 style data.
// Timing: 'done' rises dct_pkg::DCT2D_CYCLES + 1 (DCT) or IDCT2D_CYCLES + 1
// (IDCT) clock edges after the edge that samples 'start'.  Host reads are
// combinational; host writes take effect at the clock edge.
//
// The block structure (controllers, datapath and RAM sharing one data bus,
// DCT and IDCT on the same datapath) is the source design's; the host port,
// number formats and handshake are this design's.
module dct_core
  import dct_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          inverse,
  output logic          busy,
  output logic          done,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic [DW-1:0] host_wdata,
  output logic [DW-1:0] host_rdata
);

  ctrl_t                ctl, dct_ctl, idct_ctl;
  logic [1:0]           phase, dct_phase, idct_phase;
  logic                 dct_busy, dct_done, idct_busy, idct_done;
  logic signed [DW-1:0] bus, ram_q, ra_q, rb_q;
  logic                 ram_we;
  logic [AW-1:0]        ram_addr;
  logic [DW-1:0]        ram_wdata;

  dct_controller u_dct_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start & ~inverse & ~busy),
    .ctl   (dct_ctl),
    .busy  (dct_busy),
    .done  (dct_done),
    .phase (dct_phase)
  );

  idct_controller u_idct_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start & inverse & ~busy),
    .ctl   (idct_ctl),
    .busy  (idct_busy),
    .done  (idct_done),
    .phase (idct_phase)
  );

  // At most one controller runs at a time; the idle one emits an all-zero word.
  assign ctl   = idct_busy ? idct_ctl : dct_ctl;
  assign phase = idct_busy ? idct_phase : dct_phase;
  assign busy  = dct_busy | idct_busy;
  assign done  = dct_done | idct_done;

  dct_datapath #(.W(DW)) u_dp (
    .clk       (clk),
    .rst_n     (rst_n),
    .ctl       (ctl),
    .ram_rdata (ram_q),
    .bus       (bus),
    .ra_q      (ra_q),
    .rb_q      (rb_q)
  );

  always_comb begin
    if (busy) begin
      ram_we    = ctl.ram_we;
      ram_addr  = ctl.addr;
      ram_wdata = bus;
    end else begin
      ram_we    = host_we;
      ram_addr  = host_addr;
      ram_wdata = host_wdata;
    end
  end

  dct_ram #(.W(DW), .WORDS(RAM_WORDS)) u_ram (
    .clk   (clk),
    .we    (ram_we),
    .addr  (ram_addr),
    .wdata (ram_wdata),
    .rdata (ram_q)
  );

  assign host_rdata = ram_q;

endmodule
