// dct_datapath: the shift-add arithmetic unit of the DCT processor core.
//
// Two operand registers, RA and RB, feed a single word adder/subtractor:
//     BUS = (RA >>> shift) + RB     or     BUS = (RA >>> shift) - RB
// The shifter (0..3 bits, arithmetic) sits in front of the adder and acts on
// RA only, so a running accumulator is kept in RA and the term to be added or
// subtracted in RB.  Each register has a two-way input multiplexer (RAM read
// data or the BUS), a load strobe and a synchronous clear that takes priority
// over the load.  BUS is combinational: it is the value written into RAM in a
// write cycle and the value fed back into RA/RB.
//
// Interface: 'ctl' carries the per-cycle control lines (MUX_A/B, Latch_A/B,
// Reset_A/B, Shift, ADD/SUB); 'ram_rdata' is the RAM read data; 'bus' the
// result.  Timing: registers update on the rising clock edge; asynchronous
// active-low reset clears both.
//
// Structure, word width, shifter range and position follow the source design
// (version-2 shifter placement).  Two's complement words, an arithmetic (sign
// filling) shift and wrap-around on overflow are this design's choices.
module dct_datapath
  import dct_pkg::*;
#(
  parameter int unsigned W = DW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  ctrl_t               ctl,
  input  logic signed [W-1:0] ram_rdata,
  output logic signed [W-1:0] bus,
  output logic signed [W-1:0] ra_q,
  output logic signed [W-1:0] rb_q
);

  logic signed [W-1:0] ra, rb, shifted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra <= '0;
      rb <= '0;
    end else begin
      if (ctl.reset_a)      ra <= '0;
      else if (ctl.latch_a) ra <= ctl.mux_a ? bus : ram_rdata;
      if (ctl.reset_b)      rb <= '0;
      else if (ctl.latch_b) rb <= ctl.mux_b ? bus : ram_rdata;
    end
  end

  always_comb begin
    shifted = ra >>> ctl.shift;
    bus     = ctl.sub ? shifted - rb : shifted + rb;
  end

  assign ra_q = ra;
  assign rb_q = rb;

endmodule
