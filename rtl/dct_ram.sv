// dct_ram: one-port working memory of the DCT processor core.
//
// Holds the input block, the intermediate 1-D results, scratch words and the
// output block.  One port means one access per cycle: either a read (the
// datapath latches 'rdata' at the clock edge) or a write of 'wdata'.  Reads
// are asynchronous (register-file style), writes take effect at the rising
// edge when 'we' is high.  The contents are not reset.
//
// The source design only asks for a one-port RAM or register file; the
// asynchronous read and the 256 x 16 size are this design's choices (the
// core uses 64 input/output words, 64 intermediate words and scratch).
module dct_ram #(
  parameter int unsigned W     = 16,
  parameter int unsigned WORDS = 256,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
