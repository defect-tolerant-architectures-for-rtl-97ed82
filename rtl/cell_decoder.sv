// cell_decoder: one of the four CMOS line decoders at the edge of a CMOL block.
//
// Drives one of W CMOS select (or data-pin) lines from a log2(W)-bit address, the
// function of the pass-gate multiplexer tree of the block periphery. A second address
// port lets the same decoder raise two lines at once, which the top-layer row decoder
// needs (it selects rows A_row1 + r/2 and A_row1 - r/2 together); en2 = 0 gives a plain
// one-hot decoder. The pass-gate tree itself is analogue; here it is the equivalent
// logic: lines[i] = (en && addr == i) || (en2 && addr2 == i). Combinational.
module cell_decoder #(
  parameter int unsigned W  = gf_pkg::XB_W_DEF,
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [AW-1:0] addr,
  input  logic          en,
  input  logic [AW-1:0] addr2,
  input  logic          en2,
  output logic [W-1:0]  lines
);
  always_comb
    for (int i = 0; i < int'(W); i++)
      lines[i] = (en && addr == AW'(i)) || (en2 && addr2 == AW'(i));
endmodule
