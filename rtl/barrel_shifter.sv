// barrel_shifter: the block's data decoder, connecting r^2 of the W CMOS data lines to the
// block's data port.
//
// Of the W data lines under a block only the r^2 that touch the selected segment's
// top-layer nanowires carry data in an operation; which ones depends on the column of the
// segment. A decoder driven by A_col2 picks one diagonal of a W x r^2 pass-gate array, so
// port bit j is joined to data line (A_col2 + j) mod W. Reads go from the lines to rdata;
// writes drive wdata onto the same lines and raise line_wen on exactly those lines.
// With W = r^2 every line is used and the selector only fixes the bit order.
// Combinational.
module barrel_shifter #(
  parameter int unsigned W  = gf_pkg::XB_W_DEF,
  parameter int unsigned R2 = gf_pkg::XB_R_DEF * gf_pkg::XB_R_DEF,
  localparam int unsigned AW = $clog2(W)
) (
  input  logic [AW-1:0] a_col2,
  input  logic          en,
  input  logic [W-1:0]  line_rdata,
  output logic [R2-1:0] rdata,
  input  logic [R2-1:0] wdata,
  output logic [W-1:0]  line_wdata,
  output logic [W-1:0]  line_wen
);
  logic [W-1:0] diag;   // one-hot diagonal select from the column decoder

  cell_decoder #(.W(W)) u_dec (.addr(a_col2), .en(en), .addr2('0), .en2(1'b0), .lines(diag));

  // pass-gate array: bit j sees line (c + j) mod W when diagonal c is selected
  always_comb begin
    rdata      = '0;
    line_wdata = '0;
    line_wen   = '0;
    for (int c = 0; c < int'(W); c++)
      for (int j = 0; j < int'(R2); j++)
        if (diag[c]) begin
          rdata[j]                  = rdata[j] | line_rdata[(c + j) % int'(W)];
          line_wdata[(c + j) % int'(W)] = wdata[j];
          line_wen[(c + j) % int'(W)]   = 1'b1;
        end
  end
endmodule
