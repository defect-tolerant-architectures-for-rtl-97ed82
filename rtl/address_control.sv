// address_control: per-block CMOS address control circuitry.
//
// From the physical address of the selected bottom-layer nanowire segment (A_col1 and
// A_row1, the latter picking the relay-cell row whose "red" pin touches the segment) it
// derives the addresses of the relay-cell rows whose "blue" pins connect the r^2 crossing
// top-layer nanowires to the CMOS data lines. Two rows are addressed at once:
//   A_row2a = A_row1 + r/2,   A_row2b = A_row1 - r/2,
// so that segments near the top and bottom edges stay reachable through whichever of the
// two rows exists; each result carries a valid bit that is low when it falls outside
// 0 .. W-1 (border segments, only one row driven). These are the block's two short
// ripple-carry adders. A_col2, which steers the data-line selector, equals A_col1 in this
// design (the r^2 top nanowires of the segment in column c land on data lines c .. c+r^2-1,
// modulo W). Combinational.
module address_control #(
  parameter int unsigned W  = gf_pkg::XB_W_DEF,
  parameter int unsigned R  = gf_pkg::XB_R_DEF,
  localparam int unsigned AW = $clog2(W)
) (
  input  logic [AW-1:0] a_col1,
  input  logic [AW-1:0] a_row1,
  output logic [AW-1:0] a_row2a,
  output logic          a_row2a_ok,
  output logic [AW-1:0] a_row2b,
  output logic          a_row2b_ok,
  output logic [AW-1:0] a_col2,
  output logic          border
);
  logic [AW:0] sum_a, dif_b;

  always_comb begin
    sum_a      = {1'b0, a_row1} + (AW+1)'(R / 2);
    dif_b      = {1'b0, a_row1} - (AW+1)'(R / 2);
    a_row2a    = sum_a[AW-1:0];
    a_row2b    = dif_b[AW-1:0];
    a_row2a_ok = (sum_a < (AW+1)'(W));
    a_row2b_ok = !dif_b[AW];
    a_col2     = a_col1;
    border     = !(a_row2a_ok && a_row2b_ok);
  end
endmodule
