// cmol_block: one CMOL memory block - W x W relay cells under a nanowire crossbar, with
// its four CMOS decoders, address control and data-line selector.
//
// An operation addresses one bottom-layer nanowire segment by its physical address
// (A_col1, A_row1) from the mapping table. The column and row decoders raise the
// data-pin column and select row of the segment's "red" relay cell; the address control
// adds and subtracts r/2 to get the two top-layer select rows, raised together by the
// second row decoder; the fourth decoder, inside the data-line selector, uses A_col2 to
// join the r^2 data lines of the segment to the block's r^2-bit data port.
// Timing: with sel high, rd samples the segment and rdata is valid in the next cycle
// (sense amplifiers clocked); wr with wr_phase 0 then 1 stores wdata (zeros first, then
// ones). All blocks of a superblock receive the same address at the same time; sel comes
// from the block address decoder. blk_id only seeds the defect model of the crossbar.
module cmol_block #(
  parameter int unsigned W     = gf_pkg::XB_W_DEF,
  parameter int unsigned R     = gf_pkg::XB_R_DEF,
  parameter int unsigned Q_PPM = 10000,
  localparam int unsigned AW   = $clog2(W),
  localparam int unsigned R2   = R * R
) (
  input  logic          clk,
  input  logic [15:0]   blk_id,
  input  logic          sel,
  input  logic          rd,
  input  logic          wr,
  input  logic          wr_phase,
  input  logic [AW-1:0] a_col1,
  input  logic [AW-1:0] a_row1,
  input  logic [R2-1:0] wdata,
  output logic [R2-1:0] rdata,
  output logic          border
);
  logic [AW-1:0] a_row2a, a_row2b, a_col2;
  logic          row2a_ok, row2b_ok;
  logic [W-1:0]  col1_lines, row1_lines, row2_lines;
  logic [W-1:0]  line_rdata, line_wdata, line_wen;

  address_control #(.W(W), .R(R)) u_actl (
    .a_col1, .a_row1, .a_row2a, .a_row2a_ok(row2a_ok), .a_row2b, .a_row2b_ok(row2b_ok),
    .a_col2, .border
  );

  // "red" side: data-pin column and select row
  cell_decoder #(.W(W)) u_col1_dec (.addr(a_col1), .en(sel), .addr2('0), .en2(1'b0),
                                    .lines(col1_lines));
  cell_decoder #(.W(W)) u_row1_dec (.addr(a_row1), .en(sel), .addr2('0), .en2(1'b0),
                                    .lines(row1_lines));
  // "blue" side: both top-layer select rows
  cell_decoder #(.W(W)) u_row2_dec (.addr(a_row2a), .en(sel && row2a_ok),
                                    .addr2(a_row2b), .en2(sel && row2b_ok),
                                    .lines(row2_lines));

  crossbar_array #(.W(W), .R(R), .Q_PPM(Q_PPM)) u_xbar (
    .clk, .blk_id, .col1_sel(col1_lines), .row1_sel(row1_lines), .row2_sel(row2_lines),
    .rd(rd && sel), .wr(wr && sel), .wr_phase, .line_wdata, .line_wen, .line_rdata
  );

  // data decoder (barrel shifter) with the A_col2 column decoder; A_col2 is held by the
  // caller for the read cycle and the following cycle in which rdata is used
  barrel_shifter #(.W(W), .R2(R2)) u_shift (
    .a_col2, .en(1'b1), .line_rdata, .rdata, .wdata, .line_wdata, .line_wen
  );
endmodule
