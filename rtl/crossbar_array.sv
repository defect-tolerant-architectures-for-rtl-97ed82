// crossbar_array: behavioural model of one CMOL block's nanowire crossbar together with
// its CMOS relay cells, drive buffers and sense amplifiers. It is not synthesizable
// logic: the real part is a layer of bistable two-terminal nanodevices ("programmable
// diodes") at every crossing of two nanowire layers over a W x W array of CMOS relay
// cells, and this model reproduces only its behaviour at the CMOS lines.
//
// Organisation: the bottom-layer nanowires are cut into segments; the segment reached by
// the "red" pin of relay cell (column c, row r) touches r^2 crosspoint devices, so the
// block stores W*W segments of R*R bits. A segment is addressed by raising CMOS line c of
// the column (data-pin) decoder and line r of the row decoder, plus one or both of the
// top-layer rows r + R/2, r - R/2 whose "blue" pins connect the segment's R*R crossing
// top nanowires to the data lines. Device j of the segment in column c sits on data line
// (c + j) mod W.
// Read (rd): all R*R devices of the segment are sensed at once; the sense amplifiers
// latch at the clock edge, so line_rdata is valid the cycle after rd; other lines read 0.
// Write (wr): done in two steps because the two switching directions need opposite bias:
// wr_phase = 0 switches to 0 every device whose line is driven with 0, wr_phase = 1
// switches to 1 every device whose line is driven with 1. Only lines with line_wen set
// are driven.
// Defects: a fraction Q_PPM / 10^6 of the devices, chosen by a fixed hash of (blk_id,
// column, row, bit), is stuck open: it never conducts and always reads 0. Border
// segments are reachable when at least one of the two top-layer rows exists; an access
// with no valid select pattern does nothing and reads zero.
// The defect model, the hash and the one-cycle sense timing are this design's choices.
module crossbar_array #(
  parameter int unsigned W     = gf_pkg::XB_W_DEF,
  parameter int unsigned R     = gf_pkg::XB_R_DEF,
  parameter int unsigned Q_PPM = 10000,
  localparam int unsigned R2   = R * R
) (
  input  logic         clk,
  input  logic [15:0]  blk_id,
  input  logic [W-1:0] col1_sel,
  input  logic [W-1:0] row1_sel,
  input  logic [W-1:0] row2_sel,
  input  logic         rd,
  input  logic         wr,
  input  logic         wr_phase,
  input  logic [W-1:0] line_wdata,
  input  logic [W-1:0] line_wen,
  output logic [W-1:0] line_rdata
);
  logic [R2-1:0] seg_q [W*W];

  function automatic bit defect(input int unsigned blk, input int unsigned c,
                                input int unsigned r, input int unsigned j);
    logic [31:0] h;
    h = 32'(blk) * 32'h9E3779B1 ^ 32'(c) * 32'h85EBCA77 ^ 32'(r) * 32'hC2B2AE3D ^
        32'(j) * 32'h27D4EB2F;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A2D39;
    h = h ^ (h >> 15);
    return (h % 32'd1000000) < 32'(Q_PPM);
  endfunction

  // decode the one-hot select patterns back to indices
  int unsigned col, row, ncol, nrow;
  bit          row2_ok;
  always_comb begin
    col = 0; row = 0; ncol = 0; nrow = 0;
    for (int unsigned i = 0; i < W; i++) begin
      if (col1_sel[i]) begin col = i; ncol++; end
      if (row1_sel[i]) begin row = i; nrow++; end
    end
    row2_ok = ((row + R / 2 < W) && row2_sel[(row + R / 2) % W]) ||
              ((row >= R / 2) && row2_sel[(row + W - R / 2) % W]);
  end

  wire access_ok = (ncol == 1) && (nrow == 1) && row2_ok;

  always_ff @(posedge clk) begin
    line_rdata <= '0;
    if (rd && access_ok)
      for (int unsigned j = 0; j < R2; j++)
        line_rdata[(col + j) % W] <= seg_q[col * W + row][j] && !defect(blk_id, col, row, j);
    if (wr && access_ok)
      for (int unsigned j = 0; j < R2; j++)
        if (line_wen[(col + j) % W] && line_wdata[(col + j) % W] == wr_phase)
          seg_q[col * W + row][j] <= wr_phase;
  end

  initial assert (R2 <= W) else $error("crossbar_array: r^2 must not exceed W");
endmodule
