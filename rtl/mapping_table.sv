// mapping_table: the CMOS look-up table that steers a logical fragment address to a good
// physical location.
//
// A superblock (the g adjacent blocks that together hold one data fragment) shares one
// table. It holds, for each of the M_FRAG useful fragments, the physical segment address
// {A_col1, A_row1} (2 log2 W bits) of a fragment that passed the ECC self-test; bad
// fragments are simply never entered, and the spare ones take their place. The table is
// filled through the write port after testing and read with one cycle of latency
// (registered output). Unwritten entries read as zero (reset clears a valid bit per
// entry and the output is masked).
module mapping_table #(
  parameter int unsigned W       = gf_pkg::XB_W_DEF,
  parameter int unsigned M_FRAG  = gf_pkg::MAP_M_DEF,
  localparam int unsigned AW     = $clog2(W),
  localparam int unsigned LW     = $clog2(M_FRAG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [LW-1:0] waddr,
  input  logic [AW-1:0] wcol1,
  input  logic [AW-1:0] wrow1,
  input  logic          re,
  input  logic [LW-1:0] raddr,
  output logic [AW-1:0] a_col1,
  output logic [AW-1:0] a_row1,
  output logic          hit
);
  logic [2*AW-1:0] table_q [M_FRAG];
  logic [M_FRAG-1:0] valid_q;

  always_ff @(posedge clk)
    if (we && 32'(waddr) < M_FRAG) table_q[waddr] <= {wcol1, wrow1};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) valid_q <= '0;
    else if (we && 32'(waddr) < M_FRAG) valid_q[waddr] <= 1'b1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      a_col1 <= '0;
      a_row1 <= '0;
      hit    <= 1'b0;
    end else if (re) begin
      if (32'(raddr) < M_FRAG && valid_q[raddr]) begin
        {a_col1, a_row1} <= table_q[raddr];
        hit              <= 1'b1;
      end else begin
        {a_col1, a_row1} <= '0;
        hit              <= 1'b0;
      end
    end
endmodule
