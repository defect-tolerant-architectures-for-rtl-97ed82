// cmol_memory: defect-tolerant CMOL crossbar memory - NSB superblocks of G CMOL blocks
// each, with per-superblock mapping tables, a block address decoder and BCH error
// correction on the data path.
//
// Defect tolerance comes from two mechanisms working together. Data are stored in
// fragments of G*r^2 bits: one r^2-bit nanowire segment at the same intrablock address in
// each of the G adjacent blocks of a superblock. Each fragment is a run of BCH codewords,
// so up to T bad devices per codeword are corrected on every read; a fragment that the
// code cannot repair is excluded by never entering it in the mapping table, which maps
// each logical fragment address to a good physical segment address (A_col1, A_row1).
//
// Write (cmd_write = 1): after the command, NCW = floor(G*r^2 / N) words of K bits are
// accepted on wr_data (valid/ready); each is encoded and placed at its codeword slot of
// the fragment buffer (remaining buffer bits are written as 0). The mapping table is then
// read (one cycle), and all G blocks of the selected superblock write their segment in
// two steps: zeros, then ones.
// Read (cmd_write = 0): mapping table lookup, one sense cycle in all G blocks, capture of
// the fragment, then the NCW codewords are decoded one after another by the BCH decoder
// (T + 2 cycles each); each result appears with rd_valid, together with the number of
// corrected bits and the uncorrectable flag; rd_last marks the final word.
// A logical address not present in the table ends the command with op_miss.
// op_done pulses when a command has finished. The host side (filling the mapping table
// after a self-test, choosing the superblock) is outside this module.
module cmol_memory #(
  parameter int unsigned W      = gf_pkg::XB_W_DEF,
  parameter int unsigned R      = gf_pkg::XB_R_DEF,
  parameter int unsigned G      = gf_pkg::XB_G_DEF,
  parameter int unsigned NSB    = 2,
  parameter int unsigned M_FRAG = gf_pkg::MAP_M_DEF,
  parameter int unsigned M      = gf_pkg::GF_M_DEF,
  parameter int unsigned POLY   = gf_pkg::GF_POLY_DEF,
  parameter int unsigned T      = gf_pkg::BCH_T_DEF,
  parameter int unsigned K      = gf_pkg::BCH_K_DEF,
  parameter int unsigned Q_PPM  = 10000,
  localparam int unsigned R2    = R * R,
  localparam int unsigned N     = (1 << M) - 1,
  localparam int unsigned FB    = G * R2,
  localparam int unsigned NCW   = FB / N,
  localparam int unsigned AW    = $clog2(W),
  localparam int unsigned LW    = $clog2(M_FRAG),
  localparam int unsigned SBW   = (NSB > 1) ? $clog2(NSB) : 1,
  localparam int unsigned CW    = $clog2(NCW + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // mapping table fill
  input  logic           map_we,
  input  logic [SBW-1:0] map_sb,
  input  logic [LW-1:0]  map_addr,
  input  logic [AW-1:0]  map_col1,
  input  logic [AW-1:0]  map_row1,
  // commands
  input  logic           cmd_valid,
  output logic           cmd_ready,
  input  logic           cmd_write,
  input  logic [SBW-1:0] cmd_sb,
  input  logic [LW-1:0]  cmd_addr,
  // write data
  input  logic           wr_valid,
  output logic           wr_ready,
  input  logic [K-1:0]   wr_data,
  // read data
  output logic           rd_valid,
  output logic [K-1:0]   rd_data,
  output logic [8:0]     rd_nerr,
  output logic           rd_fail,
  output logic           rd_last,
  // status
  output logic           op_done,
  output logic           op_miss,
  output logic           op_border
);
  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_MAP, S_ACC, S_WR0, S_WR1, S_RD, S_CAP, S_DEC, S_WAIT
  } state_t;

  state_t         st_q;
  logic           write_q;
  logic [SBW-1:0] sb_q;
  logic [LW-1:0]  addr_q;
  logic [CW-1:0]  cw_q;
  logic [FB-1:0]  frag_q;
  logic [AW-1:0]  col1_q, row1_q;

  // ---------------- mapping tables, one per superblock ----------------
  logic [NSB-1:0][AW-1:0] mt_col1, mt_row1;
  logic [NSB-1:0]         mt_hit;

  for (genvar s = 0; s < NSB; s++) begin : g_map
    mapping_table #(.W(W), .M_FRAG(M_FRAG)) u_map (
      .clk, .rst_n,
      .we(map_we && map_sb == SBW'(s)), .waddr(map_addr), .wcol1(map_col1), .wrow1(map_row1),
      .re(st_q == S_MAP), .raddr(addr_q),
      .a_col1(mt_col1[s]), .a_row1(mt_row1[s]), .hit(mt_hit[s])
    );
  end

  // ---------------- block address decoder ----------------
  logic [NSB-1:0] sb_lines;
  cell_decoder #(.W(NSB)) u_sb_dec (.addr(sb_q), .en(1'b1), .addr2('0), .en2(1'b0),
                                    .lines(sb_lines));

  // ---------------- CMOL blocks ----------------
  logic [NSB-1:0][G-1:0][R2-1:0] blk_rdata;
  logic [NSB-1:0][G-1:0]         blk_border;
  logic                          blk_rd, blk_wr, blk_phase;

  assign blk_rd    = (st_q == S_RD);
  assign blk_wr    = (st_q == S_WR0) || (st_q == S_WR1);
  assign blk_phase = (st_q == S_WR1);

  for (genvar s = 0; s < NSB; s++) begin : g_sb
    for (genvar b = 0; b < G; b++) begin : g_blk
      cmol_block #(.W(W), .R(R), .Q_PPM(Q_PPM)) u_blk (
        .clk, .blk_id(16'(s * G + b)), .sel(sb_lines[s]), .rd(blk_rd), .wr(blk_wr),
        .wr_phase(blk_phase), .a_col1(col1_q), .a_row1(row1_q),
        .wdata(frag_q[b*R2 +: R2]), .rdata(blk_rdata[s][b]), .border(blk_border[s][b])
      );
    end
  end

  logic [FB-1:0] frag_rd;
  always_comb begin
    frag_rd = '0;
    for (int s = 0; s < int'(NSB); s++)
      if (sb_lines[s])
        for (int b = 0; b < int'(G); b++) frag_rd[b*R2 +: R2] = frag_rd[b*R2 +: R2] | blk_rdata[s][b];
  end

  // ---------------- ECC ----------------
  logic [N-1:0] enc_cw;
  bch_encoder #(.M(M), .POLY(POLY), .T(T), .K(K)) u_enc (.u(wr_data), .c(enc_cw));

  logic         dec_in_valid, dec_in_ready, dec_out_valid, dec_fail;
  logic [N-1:0] dec_v;
  logic [8:0]   dec_nerr;
  logic [K-1:0] dec_data;

  assign dec_in_valid = (st_q == S_DEC) && dec_in_ready;

  bch_decoder #(.M(M), .POLY(POLY), .T(T), .K(K)) u_dec (
    .clk, .rst_n, .in_valid(dec_in_valid), .in_ready(dec_in_ready),
    .r(frag_q[cw_q*N +: N]), .out_valid(dec_out_valid), .v(dec_v), .data(dec_data),
    .nerr(dec_nerr), .fail(dec_fail)
  );

  assign rd_valid = dec_out_valid;
  assign rd_data  = dec_data;
  assign rd_nerr  = dec_nerr;
  assign rd_fail  = dec_fail;
  assign rd_last  = dec_out_valid && (cw_q == CW'(NCW - 1));

  // ---------------- controller ----------------
  assign cmd_ready = (st_q == S_IDLE);
  assign wr_ready  = (st_q == S_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= S_IDLE;
      write_q   <= 1'b0;
      sb_q      <= '0;
      addr_q    <= '0;
      cw_q      <= '0;
      frag_q    <= '0;
      col1_q    <= '0;
      row1_q    <= '0;
      op_done   <= 1'b0;
      op_miss   <= 1'b0;
      op_border <= 1'b0;
    end else begin
      op_done <= 1'b0;
      unique case (st_q)
        S_IDLE: if (cmd_valid) begin
          write_q <= cmd_write;
          sb_q    <= cmd_sb;
          addr_q  <= cmd_addr;
          cw_q    <= '0;
          op_miss <= 1'b0;
          if (cmd_write) begin
            frag_q <= '0;
            st_q   <= S_LOAD;
          end else begin
            st_q <= S_MAP;
          end
        end
        S_LOAD: if (wr_valid) begin
          frag_q[cw_q*N +: N] <= enc_cw;
          cw_q                <= cw_q + CW'(1);
          if (cw_q == CW'(NCW - 1)) st_q <= S_MAP;
        end
        S_MAP: st_q <= S_ACC;
        S_ACC: begin
          col1_q <= mt_col1[sb_q];
          row1_q <= mt_row1[sb_q];
          if (!mt_hit[sb_q]) begin
            op_miss <= 1'b1;
            op_done <= 1'b1;
            st_q    <= S_IDLE;
          end else begin
            st_q <= write_q ? S_WR0 : S_RD;
          end
        end
        S_WR0: begin
          op_border <= blk_border[sb_q][0];
          st_q      <= S_WR1;
        end
        S_WR1: begin
          op_done <= 1'b1;
          st_q    <= S_IDLE;
        end
        S_RD: begin
          op_border <= blk_border[sb_q][0];
          st_q      <= S_CAP;
        end
        S_CAP: begin
          frag_q <= frag_rd;
          cw_q   <= '0;
          st_q   <= S_DEC;
        end
        S_DEC: if (dec_in_ready) st_q <= S_WAIT;
        S_WAIT: if (dec_out_valid) begin
          if (cw_q == CW'(NCW - 1)) begin
            op_done <= 1'b1;
            st_q    <= S_IDLE;
          end else begin
            cw_q <= cw_q + CW'(1);
            st_q <= S_DEC;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  a_wr_handshake: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid && wr_ready |-> st_q == S_LOAD)
    else $error("cmol_memory: write data outside a write command");
endmodule
