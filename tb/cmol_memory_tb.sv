// cmol_memory_tb: end-to-end test of the defect-tolerant memory at reduced size
// (W = 32 relay cells, r = 4, 8 blocks per superblock, 2 superblocks, BCH(31,21,t=2),
// fragment = 128 bits = 4 codewords). Two memories with different stuck-open defect
// fractions (0.5 % and 4 %) run the same procedure:
//   1. self-test: candidate physical segments (including border rows) are written with
//      all-ones words and read back; a segment with any flagged or wrong word is excluded,
//      the others are entered in the mapping table of their superblock;
//   2. random data are written to every mapped logical fragment of both superblocks and
//      read back; every word must come back exactly, without the fail flag, at a fixed
//      decoding interval of T + 4 cycles;
//   3. a logical address that was never mapped must end with op_miss.
// Each mechanism (two-step write, read, corrected word, uncorrectable word, excluded
// segment, mapping miss, border segment, both superblocks) is counted and must occur.
module cmol_memory_tb;
  localparam int W = 32, R = 4, G = 8, NSB = 2, MF = 40, M = 5, T = 2, K = 21;
  localparam int N = 31, NCW = G * R * R / N;
  localparam int NGOOD = 10;
  localparam int QS [2] = '{5000, 40000};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int n_write = 0, n_read = 0, n_corr = 0, n_fail = 0, n_excl = 0, n_miss = 0, n_border = 0;
  int n_sb [2] = '{0, 0};
  bit fin [2] = '{0, 0};

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  for (genvar u = 0; u < 2; u++) begin : g_mem
    logic map_we = 0, cmd_valid = 0, cmd_write = 0, wr_valid = 0;
    logic [0:0] map_sb = 0, cmd_sb = 0;
    logic [5:0] map_addr = 0, cmd_addr = 0;
    logic [4:0] map_col1 = 0, map_row1 = 0;
    logic [K-1:0] wr_data = 0, rd_data;
    logic cmd_ready, wr_ready, rd_valid, rd_fail, rd_last, op_done, op_miss, op_border;
    logic [8:0] rd_nerr;
    int cyc = 0;
    always @(posedge clk) cyc <= cyc + 1;

    cmol_memory #(.W(W), .R(R), .G(G), .NSB(NSB), .M_FRAG(MF), .M(M), .POLY('h25), .T(T),
                  .K(K), .Q_PPM(QS[u])) dut (
      .clk, .rst_n, .map_we, .map_sb, .map_addr, .map_col1, .map_row1,
      .cmd_valid, .cmd_ready, .cmd_write, .cmd_sb, .cmd_addr,
      .wr_valid, .wr_ready, .wr_data,
      .rd_valid, .rd_data, .rd_nerr, .rd_fail, .rd_last,
      .op_done, .op_miss, .op_border
    );

    task automatic map(input int sb, input int la, input int c, input int r);
      map_we = 1; map_sb = 1'(sb); map_addr = 6'(la); map_col1 = 5'(c); map_row1 = 5'(r);
      @(negedge clk);
      map_we = 0;
    endtask

    task automatic write_frag(input int sb, input int la, input logic [K-1:0] d [NCW]);
      while (!cmd_ready) @(negedge clk);
      cmd_valid = 1; cmd_write = 1; cmd_sb = 1'(sb); cmd_addr = 6'(la);
      @(negedge clk);
      cmd_valid = 0;
      for (int i = 0; i < NCW; i++) begin
        wr_valid = 1; wr_data = d[i];
        @(negedge clk);
        while (!wr_ready && i == 0) @(negedge clk);
      end
      wr_valid = 0;
      while (!op_done) @(negedge clk);
      n_write++;
      if (op_border) n_border++;
    endtask

    // returns the number of words that are flagged or differ from e; checks them when exp_valid
    task automatic read_frag(input int sb, input int la, input logic [K-1:0] e [NCW],
                             input bit exp_valid, output int nbad, output bit miss);
      int i, last_t;
      nbad = 0; i = 0; last_t = 0;
      while (!cmd_ready) @(negedge clk);
      cmd_valid = 1; cmd_write = 0; cmd_sb = 1'(sb); cmd_addr = 6'(la);
      @(negedge clk);
      cmd_valid = 0;
      while (!op_done) begin
        if (rd_valid) begin
          if (rd_fail) n_fail++;
          if (rd_fail || rd_data != e[i]) nbad++;
          if (rd_nerr != 0 && !rd_fail) n_corr++;
          if (exp_valid) begin
            check(rd_data == e[i], $sformatf("mem%0d sb%0d la%0d word %0d", u, sb, la, i));
            check(!rd_fail, "no fail flag on a screened fragment");
          end
          if (i > 0) check(cyc - last_t == T + 4, $sformatf("decode interval %0d", cyc - last_t));
          check(rd_last == (i == NCW - 1), "last-word marker");
          last_t = cyc;
          i++;
        end
        @(negedge clk);
      end
      miss = op_miss;
      if (!miss) begin
        check(i == NCW, "word count of a read");
        n_read++;
      end
    endtask

    initial begin
      logic [K-1:0] ones [NCW], d [NCW];
      logic [K-1:0] stored [NSB][NGOOD][NCW];
      int nbad;
      bit miss;
      for (int i = 0; i < NCW; i++) ones[i] = '1;
      repeat (3) @(negedge clk);
      rst_n = 1;
      // 1. self-test and mapping
      for (int sb = 0; sb < NSB; sb++) begin
        int good, cand;
        good = 0;
        cand = 0;
        while (good < NGOOD && cand < 200) begin
          int c, r;
          c = (cand * 7 + sb) % W;
          r = (cand < 3) ? cand : (cand == 3) ? W - 1 : (cand * 13 + 5) % W;
          cand++;
          map(sb, MF - 1, c, r);
          write_frag(sb, MF - 1, ones);
          read_frag(sb, MF - 1, ones, 0, nbad, miss);
          if (nbad != 0) n_excl++;
          else begin
            map(sb, good, c, r);
            good++;
          end
        end
        check(good == NGOOD, $sformatf("mem%0d sb%0d found %0d good fragments", u, sb, good));
      end
      // 2. data
      for (int sb = 0; sb < NSB; sb++)
        for (int la = 0; la < NGOOD; la++) begin
          for (int i = 0; i < NCW; i++) d[i] = K'($urandom);
          stored[sb][la] = d;
          write_frag(sb, la, d);
          n_sb[sb]++;
        end
      for (int sb = 0; sb < NSB; sb++)
        for (int la = 0; la < NGOOD; la++) begin
          read_frag(sb, la, stored[sb][la], 1, nbad, miss);
          check(!miss, $sformatf("mapped address hit mem%0d sb%0d la%0d", u, sb, la));
        end
      // 3. unmapped address
      read_frag(1, MF - 2, ones, 0, nbad, miss);
      check(miss, "unmapped address reported");
      if (miss) n_miss++;
      fin[u] = 1;
    end
  end

  initial begin
    wait (fin[0] && fin[1]);
    $display("writes %0d reads %0d corrected %0d uncorrectable %0d excluded %0d miss %0d border %0d sb0 %0d sb1 %0d",
             n_write, n_read, n_corr, n_fail, n_excl, n_miss, n_border, n_sb[0], n_sb[1]);
    check(n_write > 0, "two-step writes happened");
    check(n_read > 0, "reads happened");
    check(n_corr > 0, "ECC corrected words");
    check(n_fail > 0, "uncorrectable words detected");
    check(n_excl > 0, "bad segments excluded");
    check(n_miss > 0, "mapping miss");
    check(n_border > 0, "border segments used");
    check(n_sb[0] > 0 && n_sb[1] > 0, "both superblocks used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
