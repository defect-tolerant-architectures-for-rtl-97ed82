// cmol_memory_full_tb: one complete write and read of a fragment at the default size
// (W = 256, r = 16, 128 blocks per superblock, 2 superblocks, 58766-entry mapping tables,
// BCH(255,179,t=10), 1 % stuck-open devices). A fragment is 128 x 256 = 32768 bits and
// holds 128 codewords. Fragments are written to an interior segment of superblock 0 and a
// border segment of superblock 1, read back and compared word by word; the 1 % defects
// must show up as corrected bits and never as a wrong or flagged word. An unmapped
// logical address must end with op_miss.
module cmol_memory_full_tb;
  localparam int K = 179, T = 10, NCW = 128;

  logic clk = 0, rst_n = 0;
  logic map_we = 0, cmd_valid = 0, cmd_write = 0, wr_valid = 0;
  logic [0:0] map_sb = 0, cmd_sb = 0;
  logic [15:0] map_addr = 0, cmd_addr = 0;
  logic [7:0] map_col1 = 0, map_row1 = 0;
  logic [K-1:0] wr_data = 0, rd_data;
  logic cmd_ready, wr_ready, rd_valid, rd_fail, rd_last, op_done, op_miss, op_border;
  logic [8:0] rd_nerr;
  int checks = 0, failures = 0, corrected_bits = 0, cyc = 0;

  cmol_memory dut (
    .clk, .rst_n, .map_we, .map_sb, .map_addr, .map_col1, .map_row1,
    .cmd_valid, .cmd_ready, .cmd_write, .cmd_sb, .cmd_addr,
    .wr_valid, .wr_ready, .wr_data,
    .rd_valid, .rd_data, .rd_nerr, .rd_fail, .rd_last,
    .op_done, .op_miss, .op_border
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic map(input int sb, input int la, input int c, input int r);
    map_we = 1; map_sb = 1'(sb); map_addr = 16'(la); map_col1 = 8'(c); map_row1 = 8'(r);
    @(negedge clk);
    map_we = 0;
  endtask

  task automatic write_frag(input int sb, input int la, input logic [K-1:0] d [NCW]);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_write = 1; cmd_sb = 1'(sb); cmd_addr = 16'(la);
    @(negedge clk);
    cmd_valid = 0;
    for (int i = 0; i < NCW; i++) begin
      wr_valid = 1; wr_data = d[i];
      @(negedge clk);
    end
    wr_valid = 0;
    while (!op_done) @(negedge clk);
    check(!op_miss, "write hit the mapping table");
  endtask

  task automatic read_frag(input int sb, input int la, input logic [K-1:0] e [NCW],
                           output int nwords, output bit miss);
    int t0;
    nwords = 0;
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_write = 0; cmd_sb = 1'(sb); cmd_addr = 16'(la);
    t0 = cyc;
    @(negedge clk);
    cmd_valid = 0;
    while (!op_done) begin
      if (rd_valid) begin
        check(rd_data == e[nwords], $sformatf("sb%0d la%0d word %0d", sb, la, nwords));
        check(!rd_fail, "no uncorrectable word");
        check(rd_last == (nwords == NCW - 1), "last-word marker");
        corrected_bits += int'(rd_nerr);
        nwords++;
      end
      @(negedge clk);
    end
    miss = op_miss;
    if (!miss) $display("read of %0d words took %0d cycles", nwords, cyc - t0);
  endtask

  initial begin
    logic [K-1:0] d0 [NCW], d1 [NCW];
    int n;
    bit miss;
    for (int i = 0; i < NCW; i++)
      for (int b = 0; b < K; b += 32) begin
        d0[i][b +: 32] = $urandom;   // upper bits beyond K are discarded
        d1[i][b +: 32] = $urandom;
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    map(0, 1234, 77, 100);       // interior segment
    map(1, 58765, 200, 3);       // border segment (row 3 < r/2)
    write_frag(0, 1234, d0);
    write_frag(1, 58765, d1);
    check(op_border, "border segment reported");
    read_frag(0, 1234, d0, n, miss);
    check(!miss && n == NCW, "all words of superblock 0 read");
    read_frag(1, 58765, d1, n, miss);
    check(!miss && n == NCW, "all words of superblock 1 read");
    read_frag(0, 5, d0, n, miss);
    check(miss && n == 0, "unmapped address reported");
    $display("corrected bits %0d", corrected_bits);
    check(corrected_bits > 0, "defects corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
