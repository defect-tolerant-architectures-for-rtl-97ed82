// crossbar_array_tb: behaviour of the crossbar model at its CMOS lines.
// A defect-free copy must store and return whole segments, place device j of the segment
// in column c on line (c + j) mod W, apply the two write steps separately (step 0 only
// clears, step 1 only sets), reach border segments through one top-layer row, and do
// nothing without a top-layer row. A copy with the default 1 % stuck-open devices must
// never return a 1 that was not written, and lose between 0.5 % and 2 % of written ones.
module crossbar_array_tb;
  localparam int W = 256, R = 16, R2 = 256;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  logic [W-1:0] col1_sel, row1_sel, row2_sel, lwd, lwe, lrd_a, lrd_b;
  logic rd = 0, wr = 0, ph = 0;
  crossbar_array #(.Q_PPM(0)) xa (.clk, .blk_id(16'd0), .col1_sel, .row1_sel, .row2_sel, .rd, .wr,
    .wr_phase(ph), .line_wdata(lwd), .line_wen(lwe), .line_rdata(lrd_a));
  crossbar_array xb (.clk, .blk_id(16'd7), .col1_sel, .row1_sel, .row2_sel, .rd, .wr,
    .wr_phase(ph), .line_wdata(lwd), .line_wen(lwe), .line_rdata(lrd_b));

  function automatic logic [W-1:0] place(input int c, input logic [R2-1:0] d);
    logic [W-1:0] l;
    for (int j = 0; j < R2; j++) l[(c + j) % W] = d[j];
    return l;
  endfunction

  task automatic sel(input int c, input int r, input bit row2);
    col1_sel = '0; row1_sel = '0; row2_sel = '0;
    col1_sel[c] = 1'b1;
    row1_sel[r] = 1'b1;
    if (row2) begin
      if (r + R/2 < W) row2_sel[r + R/2] = 1'b1;
      if (r - R/2 >= 0) row2_sel[r - R/2] = 1'b1;
    end
  endtask

  task automatic write_step(input bit phase, input logic [W-1:0] lines);
    lwd = lines; lwe = '1; ph = phase; wr = 1;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic read_lines();
    rd = 1;
    @(negedge clk);
    rd = 0;
  endtask

  function automatic logic [R2-1:0] rnd();
    logic [R2-1:0] d;
    for (int i = 0; i < R2; i += 32) d[i +: 32] = $urandom;
    return d;
  endfunction

  initial begin
    logic [R2-1:0] d, d2;
    int ones = 0, lost = 0;
    @(negedge clk);
    for (int t = 0; t < 60; t++) begin
      int c, r;
      c = $urandom_range(W - 1);
      r = (t < 4) ? t : (t < 8) ? W - 1 - t + 4 : $urandom_range(W - 1);
      d = rnd();
      sel(c, r, 1);
      write_step(0, place(c, d));
      write_step(1, place(c, d));
      read_lines();
      check(lrd_a == place(c, d), $sformatf("segment (%0d,%0d) read back", c, r));
      check((lrd_b & ~place(c, d)) == '0, "defective copy returns no unwritten ones");
      for (int j = 0; j < R2; j++) if (d[j]) begin
        ones++;
        if (!lrd_b[(c + j) % W]) lost++;
      end
      // step 1 alone only sets, step 0 alone only clears
      d2 = rnd();
      write_step(1, place(c, d2));
      read_lines();
      check(lrd_a == place(c, d | d2), "set-only step");
      write_step(0, place(c, d2));
      read_lines();
      check(lrd_a == place(c, (d | d2) & d2), "clear-only step");
      // no top-layer row: nothing is read
      sel(c, r, 0);
      read_lines();
      check(lrd_a == '0, "no access without a top-layer row");
    end
    // all ones for the defect statistics
    for (int t = 0; t < 200; t++) begin
      int c, r;
      c = $urandom_range(W - 1); r = $urandom_range(W - 1);
      sel(c, r, 1);
      write_step(1, '1);
      read_lines();
      ones += R2;
      for (int j = 0; j < W; j++) if (!lrd_b[j]) lost++;
    end
    $display("stuck-open fraction %0d / %0d", lost, ones);
    check(lost * 200 > ones && lost * 50 < ones, "defect fraction near 1 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
