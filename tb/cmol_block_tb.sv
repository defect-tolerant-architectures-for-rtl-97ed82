// cmol_block_tb: a defect-free block must store r^2-bit words at segment addresses across
// the whole array, including the border rows where only one top-layer row exists, return
// them in bit order one cycle after the read, ignore operations while not selected, and
// report border addresses. A block with the default 1 % defects may only lose ones.
module cmol_block_tb;
  localparam int W = 256, R = 16, R2 = 256;
  logic clk = 0;
  int checks = 0, failures = 0, nborder = 0;
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
  logic sel = 0, rd = 0, wr = 0, ph = 0, border, border_b;
  logic [7:0] a_col1, a_row1;
  logic [R2-1:0] wdata, rdata, rdata_b;
  cmol_block #(.Q_PPM(0)) dut (.clk, .blk_id(16'd3), .sel, .rd, .wr, .wr_phase(ph), .a_col1,
    .a_row1, .wdata, .rdata, .border);
  cmol_block dutb (.clk, .blk_id(16'd4), .sel, .rd, .wr, .wr_phase(ph), .a_col1,
    .a_row1, .wdata, .rdata(rdata_b), .border(border_b));

  function automatic logic [R2-1:0] rnd();
    logic [R2-1:0] d;
    for (int i = 0; i < R2; i += 32) d[i +: 32] = $urandom;
    return d;
  endfunction

  task automatic write(input logic [7:0] c, input logic [7:0] r, input logic [R2-1:0] d,
                       input bit s);
    a_col1 = c; a_row1 = r; wdata = d; sel = s;
    wr = 1; ph = 0; @(negedge clk);
    ph = 1; @(negedge clk);
    wr = 0; sel = 0;
  endtask

  task automatic read(input logic [7:0] c, input logic [7:0] r);
    a_col1 = c; a_row1 = r; sel = 1;
    rd = 1; @(negedge clk);
    rd = 0; sel = 0;
  endtask

  initial begin
    logic [R2-1:0] d, d0;
    logic [7:0] c, r;
    @(negedge clk);
    for (int t = 0; t < 80; t++) begin
      c = 8'($urandom);
      r = (t < 8) ? 8'(t) : (t < 16) ? 8'(W - 1 - (t - 8)) : 8'($urandom);
      d = rnd();
      write(c, r, d, 1);
      read(c, r);
      check(rdata == d, $sformatf("word at (%0d,%0d)", c, r));
      check((rdata_b & ~d) == '0, "defective block returns no unwritten ones");
      check(border == (r < R/2 || r >= W - R/2), "border flag");
      if (border) nborder++;
      // a write while not selected must leave the word unchanged
      d0 = rnd();
      write(c, r, d0, 0);
      read(c, r);
      check(rdata == d, "unselected write ignored");
    end
    check(nborder > 0, "border segments exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
