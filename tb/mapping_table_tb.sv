// mapping_table_tb: random entries of the 58766-entry table are written and read back
// with one cycle of latency; entries never written must miss.
module mapping_table_tb;
  localparam int MF = 58766;
  logic clk = 0, rst_n = 0, we = 0, re = 0, hit;
  logic [15:0] waddr, raddr;
  logic [7:0] wcol1, wrow1, a_col1, a_row1;
  int checks = 0, failures = 0;
  logic [15:0] model [int];
  mapping_table dut (.clk, .rst_n, .we, .waddr, .wcol1, .wrow1, .re, .raddr, .a_col1, .a_row1, .hit);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      waddr = 16'($urandom_range(MF - 1));
      if (i == 0) waddr = 16'(MF - 1);
      wcol1 = 8'($urandom); wrow1 = 8'($urandom);
      we = 1;
      model[waddr] = {wcol1, wrow1};
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 600; i++) begin
      raddr = (i % 2) ? 16'($urandom_range(MF - 1)) : 16'(i / 2);
      if (i < 600 && (i % 3 == 0) && model.num() > 0) begin
        int k;
        void'(model.first(k));
        for (int s = 0; s < (i % 50); s++) void'(model.next(k));
        raddr = 16'(k);
      end
      re = 1;
      @(negedge clk);
      re = 0;
      if (model.exists(raddr)) begin
        check(hit, $sformatf("hit at %0d", raddr));
        check({a_col1, a_row1} == model[raddr], $sformatf("entry %0d", raddr));
      end else
        check(!hit, $sformatf("miss at %0d", raddr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
