// barrel_shifter_tb: port bit j must connect to data line (A_col2 + j) mod W, for reads
// and writes, both for the default W = r^2 = 256 and for W = 32, r^2 = 16 where only part
// of the lines is used.
module barrel_shifter_tb;
  logic clk = 0;
  int checks = 0, failures = 0;
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
  // full width
  logic [7:0] c1;
  logic [255:0] lr1, rd1, wd1, lw1, le1;
  barrel_shifter dut1 (.a_col2(c1), .en(1'b1), .line_rdata(lr1), .rdata(rd1), .wdata(wd1),
                       .line_wdata(lw1), .line_wen(le1));
  // partial: W = 32, r^2 = 16
  logic [4:0] c2;
  logic [31:0] lr2, lw2, le2;
  logic [15:0] rd2, wd2;
  barrel_shifter #(.W(32), .R2(16)) dut2 (.a_col2(c2), .en(1'b1), .line_rdata(lr2),
                       .rdata(rd2), .wdata(wd2), .line_wdata(lw2), .line_wen(le2));
  initial begin
    for (int t = 0; t < 64; t++) begin
      c1 = 8'($urandom); c2 = 5'($urandom);
      for (int i = 0; i < 256; i += 32) begin lr1[i +: 32] = $urandom; wd1[i +: 32] = $urandom; end
      lr2 = $urandom; wd2 = 16'($urandom);
      #1;
      for (int j = 0; j < 256; j++) begin
        check(rd1[j] == lr1[(int'(c1) + j) % 256], "read bit, W=256");
        check(lw1[(int'(c1) + j) % 256] == wd1[j], "write bit, W=256");
      end
      check(le1 == '1, "all lines driven when W = r^2");
      for (int j = 0; j < 16; j++) begin
        check(rd2[j] == lr2[(int'(c2) + j) % 32], "read bit, W=32");
        check(lw2[(int'(c2) + j) % 32] == wd2[j], "write bit, W=32");
      end
      for (int i = 0; i < 32; i++)
        check(le2[i] == (((i - int'(c2) + 32) % 32) < 16), "driven window, W=32");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
