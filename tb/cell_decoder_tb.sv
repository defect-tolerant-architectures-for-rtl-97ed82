// cell_decoder_tb: every address, alone and paired with a second address, must raise
// exactly the expected lines; no lines when both enables are low.
module cell_decoder_tb;
  localparam int W = 256;
  logic clk = 0;
  logic [7:0] addr, addr2;
  logic en, en2;
  logic [W-1:0] lines, expect_l;
  int checks = 0, failures = 0;
  cell_decoder dut (.addr, .en, .addr2, .en2, .lines);
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
    for (int i = 0; i < W; i++)
      for (int m = 0; m < 4; m++) begin
        addr = 8'(i); addr2 = 8'($urandom); en = m[0]; en2 = m[1];
        #1;
        expect_l = '0;
        if (en) expect_l[i] = 1'b1;
        if (en2) expect_l[addr2] = 1'b1;
        check(lines == expect_l, $sformatf("addr %0d addr2 %0d en %b%b", i, addr2, en, en2));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
