// gf_mult_tb: exhaustive check of the GF(2^8) multiplier against a reference multiply.
module gf_mult_tb;
  import tb_gf_pkg::*;
  logic clk = 0;
  logic [7:0] a, b, c;
  int checks = 0, failures = 0;
  gf_mult dut (.a, .b, .c);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (c != gmul(a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL %h*%h = %h, expected %h", a, b, c, gmul(a, b));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
