// gf_inv_tb: every non-zero element times its table inverse must give 1; inv(0) = 0.
module gf_inv_tb;
  import tb_gf_pkg::*;
  logic clk = 0;
  logic [7:0] a, y;
  int checks = 0, failures = 0;
  gf_inv dut (.a, .y);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if ((i == 0) ? (y != 0) : (gmul(a, y) != 8'd1)) begin
        failures++;
        $display("FAIL inv(%h) = %h", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
