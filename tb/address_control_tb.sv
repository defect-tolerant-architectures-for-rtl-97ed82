// address_control_tb: for every row address the two top-layer rows must be row +/- r/2
// (r = 16), valid only inside the array, border set when one is missing, A_col2 = A_col1.
module address_control_tb;
  localparam int W = 256, R = 16;
  logic clk = 0;
  logic [7:0] a_col1, a_row1, a_row2a, a_row2b, a_col2;
  logic ok_a, ok_b, border;
  int checks = 0, failures = 0, nborder = 0;
  address_control dut (.a_col1, .a_row1, .a_row2a, .a_row2a_ok(ok_a), .a_row2b,
                       .a_row2b_ok(ok_b), .a_col2, .border);
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
    for (int i = 0; i < W; i++) begin
      a_row1 = 8'(i); a_col1 = 8'($urandom);
      #1;
      check(ok_a == (i + R/2 < W), $sformatf("row2a valid at %0d", i));
      check(ok_b == (i - R/2 >= 0), $sformatf("row2b valid at %0d", i));
      if (ok_a) check(a_row2a == 8'(i + R/2), "row2a value");
      if (ok_b) check(a_row2b == 8'(i - R/2), "row2b value");
      check(border == (i < R/2 || i >= W - R/2), "border flag");
      check(a_col2 == a_col1, "col2");
      if (border) nborder++;
    end
    check(nborder == R, "number of border rows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
