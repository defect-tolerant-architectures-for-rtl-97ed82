// bch_syndrome_tb: syndromes S_j = r(alpha^j), j = 1..20, of random and sparse words,
// compared with Horner evaluation of the received polynomial.
module bch_syndrome_tb;
  import tb_gf_pkg::*;
  localparam int T = 10, N = 255;
  logic clk = 0;
  logic [N-1:0] r;
  logic [2*T-1:0][7:0] s;
  int checks = 0, failures = 0;
  bch_syndrome dut (.r, .s);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [7:0] eval(input logic [N-1:0] w, input int j);
    logic [7:0] x, acc;
    x = gpow(j);
    acc = '0;
    for (int i = N - 1; i >= 0; i--) acc = gmul(acc, x) ^ {7'd0, w[i]};
    return acc;
  endfunction
  initial begin
    for (int t = 0; t < 60; t++) begin
      if (t < 20) begin
        r = '0;
        r[$urandom_range(N - 1)] = 1'b1;
      end else
        for (int i = 0; i < N; i += 32) r[i +: 32] = $urandom;
      #1;
      for (int j = 1; j <= 2 * T; j++) begin
        checks++;
        if (s[j-1] != eval(r, j)) begin
          failures++;
          $display("FAIL S%0d = %h expected %h", j, s[j-1], eval(r, j));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
