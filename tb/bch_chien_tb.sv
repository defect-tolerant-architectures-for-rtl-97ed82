// bch_chien_tb: sigma(X) = prod (1 + alpha^p X) is built here for random error sets;
// the circuit must flip exactly the bits p of a random word, count them, and flag a
// mismatch between the degree it is told and the roots it finds.
module bch_chien_tb;
  import tb_gf_pkg::*;
  localparam int T = 10, N = 255;
  logic clk = 0;
  logic [N-1:0] r, v, loc;
  logic [T:0][7:0] sigma;
  logic [7:0] deg;
  logic [8:0] nerr;
  logic fail;
  int checks = 0, failures = 0;
  bch_chien dut (.r, .sigma, .deg, .v, .err_loc(loc), .nerr, .fail);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    logic [N-1:0] e;
    for (int trial = 0; trial < 200; trial++) begin
      int ne;
      ne = (trial <= T) ? trial : $urandom_range(T);
      e = '0;
      sigma = '0;
      sigma[0] = 8'd1;
      for (int k = 0; k < ne; k++) begin
        int p;
        do p = $urandom_range(N - 1); while (e[p]);
        e[p] = 1'b1;
        for (int d = T; d >= 1; d--) sigma[d] = gmul(sigma[d-1], gpow(p)) ^ sigma[d];
      end
      for (int i = 0; i < N; i += 32) r[i +: 32] = $urandom;
      deg = 8'(ne);
      #1;
      check(v == (r ^ e), $sformatf("correction with %0d errors", ne));
      check(nerr == 9'(ne), "root count");
      check(!fail, "fail flag on consistent sigma");
      deg = 8'(ne + 1);
      #1;
      check(fail, "degree/root mismatch flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
