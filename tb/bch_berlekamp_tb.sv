// bch_berlekamp_tb: for random sets of e <= T error positions p, the syndromes
// S_j = sum alpha^(p j) are computed here and the circuit must return
// sigma(X) = prod (1 + alpha^p X) with degree e, exactly T cycles after start.
module bch_berlekamp_tb;
  import tb_gf_pkg::*;
  localparam int T = 10, N = 255;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [2*T-1:0][7:0] s;
  logic [T:0][7:0] sigma;
  logic [7:0] deg;
  int checks = 0, failures = 0, cyc = 0;
  bch_berlekamp dut (.clk, .rst_n, .start, .s, .busy, .done, .sigma, .deg);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
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
    logic [T:0][7:0] ref_sig;
    logic [N-1:0] used;
    int pos[$];
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 300; trial++) begin
      int e;
      e = (trial <= T) ? trial : $urandom_range(T);
      used = '0;
      pos.delete();
      for (int k = 0; k < e; k++) begin
        int p;
        do p = $urandom_range(N - 1); while (used[p]);
        used[p] = 1'b1;
        pos.push_back(p);
      end
      for (int j = 1; j <= 2 * T; j++) begin
        s[j-1] = '0;
        foreach (pos[k]) s[j-1] ^= gpow(pos[k] * j);
      end
      ref_sig = '0;
      ref_sig[0] = 8'd1;
      foreach (pos[k])
        for (int d = T; d >= 0; d--)
          ref_sig[d] = ((d > 0) ? gmul(ref_sig[d-1], gpow(pos[k])) : 8'd0) ^ ref_sig[d];
      start = 1;
      t0 = cyc;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      check(sigma == ref_sig, $sformatf("sigma for %0d errors", e));
      check(deg == 8'(e), $sformatf("degree %0d for %0d errors", deg, e));
      check(cyc - t0 == T + 1, $sformatf("done after %0d edges", cyc - t0));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
