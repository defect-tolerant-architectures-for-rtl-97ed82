// bch_encoder_tb: codewords of random data must equal systematic long division by the
// generator polynomial of the BCH(255,179) code, written out here as a constant.
module bch_encoder_tb;
  localparam int K = 179, N = 255, P = N - K;
  localparam logic [P:0] G = 77'h12ca7239ee08d439812d;
  logic clk = 0;
  logic [K-1:0] u;
  logic [N-1:0] c;
  int checks = 0, failures = 0;
  bch_encoder dut (.u, .c);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [N-1:0] encode(input logic [K-1:0] d);
    logic [N-1:0] w;
    w = {d, {P{1'b0}}};
    for (int i = N - 1; i >= P; i--)
      if (w[i]) w[i -: P+1] = w[i -: P+1] ^ G;
    return {d, w[P-1:0]};
  endfunction
  initial begin
    for (int t = 0; t < 300; t++) begin
      if (t < K) begin u = '0; u[t] = 1'b1; end
      else for (int i = 0; i < K; i += 32) u[i +: 32] = $urandom;
      #1;
      checks++;
      if (c != encode(u)) begin
        failures++;
        $display("FAIL data %h", u);
      end
    end
    u = '1;
    #1;
    checks++;
    if (c != '1) begin failures++; $display("FAIL all-ones"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
