// tb_gf_pkg: reference GF(2^8) arithmetic for the testbenches, written independently of
// the design (shift-and-reduce multiplication, field polynomial x^8+x^4+x^3+x^2+1).
package tb_gf_pkg;
  localparam int TM = 8;
  localparam int TN = 255;
  localparam logic [8:0] TPOLY = 9'h11D;

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [8:0] x;
    logic [7:0] acc;
    x = {1'b0, a};
    acc = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= x[7:0];
      x = {x[7:0], 1'b0};
      if (x[8]) x ^= TPOLY;
    end
    return acc;
  endfunction

  function automatic logic [7:0] gpow(input int e);
    logic [7:0] v;
    v = 8'd1;
    for (int i = 0; i < ((e % TN) + TN) % TN; i++) v = gmul(v, 8'd2);
    return v;
  endfunction
endpackage
