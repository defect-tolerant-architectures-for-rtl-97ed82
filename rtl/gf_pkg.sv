// gf_pkg: shared constants and GF(2^m) arithmetic for the crossbar memory and its
// BCH error-correcting decoder.
//
// Field elements are carried in 16-bit words so that one set of functions serves every
// field size up to GF(2^15); a module uses only the low M bits. All functions are plain
// combinational loops with constant bounds: inside always_comb they synthesise to AND/XOR
// networks, and called with constant arguments they fold into constants at elaboration.
//
// The default code is the primitive binary BCH code of length n = 255 over GF(2^8) that
// corrects t = 10 errors with k = 179 information bits (the optimum reported for a 1 %
// defect fraction with a 45 nm / 4.5 nm CMOS / nanowire half-pitch pair). The memory
// geometry defaults are a block of W = 256 relay cells on a side and r = 16, so that a
// nanowire segment holds r^2 = 256 cells. The primitive polynomial x^8+x^4+x^3+x^2+1 is
// this design's choice; any primitive polynomial of degree M works.
package gf_pkg;

  // ---------------- default configuration ----------------
  localparam int unsigned GF_M_DEF    = 8;        // field GF(2^m)
  localparam int unsigned GF_POLY_DEF = 'h11D;    // x^8+x^4+x^3+x^2+1
  localparam int unsigned BCH_T_DEF   = 10;       // correctable errors
  localparam int unsigned BCH_K_DEF   = 179;      // information bits per codeword
  localparam int unsigned XB_W_DEF    = 256;      // relay cells on a block side
  localparam int unsigned XB_R_DEF    = 16;       // CMOL topology parameter r
  localparam int unsigned XB_G_DEF    = 128;      // blocks per superblock (fragment = g r^2 bits)
  localparam int unsigned MAP_M_DEF   = 58766;    // useful fragments per superblock
  localparam int unsigned MAP_A_DEF   = 2433;     // spare fragments per superblock

  typedef logic [15:0] gf_t;

  // Multiply two field elements: carry-less product reduced modulo the field polynomial.
  function automatic gf_t gf_mul(input gf_t a, input gf_t b, input int unsigned m,
                                 input int unsigned poly);
    logic [31:0] p;
    p = '0;
    for (int i = 0; i < 16; i++)
      if (i < int'(m) && b[i]) p = p ^ (32'(a) << i);
    for (int i = 30; i >= 0; i--)
      if (i >= int'(m) && p[i]) p = p ^ (32'(poly) << (i - int'(m)));
    return gf_t'(p);
  endfunction

  // Table of powers: entry e holds alpha^e for the primitive element alpha = x,
  // 0 <= e < 2^m - 1, for m up to 9. Packed so that it can be a localparam of any module.
  typedef logic [511:0][15:0] gf_tab_t;

  function automatic gf_tab_t gf_exp_table(input int unsigned m, input int unsigned poly);
    gf_tab_t t;
    gf_t v;
    t = '0;
    v = 16'd1;
    for (int unsigned e = 0; e < 512; e++) begin
      if (e < (1 << m) - 1) begin
        t[e] = v;
        v = v << 1;                              // times alpha
        if (v[m]) v = v ^ gf_t'(poly);
      end
    end
    return t;
  endfunction

  // Table of logarithms: entry a holds e with alpha^e = a (entry 0 unused).
  function automatic gf_tab_t gf_log_table(input int unsigned m, input int unsigned poly);
    gf_tab_t t;
    gf_tab_t ex;
    t = '0;
    ex = gf_exp_table(m, poly);
    for (int unsigned e = 0; e < 512; e++)
      if (e < (1 << m) - 1) t[ex[e][8:0]] = gf_t'(e);
    return t;
  endfunction

endpackage
