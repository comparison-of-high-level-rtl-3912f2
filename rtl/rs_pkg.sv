// rs_pkg: shared types, constants and GF(2^8) arithmetic for the Reed-Solomon decoder.
//
// Every symbol is an element of GF(2^8), an 8-bit value. Addition is bitwise XOR.
// Multiplication is carry-less multiplication reduced modulo the primitive polynomial,
// written here as a shift-and-add loop that elaborates into a pure XOR network
// (about 15 XOR levels for two variables; fewer gates when one operand is a constant).
// Division multiplies by an inverse taken from a 256-entry lookup table
// (gf_inv_rom), whose contents are computed here by gf_inv_table().
// The primitive polynomial is a static (elaboration-time) choice: every function takes it as an
// argument, and every module passes its own PRIM_POLY parameter. The default,
// x^8+x^4+x^3+x^2+1 (0x11D), is the usual field of the IEEE 802.16 code; the root alpha is x (0x02).
// The decoder's maximum code size (n <= 255 symbols, t <= 16 correctable errors) matches the
// configuration the design is built around; the default sizes are the constants below.
package rs_pkg;

  typedef logic [7:0] gf_t;

  // Per-block code configuration, carried along the pipeline with each block:
  // n = symbols per block (data + parity), t = correctable errors (2t parity symbols).
  typedef struct packed {
    logic [7:0] n;
    logic [7:0] t;
  } rs_cfg_t;

  localparam logic [8:0] DEFAULT_PRIM_POLY = 9'h11D;
  localparam int unsigned DEFAULT_T = 16;   // maximum correctable errors (2t = 32 parity symbols)
  localparam int unsigned NMAX      = 255;  // full-length code, 2^8 - 1 symbols

  // a (x) b modulo the primitive polynomial pp
  function automatic gf_t gf_mul(input gf_t a, input gf_t b, input logic [8:0] pp);
    logic [7:0] acc;
    logic [7:0] sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc = acc ^ sh;
      sh = sh[7] ? ((sh << 1) ^ pp[7:0]) : (sh << 1);
    end
    return acc;
  endfunction

  // Power table: entry e holds alpha^e, e = 0..254 (entry 255 repeats alpha^0).
  function automatic logic [255:0][7:0] gf_alpha_table(input logic [8:0] pp);
    logic [255:0][7:0] tab;
    gf_t p;
    p = 8'h01;
    for (int e = 0; e < 256; e++) begin
      tab[e] = p;
      p = gf_mul(p, 8'h02, pp);
    end
    return tab;
  endfunction

  // Inverse table: entry a holds a^-1 (entry 0 holds 0). Built by walking alpha^i and
  // storing alpha^(-i) at address alpha^i.
  function automatic logic [255:0][7:0] gf_inv_table(input logic [8:0] pp);
    logic [255:0][7:0] tab;
    gf_t p;
    gf_t q;
    gf_t alpha_inv;
    alpha_inv = {1'b1, pp[7:1]};   // x^-1: x * (pp - 1)/x = 1 mod pp
    tab = '0;
    p   = 8'h01;
    q   = 8'h01;
    for (int i = 0; i < 255; i++) begin
      tab[p] = q;
      p = gf_mul(p, 8'h02, pp);
      q = gf_mul(q, alpha_inv, pp);
    end
    return tab;
  endfunction

endpackage
