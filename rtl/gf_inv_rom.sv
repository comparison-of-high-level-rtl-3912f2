// gf_inv_rom: GF(2^8) inverse lookup table used for division (a / b = a (x) inv(b)).
//
// A 256 x 8 read-only table, combinational read: inv = addr^-1, and 0 for addr = 0.
// Its contents are computed at elaboration from the primitive polynomial (rs_pkg::gf_inv_table),
// so changing PRIM_POLY regenerates the table. Division through an inverse table follows the
// usual practice for Reed-Solomon hardware; the combinational read is a choice of this design
// (an FPGA flow maps it to LUTs or a distributed ROM).
module gf_inv_rom
  import rs_pkg::*;
#(
  parameter logic [8:0] PRIM_POLY = DEFAULT_PRIM_POLY
) (
  input  gf_t addr,
  output gf_t inv
);
  localparam logic [255:0][7:0] TABLE = gf_inv_table(PRIM_POLY);

  assign inv = TABLE[addr];
endmodule
