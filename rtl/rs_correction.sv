// rs_correction: error correction d_i = r_i (+) e_i for the data symbols of each block.
//
// The received symbols wait in the received-data buffer (an rs_fifo in the top level) while
// the error values are computed. Each buffer entry carries the symbol, a flag marking it as a
// parity symbol and a flag marking the block's last symbol. Data symbols are paired one for
// one with the error-value stream and leave corrected; parity symbols are dropped, so a block
// of n symbols yields n-2t output symbols, the last one flagged. One symbol per cycle; a
// parity symbol is dropped in one cycle without waiting for an error value. The output is
// combinational from the two inputs (no register), and waits on out_ready. out_last is the
// error stream's last flag, passed straight through; clk and rst_n serve only the assertions.
// Correction by XOR follows the decoding algorithm; the flags and the dropping of parity
// symbols inside this stage are this design's own.
module rs_correction
  import rs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  // received-data buffer
  input  logic buf_valid,
  output logic buf_ready,
  input  gf_t  buf_data,
  input  logic buf_parity,
  input  logic buf_last,
  // error values, one per data symbol
  input  logic err_valid,
  output logic err_ready,
  input  gf_t  err_e,
  input  logic err_last,
  // corrected data symbols
  output logic out_valid,
  input  logic out_ready,
  output gf_t  out_data,
  output logic out_last
);
  assign out_valid = buf_valid && !buf_parity && err_valid;
  assign out_data  = buf_data ^ err_e;
  assign out_last  = err_last;
  assign err_ready = buf_valid && !buf_parity && out_ready;
  assign buf_ready = buf_parity || (err_valid && out_ready);

  // a block's parity symbols are its last ones
  assert property (@(posedge clk) disable iff (!rst_n)
                   buf_valid && buf_ready && buf_last |-> buf_parity);
endmodule
