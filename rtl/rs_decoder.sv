// rs_decoder: streaming Reed-Solomon decoder over GF(2^8) for full-length and shortened codes
// (n <= 255 symbols per block, up to T = 16 correctable symbol errors with 2t parity symbols).
//
// Dataflow (one symbol per cycle at the input, blocks back to back):
//
//   in --+--> rs_syndrome --> rs_berlekamp --> rs_chien --loc FIFO----> rs_forney --+
//        |                                          \---poly FIFO------>/           |
//        +--> received-data buffer (rs_fifo, BUF_DEPTH symbols) --> rs_correction <-+--> out
//
// Every stage is a latency-insensitive unit with valid/ready handshakes, so stages work on
// different blocks at the same time and stall only when their output is full. Per block:
// syndrome n cycles; Berlekamp-Massey 3t+2; Chien 256-2t; Forney about
// max((T+1)*errors, n-2t); correction n. With the default 765-symbol buffer (three 255-symbol
// blocks) the decoder accepts a new 255-symbol block about every 256-272 cycles in steady
// state, set by the syndrome stage or, with 16 errors per block, by the Forney stage.
// The received-data buffer must hold at least one whole block (BUF_DEPTH >= n), otherwise
// the input stalls before the syndromes of the block can be finished.
//
// Input: symbols r_{n-1} first, parity symbols last. The block's code size in_cfg (n, t) is
// sampled with its first symbol and must satisfy 2t < n <= 255 and 1 <= t <= T; the primitive
// polynomial is the static parameter PRIM_POLY. Output: the n-2t corrected data symbols of
// each block, in order, out_last on the final one. Blocks with more than t errors are passed
// on with whatever the algorithm produced; no failure flag is raised.
// The stage structure, the stream between Chien and Forney, the out-of-order Forney stage and
// the 765-symbol buffer follow the design this decoder is based on; the other FIFO depths, the
// handshake and the in-band block configuration are this design's own.
module rs_decoder
  import rs_pkg::*;
#(
  parameter int unsigned T           = DEFAULT_T,
  parameter int unsigned SYN_PAR     = 2 * T,   // syndromes updated per cycle
  parameter int unsigned BUF_DEPTH   = 765,     // received-data buffer, symbols
  parameter int unsigned LOC_DEPTH   = 16,      // Chien -> Forney position FIFO
  parameter int unsigned ORDER_DEPTH = 256,     // Forney reorder tags
  parameter logic [8:0]  PRIM_POLY   = DEFAULT_PRIM_POLY
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  gf_t     in_data,
  input  rs_cfg_t in_cfg,
  output logic    out_valid,
  input  logic    out_ready,
  output gf_t     out_data,
  output logic    out_last
);
  typedef struct packed {
    gf_t  data;
    logic parity;
    logic last;
  } buf_t;

  typedef struct packed {
    logic err;
    gf_t  z;
    logic last;
  } loc_t;

  // ---------------- input framing ----------------
  logic [7:0] pos;          // index of the next symbol within its block
  rs_cfg_t    cfg_r, cfg_cur;
  logic       is_last, is_parity, syn_in_ready, buf_in_ready, accept;

  assign cfg_cur   = (pos == 8'd0) ? in_cfg : cfg_r;
  assign is_last   = (pos == cfg_cur.n - 8'd1);
  assign is_parity = (pos >= cfg_cur.n - {cfg_cur.t[6:0], 1'b0});
  assign in_ready  = syn_in_ready && buf_in_ready;
  assign accept    = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pos <= '0;
    else if (accept) pos <= is_last ? 8'd0 : pos + 8'd1;
  end

  always_ff @(posedge clk) begin
    if (accept && pos == 8'd0) cfg_r <= in_cfg;
  end

  // ---------------- syndrome ----------------
  logic          syn_valid, syn_ready;
  gf_t [2*T-1:0] syn;
  rs_cfg_t       syn_cfg;

  rs_syndrome #(.T(T), .PAR(SYN_PAR), .PRIM_POLY(PRIM_POLY)) u_syndrome (
    .clk, .rst_n,
    .in_valid(in_valid && buf_in_ready), .in_ready(syn_in_ready),
    .in_data, .in_last(is_last), .in_cfg(cfg_cur),
    .out_valid(syn_valid), .out_ready(syn_ready), .out_syn(syn), .out_cfg(syn_cfg)
  );

  // ---------------- Berlekamp-Massey ----------------
  logic        bm_valid, bm_ready;
  gf_t [T:0]   bm_lambda;
  gf_t [T-1:0] bm_omega;
  logic [7:0]  bm_l;
  rs_cfg_t     bm_cfg;

  rs_berlekamp #(.T(T), .PRIM_POLY(PRIM_POLY)) u_berlekamp (
    .clk, .rst_n,
    .in_valid(syn_valid), .in_ready(syn_ready), .in_syn(syn), .in_cfg(syn_cfg),
    .out_valid(bm_valid), .out_ready(bm_ready), .out_lambda(bm_lambda),
    .out_omega(bm_omega), .out_l(bm_l), .out_cfg(bm_cfg)
  );

  // ---------------- Chien search ----------------
  logic        cp_valid, cp_ready, fp_valid, fp_ready;
  gf_t [T:0]   cp_lambda, fp_lambda;
  gf_t [T-1:0] cp_omega, fp_omega;
  logic        cl_valid, cl_ready, fl_valid, fl_ready;
  loc_t        cl, fl;

  rs_chien #(.T(T), .PRIM_POLY(PRIM_POLY)) u_chien (
    .clk, .rst_n,
    .in_valid(bm_valid), .in_ready(bm_ready), .in_lambda(bm_lambda), .in_omega(bm_omega),
    .in_cfg(bm_cfg),
    .poly_valid(cp_valid), .poly_ready(cp_ready), .poly_lambda(cp_lambda), .poly_omega(cp_omega),
    .out_valid(cl_valid), .out_ready(cl_ready), .out_err(cl.err), .out_z(cl.z), .out_last(cl.last)
  );

  rs_fifo #(.WIDTH($bits(cp_lambda) + $bits(cp_omega)), .DEPTH(2)) u_poly_fifo (
    .clk, .rst_n,
    .in_valid(cp_valid), .in_ready(cp_ready), .in_data({cp_lambda, cp_omega}),
    .out_valid(fp_valid), .out_ready(fp_ready), .out_data({fp_lambda, fp_omega}),
    .count()
  );

  rs_fifo #(.WIDTH($bits(loc_t)), .DEPTH(LOC_DEPTH)) u_loc_fifo (
    .clk, .rst_n,
    .in_valid(cl_valid), .in_ready(cl_ready), .in_data(cl),
    .out_valid(fl_valid), .out_ready(fl_ready), .out_data(fl),
    .count()
  );

  // ---------------- Forney ----------------
  logic e_valid, e_ready, e_last;
  gf_t  e_val;

  rs_forney #(.T(T), .ORDER_DEPTH(ORDER_DEPTH), .PRIM_POLY(PRIM_POLY)) u_forney (
    .clk, .rst_n,
    .poly_valid(fp_valid), .poly_ready(fp_ready), .poly_lambda(fp_lambda), .poly_omega(fp_omega),
    .in_valid(fl_valid), .in_ready(fl_ready), .in_err(fl.err), .in_z(fl.z), .in_last(fl.last),
    .out_valid(e_valid), .out_ready(e_ready), .out_e(e_val), .out_last(e_last)
  );

  // ---------------- received-data buffer and correction ----------------
  logic b_valid, b_ready;
  buf_t b_in, b_out;

  assign b_in = '{data: in_data, parity: is_parity, last: is_last};

  rs_fifo #(.WIDTH($bits(buf_t)), .DEPTH(BUF_DEPTH)) u_buffer (
    .clk, .rst_n,
    .in_valid(in_valid && syn_in_ready), .in_ready(buf_in_ready), .in_data(b_in),
    .out_valid(b_valid), .out_ready(b_ready), .out_data(b_out),
    .count()
  );

  rs_correction u_correction (
    .clk, .rst_n,
    .buf_valid(b_valid), .buf_ready(b_ready), .buf_data(b_out.data),
    .buf_parity(b_out.parity), .buf_last(b_out.last),
    .err_valid(e_valid), .err_ready(e_ready), .err_e(e_val), .err_last(e_last),
    .out_valid, .out_ready, .out_data, .out_last
  );
endmodule
