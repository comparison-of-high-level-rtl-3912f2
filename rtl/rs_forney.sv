// rs_forney: Forney stage with out-of-order execution. Turns the per-position stream from the
// Chien search into one error value per data position: Omega(z)/Lambda'(z) where a root was
// found, 0 elsewhere, delivered strictly in input order.
//
// An error value takes T+1 cycles (rs_forney_eval) but a clean position needs no work, and
// the two kinds have no data dependence on each other. The stage is therefore split into
//   check input : takes the block's Lambda/Omega at its first position, then sorts every
//                 position: errors go with z into the error unit's queue (EQ_DEPTH), the
//                 first error of a block also hands the block's polynomials to the error unit
//                 (through a 2-deep polynomial FIFO), and every position leaves an order tag
//                 {is_error, last}
//   error unit  : rs_forney_eval, T+1 cycles per error, its results queued in an EQ_DEPTH FIFO
//   zero unit   : a clean position's value is the constant 0, so its "result" is the tag itself
//   merge       : pops the order tags in order; an error tag waits for the error unit's next
//                 result, a clean tag yields 0 at once
// connected by FIFOs. The check-input side runs ahead of the error unit by up to ORDER_DEPTH
// positions, so the stage handles a block in about max((T+1)*errors, positions) cycles, instead
// of positions + T*errors when everything is processed in arrival order.
// With EQ_DEPTH = T even t errors at the very start of a block do not stop the check-input
// side, and the error unit can finish all errors of the next block while the clean positions
// of the current one are still draining, which gives the max((T+1)t, n-2t) rate in steady
// state. The four-part split and its throughput follow the design this decoder is based on;
// passing polynomials only for blocks that have errors, folding the zero unit into the tag
// FIFO, and the FIFO depths are this design's own.
module rs_forney
  import rs_pkg::*;
#(
  parameter int unsigned T           = DEFAULT_T,
  parameter int unsigned ORDER_DEPTH = 256,
  parameter int unsigned EQ_DEPTH    = T,
  parameter logic [8:0]  PRIM_POLY   = DEFAULT_PRIM_POLY
) (
  input  logic         clk,
  input  logic         rst_n,
  // polynomials of the next block, one transfer per block
  input  logic         poly_valid,
  output logic         poly_ready,
  input  gf_t [T:0]    poly_lambda,
  input  gf_t [T-1:0]  poly_omega,
  // one entry per data position
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_err,
  input  gf_t          in_z,
  input  logic         in_last,
  // one error value per data position, in input order
  output logic         out_valid,
  input  logic         out_ready,
  output gf_t          out_e,
  output logic         out_last
);
  typedef struct packed {
    gf_t  z;
    logic first;     // first error of its block: the error unit takes new polynomials
  } job_t;

  typedef struct packed {
    gf_t [T:0]   lambda;
    gf_t [T-1:0] omega;
  } poly_t;

  typedef struct packed {
    logic is_err;
    logic last;
  } tag_t;

  // ---------------- check input ----------------
  logic        have_poly, seen_err;
  gf_t [T:0]   cur_lambda;
  gf_t [T-1:0] cur_omega;
  logic        tag_in_ready, job_in_ready, ep_in_ready, take, new_poly;
  poly_t       ep_out;
  logic        ep_out_valid, ep_out_ready;
  gf_t [T:0]   ev_lambda;
  gf_t [T-1:0] ev_omega;
  logic        ev_in_valid, ev_in_ready;
  tag_t        tag_in, tag_out;
  job_t        job_in, job_out;
  logic        tag_out_valid, tag_out_ready, job_out_valid, job_out_ready;
  logic        res_valid, res_ready, ev_out_valid, ev_out_ready;
  gf_t         res_e, ev_out_e;

  assign poly_ready = !have_poly;
  assign new_poly   = in_err && !seen_err;
  assign in_ready   = have_poly && tag_in_ready && (!in_err || job_in_ready)
                      && (!new_poly || ep_in_ready);
  assign take       = in_valid && in_ready;
  assign tag_in     = '{is_err: in_err, last: in_last};
  assign job_in     = '{z: in_z, first: new_poly};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_poly <= 1'b0;
      seen_err  <= 1'b0;
    end else if (poly_valid && poly_ready) begin
      have_poly <= 1'b1;
      seen_err  <= 1'b0;
    end else if (take) begin
      if (in_err) seen_err <= 1'b1;
      if (in_last) have_poly <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (poly_valid && poly_ready) begin
      cur_lambda <= poly_lambda;
      cur_omega  <= poly_omega;
    end
  end

  rs_fifo #(.WIDTH($bits(tag_t)), .DEPTH(ORDER_DEPTH)) u_order (
    .clk, .rst_n,
    .in_valid(take), .in_ready(tag_in_ready), .in_data(tag_in),
    .out_valid(tag_out_valid), .out_ready(tag_out_ready), .out_data(tag_out),
    .count()
  );

  rs_fifo #(.WIDTH($bits(job_t)), .DEPTH(EQ_DEPTH)) u_jobq (
    .clk, .rst_n,
    .in_valid(take && in_err), .in_ready(job_in_ready), .in_data(job_in),
    .out_valid(job_out_valid), .out_ready(job_out_ready), .out_data(job_out),
    .count()
  );

  rs_fifo #(.WIDTH($bits(poly_t)), .DEPTH(2)) u_epoly (
    .clk, .rst_n,
    .in_valid(take && new_poly), .in_ready(ep_in_ready), .in_data({cur_lambda, cur_omega}),
    .out_valid(ep_out_valid), .out_ready(ep_out_ready), .out_data(ep_out),
    .count()
  );

  // ---------------- error unit ----------------
  // polynomials of the block being worked on; replaced by the job that starts a new block
  always_ff @(posedge clk) begin
    if (ep_out_valid && ep_out_ready) begin
      ev_lambda <= ep_out.lambda;
      ev_omega  <= ep_out.omega;
    end
  end

  assign ev_in_valid   = job_out_valid && (!job_out.first || ep_out_valid);
  assign job_out_ready = ev_in_ready && ev_in_valid;
  assign ep_out_ready  = job_out_ready && job_out.first;

  rs_forney_eval #(.T(T), .PRIM_POLY(PRIM_POLY)) u_eval (
    .clk, .rst_n,
    .in_valid(ev_in_valid), .in_ready(ev_in_ready), .in_z(job_out.z),
    .in_lambda(job_out.first ? ep_out.lambda : ev_lambda),
    .in_omega(job_out.first ? ep_out.omega : ev_omega),
    .out_valid(ev_out_valid), .out_ready(ev_out_ready), .out_e(ev_out_e)
  );

  // results wait here for their turn, so the error unit can work ahead on the next block
  rs_fifo #(.WIDTH(8), .DEPTH(EQ_DEPTH)) u_results (
    .clk, .rst_n,
    .in_valid(ev_out_valid), .in_ready(ev_out_ready), .in_data(ev_out_e),
    .out_valid(res_valid), .out_ready(res_ready), .out_data(res_e),
    .count()
  );

  // ---------------- merge ----------------
  assign out_valid     = tag_out_valid && (!tag_out.is_err || res_valid);
  assign out_e         = tag_out.is_err ? res_e : 8'h00;
  assign out_last      = tag_out.last;
  assign tag_out_ready = out_valid && out_ready;
  assign res_ready     = tag_out_valid && tag_out.is_err && out_ready;

  assert property (@(posedge clk) disable iff (!rst_n) res_valid && res_ready |-> tag_out.is_err);
endmodule
