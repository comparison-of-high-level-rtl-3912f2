// rs_chien: Chien search. Tests every symbol position i of the block for Lambda(alpha^-i) = 0
// and streams one result per data position, in the order the data symbols arrive
// (i = n-1 down to 2t), so that the Forney stage can start on an error location as soon as it
// is found instead of waiting for the whole list.
//
// One position per cycle, fully unrolled over the T+1 coefficients: register term_k holds
// Lambda_k alpha^(-i k), and stepping from i to i-1 multiplies it by the constant alpha^k.
// The scan always starts at i = 254, where term_k = Lambda_k alpha^k, so a shortened block
// (n < 255) needs no table of starting powers: positions above n-1 are stepped through
// without output. Parity positions (i < 2t) are not searched, since only data symbols are
// corrected. A block therefore takes 1 + (255 - 2t) cycles when the output is never stalled
// (224 for t = 16); the scan pauses while out_ready is low.
// Interfaces:
//   in_*    Lambda, Omega and configuration from the Berlekamp-Massey stage
//   poly_*  Lambda and Omega passed on to the Forney stage, once per block (one-entry register)
//   out_*   per data position: err (root found), z = alpha^-i (the point where Forney evaluates
//           the polynomials) and last (position 2t, end of block)
// The search itself follows the algorithm the design is based on; the fixed start at i = 254,
// the per-position stream and the interfaces are this design's own choices.
module rs_chien
  import rs_pkg::*;
#(
  parameter int unsigned T         = DEFAULT_T,
  parameter logic [8:0]  PRIM_POLY = DEFAULT_PRIM_POLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  gf_t [T:0]    in_lambda,
  input  gf_t [T-1:0]  in_omega,
  input  rs_cfg_t      in_cfg,
  output logic         poly_valid,
  input  logic         poly_ready,
  output gf_t [T:0]    poly_lambda,
  output gf_t [T-1:0]  poly_omega,
  output logic         out_valid,
  input  logic         out_ready,
  output logic         out_err,
  output gf_t          out_z,
  output logic         out_last
);
  localparam logic [255:0][7:0] ALPHA = gf_alpha_table(PRIM_POLY);

  gf_t [T:0]   term;
  gf_t         z, sum;
  logic [7:0]  i;
  logic        busy;
  rs_cfg_t     cfg;
  logic        in_range, step;

  assign in_ready = !busy && (!poly_valid || poly_ready);
  assign in_range = (i <= cfg.n - 8'd1) && (i >= {cfg.t[6:0], 1'b0});
  assign out_valid = busy && in_range;
  assign step      = busy && (!in_range || out_ready);

  always_comb begin
    sum = '0;
    for (int k = 0; k <= T; k++) sum = sum ^ term[k];
  end

  assign out_err  = (sum == 8'h00);
  assign out_z    = z;
  assign out_last = (i == {cfg.t[6:0], 1'b0});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      poly_valid <= 1'b0;
    end else begin
      if (poly_valid && poly_ready) poly_valid <= 1'b0;
      if (in_valid && in_ready) begin
        busy       <= 1'b1;
        poly_valid <= 1'b1;
      end else if (step && out_last) begin
        busy <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      for (int k = 0; k <= T; k++)
        term[k] <= gf_mul(in_lambda[k], ALPHA[k], PRIM_POLY);
      z           <= ALPHA[1];   // alpha^-254
      i           <= 8'd254;
      cfg         <= in_cfg;
      poly_lambda <= in_lambda;
      poly_omega  <= in_omega;
    end else if (step) begin
      for (int k = 0; k <= T; k++)
        term[k] <= gf_mul(term[k], ALPHA[k], PRIM_POLY);
      z <= gf_mul(z, 8'h02, PRIM_POLY);
      i <= i - 8'd1;
    end
  end
endmodule
