// rs_forney_eval: the error-value unit of the Forney stage. For one error location it computes
// e = Omega(z) / Lambda'(z), z = alpha^-loc, where Lambda'(x) = sum over odd i of
// Lambda_i x^(i-1) is the formal derivative of Lambda over GF(2^m).
//
// Both polynomials are evaluated together by Horner's rule, one coefficient per cycle
// (T cycles, highest coefficient first, taken from shift registers), and the division by
// the inverse table and one multiplier takes one more cycle: T+1 cycles per error value
// (17 for T = 16). The result goes out through a one-entry register (out_valid/out_ready).
// The next job is accepted in the division cycle of the current one when the result register
// is free, so back-to-back error values come every T+1 cycles.
// The per-error cost of T+1 cycles matches the design this decoder is based on; the Horner
// schedule that realises it is this design's own.
module rs_forney_eval
  import rs_pkg::*;
#(
  parameter int unsigned T         = DEFAULT_T,
  parameter logic [8:0]  PRIM_POLY = DEFAULT_PRIM_POLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  gf_t          in_z,
  input  gf_t [T:0]    in_lambda,
  input  gf_t [T-1:0]  in_omega,
  output logic         out_valid,
  input  logic         out_ready,
  output gf_t          out_e
);
  localparam int unsigned CW = $clog2(T + 1);

  gf_t [T-1:0] om_sh, ld_sh;   // remaining coefficients, next one in [T-1]
  gf_t         acc_om, acc_ld, z, ld_inv;
  logic [CW-1:0] cnt;
  logic          busy;

  gf_inv_rom #(.PRIM_POLY(PRIM_POLY)) u_inv (.addr(acc_ld), .inv(ld_inv));

  logic finish;
  assign finish   = busy && (cnt == CW'(T)) && (!out_valid || out_ready);
  assign in_ready = (!busy || finish) && (!out_valid || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (finish) out_valid <= 1'b1;
      if (in_valid && in_ready) busy <= 1'b1;
      else if (finish) busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (finish) out_e <= gf_mul(acc_om, ld_inv, PRIM_POLY);
    if (in_valid && in_ready) begin
      om_sh <= in_omega;
      for (int c = 0; c < T; c++)             // coefficient of x^c in Lambda'(x)
        ld_sh[c] <= (c % 2 == 0) ? in_lambda[c + 1] : 8'h00;
      z      <= in_z;
      acc_om <= '0;
      acc_ld <= '0;
      cnt    <= '0;
    end else if (busy) begin
      if (cnt != CW'(T)) begin
        acc_om <= gf_mul(acc_om, z, PRIM_POLY) ^ om_sh[T-1];
        acc_ld <= gf_mul(acc_ld, z, PRIM_POLY) ^ ld_sh[T-1];
        om_sh  <= {om_sh[T-2:0], 8'h00};
        ld_sh  <= {ld_sh[T-2:0], 8'h00};
        cnt    <= cnt + 1'b1;
      end
    end
  end
endmodule
