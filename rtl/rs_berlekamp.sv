// rs_berlekamp: Berlekamp-Massey solver. From the 2t syndromes of a block it finds the error
// locator polynomial Lambda(x) (degree L = number of errors) and then the error evaluator
// Omega(x) = S(x) Lambda(x) mod x^2t, with S(x) = S_1 + S_2 x + S_3 x^2 + ...
//
// Schedule for one block (t = the block's t, at most T):
//   load   1 cycle   syndromes and configuration are registered, Lambda = 1, L = 0
//   iter   2t cycles one Berlekamp-Massey step per cycle (j = 1..2t), fully unrolled over the
//                    T+1 coefficients:
//                      d = S_j + sum_{i=1..L} Lambda_i S_{j-i}    (discrepancy)
//                      d == 0            : shift only
//                      d != 0, 2L > j-1  : Lambda += (d/d_m) x^l Lambda_prev
//                      d != 0, 2L <= j-1 : same update, then Lambda_prev = old Lambda,
//                                          L = j - L, d_m = d, l = 1
//   omega  t cycles  Omega_i = sum_k Lambda_k S_{i+1-k}, one coefficient per cycle
//   out    result held in the output register until out_ready
// so a block takes 3t+2 cycles (50 for t = 16), far below the time the other stages spend on a
// block. The products Lambda_i S_{j-i} use a window register that shifts in one syndrome per
// step, and x^l Lambda_prev is kept already shifted (bs), so no variable shifters or wide
// multiplexers are needed. 1/d_m comes from the inverse table. The same dot-product network
// serves the discrepancy and the Omega coefficients.
// The iteration follows the Berlekamp-Massey recurrence of the design this decoder is based on;
// the length-change test uses the textbook form 2L <= j-1, and Omega is computed from its
// defining product after Lambda is known rather than alongside it. Coefficients above degree T
// are dropped (they only arise for blocks with more than t errors, which cannot be corrected).
module rs_berlekamp
  import rs_pkg::*;
#(
  parameter int unsigned T         = DEFAULT_T,
  parameter logic [8:0]  PRIM_POLY = DEFAULT_PRIM_POLY
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  gf_t [2*T-1:0]   in_syn,     // in_syn[j-1] = S_j
  input  rs_cfg_t         in_cfg,
  output logic            out_valid,
  input  logic            out_ready,
  output gf_t [T:0]       out_lambda, // out_lambda[i] = Lambda_i, Lambda_0 = 1
  output gf_t [T-1:0]     out_omega,  // out_omega[i]  = Omega_i
  output logic [7:0]      out_l,      // degree of Lambda (number of errors found)
  output rs_cfg_t         out_cfg
);
  typedef enum logic [1:0] {S_IDLE, S_ITER, S_OMEGA, S_OUT} state_t;
  localparam int unsigned PW = $clog2(2 * T + 1);

  state_t        state;
  gf_t [2*T-1:0] syn;
  gf_t [T:0]     lambda, bs, lambda_upd;
  gf_t [T-1:0]   omega;
  gf_t [T:0]     win;        // win[k] = S_{j-k} (iteration) or S_{i+1-k} (omega)
  gf_t           dm_inv, d, d_inv, coef, next_s;
  logic [7:0]    l_deg;
  logic [7:0]    j;          // current step, 1-based
  logic [PW-1:0] ptr;        // index of the next syndrome to shift into the window
  rs_cfg_t       cfg;

  gf_inv_rom #(.PRIM_POLY(PRIM_POLY)) u_inv (.addr(d), .inv(d_inv));

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_OUT);
  assign next_s    = (int'(ptr) < 2 * T) ? syn[ptr] : 8'h00;

  // dot product sum_{k <= L} lambda_k win_k : the discrepancy, or an Omega coefficient
  always_comb begin
    d = '0;
    for (int k = 0; k <= T; k++)
      if (k <= int'(l_deg)) d = d ^ gf_mul(lambda[k], win[k], PRIM_POLY);
  end

  always_comb begin
    coef = gf_mul(d, dm_inv, PRIM_POLY);
    for (int k = 0; k <= T; k++) lambda_upd[k] = lambda[k] ^ gf_mul(coef, bs[k], PRIM_POLY);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else begin
      case (state)
        S_IDLE:  if (in_valid) state <= (in_cfg.t == 0) ? S_OUT : S_ITER;
        S_ITER:  if (j == {cfg.t[6:0], 1'b0}) state <= S_OMEGA;
        S_OMEGA: if (j == cfg.t) state <= S_OUT;
        S_OUT:   if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    case (state)
      S_IDLE: if (in_valid) begin
        syn    <= in_syn;
        cfg    <= in_cfg;
        lambda <= '0;
        lambda[0] <= 8'h01;
        bs     <= '0;
        bs[1]  <= 8'h01;               // x^1 * Lambda_prev(x), Lambda_prev = 1
        omega  <= '0;
        dm_inv <= 8'h01;
        l_deg  <= '0;
        j      <= 8'd1;
        win    <= '0;
        win[0] <= in_syn[0];
        ptr    <= PW'(1);
      end
      S_ITER: begin
        if (d == 8'h00) begin
          bs <= {bs[T-1:0], 8'h00};
        end else if ({l_deg[6:0], 1'b0} > j - 8'd1) begin
          lambda <= lambda_upd;
          bs     <= {bs[T-1:0], 8'h00};
        end else begin
          lambda <= lambda_upd;
          bs     <= {lambda[T-1:0], 8'h00};
          l_deg  <= j - l_deg;
          dm_inv <= d_inv;
        end
        if (j == {cfg.t[6:0], 1'b0}) begin
          // restart the window for the Omega products
          j      <= 8'd1;
          win    <= '0;
          win[0] <= syn[0];
          ptr    <= PW'(1);
        end else begin
          j   <= j + 8'd1;
          win <= {win[T-1:0], next_s};
          ptr <= ptr + 1'b1;
        end
      end
      S_OMEGA: begin
        omega[j - 8'd1] <= d;
        j   <= j + 8'd1;
        win <= {win[T-1:0], next_s};
        ptr <= ptr + 1'b1;
      end
      default: ;
    endcase
  end

  assign out_lambda = lambda;
  assign out_omega  = omega;
  assign out_l      = l_deg;
  assign out_cfg    = cfg;
endmodule
