// rs_syndrome: syndrome computation S_j = R(alpha^j), j = 1..2T, for one received block.
//
// Symbols arrive highest power first (r_{n-1} ... r_0), one per handshake, with in_last on r_0.
// Each syndrome is evaluated by Horner's rule, S_j <- S_j (x) alpha^j (+) r_i. PAR syndromes are
// updated per cycle, so a symbol is consumed every ceil(2T/PAR) cycles; with the default
// PAR = 2T the whole loop over j is unrolled and the module takes one symbol per cycle, i.e. a
// block of n symbols in n cycles. The multipliers by alpha^j are constant multipliers when
// PAR = 2T. All 2T_max syndromes are computed whatever the block's t; the next stage uses only
// the first 2t of them.
// The first symbol of a block starts from zero syndromes without a separate clearing cycle,
// so blocks can follow back to back. The result, with the block's configuration taken along
// with r_0, is held in a one-entry output register (out_valid/out_ready). The last symbol of a
// block is not accepted while that register is still full.
// The Horner recurrence and the "par" unrolling follow the design this decoder is based on;
// the handshake details and the zero-start flag are this design's own.
module rs_syndrome
  import rs_pkg::*;
#(
  parameter int unsigned    T         = DEFAULT_T,
  parameter int unsigned    PAR       = 2 * T,
  parameter logic [8:0]     PRIM_POLY = DEFAULT_PRIM_POLY
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  gf_t               in_data,
  input  logic              in_last,
  input  rs_cfg_t           in_cfg,
  output logic              out_valid,
  input  logic              out_ready,
  output gf_t [2*T-1:0]     out_syn,    // out_syn[j-1] = S_j
  output rs_cfg_t           out_cfg
);
  localparam int unsigned NS = 2 * T;
  localparam int unsigned NG = (NS + PAR - 1) / PAR;   // cycles per symbol
  localparam int unsigned GW = (NG > 1) ? $clog2(NG) : 1;

  localparam logic [255:0][7:0] ALPHA = gf_alpha_table(PRIM_POLY);

  gf_t [NS-1:0] syn, syn_nx;
  logic [GW-1:0] grp;
  logic          fresh;   // current symbol is the first of a block
  logic          last_grp, can_finish, fire;

  assign last_grp   = (NG == 1) || (grp == GW'(NG - 1));
  assign can_finish = !in_last || !out_valid || out_ready;
  assign in_ready   = last_grp && can_finish;
  assign fire       = in_valid && (!last_grp || can_finish);

  always_comb begin
    syn_nx = syn;
    for (int p = 0; p < PAR; p++) begin
      int unsigned idx;
      idx = (NG == 1) ? p : int'(grp) * PAR + p;
      if (idx < NS)
        syn_nx[idx] = gf_mul(fresh ? 8'h00 : syn[idx], ALPHA[idx + 1], PRIM_POLY)
                      ^ in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grp       <= '0;
      fresh     <= 1'b1;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        if (last_grp) begin
          grp   <= '0;
          fresh <= in_last;
          if (in_last) out_valid <= 1'b1;
        end else begin
          grp <= grp + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fire) syn <= syn_nx;
    if (fire && last_grp && in_last) begin
      out_syn <= syn_nx;
      out_cfg <= in_cfg;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid && $stable(out_syn));
endmodule
