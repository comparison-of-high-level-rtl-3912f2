// tb_rs_berlekamp: drives syndromes of encoded blocks carrying 0..t random errors and checks
// the Berlekamp-Massey result against the reference: the degree L equals the number of errors,
// Lambda(x) equals prod (1 + alpha^loc x) over the error positions, and Omega(x) equals
// S(x) Lambda(x) mod x^2t (all of its coefficients from t upward must be zero). Also checks the
// schedule: the result appears 3t cycles after the syndromes are taken (one block every 3t+2
// cycles).
module tb_rs_berlekamp;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int T = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid, in_ready, out_valid, out_ready;
  gf_t [2*T-1:0] in_syn;
  rs_cfg_t       in_cfg, out_cfg;
  gf_t [T:0]     out_lambda;
  gf_t [T-1:0]   out_omega;
  logic [7:0]    out_l;

  rs_berlekamp #(.T(T)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input int n, input int t, input int nerr);
    sym_t msg [];
    blk_t cw;
    sym_t s [], lam [], om [];
    int locs [];
    int lat;
    bit took;
    msg = new[n - 2 * t];
    foreach (msg[i]) msg[i] = sym_t'($urandom);
    cw = encode(msg, n, t);
    pick_positions(nerr, 0, n - 1, locs);
    foreach (locs[q]) cw[locs[q]] ^= sym_t'(1 + $urandom % 255);
    syndromes(cw, n, t, s);
    locator(locs, lam);
    evaluator(s, lam, t, om);
    in_syn = '0;
    foreach (s[j]) in_syn[j] = s[j];
    in_cfg = '{n: 8'(n), t: 8'(t)};
    in_valid = 1;
    do begin #1 took = in_ready; @(negedge clk); end while (!took);
    in_valid = 0;
    lat = 0;
    while (!out_valid) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 3 * t) begin failures++; $display("t=%0d: latency %0d, expected %0d", t, lat, 3 * t); end
    checks++;
    if (out_l != 8'(nerr) || out_cfg != in_cfg) begin
      failures++; $display("t=%0d errors=%0d: L = %0d", t, nerr, out_l);
    end
    for (int i = 0; i <= T; i++) begin
      checks++;
      if (out_lambda[i] !== ((i < lam.size()) ? lam[i] : 8'h00)) begin
        failures++;
        $display("t=%0d errors=%0d: Lambda_%0d = %h, expected %h", t, nerr, i, out_lambda[i],
                 (i < lam.size()) ? lam[i] : 8'h00);
      end
    end
    for (int i = 0; i < T; i++) begin
      checks++;
      if (out_omega[i] !== ((i < t) ? om[i] : 8'h00)) begin
        failures++;
        $display("t=%0d errors=%0d: Omega_%0d = %h, expected %h", t, nerr, i, out_omega[i],
                 (i < t) ? om[i] : 8'h00);
      end
    end
    for (int i = t; i < 2 * t; i++) begin
      checks++;
      if (om[i] != 0) begin failures++; $display("reference Omega has degree >= t"); end
    end
    out_ready = 1; @(negedge clk); out_ready = 0;
  endtask

  initial begin
    ref_init();
    in_valid = 0; out_ready = 0; in_syn = '0; in_cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run_block(255, 16, 0);
    run_block(255, 16, 1);
    run_block(255, 16, 16);
    run_block(255, 16, 15);
    run_block(200, 8, 8);
    run_block(64, 4, 3);
    run_block(30, 1, 1);
    for (int b = 0; b < 20; b++) run_block(255, 16, $urandom % 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
