// tb_rs_chien: builds Lambda(x) = prod (1 + alpha^loc x) for random error positions (some in
// the parity region, which must not be reported) and checks the position stream: exactly n-2t
// entries, positions n-1 down to 2t in order, err set exactly at the error positions,
// z = alpha^-i, last on position 2t, and the polynomials passed on unchanged. Without
// back-pressure the last position must leave 255-2t cycles after Lambda is taken; a second
// series applies random back-pressure on the output.
module tb_rs_chien;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int T = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready, poly_valid, poly_ready, out_valid, out_ready;
  gf_t [T:0]   in_lambda, poly_lambda;
  gf_t [T-1:0] in_omega, poly_omega;
  rs_cfg_t     in_cfg;
  logic        out_err, out_last;
  gf_t         out_z;
  int          stall_pct;

  rs_chien #(.T(T)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input int n, input int t, input int nerr, input int npar);
    sym_t lam [];
    int locs [], plocs [], all [];
    int expect_i, cyc;
    bit took, is_err;
    pick_positions(nerr, 2 * t, n - 1, locs);
    pick_positions(npar, 0, 2 * t - 1, plocs);
    all = new[nerr + npar];
    foreach (locs[q]) all[q] = locs[q];
    foreach (plocs[q]) all[nerr + q] = plocs[q];
    locator(all, lam);
    in_lambda = '0;
    foreach (lam[k]) if (k <= T) in_lambda[k] = lam[k];
    for (int k = 0; k < T; k++) in_omega[k] = gf_t'($urandom);
    in_cfg = '{n: 8'(n), t: 8'(t)};
    in_valid = 1;
    do begin #1 took = in_ready; @(negedge clk); end while (!took);
    in_valid = 0;
    checks++;
    if (!poly_valid || poly_lambda != in_lambda || poly_omega != in_omega) begin
      failures++; $display("polynomials not passed on");
    end
    poly_ready = 1;
    expect_i = n - 1;
    cyc = 0;
    forever begin
      out_ready = ($urandom % 100) >= stall_pct;
      #1;
      if (out_valid && out_ready) begin
        is_err = 0;
        foreach (locs[q]) if (locs[q] == expect_i) is_err = 1;
        checks++;
        if (out_err !== is_err || out_z !== ralpha(-expect_i) || out_last !== (expect_i == 2 * t)) begin
          failures++;
          $display("n=%0d t=%0d position %0d: err %b z %h last %b", n, t, expect_i, out_err, out_z, out_last);
        end
        expect_i--;
      end
      @(negedge clk);
      poly_ready = 0;
      cyc++;
      if (expect_i < 2 * t || cyc > 2000) break;
    end
    out_ready = 0;
    checks++;
    if (expect_i != 2 * t - 1) begin failures++; $display("stream ended early"); end
    if (stall_pct == 0) begin
      checks++;
      if (cyc != 255 - 2 * t) begin
        failures++; $display("n=%0d t=%0d: %0d cycles, expected %0d", n, t, cyc, 255 - 2 * t);
      end
    end
  endtask

  initial begin
    ref_init();
    in_valid = 0; out_ready = 0; poly_ready = 0; in_lambda = '0; in_omega = '0; in_cfg = '0;
    stall_pct = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run_block(255, 16, 0, 0);
    run_block(255, 16, 16, 0);
    run_block(255, 16, 10, 3);
    run_block(100, 16, 5, 2);
    run_block(255, 8, 8, 0);
    run_block(40, 3, 2, 1);
    stall_pct = 40;
    for (int b = 0; b < 6; b++) run_block(60 + $urandom % 196, 16, $urandom % 13, $urandom % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
