// tb_rs_forney: for random error patterns it computes Lambda and Omega with the reference model,
// feeds the polynomials and the per-position stream (err, z = alpha^-i, last) of each block, and
// checks that the output gives the injected error value at every error position and 0 elsewhere,
// in input order, with last on the final position. Output back-pressure is random in one series.
// Throughput: back-to-back 223-position blocks with 16 errors each, all at the first positions,
// must leave at about one per max(17*16, 223) = 272 cycles (at most 280 here), not one per
// 223 + 16*16 = 479 as with in-order processing: the error unit works on the next block while
// the clean positions of the current one drain. The test also
// the test counts how often a clean position was queued while the error unit was busy with an
// earlier position (out-of-order execution).
module tb_rs_forney;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int T = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        poly_valid, poly_ready, in_valid, in_ready, in_err, in_last;
  logic        out_valid, out_ready, out_last;
  gf_t [T:0]   poly_lambda;
  gf_t [T-1:0] poly_omega;
  gf_t         in_z, out_e;
  int          stall_pct = 0;
  int          ooo_events = 0;
  sym_t        exp_e [$];
  longint      last_times [$];
  longint      cyc_count = 0;
  always @(posedge clk) cyc_count++;
  always @(posedge clk) if (rst_n && out_valid && out_ready && out_last) last_times.push_back(cyc_count);
  bit          exp_last [$];

  rs_forney #(.T(T)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // out-of-order: a clean position enters while the error unit holds an earlier error
  always @(posedge clk)
    if (rst_n && in_valid && in_ready && !in_err && dut.u_eval.busy) ooo_events++;

  // output checker
  always @(negedge clk) begin
    out_ready <= ($urandom % 100) >= stall_pct;
  end
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_e.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        if (out_e !== exp_e[0] || out_last !== exp_last[0]) begin
          failures++;
          $display("error value %h last %b, expected %h %b", out_e, out_last, exp_e[0], exp_last[0]);
        end
        void'(exp_e.pop_front());
        void'(exp_last.pop_front());
      end
    end
  end

  // front: errors at chosen positions (or random ones when first_only = 0)
  task automatic run_block(input int n, input int t, input int nerr, input bit first_only,
                           output int cycles);
    blk_t e;
    sym_t s [], lam [], om [];
    int locs [];
    bit took;
    foreach (e[i]) e[i] = 0;
    if (first_only) begin
      locs = new[nerr];
      foreach (locs[q]) locs[q] = n - 1 - q;
    end else pick_positions(nerr, 2 * t, n - 1, locs);
    foreach (locs[q]) e[locs[q]] = sym_t'(1 + $urandom % 255);
    syndromes(e, n, t, s);       // the all-zero word is a codeword: S depends on e only
    locator(locs, lam);
    evaluator(s, lam, t, om);
    poly_lambda = '0;
    foreach (lam[k]) poly_lambda[k] = lam[k];
    poly_omega = '0;
    for (int k = 0; k < t; k++) poly_omega[k] = om[k];
    for (int i = n - 1; i >= 2 * t; i--) begin
      exp_e.push_back(e[i]);
      exp_last.push_back(i == 2 * t);
    end
    poly_valid = 1;
    do begin #1 took = poly_ready; @(negedge clk); end while (!took);
    poly_valid = 0;
    cycles = 1;
    for (int i = n - 1; i >= 2 * t; i--) begin
      in_valid = 1; in_err = (e[i] != 0); in_z = ralpha(-i); in_last = (i == 2 * t);
      do begin #1 took = in_ready; @(negedge clk); cycles++; end while (!took);
    end
    in_valid = 0;
  endtask

  initial begin
    int cyc, t0;
    ref_init();
    poly_valid = 0; in_valid = 0; in_err = 0; in_z = 0; in_last = 0;
    poly_lambda = '0; poly_omega = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run_block(255, 16, 3, 0, cyc);
    run_block(255, 16, 0, 0, cyc);
    run_block(255, 16, 16, 0, cyc);
    run_block(120, 8, 8, 0, cyc);
    run_block(50, 4, 1, 0, cyc);
    // throughput with errors bunched at the start of every block
    while (exp_e.size() != 0) @(negedge clk);
    last_times.delete();
    for (int b = 0; b < 5; b++) run_block(255, 16, 16, 1, cyc);
    while (exp_e.size() != 0) @(negedge clk);
    t0 = int'((last_times[4] - last_times[1]) / 3);
    checks++;
    if (t0 > 280) begin failures++; $display("16-error blocks: %0d cycles per block", t0); end
    else $display("16-error blocks, errors first: %0d cycles per block", t0);
    stall_pct = 30;
    for (int b = 0; b < 8; b++) run_block(60 + $urandom % 196, 16, $urandom % 17, 0, cyc);
    while (exp_e.size() != 0) @(negedge clk);
    checks++;
    if (ooo_events == 0) begin failures++; $display("no out-of-order execution seen"); end
    $display("out-of-order events: %0d", ooo_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
