// tb_rs_syndrome: feeds encoded blocks with random errors (full-length and shortened, several
// t) and compares the 2t syndromes with the reference. Error-free codewords must give all-zero
// syndromes. Also checks the rate: with the default unrolling (PAR = 2T) a block of n symbols
// is taken in n consecutive cycles, and the result appears one cycle after the last symbol.
// A second instance with PAR = 8 checks the partly unrolled form (2T/8 cycles per symbol).
module tb_rs_syndrome;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int T = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid, in_last, out_ready;
  gf_t           in_data;
  rs_cfg_t       in_cfg;
  logic          in_ready [2], out_valid [2];
  gf_t [2*T-1:0] out_syn [2];
  rs_cfg_t       out_cfg [2];
  int            sel;      // which instance is driven

  rs_syndrome #(.T(T)) dut0 (
    .clk, .rst_n, .in_valid(in_valid && sel == 0), .in_ready(in_ready[0]), .in_data, .in_last,
    .in_cfg, .out_valid(out_valid[0]), .out_ready, .out_syn(out_syn[0]), .out_cfg(out_cfg[0]));
  rs_syndrome #(.T(T), .PAR(8)) dut1 (
    .clk, .rst_n, .in_valid(in_valid && sel == 1), .in_ready(in_ready[1]), .in_data, .in_last,
    .in_cfg, .out_valid(out_valid[1]), .out_ready, .out_syn(out_syn[1]), .out_cfg(out_cfg[1]));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input int n, input int t, input int nerr, input int which);
    sym_t msg [];
    blk_t cw;
    sym_t s [];
    int locs [];
    int cycles;
    msg = new[n - 2 * t];
    foreach (msg[i]) msg[i] = sym_t'($urandom);
    cw = encode(msg, n, t);
    pick_positions(nerr, 0, n - 1, locs);
    foreach (locs[q]) cw[locs[q]] ^= sym_t'(1 + $urandom % 255);
    syndromes(cw, n, t, s);
    sel = which;
    in_cfg = '{n: 8'(n), t: 8'(t)};
    cycles = 0;
    for (int i = n - 1; i >= 0; i--) begin
      in_valid = 1; in_data = cw[i]; in_last = (i == 0);
      forever begin            // drive after a falling edge, transfer on the rising edge
        bit took;
        #1 took = in_ready[which];
        @(negedge clk);
        cycles++;
        if (took) break;
      end
    end
    in_valid = 0;
    checks++;
    if (!out_valid[which] || out_cfg[which].n != 8'(n) || out_cfg[which].t != 8'(t)) begin
      failures++; $display("no result one cycle after the last symbol");
    end
    for (int j = 0; j < 2 * t; j++) begin
      checks++;
      if (out_syn[which][j] !== s[j]) begin
        failures++;
        $display("n=%0d t=%0d errors=%0d: S_%0d = %h, expected %h", n, t, nerr, j + 1,
                 out_syn[which][j], s[j]);
      end
      if (nerr == 0 && s[j] != 0) begin failures++; $display("reference encoder broken"); end
    end
    checks++;
    if (cycles != n * ((which == 0) ? 1 : 4)) begin
      failures++; $display("block took %0d cycles, expected %0d", cycles, n * (which == 0 ? 1 : 4));
    end
    out_ready = 1; @(negedge clk); out_ready = 0;
  endtask

  initial begin
    ref_init();
    in_valid = 0; in_last = 0; in_data = 0; out_ready = 0; sel = 0; in_cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run_block(255, 16, 0, 0);
    run_block(255, 16, 16, 0);
    run_block(255, 16, 5, 0);
    run_block(120, 16, 9, 0);
    run_block(255, 8, 3, 0);
    run_block(40, 4, 2, 0);
    for (int b = 0; b < 6; b++) run_block(100 + $urandom % 156, 16, $urandom % 17, 0);
    run_block(255, 16, 7, 1);
    run_block(60, 16, 16, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
