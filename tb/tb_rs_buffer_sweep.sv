// tb_rs_buffer_sweep: rate of the whole decoder against the size of its received-data buffer,
// the experiment of choosing that buffer's size. Five decoders with buffers of 255, 510, 765,
// 1020 and 1275 symbols decode the same kind of traffic (back-to-back RS(255,223) blocks with 16
// errors each). All outputs must be correct; the steady-state cycles per block must not grow (beyond
// 2 cycles of averaging noise) with the buffer size, and from 765 symbols on must be at most 276
// (the Forney stage bound is 272).
module tb_rs_buffer_sweep;
  localparam int NL = 5;
  localparam int SIZES [NL] = '{255, 510, 765, 1020, 1275};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done [NL];
  int   period [NL], lchecks [NL], lfail [NL];

  for (genvar g = 0; g < NL; g++) begin : g_lane
    rs_sweep_lane #(.BUF_DEPTH(SIZES[g])) lane (
      .clk, .rst_n, .done(done[g]), .period(period[g]), .checks(lchecks[g]), .failures(lfail[g]));
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    rs_ref_pkg::ref_init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all = 1;
      foreach (done[g]) all &= done[g];
    end while (!all);
    @(posedge clk);
    for (int g = 0; g < NL; g++) begin
      $display("buffer %4d symbols: %0d cycles per block, %0d symbols checked, %0d wrong",
               SIZES[g], period[g], lchecks[g], lfail[g]);
      checks += lchecks[g] + 1;
      failures += lfail[g];
      if (g > 0 && period[g] > period[g - 1] + 2) begin   // 2 cycles of averaging noise
        failures++; $display("rate drops with a larger buffer");
      end
      if (SIZES[g] >= 765 && period[g] > 276) begin
        failures++; $display("rate too low for a %0d-symbol buffer", SIZES[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
