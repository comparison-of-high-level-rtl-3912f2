// tb_rs_correction: random blocks (data followed by parity symbols) on the buffer side and
// random error values on the error side, both with random gaps, and random output back-pressure.
// Checks that every output is buffer data XOR error value, in order, that parity symbols never
// appear, that last marks the final data symbol, and that a block with no gaps and no
// back-pressure passes at one data symbol per cycle.
module tb_rs_correction;
  import rs_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic buf_valid, buf_ready, buf_parity, buf_last, err_valid, err_ready, err_last;
  logic out_valid, out_ready, out_last;
  gf_t  buf_data, err_e, out_data;

  rs_correction dut (.*);

  typedef struct { gf_t d; bit parity; bit last; } bent_t;
  bent_t bq [$];
  gf_t   eq [$];
  bit    elq [$];
  gf_t   expq [$];
  bit    explq [$];
  int    gap_pct = 30, stall_pct = 30;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_block(input int n, input int t);
    gf_t d, e;
    for (int i = 0; i < n; i++) begin
      d = gf_t'($urandom);
      bq.push_back('{d: d, parity: (i >= n - 2 * t), last: (i == n - 1)});
      if (i < n - 2 * t) begin
        e = ($urandom % 4 == 0) ? gf_t'($urandom) : 8'h00;
        eq.push_back(e);
        elq.push_back(i == n - 2 * t - 1);
        expq.push_back(d ^ e);
        explq.push_back(i == n - 2 * t - 1);
      end
    end
  endfunction

  // drivers: change only after the falling edge
  always @(negedge clk) begin
    if (!rst_n) begin
      buf_valid <= 0; err_valid <= 0; out_ready <= 0;
    end else begin
      buf_valid  <= (bq.size() != 0) && (($urandom % 100) >= gap_pct);
      err_valid  <= (eq.size() != 0) && (($urandom % 100) >= gap_pct);
      out_ready  <= ($urandom % 100) >= stall_pct;
    end
  end
  assign buf_data   = bq.size() ? bq[0].d : 8'h00;
  assign buf_parity = bq.size() ? bq[0].parity : 1'b0;
  assign buf_last   = bq.size() ? bq[0].last : 1'b0;
  assign err_e      = eq.size() ? eq[0] : 8'h00;
  assign err_last   = eq.size() ? elq[0] : 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        checks++;
        if (expq.size() == 0 || out_data !== expq[0] || out_last !== explq[0]) begin
          failures++;
          $display("output %h last %b, expected %h", out_data, out_last, expq.size() ? expq[0] : 0);
        end
        if (expq.size()) begin void'(expq.pop_front()); void'(explq.pop_front()); end
      end
      if (buf_valid && buf_ready) void'(bq.pop_front());
      if (err_valid && err_ready) begin void'(eq.pop_front()); void'(elq.pop_front()); end
    end
  end

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    make_block(255, 16);
    make_block(60, 4);
    make_block(200, 10);
    while (expq.size() != 0) @(negedge clk);
    // full rate: no gaps, no back-pressure
    gap_pct = 0; stall_pct = 0;
    make_block(255, 16);
    cyc = 0;
    while (expq.size() != 0) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > 255 + 3) begin failures++; $display("block took %0d cycles", cyc); end
    repeat (40) @(negedge clk);      // trailing parity symbols are dropped
    checks++;
    if (bq.size() != 0 || eq.size() != 0) begin failures++; $display("inputs left over"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
