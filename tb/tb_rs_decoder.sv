// tb_rs_decoder: end-to-end test of the decoder at its default parameters (T = 16, 765-symbol
// buffer). Random messages are encoded by the reference encoder, random symbol errors are added
// (up to t per block), and the corrected output must equal the message symbol for symbol, with
// last on the final data symbol of each block.
//   phase 1  mixed blocks: full-length and shortened n, t = 16/8/4/1, 0..t errors, random input
//            gaps and output back-pressure
//   phase 2  steady-state rate: 60 back-to-back 255-symbol blocks with 16 errors each, all in data
//            symbols, and no
//            back-pressure; once the buffer has filled (blocks 45..59), one block must be
//            accepted every <= 276 cycles (the Forney stage's bound is 17*16 = 272)
//   phase 3  back-to-back 255-symbol blocks with 0..4 errors; at most 260 cycles per block
// It also counts how often each mechanism happened and fails if one never did: input stall,
// output back-pressure, out-of-order Forney execution, shortened block, block with t < 16,
// error-free block, block with the full t errors, and the received-data buffer holding more
// than two whole blocks.
module tb_rs_decoder;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid, in_ready, out_valid, out_ready, out_last;
  gf_t     in_data, out_data;
  rs_cfg_t in_cfg;

  rs_decoder dut (.*);

  typedef struct { gf_t d; rs_cfg_t cfg; bit first; } ient_t;
  ient_t  inq [$];
  gf_t    expq [$];
  bit     explq [$];
  int     gap_pct = 0, stall_pct = 0;
  longint cyc = 0;
  longint first_times [$];

  // mechanism counters
  int n_in_stall = 0, n_out_bp = 0, n_ooo = 0, n_short = 0, n_small_t = 0, n_clean = 0,
      n_full_t = 0, n_buf_deep = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void make_block(input int n, input int t, input int nerr,
                                    input bit data_only = 0);
    sym_t msg [];
    blk_t cw;
    int locs [];
    msg = new[n - 2 * t];
    foreach (msg[i]) msg[i] = sym_t'($urandom);
    cw = encode(msg, n, t);
    pick_positions(nerr, data_only ? 2 * t : 0, n - 1, locs);
    foreach (locs[q]) cw[locs[q]] ^= sym_t'(1 + $urandom % 255);
    for (int i = n - 1; i >= 0; i--)
      inq.push_back('{d: cw[i], cfg: '{n: 8'(n), t: 8'(t)}, first: (i == n - 1)});
    foreach (msg[m]) begin
      expq.push_back(msg[m]);
      explq.push_back(m == msg.size() - 1);
    end
    if (n < 255) n_short++;
    if (t < 16) n_small_t++;
    if (nerr == 0) n_clean++;
    if (nerr == t) n_full_t++;
  endfunction

  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    if (!rst_n) begin
      in_valid <= 0; out_ready <= 0;
    end else begin
      in_valid  <= (inq.size() != 0) && (($urandom % 100) >= gap_pct);
      out_ready <= ($urandom % 100) >= stall_pct;
    end
  end
  assign in_data = inq.size() ? inq[0].d : 8'h00;
  assign in_cfg  = inq.size() ? inq[0].cfg : '0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && !in_ready) n_in_stall++;
      if (out_valid && !out_ready) n_out_bp++;
      if (dut.u_forney.take && !dut.u_forney.in_err && dut.u_forney.u_eval.busy) n_ooo++;
      if (dut.u_buffer.count > 510) n_buf_deep++;
      if (in_valid && in_ready) begin
        if (inq[0].first) first_times.push_back(cyc);
        void'(inq.pop_front());
      end
      if (out_valid && out_ready) begin
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("unexpected output %h", out_data);
        end else begin
          if (out_data !== expq[0] || out_last !== explq[0]) begin
            failures++;
            if (failures < 20)
              $display("cycle %0d: output %h last %b, expected %h %b", cyc, out_data, out_last,
                       expq[0], explq[0]);
          end
          void'(expq.pop_front());
          void'(explq.pop_front());
        end
      end
    end
  end

  task automatic drain();
    while (expq.size() != 0) @(negedge clk);
  endtask

  function automatic int period(input int from, input int to);
    return int'((first_times[to] - first_times[from]) / (to - from));
  endfunction

  task automatic count_check(input string what, input int n);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
  endtask

  initial begin
    int p;
    ref_init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1
    gap_pct = 20; stall_pct = 25;
    make_block(255, 16, 16);
    make_block(255, 16, 0);
    make_block(120, 16, 7);
    make_block(255, 8, 8);
    make_block(64, 4, 2);
    make_block(20, 1, 1);
    for (int b = 0; b < 6; b++) make_block(100 + $urandom % 156, 16, $urandom % 17);
    drain();
    // phase 2
    gap_pct = 0; stall_pct = 0;
    first_times.delete();
    for (int b = 0; b < 60; b++) make_block(255, 16, 16, 1);
    drain();
    p = period(45, 59);
    $display("16 errors per block: one block per %0d cycles", p);
    checks++;
    if (p > 276) begin failures++; $display("rate too low"); end
    // phase 3
    first_times.delete();
    for (int b = 0; b < 10; b++) make_block(255, 16, $urandom % 5);
    drain();
    p = period(3, 9);
    $display("0..4 errors per block: one block per %0d cycles", p);
    checks++;
    if (p > 260) begin failures++; $display("rate too low"); end
    repeat (50) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("output left over"); end
    count_check("input stalls", n_in_stall);
    count_check("output back-pressure", n_out_bp);
    count_check("out-of-order Forney", n_ooo);
    count_check("shortened blocks", n_short);
    count_check("blocks with t < 16", n_small_t);
    count_check("error-free blocks", n_clean);
    count_check("blocks with t errors", n_full_t);
    count_check("buffer > 2 blocks (cycles)", n_buf_deep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
