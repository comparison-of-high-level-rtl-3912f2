// rs_sweep_lane: one lane of the buffer-size sweep. Instantiates the decoder with the given
// received-data buffer size, feeds NBLK back-to-back 255-symbol blocks (t = 16) with 16 errors
// each in data symbols, checks every decoded symbol against the message, and reports the
// steady-state number of cycles between accepted blocks (over the last third of the run).
module rs_sweep_lane
  import rs_pkg::*;
  import rs_ref_pkg::*;
#(
  parameter int BUF_DEPTH = 765,
  parameter int NBLK      = 120
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   period,
  output int   checks,
  output int   failures
);
  logic    in_valid, in_ready, out_valid, out_last;
  gf_t     in_data, out_data;
  rs_cfg_t in_cfg;
  gf_t     inq [$];
  bit      firstq [$];
  gf_t     expq [$];
  longint  cyc = 0;
  longint  first_times [$];

  rs_decoder #(.BUF_DEPTH(BUF_DEPTH)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_cfg,
    .out_valid, .out_ready(1'b1), .out_data, .out_last);

  assign in_valid = rst_n && inq.size() != 0;
  assign in_data  = inq.size() ? inq[0] : 8'h00;
  assign in_cfg   = '{n: 8'd255, t: 8'd16};

  initial begin
    sym_t msg [];
    blk_t cw;
    int locs [];
    done = 0; checks = 0; failures = 0; period = 0;
    wait (rst_n);                 // the reference tables are ready by then
    for (int b = 0; b < NBLK; b++) begin
      msg = new[223];
      foreach (msg[i]) msg[i] = sym_t'($urandom);
      cw = encode(msg, 255, 16);
      pick_positions(16, 32, 254, locs);
      foreach (locs[q]) cw[locs[q]] ^= sym_t'(1 + $urandom % 255);
      for (int i = 254; i >= 0; i--) begin inq.push_back(cw[i]); firstq.push_back(i == 254); end
      foreach (msg[m]) expq.push_back(msg[m]);
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid && in_ready) begin
      if (firstq[0]) first_times.push_back(cyc);
      void'(inq.pop_front());
      void'(firstq.pop_front());
    end
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0 || out_data !== expq[0]) failures++;
      if (expq.size()) void'(expq.pop_front());
      if (expq.size() == 0 && !done) begin
        done   <= 1;
        period <= int'((first_times[NBLK - 1] - first_times[2 * NBLK / 3]) / (NBLK - 1 - 2 * NBLK / 3));
      end
    end
  end
endmodule
