// tb_rs_fifo: random push/pop traffic against a queue model for a 5-deep FIFO (a depth that
// is not a power of two), including simultaneous push and pop while full and while empty.
// Checks the data order, in_ready (full), out_valid (empty) and count every cycle.
module tb_rs_fifo;
  localparam int W = 12, D = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D+1)-1:0] count;
  logic [W-1:0] model [$];
  int full_seen = 0, both_full = 0;

  always #5 clk = ~clk;

  rs_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      bit push, pop;
      @(negedge clk);
      // bias toward filling in one phase, draining in the next
      in_valid  = ($urandom % 100) < (((cyc / 500) % 2 == 1) ? 35 : 75);
      out_ready = ($urandom % 100) < (((cyc / 500) % 2 == 1) ? 75 : 35);
      in_data   = W'($urandom);
      #1;
      checks++;
      if (out_valid !== (model.size() != 0) || int'(count) != model.size()
          || (model.size() < D && !in_ready) || (model.size() == D && in_ready !== out_ready)) begin
        failures++;
        $display("cycle %0d: flags wrong (size %0d count %0d valid %b ready %b)",
                 cyc, model.size(), count, out_valid, in_ready);
      end
      if (out_valid && model.size() != 0) begin
        checks++;
        if (out_data !== model[0]) begin
          failures++;
          $display("cycle %0d: data %h expected %h", cyc, out_data, model[0]);
        end
      end
      if (model.size() == D) begin
        full_seen++;
        if (in_valid && out_ready) both_full++;
      end
      pop  = out_valid && out_ready;
      push = in_valid && in_ready;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(in_data);
    end
    checks++;
    if (full_seen == 0 || both_full == 0) begin
      failures++;
      $display("full state not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
