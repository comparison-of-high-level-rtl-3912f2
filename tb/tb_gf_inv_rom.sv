// tb_gf_inv_rom: checks the GF(2^8) inverse table for every address against a log/antilog
// reference, checks a * inv(a) = 1, and checks the package multiplier rs_pkg::gf_mul on all
// 65536 operand pairs. Combinational block; a clock only paces the sweep.
module tb_gf_inv_rom;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  int  checks = 0, failures = 0;
  gf_t addr, inv;
  logic clk = 0;
  always #5 clk = ~clk;

  gf_inv_rom dut (.addr(addr), .inv(inv));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    for (int a = 0; a < 256; a++) begin
      addr = gf_t'(a);
      @(posedge clk);
      checks++;
      if (a == 0) begin
        if (inv !== 8'h00) begin failures++; $display("inv(0) = %h", inv); end
      end else if (inv !== rinv(gf_t'(a)) || rmul(gf_t'(a), inv) !== 8'h01) begin
        failures++;
        $display("inv(%h) = %h, expected %h", a, inv, rinv(gf_t'(a)));
      end
    end
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        checks++;
        if (gf_mul(gf_t'(a), gf_t'(b), DEFAULT_PRIM_POLY) !== rmul(gf_t'(a), gf_t'(b))) begin
          failures++;
          if (failures < 10) $display("gf_mul(%h,%h) wrong", a, b);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
