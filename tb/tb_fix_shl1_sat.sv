// Exhaustive self-checking testbench of fix_shl1_sat: every one of the 1024
// fixed-point codes is doubled and compared with min(2*|x|, 511/64) computed
// in integers, keeping the sign.
module tb_fix_shl1_sat;
  import sigtanh_pkg::*;

  fix_t a, y;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  fix_shl1_sat dut (.a(a), .y(y));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_mag, nsat;
    nsat = 0;
    for (int i = 0; i < 1024; i++) begin
      a = fix_t'(10'(i));
      #1;
      exp_mag = 2 * (i % 512);
      if (exp_mag > 511) begin exp_mag = 511; nsat++; end
      checks++;
      if (y.sign != a.sign || int'(y.mag) != exp_mag) begin
        failures++;
        $display("FAIL code %0d got %0b/%0d exp %0d", i, y.sign, y.mag, exp_mag);
      end
    end
    checks++;
    if (nsat != 512) begin failures++; $display("FAIL saturation count %0d", nsat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
