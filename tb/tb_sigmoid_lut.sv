// Self-checking testbench of sigmoid_lut: reads all 1024 entries back to back
// and compares each with 1/(1+exp(-x)) computed in real arithmetic and rounded
// to single precision, or with 0 / 1 beyond -6 / +6. Checks the one-cycle
// read latency and that the entries are monotonic in x.
module tb_sigmoid_lut;
  import sigtanh_pkg::*;
  import tb_fp_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  fix_t  index = '0;
  logic  out_valid;
  fp32_t y;
  int    checks = 0, failures = 0;
  logic [31:0] got [1024];

  always #5 clk = ~clk;

  sigmoid_lut dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expected(input int code);
    real x;
    x = real'(code % 512) / 64.0;
    if (code >= 512) x = -x;
    if (x < -6.0) return 32'h0000_0000;
    if (x >  6.0) return 32'h3F80_0000;
    return real_to_fp32(sigmoid(x));
  endfunction

  initial begin
    real prev, cur;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1024; i++) begin
      index = fix_t'(10'(i)); in_valid = 1'b1;
      @(negedge clk);               // one clock edge later the word is out
      got[i] = y;
      checks++;
      if (!out_valid || y !== expected(i)) begin
        failures++;
        $display("FAIL code %0d got %h exp %h", i, y, expected(i));
      end
    end
    in_valid = 1'b0;
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid did not drop"); end
    // monotonic: Sigmoid(m/64) rises with m, Sigmoid(-m/64) falls
    prev = -1.0;
    for (int m = 0; m < 512; m++) begin
      cur = fp32_to_real(got[m]);
      checks++;
      if (cur < prev) begin failures++; $display("FAIL not monotonic at +%0d", m); end
      prev = cur;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
