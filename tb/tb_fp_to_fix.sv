// Self-checking testbench of fp_to_fix: directed values (grid points, halves,
// range edges, zero, subnormal, Inf, NaN) and random inputs over many
// binades, compared with a real-valued model of "round |x|*64 to nearest,
// halves up, saturate at 511". Also checks the one-cycle latency.
module tb_fp_to_fix;
  import sigtanh_pkg::*;
  import tb_fp_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  fp32_t a = '0;
  logic  out_valid;
  fix_t  y;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp_to_fix dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fix_t ref_fix(input logic [31:0] f);
    real    v, s;
    longint q;
    fix_t   r;
    r.sign = f[31];
    if (f[30:23] == 8'hFF) begin r.mag = 9'd511; return r; end
    v = fp32_to_real(f);
    if (v < 0.0) v = -v;
    s = v * 64.0;
    if (s >= 511.0) begin r.mag = 9'd511; return r; end
    q = longint'($floor(s + 0.5));
    r.mag = (q > 511) ? 9'd511 : 9'(q);
    return r;
  endfunction

  task automatic apply(input logic [31:0] f);
    fix_t exp_y;
    exp_y = ref_fix(f);
    @(negedge clk);
    a = f; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || y !== exp_y) begin
      failures++;
      $display("FAIL in=%h (%f) got v=%0b %0b/%0d exp %0b/%0d", f, fp32_to_real(f),
               out_valid, y.sign, y.mag, exp_y.sign, exp_y.mag);
    end
  endtask

  initial begin
    logic [31:0] vec [$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    vec = '{32'h0000_0000, 32'h8000_0000, 32'h0000_0001, 32'h3F80_0000, 32'hBF80_0000,
            32'h40C0_0000, 32'hC0C0_0000, 32'h40FF_8000, 32'h40FF_C000, 32'h4100_0000,
            32'hC100_0000, 32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000, 32'h3C00_0000,
            32'h3C00_0001, 32'h3BFF_FFFF, 32'h3C40_0000, 32'h3CA0_0000, 32'h4B00_0000};
    foreach (vec[i]) apply(vec[i]);
    for (int k = -600; k <= 600; k++) apply(real_to_fp32(k / 64.0));
    for (int k = -1200; k <= 1200; k += 3) apply(real_to_fp32(k / 128.0));
    repeat (5000) apply(rand_fp(-10, 4));
    // pipelined: back-to-back samples
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      a = real_to_fp32(i * 0.5); in_valid = 1'b1;
      @(negedge clk);
      checks++;
      if (!out_valid || y.mag != 9'(i * 32)) begin
        failures++; $display("FAIL back-to-back %0d got %0d", i, y.mag);
      end
    end
    in_valid = 1'b0;
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid did not drop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
