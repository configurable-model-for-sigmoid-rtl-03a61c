// Self-checking testbench of fp_add: random operand pairs (same and opposite
// signs, near and far exponents, exact cancellation, x + x) and special
// values, streamed one per clock. Each result is compared bit for bit with
// the real sum rounded to single precision; the three-cycle latency is
// checked by matching every output to the input issued three clocks earlier.
module tb_fp_add;
  import sigtanh_pkg::*;
  import tb_fp_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  fp32_t a = '0, b = '0;
  logic  out_valid;
  fp32_t y;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp_add dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_q [$];

  function automatic logic [31:0] ref_add(input logic [31:0] x, input logic [31:0] z);
    logic xn, zn, xi, zi;
    xn = (x[30:23] == 8'hFF) && (x[22:0] != 0);
    zn = (z[30:23] == 8'hFF) && (z[22:0] != 0);
    xi = (x[30:23] == 8'hFF) && (x[22:0] == 0);
    zi = (z[30:23] == 8'hFF) && (z[22:0] == 0);
    if (xn || zn || (xi && zi && x[31] != z[31])) return 32'h7FC0_0000;
    if (xi) return x;
    if (zi) return z;
    return real_to_fp32(fp32_to_real(x) + fp32_to_real(z));
  endfunction

  // compare the result of the sample issued three clocks ago
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      logic [31:0] e;
      e = exp_q.pop_front();
      checks++;
      // both zero signs are accepted for an exact zero sum
      if (!(y === e || (y[30:0] == 0 && e[30:0] == 0))) begin
        failures++;
        $display("FAIL got %h exp %h", y, e);
      end
    end
  end

  task automatic issue(input logic [31:0] x, input logic [31:0] z);
    a = x; b = z; in_valid = 1'b1;
    exp_q.push_back(ref_add(x, z));
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] x, z;
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // latency: one sample, count clocks to out_valid
    a = 32'h3F80_0000; b = 32'h3F80_0000; in_valid = 1'b1;
    exp_q.push_back(32'h4000_0000);
    @(negedge clk); in_valid = 1'b0; lat = 1;
    while (!out_valid && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != ADD_LAT) begin failures++; $display("FAIL latency %0d", lat); end
    @(negedge clk);
    issue(32'h3F80_0000, 32'hBF80_0000);   // 1 - 1
    issue(32'h7F80_0000, 32'h3F80_0000);   // Inf + 1
    issue(32'h7F80_0000, 32'hFF80_0000);   // Inf - Inf
    issue(32'h7F7F_FFFF, 32'h7F7F_FFFF);   // overflow
    issue(32'h0000_0000, 32'h3E80_0000);   // 0 + 0.25
    issue(32'h3F00_0000, 32'hBF80_0000);   // 0.5 - 1
    issue(32'h3F7F_FFFF, 32'hBF80_0000);   // tiny difference
    issue(32'h4B80_0000, 32'h3F80_0001);   // far, sticky
    for (int i = 0; i < 3000; i++) begin
      x = rand_fp(-20, 20);
      case (i % 4)
        0: z = rand_fp(-20, 20);
        1: z = {1'($urandom), x[30:23] - 8'($urandom_range(3)), 23'($urandom)};
        2: z = x;
        default: z = {~x[31], x[30:0]};
      endcase
      issue(x, z);
    end
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
