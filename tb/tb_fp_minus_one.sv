// Self-checking testbench of fp_minus_one: values across the range of
// 2*Sigmoid (0 .. 2), plus negative, large and tiny values, streamed one per
// clock; each result is compared with x - 1 in real arithmetic rounded to
// single precision. The three-cycle latency is checked.
module tb_fp_minus_one;
  import sigtanh_pkg::*;
  import tb_fp_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  fp32_t a = '0;
  logic  out_valid;
  fp32_t y;
  int    checks = 0, failures = 0;
  logic [31:0] exp_q [$];

  always #5 clk = ~clk;

  fp_minus_one dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      logic [31:0] e;
      e = exp_q.pop_front();
      checks++;
      if (!(y === e || (y[30:0] == 0 && e[30:0] == 0))) begin
        failures++;
        $display("FAIL got %h exp %h", y, e);
      end
    end
  end

  task automatic issue(input logic [31:0] x);
    a = x; in_valid = 1'b1;
    exp_q.push_back(real_to_fp32(fp32_to_real(x) - 1.0));
    @(negedge clk);
  endtask

  initial begin
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    a = 32'h4000_0000; in_valid = 1'b1;          // 2 - 1 = 1
    exp_q.push_back(32'h3F80_0000);
    @(negedge clk); in_valid = 1'b0; lat = 1;
    while (!out_valid && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != ADD_LAT) begin failures++; $display("FAIL latency %0d", lat); end
    @(negedge clk);
    issue(32'h0000_0000);
    issue(32'h3F80_0000);
    issue(32'h3A80_0000);
    issue(32'hC000_0000);
    issue(32'h5000_0000);
    for (int i = 0; i < 3000; i++) begin
      if (i % 2 == 0) issue(real_to_fp32(2.0 * $urandom_range(1000000) / 1000000.0));
      else            issue(rand_fp(-30, 30));
    end
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
