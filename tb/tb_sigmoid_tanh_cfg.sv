// End-to-end self-checking testbench of sigmoid_tanh_cfg at its default
// parameters (LATENCY = 20).
//
// A stream of random single-precision inputs with a random mode per sample
// and random idle cycles is fed in. For every output the testbench checks:
//   - that it arrives exactly LATENCY clocks after its input;
//   - the exact bit pattern, against a real-valued model of the datapath
//     (quantise to 1/64, saturate at 7.984375, double in Tanh mode, table
//     value 1/(1+exp(-x)) or 0 / 1 beyond -+6, then 2s - 1);
//   - the accuracy against the ideal function (|error| < 0.005 for Sigmoid,
//     < 0.01 for Tanh).
// It counts how often each mechanism of the unit occurred (both modes, a
// mode change between consecutive samples, both saturation ends of each
// function, saturation in the conversion and in the doubling shift, idle
// cycles) and counts a failure for any that never did.
module tb_sigmoid_tanh_cfg;
  import tb_fp_pkg::*;

  localparam int LAT = 20;     // the unit's default latency

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic        mode = 1'b0;
  logic [31:0] ip = '0;
  logic        out_valid, out_mode;
  logic [31:0] sigmoid_op, tanh_op;
  int          checks = 0, failures = 0;
  longint      cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  sigmoid_tanh_cfg dut (.*);

  typedef struct {
    longint      t_in;
    logic        mode;
    logic [31:0] ip;
  } sample_t;
  sample_t q [$];

  // mechanism counters
  int n_sig, n_tanh, n_switch, n_sig_lo, n_sig_hi, n_tanh_lo, n_tanh_hi;
  int n_conv_sat, n_shift_sat, n_idle;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 1024-entry table model
  function automatic real lut_model(input logic s, input int m);
    real x;
    x = s ? -(m / 64.0) : (m / 64.0);
    if (x < -6.0) return 0.0;
    if (x >  6.0) return 1.0;
    return fp32_to_real(real_to_fp32(sigmoid(x)));
  endfunction

  function automatic int quant_mag(input logic [31:0] f);
    real v;
    if (f[30:23] == 8'hFF) return 511;
    v = fp32_to_real(f);
    if (v < 0.0) v = -v;
    if (v * 64.0 >= 511.0) return 511;
    return int'($floor(v * 64.0 + 0.5));
  endfunction

  // check outputs at the negedge following the clock that produced them
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      sample_t     s;
      int          m, m2;
      real         sv, x, tv, err;
      logic [31:0] e_sig, e_tanh;
      if (q.size() == 0) begin
        failures++; $display("FAIL output without input");
      end else begin
        s = q.pop_front();
        checks++;
        if (cycle - s.t_in != longint'(LAT)) begin
          failures++; $display("FAIL latency %0d", cycle - s.t_in);
        end
        m  = quant_mag(s.ip);
        m2 = s.mode ? ((2 * m > 511) ? 511 : 2 * m) : m;
        sv = lut_model(s.ip[31], m2);
        e_sig  = real_to_fp32(sv);
        e_tanh = real_to_fp32(2.0 * sv - 1.0);
        x  = fp32_to_real(s.ip);
        checks++;
        if (out_mode != s.mode) begin failures++; $display("FAIL out_mode"); end
        checks++;
        if (s.mode == 1'b0) begin
          if (sigmoid_op !== e_sig) begin
            failures++; $display("FAIL sigmoid x=%f got %h exp %h", x, sigmoid_op, e_sig);
          end
          err = fp32_to_real(sigmoid_op) - sigmoid(x);
          checks++;
          if (err > 0.005 || err < -0.005) begin
            failures++; $display("FAIL sigmoid accuracy x=%f err=%f", x, err);
          end
        end else begin
          if (tanh_op !== e_tanh && !(tanh_op[30:0] == 0 && e_tanh[30:0] == 0)) begin
            failures++; $display("FAIL tanh x=%f got %h exp %h", x, tanh_op, e_tanh);
          end
          tv  = fp32_to_real(tanh_op);
          err = tv - tanh_ideal(x);
          checks++;
          if (err > 0.01 || err < -0.01) begin
            failures++; $display("FAIL tanh accuracy x=%f err=%f", x, err);
          end
        end
      end
    end
  end

  task automatic issue(input logic md, input logic [31:0] f);
    real x;
    static logic have_prev = 1'b0;
    static logic last_mode = 1'b0;
    x = fp32_to_real(f);
    ip = f; mode = md; in_valid = 1'b1;
    @(posedge clk);
    q.push_back('{t_in: cycle, mode: md, ip: f});
    if (have_prev && last_mode != md) n_switch++;
    have_prev = 1'b1; last_mode = md;
    if (quant_mag(f) == 511) n_conv_sat++;
    if (md == 1'b0) begin
      n_sig++;
      if (x < -6.0) n_sig_lo++;
      if (x >  6.0) n_sig_hi++;
    end else begin
      n_tanh++;
      if (x < -3.0) n_tanh_lo++;
      if (x >  3.0) n_tanh_hi++;
      if (quant_mag(f) >= 256) n_shift_sat++;
    end
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // a sweep in each mode over [-8.5, 8.5]
    for (int k = -544; k <= 544; k += 4) issue(1'b0, real_to_fp32(k / 64.0));
    for (int k = -544; k <= 544; k += 4) issue(1'b1, real_to_fp32(k / 64.0));
    // random stream: random mode per sample, random idle cycles
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] f;
      if ($urandom_range(9) == 0) begin
        in_valid = 1'b0; n_idle++;
        @(posedge clk); #1;
      end
      if (i % 10 == 0) f = rand_fp(-12, 6);
      else             f = real_to_fp32((real'($urandom_range(20000)) - 10000.0) / 1000.0);
      issue(1'($urandom), f);
    end
    in_valid = 1'b0;
    repeat (LAT + 5) @(posedge clk);
    @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end

    $display("mechanisms: sigmoid=%0d tanh=%0d mode_switch=%0d sig_sat_lo=%0d sig_sat_hi=%0d",
             n_sig, n_tanh, n_switch, n_sig_lo, n_sig_hi);
    $display("            tanh_sat_lo=%0d tanh_sat_hi=%0d conv_sat=%0d shift_sat=%0d idle=%0d",
             n_tanh_lo, n_tanh_hi, n_conv_sat, n_shift_sat, n_idle);
    checks += 10;
    if (n_sig == 0)       begin failures++; $display("FAIL no Sigmoid sample"); end
    if (n_tanh == 0)      begin failures++; $display("FAIL no Tanh sample"); end
    if (n_switch == 0)    begin failures++; $display("FAIL no mode switch"); end
    if (n_sig_lo == 0)    begin failures++; $display("FAIL no Sigmoid low saturation"); end
    if (n_sig_hi == 0)    begin failures++; $display("FAIL no Sigmoid high saturation"); end
    if (n_tanh_lo == 0)   begin failures++; $display("FAIL no Tanh low saturation"); end
    if (n_tanh_hi == 0)   begin failures++; $display("FAIL no Tanh high saturation"); end
    if (n_conv_sat == 0)  begin failures++; $display("FAIL no conversion saturation"); end
    if (n_shift_sat == 0) begin failures++; $display("FAIL no shift saturation"); end
    if (n_idle == 0)      begin failures++; $display("FAIL no idle cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
