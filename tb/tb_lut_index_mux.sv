// Self-checking testbench of lut_index_mux: random x, 2x and mode every
// cycle; the registered index must be the chosen input one clock later, with
// mode and valid following along, and valid must clear in reset.
module tb_lut_index_mux;
  import sigtanh_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  mode_e mode = MODE_SIGMOID;
  fix_t  x = '0, x2 = '0;
  logic  out_valid;
  mode_e out_mode;
  fix_t  index;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  lut_index_mux dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fix_t  px, px2;
    mode_e pm;
    logic  pv;
    repeat (2) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid set in reset"); end
    rst_n = 1'b1;
    pv = 1'b0; pm = MODE_SIGMOID; px = '0; px2 = '0;
    for (int i = 0; i < 2000; i++) begin
      x = fix_t'(10'($urandom)); x2 = fix_t'(10'($urandom));
      mode = mode_e'(1'($urandom)); in_valid = 1'($urandom);
      @(negedge clk);
      checks++;
      if (out_valid != in_valid || out_mode != mode ||
          index != ((mode == MODE_TANH) ? x2 : x)) begin
        failures++;
        $display("FAIL i=%0d mode=%0d x=%h x2=%h got %h", i, mode, x, x2, index);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
