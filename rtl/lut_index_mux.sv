// Mode multiplexer in front of the Sigmoid table.
//
// Chooses the table address from the fixed-point input x (mode = Sigmoid) or
// from its doubled copy 2x (mode = Tanh), and registers it together with the
// mode and a valid bit, so that a different mode may be chosen for every
// sample. The mode travels with the sample down the pipeline.
//
// Timing: one register stage, one sample per clock. rst_n (synchronous,
// active low) clears the valid bit only. The mode encoding (0 Sigmoid,
// 1 Tanh) and the register are this implementation's choice.
module lut_index_mux
  import sigtanh_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  mode_e mode,
  input  fix_t  x,          // address for Sigmoid(x)
  input  fix_t  x2,         // address for Sigmoid(2x)
  output logic  out_valid,
  output mode_e out_mode,
  output fix_t  index
);

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_mode <= mode;
    index    <= (mode == MODE_TANH) ? x2 : x;
  end

endmodule
