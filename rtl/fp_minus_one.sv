// The "-1" step: y = a - 1.0 in IEEE-754 single precision.
//
// Turns the doubled Sigmoid value 2*Sigmoid(2x) into Tanh(x). It is a
// floating-point adder whose second operand is the constant -1.0, so it has
// the adder's rounding (nearest, ties to even) and its latency.
//
// Timing: y and out_valid follow a and in_valid ADD_LAT (3) clocks later, one
// value per clock. rst_n (synchronous, active low) clears the valid bits.
// The step is part of the design; building it from the adder is this
// implementation's choice.
module fp_minus_one
  import sigtanh_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  output logic  out_valid,
  output fp32_t y
);

  fp_add u_add (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .a         (a),
    .b         (FP_MINUS_ONE),
    .out_valid (out_valid),
    .y         (y)
  );

endmodule
