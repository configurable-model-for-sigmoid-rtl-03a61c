// Delay line: DEPTH register stages for a WIDTH-bit bundle and its valid bit.
//
// Used by the activation unit to keep the mode and the Sigmoid value in step
// with the Tanh path and to pad the whole unit to its specified latency.
// DEPTH = 0 is a plain wire. rst_n (synchronous, active low) clears the valid
// bits only.
module pipe_delay #(
  parameter int WIDTH = 1,
  parameter int DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] d,
  output logic             out_valid,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign out_valid = in_valid;
    assign q         = d;
  end else begin : g_regs
    logic             vld  [DEPTH];
    logic [WIDTH-1:0] data [DEPTH];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) vld[i] <= 1'b0;
      end else begin
        vld[0] <= in_valid;
        for (int i = 1; i < DEPTH; i++) vld[i] <= vld[i-1];
      end
      data[0] <= d;
      for (int i = 1; i < DEPTH; i++) data[i] <= data[i-1];
    end

    assign out_valid = vld[DEPTH-1];
    assign q         = data[DEPTH-1];
  end

endmodule
