// nus_mult: pipelined multiplier g'(x_nm) * (x - x_nm).
//
// Multiplies a signed A_W-bit operand (the derivative) by an unsigned B_W-bit operand (the
// residual) into an exact signed A_W+B_W-bit product. The product is formed in the first stage
// and carried through LAT-1 more registers, so p is the product of the operands of LAT clocks
// earlier (LAT = 4 as in the source design); synthesis may retime the stages into the multiplier.
// Synchronous reset clears the pipeline.
module nus_mult #(
  parameter int A_W = 32,
  parameter int B_W = 15,
  parameter int LAT = 4
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic signed [A_W-1:0]     a,
  input  logic        [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);

  logic signed [A_W+B_W-1:0] pipe [LAT];
  logic signed [A_W+B_W-1:0] prod;

  assign prod = (A_W+B_W)'(a) * $signed({1'b0, b});

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LAT; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= prod;
      for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign p = pipe[LAT-1];

endmodule
