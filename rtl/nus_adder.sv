// nus_adder: output adder g(x_nm) + g'(x_nm) * (x - x_nm), one clock of latency.
//
// The ordinate has F fraction bits; the product has F + SHIFT (SHIFT = 14, the residual's
// fraction bits). The ordinate is aligned to the product, the two are added exactly, and the
// sum is brought back to F fraction bits by an arithmetic shift (rounding toward minus
// infinity) and saturated to OUT_W bits. The rounding and saturation are this design's choice.
// Synchronous reset clears the output register.
module nus_adder #(
  parameter int ORD_W  = 32,
  parameter int PROD_W = 47,
  parameter int SHIFT  = 14,
  parameter int OUT_W  = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [ORD_W-1:0]  a,
  input  logic signed [PROD_W-1:0] b,
  output logic signed [OUT_W-1:0]  s
);

  localparam int SUM_W = ((ORD_W + SHIFT > PROD_W) ? ORD_W + SHIFT : PROD_W) + 1;
  localparam logic signed [SUM_W-1:0] MAXV = SUM_W'({1'b0, {(OUT_W-1){1'b1}}});
  localparam logic signed [SUM_W-1:0] MINV = -MAXV - SUM_W'(1);

  logic signed [SUM_W-1:0] sum, sh;
  logic signed [OUT_W-1:0] sat;

  always_comb begin
    sum = (SUM_W'(a) <<< SHIFT) + SUM_W'(b);
    sh  = sum >>> SHIFT;
    if (sh > MAXV)      sat = MAXV[OUT_W-1:0];
    else if (sh < MINV) sat = MINV[OUT_W-1:0];
    else                sat = sh[OUT_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) s <= '0;
    else     s <= sat;
  end

endmodule
