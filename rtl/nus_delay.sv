// nus_delay: an N-clock delay line (N >= 1), W bits wide.
//
// Used three times to keep the interpolator's data paths in step: "Delay RAM" (N = 1) holds the
// residual while the RAMs read, "Delay multiplier" (N = 4) holds the ordinate while the
// multiplier works, and "Delay19" (N = 6) carries the input to the ent output alongside the
// result. dout equals din of N clocks earlier. Synchronous reset clears every stage.
module nus_delay #(
  parameter int W = 15,
  parameter int N = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  logic [W-1:0] stage [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) stage[i] <= '0;
    end else begin
      stage[0] <= din;
      for (int i = 1; i < N; i++) stage[i] <= stage[i-1];
    end
  end

  assign dout = stage[N-1];

endmodule
