// nus_region_select: "Sampling region and Corrected Superior Limit" subsystem.
//
// Finds the partition n that the input x falls in. Partition n covers
// CSL_{n-1} < x <= CSL_n, so the selector is the lowest n whose programmable Corrected Superior
// Limit is not below x. All 22 comparisons run in parallel and a priority pick takes the first.
// An x above every limit (only x = +1 - 2^-14, the one code left outside the domain
// [-1, 1 - 2^-14)) is given the last partition; that clamp is this design's choice.
//
// Interface: x and the selector are combinational (no clock between them). The CSL table is a
// 22-entry register file written one entry per clock through cfg_we/cfg_idx/cfg_csl
// (cfg_idx is the 1-based partition number; other values are ignored). Reset loads scheme alpha.
module nus_region_select
  import nus_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  cfg_we,
  input  logic [SEL_W-1:0]      cfg_idx,
  input  logic signed [X_W-1:0] cfg_csl,
  input  logic signed [X_W-1:0] x,
  output logic [SEL_W-1:0]      sel
);

  logic signed [X_W-1:0] csl_tbl [1:P];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 1; n <= P; n++) csl_tbl[n] <= alpha_cfg(n).csl;
    end else if (cfg_we && cfg_idx >= SEL_W'(1) && cfg_idx <= SEL_W'(P)) begin
      csl_tbl[cfg_idx] <= cfg_csl;
    end
  end

  // below[n]: x <= CSL_n
  logic [P:1] below;
  always_comb begin
    for (int n = 1; n <= P; n++) below[n] = (x <= csl_tbl[n]);
  end

  always_comb begin
    sel = SEL_W'(P);
    for (int n = P; n >= 1; n--) begin
      if (below[n]) sel = SEL_W'(n);
    end
  end

endmodule
