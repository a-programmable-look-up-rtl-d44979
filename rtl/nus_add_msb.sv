// nus_add_msb: "Add_MSB" subsystem (parameter B).
//
// Keeps the bits of x whose weight is 2^B_n or more, where B_n = 1 - log2(f_n) is read from a
// programmable 22-entry table for the selected partition. 2^B_n is the sample pitch 2/f_n, so
// the result is floor(x / pitch): the signed index of the grid point at or below x. It is
// realised as an arithmetic right shift of x by 14 + B_n places (0 to 14), sign-extended back
// to 15 bits.
//
// Interface: sel, x -> msb is combinational. The table is written one entry per clock through
// cfg_we/cfg_idx/cfg_b (1-based partition number). Reset loads scheme alpha.
module nus_add_msb
  import nus_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  cfg_we,
  input  logic [SEL_W-1:0]      cfg_idx,
  input  logic signed [B_W-1:0] cfg_b,
  input  logic [SEL_W-1:0]      sel,
  input  logic signed [X_W-1:0] x,
  output logic signed [X_W-1:0] msb
);

  logic signed [B_W-1:0] b_tbl [1:P];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 1; n <= P; n++) b_tbl[n] <= alpha_cfg(n).b;
    end else if (cfg_we && cfg_idx >= SEL_W'(1) && cfg_idx <= SEL_W'(P)) begin
      b_tbl[cfg_idx] <= cfg_b;
    end
  end

  logic signed [B_W-1:0] b;
  always_comb begin
    b = '0;
    for (int n = 1; n <= P; n++) if (sel == SEL_W'(n)) b = b_tbl[n];
  end

  // Shift count 14 + B_n, limited to the input width.
  logic signed [B_W+1:0] sh_s;
  logic [3:0]            sh;
  always_comb begin
    sh_s = (B_W+2)'(X_FRAC) + (B_W+2)'(b);
    if (sh_s < 0)                    sh = '0;
    else if (sh_s > (B_W+2)'(X_W-1)) sh = 4'(X_W - 1);
    else                             sh = sh_s[3:0];
    msb = x >>> sh;
  end

endmodule
