// nus_dif_lsb: "Dif_LSB" subsystem (parameter S) with the "Decimal_Force" that follows it.
//
// Produces the residual x - x_nm between the input and the stored sample at or below it: the
// S_n least significant bits of x, read as an unsigned number with the binary point forced to
// 14 fraction bits (Decimal_Force is only this reinterpretation and costs no logic). In a
// partition with f_n = 2^15 every input code is itself a sample, so the residual is forced to
// zero; a per-partition one2one flag marks those partitions, because S_n is 7 there and cannot
// mark them by itself. S_n and the flag come from a programmable 22-entry table.
//
// Interface: sel, x -> diff is combinational; diff is unsigned, X_W bits, 14 fraction bits.
// The table is written one entry per clock through cfg_we/cfg_idx/cfg_s/cfg_one2one (1-based
// partition number). Reset loads scheme alpha.
module nus_dif_lsb
  import nus_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  cfg_we,
  input  logic [SEL_W-1:0]      cfg_idx,
  input  logic [CNT_W-1:0]      cfg_s,
  input  logic                  cfg_one2one,
  input  logic [SEL_W-1:0]      sel,
  input  logic signed [X_W-1:0] x,
  output logic [X_W-1:0]        diff
);

  logic [CNT_W-1:0] s_tbl   [1:P];
  logic             o2o_tbl [1:P];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 1; n <= P; n++) begin
        s_tbl[n]   <= alpha_cfg(n).s;
        o2o_tbl[n] <= alpha_cfg(n).one2one;
      end
    end else if (cfg_we && cfg_idx >= SEL_W'(1) && cfg_idx <= SEL_W'(P)) begin
      s_tbl[cfg_idx]   <= cfg_s;
      o2o_tbl[cfg_idx] <= cfg_one2one;
    end
  end

  logic [CNT_W-1:0] s;
  logic             o2o;
  always_comb begin
    s   = '0;
    o2o = 1'b0;
    for (int n = 1; n <= P; n++) begin
      if (sel == SEL_W'(n)) begin
        s   = s_tbl[n];
        o2o = o2o_tbl[n];
      end
    end
  end

  logic [X_W-1:0] mask;
  always_comb begin
    mask = ~({X_W{1'b1}} << s);
    diff = o2o ? '0 : (X_W'(x) & mask);
  end

endmodule
