// nus_displacement: "Displacement" subsystem.
//
// A programmable 22-entry table that returns Dsp_n = f_n/2 for the partition chosen by the
// selector. Added to the scaled input, it turns the signed grid index of x into an unsigned
// index counted from x = -1, as if f_n applied over the whole domain.
//
// Interface: sel -> dsp is combinational. The table is written one entry per clock through
// cfg_we/cfg_idx/cfg_dsp (1-based partition number). Reset loads scheme alpha.
module nus_displacement
  import nus_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             cfg_we,
  input  logic [SEL_W-1:0] cfg_idx,
  input  logic [DSP_W-1:0] cfg_dsp,
  input  logic [SEL_W-1:0] sel,
  output logic [DSP_W-1:0] dsp
);

  logic [DSP_W-1:0] dsp_tbl [1:P];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 1; n <= P; n++) dsp_tbl[n] <= alpha_cfg(n).dsp;
    end else if (cfg_we && cfg_idx >= SEL_W'(1) && cfg_idx <= SEL_W'(P)) begin
      dsp_tbl[cfg_idx] <= cfg_dsp;
    end
  end

  always_comb begin
    dsp = '0;
    for (int n = 1; n <= P; n++) if (sel == SEL_W'(n)) dsp = dsp_tbl[n];
  end

endmodule
