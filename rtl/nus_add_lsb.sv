// nus_add_lsb: "Add_LSB" subsystem (parameter D).
//
// Keeps the D_n = log2(f_n) least significant bits of its input, the sum of the Add_MSB output
// and Dsp_n. That sum lies in 0..f_n-1 for inputs inside the partition, so the slice is the
// unsigned grid index of x counted from -1; outside that range it wraps modulo f_n. D_n is
// read from a programmable 22-entry table for the selected partition.
//
// Interface: sel, sum_in -> lsb is combinational. The table is written one entry per clock
// through cfg_we/cfg_idx/cfg_d (1-based partition number). Reset loads scheme alpha.
module nus_add_lsb
  import nus_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    cfg_we,
  input  logic [SEL_W-1:0]        cfg_idx,
  input  logic [CNT_W-1:0]        cfg_d,
  input  logic [SEL_W-1:0]        sel,
  input  logic signed [DSP_W-1:0] sum_in,
  output logic [DSP_W-1:0]        lsb
);

  logic [CNT_W-1:0] d_tbl [1:P];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 1; n <= P; n++) d_tbl[n] <= alpha_cfg(n).d;
    end else if (cfg_we && cfg_idx >= SEL_W'(1) && cfg_idx <= SEL_W'(P)) begin
      d_tbl[cfg_idx] <= cfg_d;
    end
  end

  logic [CNT_W-1:0] d;
  always_comb begin
    d = '0;
    for (int n = 1; n <= P; n++) if (sel == SEL_W'(n)) d = d_tbl[n];
  end

  logic [DSP_W-1:0] mask;
  always_comb begin
    mask = ~({DSP_W{1'b1}} << d);
    lsb  = sum_in & mask;
  end

endmodule
