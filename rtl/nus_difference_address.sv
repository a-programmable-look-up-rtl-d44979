// nus_difference_address: the "Difference_Address" subsystem.
//
// Turns the input x into the RAM address of the stored sample x_nm at or below it and the
// residual x - x_nm, for a domain cut into 22 partitions with different sample pitches.
//   selector  n    = partition of x (nus_region_select, against CSL_n)
//   Add_MSB        = floor(x * f_n / 2)              (signed grid index, nus_add_msb)
//   Displacement_Adder: + Dsp_n = f_n/2              (index counted from x = -1)
//   Add_LSB        = low D_n bits of that sum        (nus_add_lsb)
//   Add_Log_Adder: + Add log_n                       (RAM address of the sample)
//   Difference     = low S_n bits of x, 14 fraction bits, zero where f_n = 2^15 (nus_dif_lsb)
// The address is kept to its ADDR_W low bits, the depth of the sample RAMs.
//
// Interface: x -> address and difference is combinational, as in the source design (the clock
// only writes the tables). The six tables are written together, one partition entry per clock,
// through cfg_we/cfg_idx/cfg; sel is brought out for observation. Reset loads scheme alpha.
module nus_difference_address
  import nus_pkg::*;
#(
  parameter int ADDR_W = 9
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  cfg_we,
  input  logic [SEL_W-1:0]      cfg_idx,
  input  nus_cfg_t              cfg,
  input  logic signed [X_W-1:0] x,
  output logic [ADDR_W-1:0]     address,
  output logic [X_W-1:0]        difference,
  output logic [SEL_W-1:0]      sel
);

  logic [DSP_W-1:0]        dsp;
  logic signed [LOG_W-1:0] add_log;
  logic signed [X_W-1:0]   msb;
  logic signed [DSP_W-1:0] disp_sum;
  logic [DSP_W-1:0]        lsb;

  nus_region_select u_region (
    .clk, .rst, .cfg_we, .cfg_idx, .cfg_csl(cfg.csl), .x, .sel
  );

  nus_displacement u_displacement (
    .clk, .rst, .cfg_we, .cfg_idx, .cfg_dsp(cfg.dsp), .sel, .dsp
  );

  nus_add_log u_add_log (
    .clk, .rst, .cfg_we, .cfg_idx, .cfg_add_log(cfg.add_log), .sel, .add_log
  );

  nus_add_msb u_add_msb (
    .clk, .rst, .cfg_we, .cfg_idx, .cfg_b(cfg.b), .sel, .x, .msb
  );

  // Displacement_Adder
  assign disp_sum = DSP_W'(msb) + $signed(dsp);

  nus_add_lsb u_add_lsb (
    .clk, .rst, .cfg_we, .cfg_idx, .cfg_d(cfg.d), .sel, .sum_in(disp_sum), .lsb
  );

  // Add_Log_Adder, modulo the RAM depth (bits above ADDR_W cannot change the low ones)
  assign address = ADDR_W'(lsb) + ADDR_W'(add_log);

  nus_dif_lsb u_dif_lsb (
    .clk, .rst, .cfg_we, .cfg_idx, .cfg_s(cfg.s), .cfg_one2one(cfg.one2one), .sel, .x,
    .diff(difference)
  );

endmodule
