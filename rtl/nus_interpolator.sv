// nus_interpolator: programmable look-up-table interpolator with a nonuniform sampling scheme.
//
// Computes g(x) ~= g(x_nm) + g'(x_nm) * (x - x_nm), a first-order Taylor step from the stored
// sample x_nm at or below x. The samples are spaced unevenly: the domain [-1, 1) is cut into
// 22 partitions, each with its own power-of-two sampling frequency, so that a 512-word memory
// can follow a function that is steep in places (such as the inverse error function near +-1).
// Which partition, which address and which residual belong to x is worked out by
// nus_difference_address from six programmable tables; the ordinates and derivatives sit in two
// 512-word RAMs. Loading other tables and RAM contents switches to another function and another
// sampling scheme while the circuit runs.
//
// Data path and timing (clock edges after lut_in is presented):
//   edge 1   the RAMs register g(x_nm) and g'(x_nm); the residual is registered (Delay RAM)
//   edge 2-5 the 4-stage multiplier forms g'(x_nm) * (x - x_nm); the ordinate is delayed by 4
//   edge 6   the adder registers lut_out; ent carries lut_in delayed by 6 (Delay19)
// One result per clock, latency 6, following the delays of the source design.
//
// Writing: while we is high the address multiplexer gives the RAMs the external address ad
// instead of the computed one, and r1/r2 are written to the ordinate/derivative RAM (one word
// of each per clock, so a full reload takes 512 clocks); lut_out is meaningless during such
// clocks. The partition tables are written independently through cfg_we/cfg_idx/cfg (one
// partition per clock, 22 clocks), and can be loaded during the RAM reload. The port names
// follow the source design's LUT_IN, R1, R2, We, Ad, ent and LUT_OUT; the table write port,
// the data widths (32-bit ordinates, derivatives and output with 16 fraction bits), the
// sharing of We as the multiplexer select and the reset are this design's choices.
module nus_interpolator
  import nus_pkg::*;
#(
  parameter int ADDR_W  = 9,   // 512-word sample RAMs
  parameter int ORD_W   = 32,  // ordinate width, 16 fraction bits
  parameter int DER_W   = 32,  // derivative width, 16 fraction bits
  parameter int OUT_W   = 32,  // output width, 16 fraction bits
  parameter int MUL_LAT = 4    // multiplier latency
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [X_W-1:0]   lut_in,
  input  logic signed [ORD_W-1:0] r1,
  input  logic signed [DER_W-1:0] r2,
  input  logic                    we,
  input  logic [ADDR_W-1:0]       ad,
  input  logic                    cfg_we,
  input  logic [SEL_W-1:0]        cfg_idx,
  input  nus_cfg_t                cfg,
  output logic signed [X_W-1:0]   ent,
  output logic signed [OUT_W-1:0] lut_out
);

  localparam int PROD_W = DER_W + X_W;

  logic [ADDR_W-1:0]        calc_addr, ram_addr;
  logic [X_W-1:0]           difference, difference_d;
  logic [SEL_W-1:0]         sel;
  logic [ORD_W-1:0]         ord_q, ord_d;
  logic [DER_W-1:0]         der_q;
  logic signed [PROD_W-1:0] prod;

  nus_difference_address #(.ADDR_W(ADDR_W)) u_diff_addr (
    .clk, .rst, .cfg_we, .cfg_idx, .cfg, .x(lut_in),
    .address(calc_addr), .difference, .sel
  );

  // Mux: external address while writing, computed address otherwise
  assign ram_addr = we ? ad : calc_addr;

  nus_lut_ram #(.DEPTH(1 << ADDR_W), .W(ORD_W)) u_ordinate_ram (
    .clk, .we, .addr(ram_addr), .wdata(r1), .rdata(ord_q)
  );

  nus_lut_ram #(.DEPTH(1 << ADDR_W), .W(DER_W)) u_derivative_ram (
    .clk, .we, .addr(ram_addr), .wdata(r2), .rdata(der_q)
  );

  // Delay RAM
  nus_delay #(.W(X_W), .N(1)) u_delay_ram (
    .clk, .rst, .din(difference), .dout(difference_d)
  );

  nus_mult #(.A_W(DER_W), .B_W(X_W), .LAT(MUL_LAT)) u_multiplier (
    .clk, .rst, .a(signed'(der_q)), .b(difference_d), .p(prod)
  );

  // Delay multiplier
  nus_delay #(.W(ORD_W), .N(MUL_LAT)) u_delay_multiplier (
    .clk, .rst, .din(ord_q), .dout(ord_d)
  );

  nus_adder #(.ORD_W(ORD_W), .PROD_W(PROD_W), .SHIFT(X_FRAC), .OUT_W(OUT_W)) u_adder (
    .clk, .rst, .a(signed'(ord_d)), .b(prod), .s(lut_out)
  );

  // Delay19: input echoed in step with the result
  nus_delay #(.W(X_W), .N(MUL_LAT + 2)) u_delay19 (
    .clk, .rst, .din(lut_in), .dout(ent)
  );

endmodule
