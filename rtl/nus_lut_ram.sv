// nus_lut_ram: sample memory, used for both the Ordinate RAM (g(x_nm)) and the Derivative RAM
// (g'(x_nm)).
//
// A single-port DEPTH x W RAM. On a clock edge with we high it stores wdata at addr; on every
// edge it registers the word at addr onto rdata (read before write), so a read costs one clock,
// as a block RAM does. The contents are not reset: they are loaded, and reloaded on the fly,
// through the write port; DEPTH = 512 words take 512 clocks to fill.
module nus_lut_ram #(
  parameter int DEPTH = 512,
  parameter int W     = 32,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
