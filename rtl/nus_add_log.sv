// nus_add_log: "Add_Log" subsystem.
//
// A programmable 22-entry table that returns the signed address offset
// Add log_n = SMN_n - IMN_n for the partition chosen by the selector: the first RAM word of the
// partition (SMN_n) less the grid index of the partition's lower limit (IMN_n). Adding it to
// the partition-local grid index gives the RAM address of the sample at or below x.
//
// Interface: sel -> add_log is combinational. The table is written one entry per clock through
// cfg_we/cfg_idx/cfg_add_log (1-based partition number). Reset loads scheme alpha.
module nus_add_log
  import nus_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    cfg_we,
  input  logic [SEL_W-1:0]        cfg_idx,
  input  logic signed [LOG_W-1:0] cfg_add_log,
  input  logic [SEL_W-1:0]        sel,
  output logic signed [LOG_W-1:0] add_log
);

  logic signed [LOG_W-1:0] log_tbl [1:P];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 1; n <= P; n++) log_tbl[n] <= alpha_cfg(n).add_log;
    end else if (cfg_we && cfg_idx >= SEL_W'(1) && cfg_idx <= SEL_W'(P)) begin
      log_tbl[cfg_idx] <= cfg_add_log;
    end
  end

  always_comb begin
    add_log = '0;
    for (int n = 1; n <= P; n++) if (sel == SEL_W'(n)) add_log = log_tbl[n];
  end

endmodule
