// tb_nus_dif_lsb: self-checking test of the Dif_LSB slice and Decimal_Force.
// The residual must be x modulo 2^S_n, or zero in partitions marked one-to-one (f_n = 2^15,
// partitions 1 and 22 of scheme alpha after reset, where S_n = 7); then for random S values
// and flags written to the table.
module tb_nus_dif_lsb;
  import nus_pkg::*;
  import nus_tb_pkg::*;

  logic clk = 0, rst = 1, cfg_we = 0, cfg_one2one = 0;
  logic [SEL_W-1:0] cfg_idx = '0, sel = '0;
  logic [CNT_W-1:0] cfg_s = '0;
  logic signed [X_W-1:0] x = '0;
  logic [X_W-1:0] diff;
  int checks = 0, failures = 0, zero_forced = 0;
  int sval [1:P];
  bit oval [1:P];

  nus_dif_lsb dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic probe(int n, int xi);
    int e;
    sel = SEL_W'(n);
    x = X_W'(xi);
    #1;
    e = oval[n] ? 0 : ((xi & 32'h7FFF) % (1 << sval[n]));
    if (oval[n] && (xi & 127) != 0) zero_forced++;
    checks++;
    if (int'(diff) != e) begin
      failures++;
      $display("FAIL n=%0d s=%0d o=%0d x=%0d diff=%0d expected %0d", n, sval[n], oval[n], xi, diff, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int n = 1; n <= P; n++) begin
      int lf;
      lf = log2i(SCHEME_F[0][n-1]);
      sval[n] = (lf == 15) ? 7 : 15 - lf;
      oval[n] = (lf == 15);
    end
    for (int n = 1; n <= P; n++) repeat (100) probe(n, int'($urandom_range(32767)) - 16384);
    for (int n = 1; n <= P; n++) begin
      @(negedge clk);
      sval[n] = int'($urandom_range(14));
      oval[n] = ($urandom_range(3) == 0);
      cfg_we = 1; cfg_idx = SEL_W'(n); cfg_s = CNT_W'(sval[n]); cfg_one2one = oval[n];
    end
    @(negedge clk);
    cfg_we = 0;
    for (int n = 1; n <= P; n++) repeat (100) probe(n, int'($urandom_range(32767)) - 16384);
    checks++;
    if (zero_forced == 0) begin failures++; $display("FAIL one-to-one case never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
