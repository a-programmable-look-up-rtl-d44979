// tb_nus_add_lsb: self-checking test of the Add_LSB slice.
// The output must be the input modulo 2^D_n, for the reset (scheme alpha) values of D_n and
// for random values written to the table.
module tb_nus_add_lsb;
  import nus_pkg::*;
  import nus_tb_pkg::*;

  logic clk = 0, rst = 1, cfg_we = 0;
  logic [SEL_W-1:0] cfg_idx = '0, sel = '0;
  logic [CNT_W-1:0] cfg_d = '0;
  logic signed [DSP_W-1:0] sum_in = '0;
  logic [DSP_W-1:0] lsb;
  int checks = 0, failures = 0;
  int dval [1:P];

  nus_add_lsb dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic probe(int n, int v);
    int e;
    sel = SEL_W'(n);
    sum_in = DSP_W'(v);
    #1;
    e = (v & 32'hFFFF) % (1 << dval[n]);
    checks++;
    if (int'(lsb) != e) begin
      failures++;
      $display("FAIL n=%0d d=%0d in=%0d lsb=%0d expected %0d", n, dval[n], v, lsb, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int n = 1; n <= P; n++) dval[n] = log2i(SCHEME_F[0][n-1]);
    for (int n = 1; n <= P; n++) repeat (100) probe(n, int'($urandom_range(65535)) - 32768);
    for (int n = 1; n <= P; n++) begin
      @(negedge clk);
      dval[n] = int'($urandom_range(15));
      cfg_we = 1; cfg_idx = SEL_W'(n); cfg_d = CNT_W'(dval[n]);
    end
    @(negedge clk);
    cfg_we = 0;
    for (int n = 1; n <= P; n++) repeat (100) probe(n, int'($urandom_range(65535)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
