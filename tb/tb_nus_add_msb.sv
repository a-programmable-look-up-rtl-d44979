// tb_nus_add_msb: self-checking test of the Add_MSB slice.
// For every partition of scheme alpha (reset contents) and then for random B values written to
// the table, the output must be floor(x / 2^(14 + B)), computed here by integer floor division.
module tb_nus_add_msb;
  import nus_pkg::*;
  import nus_tb_pkg::*;

  logic clk = 0, rst = 1, cfg_we = 0;
  logic [SEL_W-1:0] cfg_idx = '0, sel = '0;
  logic signed [B_W-1:0] cfg_b = '0;
  logic signed [X_W-1:0] x = '0, msb;
  int checks = 0, failures = 0;
  int bval [1:P];

  nus_add_msb dut (.*);

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
    e = fdiv(xi, 1 << (14 + bval[n]));
    checks++;
    if (int'(msb) != e) begin
      failures++;
      $display("FAIL n=%0d b=%0d x=%0d msb=%0d expected %0d", n, bval[n], xi, msb, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int n = 1; n <= P; n++) bval[n] = 1 - log2i(SCHEME_F[0][n-1]);
    for (int n = 1; n <= P; n++) begin
      probe(n, -16384); probe(n, 16383); probe(n, -1); probe(n, 0);
      repeat (100) probe(n, int'($urandom_range(32767)) - 16384);
    end
    for (int n = 1; n <= P; n++) begin
      @(negedge clk);
      bval[n] = -int'($urandom_range(14));
      cfg_we = 1; cfg_idx = SEL_W'(n); cfg_b = B_W'(bval[n]);
    end
    @(negedge clk);
    cfg_we = 0;
    for (int n = 1; n <= P; n++) repeat (100) probe(n, int'($urandom_range(32767)) - 16384);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
