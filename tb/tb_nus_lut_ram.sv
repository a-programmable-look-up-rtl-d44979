// tb_nus_lut_ram: self-checking test of the 512-word sample RAM.
// Fills every word in 512 consecutive write clocks, then reads back in random order checking
// the one-clock read latency, overwrites random words and reads again, all against a shadow
// array.
module tb_nus_lut_ram;
  localparam int DEPTH = 512, W = 32;
  logic clk = 0, we = 0;
  logic [8:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  nus_lut_ram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(int a);
    @(negedge clk);
    we = 0; addr = 9'(a);
    @(posedge clk);
    #1;
    checks++;
    if (rdata !== shadow[a]) begin
      failures++;
      $display("FAIL addr=%0d rdata=%h expected %h", a, rdata, shadow[a]);
    end
  endtask

  initial begin
    int fill_cycles;
    fill_cycles = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; addr = 9'(a); wdata = $urandom; shadow[a] = wdata;
      fill_cycles++;
    end
    checks++;
    if (fill_cycles != 512) failures++;
    repeat (1000) read_check(int'($urandom_range(DEPTH - 1)));
    repeat (300) begin
      int a;
      a = int'($urandom_range(DEPTH - 1));
      @(negedge clk);
      we = 1; addr = 9'(a); wdata = $urandom; shadow[a] = wdata;
    end
    for (int a = 0; a < DEPTH; a++) read_check(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
