// tb_nus_adder: self-checking test of the output adder: s = sat32(a + floor(b / 2^14)), one clock
// after the operands, with a (32-bit ordinate) and b (47-bit product) random, plus cases that
// saturate high and low.
module tb_nus_adder;
  logic clk = 0, rst = 1;
  logic signed [31:0] a = '0;
  logic signed [46:0] b = '0;
  logic signed [31:0] s;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  nus_adder #(.ORD_W(32), .PROD_W(47), .SHIFT(14), .OUT_W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(longint x, longint y);
    longint q, r;
    q = y / 16384;
    r = y % 16384;
    if (r < 0) q = q - 1;           // floor
    r = x + q;
    if (r > 64'sd2147483647) return 64'sd2147483647;
    if (r < -64'sd2147483648) return -64'sd2147483648;
    return r;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < 3000; c++) begin
      longint e;
      case (c % 20)
        0: begin a = 32'sh7FFFFF00; b = 47'sd1 <<< 40; end
        1: begin a = 32'sh80000100; b = -(47'sd1 <<< 40); end
        default: begin a = $urandom; b = 47'({$urandom, $urandom}); end
      endcase
      e = model(longint'(a), longint'(b));
      if (e == 64'sd2147483647) sat_hi++;
      if (e == -64'sd2147483648) sat_lo++;
      @(posedge clk);
      #1;
      checks++;
      if (longint'(s) != e) begin
        failures++;
        $display("FAIL a=%0d b=%0d s=%0d expected %0d", a, b, s, e);
      end
      @(negedge clk);
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
