// tb_nus_interpolator: end-to-end test of the interpolator at its default size (512-word RAMs,
// 32-bit data), used as the full-size test.
//
// Three on-the-fly reconfigurations are run back to back without reset:
//   scheme alpha with g1(x) = sqrt(2) * 0.3 * erfinv(x)  (Gaussian noise generator)
//   scheme beta  with g5(x) = x^3
//   scheme gamma with g7(x) = -x^2 - 2x - 2
// Each reconfiguration writes all 512 RAM words through the external address port while the 22
// partition entries are written in parallel, and must take exactly 512 clocks. Then a stream of
// inputs (uniformly distributed codes from $urandom, every partition limit and its neighbours,
// both ends of the domain) enters one per clock, and each lut_out is checked six clocks later
// against a bit-exact model worked out from the partition limits, together with ent, the
// echoed input. For scheme alpha the approximation error of g1 is measured too and must stay
// below 3.0518e-5 (2^-15).
//
// Counted mechanisms (each must occur): reconfiguration, RAM writes through the address
// multiplexer, inputs in each of the 22 partitions, inputs in one-to-one partitions
// (f = 2^15, residual forced to zero), nonzero residuals.
module tb_nus_interpolator;
  import nus_pkg::*;
  import nus_tb_pkg::*;

  logic clk = 0, rst = 1;
  logic signed [X_W-1:0] lut_in = '0, ent;
  logic signed [31:0] r1 = '0, r2 = '0, lut_out;
  logic we = 0, cfg_we = 0;
  logic [8:0] ad = '0;
  logic [SEL_W-1:0] cfg_idx = '0;
  nus_cfg_t cfg = '0;

  nus_interpolator dut (.*);

  int checks = 0, failures = 0;
  int n_reconfig = 0, n_mux_writes = 0, n_one2one = 0, n_nonzero_diff = 0;
  int part_hits [1:P];
  real max_err;

  typedef struct { bit valid; int x; int e; } pend_t;
  pend_t q [$];

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock: drive at the falling edge, check what leaves the pipeline after the rising edge.
  task automatic step(pend_t item, int fidx, bit measure);
    pend_t o;
    q.push_back(item);
    @(posedge clk);
    #1;
    if (q.size() >= 6) begin
      o = q.pop_front();
      if (o.valid) begin
        checks++;
        if (int'(lut_out) != o.e || int'(ent) != o.x) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d out=%0d expected %0d ent=%0d", o.x, lut_out, o.e, ent);
        end
        if (measure) begin
          real err;
          err = real'(lut_out) / real'(longint'(1) << frac_of(fidx)) - gfun(fidx, real'(o.x) / 16384.0);
          if (err < 0.0) err = -err;
          if (err > max_err) max_err = err;
        end
      end
    end
    @(negedge clk);
  endtask

  task automatic reconfigure(scheme_t sc, mem_t ord, mem_t der, int fidx);
    int cycles;
    pend_t idle;
    idle.valid = 0; idle.x = 0; idle.e = 0;
    cycles = 0;
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; ad = 9'(a); r1 = ord[a]; r2 = der[a];
      cfg_we = (a < P); cfg_idx = SEL_W'(a + 1);
      if (a < P) cfg = sc.cfg[a + 1];
      n_mux_writes++;
      cycles++;
      step(idle, fidx, 0);
    end
    we = 0; cfg_we = 0;
    n_reconfig++;
    checks++;
    if (cycles != 512) begin failures++; $display("FAIL reconfiguration took %0d clocks", cycles); end
  endtask

  task automatic apply(scheme_t sc, mem_t ord, mem_t der, int fidx, int xi, bit measure);
    pend_t it;
    int n, a, d;
    lut_in = X_W'(xi);
    it.valid = 1; it.x = xi; it.e = expect_out(sc, ord, der, xi);
    n = part_of(sc, xi);
    part_hits[n]++;
    addr_diff(sc, xi, a, d);
    if (sc.pitch[n] == 1) n_one2one++;
    if (d != 0) n_nonzero_diff++;
    step(it, fidx, measure);
  endtask

  task automatic run_scheme(int s, int fidx, int nrand);
    scheme_t sc;
    mem_t ord, der;
    sc = make_scheme(s);
    make_image(sc, fidx, ord, der);
    reconfigure(sc, ord, der, fidx);
    for (int n = 1; n <= P; n++) part_hits[n] = 0;
    max_err = 0.0;
    apply(sc, ord, der, fidx, -16384, s == 0);
    apply(sc, ord, der, fidx, 16382, s == 0);
    for (int n = 1; n <= P; n++)
      for (int dd = -1; dd <= 1; dd++)
        if (sc.csl[n] + dd >= -16384 && sc.csl[n] + dd <= 16382)
          apply(sc, ord, der, fidx, sc.csl[n] + dd, s == 0);
    repeat (nrand) apply(sc, ord, der, fidx, int'($urandom_range(32766)) - 16384, s == 0);
    for (int n = 1; n <= P; n++) begin
      checks++;
      if (part_hits[n] == 0 && sc.qmr[n] > 0) begin
        failures++;
        $display("FAIL scheme %0d: partition %0d never used", s, n);
      end
    end
    if (s == 0) begin
      $display("INFO scheme alpha, g1: max |error| = %e over %0d inputs", max_err, nrand + 2 + 3 * P);
      checks++;
      if (max_err >= 3.0518e-5) begin failures++; $display("FAIL approximation error too large"); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    run_scheme(0, 1, 4000);
    run_scheme(1, 5, 2000);
    run_scheme(2, 7, 2000);
    // drain
    repeat (8) begin
      pend_t idle;
      idle.valid = 0; idle.x = 0; idle.e = 0;
      step(idle, 1, 0);
    end
    $display("INFO reconfigurations=%0d mux_writes=%0d one_to_one=%0d nonzero_residual=%0d",
             n_reconfig, n_mux_writes, n_one2one, n_nonzero_diff);
    checks++;
    if (n_reconfig != 3 || n_mux_writes == 0 || n_one2one == 0 || n_nonzero_diff == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
