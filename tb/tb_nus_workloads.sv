// tb_nus_workloads: the 24 configurations of the evaluation (sampling schemes alpha, beta and
// gamma, each with the eight functions g1..g8) run on the interpolator at its default size,
// followed by the uniform comparison scheme (f = 128 everywhere, 127 words) with g1.
//
// For each configuration the RAMs and partition tables are reloaded on the fly (512 clocks, no
// reset in between), then 4096 inputs spread over the whole domain (every eighth code from a
// random offset) stream through one per clock. Every output is checked bit-exactly against the
// model in nus_tb_pkg, and the largest absolute approximation error against the real-valued
// function is printed for each configuration. Only scheme alpha with g1 carries an error
// requirement (below 3.0518e-5). The cubic g5 is also held against the published error peaks
// read off its error plots (about 2.8e-4, 1.75e-3 and 1.38e-3 for alpha, beta and gamma): the
// measured peak must lie within -30 %/+15 % of them (inputs are sampled every eighth code, so a
// peak can be slightly missed). The uniform scheme must stay above 3.0518e-5, which is why the
// nonuniform scheme exists. The other figures are for information. Derivatives that do not
// fit in 32 bits (g3 near +-1) are stored saturated; the model applies the same saturation.
// Noise-generator view: the evenly spread inputs stand for uniform noise, so for scheme alpha
// the mean of the outputs must match the mean of g over a uniform input (g1: 0, g2: 3, g5: 0,
// g6: 1/3, g7: -7/3) and for g1 the standard deviation must be sigma = 0.3 (Gaussian output).
module tb_nus_workloads;
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

  int checks = 0, failures = 0, n_reconfig = 0;
  real max_err, sum_out, sum_sq;
  int n_out;

  typedef struct { bit valid; int x; int e; } pend_t;
  pend_t q [$];

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(pend_t item, int fidx);
    pend_t o;
    real err;
    q.push_back(item);
    @(posedge clk);
    #1;
    if (q.size() >= 6) begin
      o = q.pop_front();
      if (o.valid) begin
        checks++;
        if (int'(lut_out) != o.e || int'(ent) != o.x) begin
          failures++;
          if (failures < 10) $display("FAIL g%0d x=%0d out=%0d expected %0d", fidx, o.x, lut_out, o.e);
        end
        err = real'(lut_out) / real'(longint'(1) << frac_of(fidx));
        sum_out += err;
        sum_sq += err * err;
        n_out++;
        err = err - gfun(fidx, real'(o.x) / 16384.0);
        if (err < 0.0) err = -err;
        if (err > max_err) max_err = err;
      end
    end
    @(negedge clk);
  endtask

  task automatic drain(int fidx);
    pend_t idle;
    idle.valid = 0; idle.x = 0; idle.e = 0;
    repeat (6) step(idle, fidx);
  endtask

  task automatic run_config(int s, int fidx);
    scheme_t sc;
    mem_t ord, der;
    pend_t it, idle;
    int off;
    idle.valid = 0; idle.x = 0; idle.e = 0;
    sc = make_scheme(s);
    make_image(sc, fidx, ord, der);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; ad = 9'(a); r1 = ord[a]; r2 = der[a];
      cfg_we = (a < P); cfg_idx = SEL_W'(a + 1);
      if (a < P) cfg = sc.cfg[a + 1];
      step(idle, fidx);
    end
    we = 0; cfg_we = 0;
    n_reconfig++;
    max_err = 0.0;
    sum_out = 0.0; sum_sq = 0.0; n_out = 0;
    off = int'($urandom_range(7));
    for (int xi = -16384 + off; xi <= 16382; xi += 8) begin
      lut_in = X_W'(xi);
      it.valid = 1; it.x = xi; it.e = expect_out(sc, ord, der, xi);
      step(it, fidx);
    end
    drain(fidx);
    $display("INFO scheme %s g%0d words=%0d max|error|=%e mean=%f", (s == 0) ? "alpha" : (s == 1) ? "beta " : (s == 2) ? "gamma" : "unif ",
             fidx, sc.total, max_err, sum_out / n_out);
    if (s == 0 && (fidx == 1 || fidx == 2 || fidx == 5 || fidx == 6 || fidx == 7)) begin
      real m, want;
      m = sum_out / n_out;
      want = (fidx == 2) ? 3.0 : (fidx == 6) ? 1.0 / 3.0 : (fidx == 7) ? -7.0 / 3.0 : 0.0;
      checks++;
      if (m - want > 0.005 || want - m > 0.005) begin
        failures++;
        $display("FAIL alpha/g%0d output mean %f, expected %f", fidx, m, want);
      end
      if (fidx == 1) begin
        real sd;
        sd = $sqrt(sum_sq / n_out - m * m);
        $display("INFO alpha/g1 output standard deviation %f", sd);
        checks++;
        if (sd - 0.3 > 0.005 || 0.3 - sd > 0.005) begin
          failures++;
          $display("FAIL alpha/g1 output standard deviation %f, expected 0.3", sd);
        end
      end
    end
    if (fidx == 5 && s < 3) begin
      real peak;
      peak = (s == 0) ? 2.8e-4 : (s == 1) ? 1.75e-3 : 1.38e-3;
      checks++;
      if (max_err < 0.7 * peak || max_err > 1.15 * peak) begin
        failures++;
        $display("FAIL g5 scheme %0d peak error %e, published about %e", s, max_err, peak);
      end
    end
    if (s == 3) begin
      checks++;
      if (max_err < 3.0518e-5) begin failures++; $display("FAIL uniform g1 error unexpectedly small"); end
    end
    if (s == 0 && fidx == 1) begin
      checks++;
      if (max_err >= 3.0518e-5) begin failures++; $display("FAIL alpha/g1 error above 3.0518e-5"); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int s = 0; s < 3; s++)
      for (int f = 1; f <= NF; f++)
        run_config(s, f);
    run_config(3, 1);
    checks++;
    if (n_reconfig != 3 * NF + 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
