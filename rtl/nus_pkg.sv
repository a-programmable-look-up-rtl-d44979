// nus_pkg: types and constants shared by the nonuniform-sampling LUT interpolator.
//
// The interpolator splits the input domain [-1, 1) into P = 22 partitions. Partition n is
// sampled on a uniform grid of pitch 2/f_n (f_n a power of two, 2..32768), so each partition
// needs its own way of turning x into a RAM address and a residual x - x_nm. Six small
// per-partition tables drive that: the Corrected Superior Limit CSL_n, the displacement
// Dsp_n = f_n/2, the address offset Add log_n, and the bit-selection counts B_n = 1-log2(f_n),
// D_n = log2(f_n) and S_n = 15-log2(f_n) (7 where f_n = 2^15, a partition whose samples map
// one to one onto the inputs and whose residual is always zero).
//
// Input format: 15-bit two's complement with 14 fraction bits, as in the source design.
// Table widths are this design's choice: each holds the full range of its equation.
//
// The reset contents of the tables are sampling scheme alpha (a Gaussian-noise oriented
// scheme with fine sampling near +-1 and coarse sampling near 0): CSL_n is stored as an integer
// count of 2^-14, log2(f_n) and Add log_n are listed per partition and the other fields follow
// from log2(f_n) by the equations above.
package nus_pkg;

  localparam int P      = 22;  // number of partitions
  localparam int X_W    = 15;  // input width
  localparam int X_FRAC = 14;  // input fraction bits (binary point position d)
  localparam int SEL_W  = 5;   // partition number 1..P
  localparam int DSP_W  = 16;  // Dsp_n = f_n/2 <= 16384, unsigned
  localparam int LOG_W  = 16;  // Add log_n, signed
  localparam int B_W    = 5;   // B_n in -14..0, signed
  localparam int CNT_W  = 4;   // D_n and S_n in 0..15

  typedef logic signed [X_W-1:0]   x_t;
  typedef logic        [SEL_W-1:0] sel_t;

  // One partition's entry of the six configuration tables.
  typedef struct packed {
    logic signed [X_W-1:0]   csl;      // Corrected Superior Limit, x format
    logic        [DSP_W-1:0] dsp;      // Displacement f_n/2
    logic signed [LOG_W-1:0] add_log;  // Address Logic offset
    logic signed [B_W-1:0]   b;        // B_n = 1 - log2(f_n)
    logic        [CNT_W-1:0] d;        // D_n = log2(f_n)
    logic        [CNT_W-1:0] s;        // S_n
    logic                    one2one;  // f_n = 2^15: the residual is forced to zero
  } nus_cfg_t;

  // Scheme alpha, partitions 1..22 (array index n-1).
  localparam int ALPHA_CSL [P] = '{
    -16347, -16309, -16225, -16065, -15713, -14977, -13441, -10497, -5633, -2049, -1,
      1023,   5119,  10239,  13311,  14911,  15679,  16047,  16215, 16303, 16343, 16382};
  localparam int ALPHA_LOG2F [P] = '{
    15, 14, 13, 12, 11, 10, 9, 8, 7, 6, 5, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15};
  localparam int ALPHA_ADDLOG [P] = '{
    0, 19, 38, 58, 78, 99, 121, 144, 167, 188, 202,
    202, 185, 143, 39, -193, -682, -1684, -3711, -7786, -15958, -32322};

  // Build a table entry from CSL_n (in units of 2^-14), log2(f_n) and Add log_n.
  function automatic nus_cfg_t make_cfg(logic signed [X_W-1:0] csl, int log2f,
                                        logic signed [LOG_W-1:0] add_log);
    nus_cfg_t c;
    c.csl     = csl;
    c.dsp     = DSP_W'(1 << (log2f - 1));
    c.add_log = add_log;
    c.b       = B_W'(1 - log2f);
    c.d       = CNT_W'(log2f);
    c.s       = CNT_W'((log2f == 15) ? 7 : 15 - log2f);
    c.one2one = (log2f == 15);
    return c;
  endfunction

  // Reset entry of partition n (1..P): scheme alpha.
  function automatic nus_cfg_t alpha_cfg(int n);
    return make_cfg(X_W'(ALPHA_CSL[n-1]), ALPHA_LOG2F[n-1], LOG_W'(ALPHA_ADDLOG[n-1]));
  endfunction

endpackage
