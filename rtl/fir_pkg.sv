// fir_pkg: widths, sizes and the default coefficient set shared by the
// 32-tap audio FIR filter.
//
// The filter takes 10-bit two's-complement samples and produces 16-bit
// outputs; 32 taps with even symmetry, h[k] = h[31-k].  The tap count,
// the sample width, the output width, the 64-entry memories and the
// 16-bit Baugh-Wooley multiplier width follow the source design.
// Coefficients are held as 16-bit signed numbers with 13 fraction bits
// (Q2.13), chosen so that the largest printed coefficient (1.5443) fits,
// and so that a 16 x 16 multiplier gives the 32-bit MAC result.  This
// format is this design's choice.
//
// H_DEFAULT holds round(h[k] * 8192) for the 16 unique coefficients
// h[0]..h[15]; h[0]..h[11] are the published values; h[12]..h[15] are
// not specified and are set to zero.
package fir_pkg;

  localparam int TAPS      = 32;   // filter length
  localparam int HALF      = TAPS / 2;  // unique coefficients
  localparam int DATA_W    = 10;   // input sample width
  localparam int COEF_W    = 16;   // coefficient width (Q2.13)
  localparam int COEF_FRAC = 13;   // fraction bits of a coefficient
  localparam int ACC_W     = 32;   // MAC / DA accumulator width
  localparam int OUT_W     = 16;   // output sample width
  localparam int MEM_DEPTH = 64;   // XRAM and BRAM depth
  localparam int MEM_AW    = $clog2(MEM_DEPTH);

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic signed [OUT_W-1:0]  out_t;

  // 16 unique coefficients, element k is h[k].
  typedef logic [HALF-1:0][COEF_W-1:0] coef_vec_t;

  localparam coef_vec_t H_DEFAULT = {
    16'sd0,     16'sd0,     16'sd0,     16'sd0,      // h[15]..h[12]
    -16'sd8658, 16'sd9845,  16'sd12651, 16'sd511,    // h[11]..h[8]
    16'sd8007,  -16'sd193,  -16'sd5482, 16'sd75,     // h[7]..h[4]
    16'sd2892,  16'sd8987,  -16'sd6644, 16'sd803     // h[3]..h[0]
  };

  // Coefficient of tap i (0..TAPS-1) of a symmetric filter.
  function automatic coef_t tap_coef(coef_vec_t h, int i);
    return coef_t'(h[(i < HALF) ? i : TAPS - 1 - i]);
  endfunction

endpackage
