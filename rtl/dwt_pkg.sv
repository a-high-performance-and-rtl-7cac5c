// dwt_pkg: types and constants shared by the lifting-based 2-D DWT.
//
// Sample format: every internal sample is a 16-bit two's-complement fixed-point
// word with 11 integer bits (sign included) and 5 fraction bits (Q11.5). The
// word split and the 5 fraction bits follow the precision study that picks
// 11 integer and 5 fraction bits so that no internal value overflows.
//
// Coefficients: 16-bit two's-complement words with 12 fraction bits (Q4.12).
// The 9/7 values are exactly the 12-bit binary forms of the merged lifting
// coefficients (beta, beta*alpha, delta/beta, delta*gamma, K2/delta, K1), the
// second-step pair halved and the scaling pair doubled to keep internal values
// below 4 times the input range. The 5/3 values (beta = 1/4,
// beta*alpha = -1/8) follow from the reversible 5/3 lifting steps.
// The inverse 9/7 values are the printed inverse coefficients (K2^-1,
// gamma*K1^-1, delta*gamma, alpha/gamma, beta*alpha, alpha^-1, with their
// printed scalings); the two that the inverse equations subtract are stored
// negated. The inverse 5/3 values (1/2, -1/8) are this design's own, derived
// from the reversible inverse steps.
package dwt_pkg;

  localparam int unsigned DATA_W = 16;  // sample word
  localparam int unsigned FRAC_W = 5;   // fraction bits of a sample
  localparam int unsigned COEF_W = 16;  // coefficient word
  localparam int unsigned COEF_FB = 12; // fraction bits of a coefficient
  localparam int unsigned PIX_W  = 8;   // raw pixel width

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Filter selection of a processor or of the whole transform.
  typedef enum logic {F53 = 1'b0, F97 = 1'b1} filter_e;

  // Sub-band code: bit 1 = high-pass along columns (vertical),
  // bit 0 = high-pass along rows (horizontal).
  typedef enum logic [1:0] {BAND_LL = 2'b00, BAND_HL = 2'b01,
                            BAND_LH = 2'b10, BAND_HH = 2'b11} band_e;

  // One half (0.5) in the sample format.
  localparam sample_t HALF = sample_t'(1 <<< (FRAC_W - 1));

  // ---- 9/7 forward coefficients, Q4.12 ----------------------------------
  // beta              = -0.052978515625  (.000011011001)
  localparam coef_t C97_BETA      = -16'sd217;
  // beta*alpha        =  0.083984375     (.000101011000)
  localparam coef_t C97_BETA_ALPHA =  16'sd344;
  // (delta/beta)>>1   = -4.185546875     (100.001011111)
  localparam coef_t C97_DELTA_BETA = -16'sd17144;
  // (delta*gamma)>>1  =  0.195556640625  (.001100100001)
  localparam coef_t C97_DELTA_GAMMA = 16'sd801;
  // (K2/delta)<<1     =  5.546875        (101.100011000)
  localparam coef_t C97_K2_DELTA  =  16'sd22720;
  // (K1)<<1           =  1.62548828125   (1.10100000001)
  localparam coef_t C97_K1        =  16'sd6658;

  // ---- 5/3 forward coefficients, Q4.12 ----------------------------------
  localparam coef_t C53_BETA       =  16'sd1024;  //  1/4
  localparam coef_t C53_BETA_ALPHA = -16'sd512;   // -1/8

  // ---- 9/7 inverse coefficients, Q4.12 ----------------------------------
  // K2^-1             =  0.812744140625  (.110100000001)
  localparam coef_t C97I_K2_INV   =  16'sd3329;
  // (gamma*K1^-1)>>1  =  0.54296875      (.100010110000)
  localparam coef_t C97I_GAMMA_K1 =  16'sd2224;
  // (delta*gamma)>>1  =  0.195556640625, used with a minus sign
  localparam coef_t C97I_DELTA_GAMMA = -16'sd801;
  // (alpha/gamma)>>1  = -0.898193359375  (.111001011111)
  localparam coef_t C97I_ALPHA_GAMMA = -16'sd3679;
  // (beta*alpha)>>1   =  0.0419921875, used with a minus sign
  localparam coef_t C97I_BETA_ALPHA = -16'sd172;
  // (alpha^-1)<<2     = -2.521484375     (10.1000010110)
  localparam coef_t C97I_ALPHA_INV = -16'sd10328;
  // 1 and 2, for samples that pass a scaling multiplier unchanged or doubled
  localparam coef_t C_ONE = 16'sd4096;
  localparam coef_t C_TWO = 16'sd8192;

  // ---- 5/3 inverse coefficients, Q4.12 ----------------------------------
  localparam coef_t C53I_S =  16'sd2048;  //  1/2
  localparam coef_t C53I_D = -16'sd512;   // -1/8
  // One quarter (0.25) in the sample format.
  localparam sample_t QUARTER = sample_t'(1 <<< (FRAC_W - 2));

  // Fixed-point product: sample (Q11.5) times coefficient (Q4.12), truncated
  // (rounded towards minus infinity) back to Q11.5.
  function automatic sample_t mul_coef(sample_t x, coef_t c);
    logic signed [DATA_W+COEF_W-1:0] p;
    p = x * c;
    return sample_t'(p >>> COEF_FB);
  endfunction

endpackage
