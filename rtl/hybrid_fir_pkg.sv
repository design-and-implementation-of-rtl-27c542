// hybrid_fir_pkg: constants and types shared by the hybrid form FIR filter.
//
// The reference configuration is the eighth-order filter (nine taps) split
// into three subsections of three taps each, the example structure of the
// design. Sample and coefficient word lengths, and the default coefficient
// set, are this design's own choices: signed 16-bit fixed point, with the
// coefficients a Hamming-windowed low-pass (cut-off 0.2 of the sample rate)
// in Q15, scaled so they sum to 32768 (unity DC gain).
package hybrid_fir_pkg;

  // Word lengths (design choice: 16-bit signed fixed point).
  parameter int unsigned DEF_DATA_W = 16;
  parameter int unsigned DEF_COEF_W = 16;

  // Reference configuration: order 8, three subsections of length 3.
  parameter int unsigned DEF_NTAPS = 9;
  parameter int unsigned DEF_NSEC  = 3;

  typedef int unsigned sec_len_t [DEF_NSEC];
  typedef logic signed [DEF_COEF_W-1:0] def_coef_t [DEF_NTAPS];

  parameter sec_len_t DEF_SEC_LEN = '{3, 3, 3};

  // h[0] .. h[8]; symmetric, so the filter has linear phase.
  parameter def_coef_t DEF_COEFS = '{
    -16'sd201, -16'sd445, 16'sd1679, 16'sd8705, 16'sd13292,
     16'sd8705, 16'sd1679, -16'sd445, -16'sd201
  };

endpackage
