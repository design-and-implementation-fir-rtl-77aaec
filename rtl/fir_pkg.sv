// fir_pkg: sizes and the default coefficient set shared by the three FIR
// filter implementations (serial MAC, parallel transposed, serial DA).
//
// The filters are 16-tap, with 16-bit signed samples and 16-bit signed
// coefficients. The output is kept at full precision: a product needs
// DATA_W+COEF_W bits and a sum of NTAPS products log2(NTAPS) more, so no
// rounding or saturation happens anywhere.
//
// The coefficient values are this design's own choice: a 16-tap raised-cosine
// pulse (roll-off 0.5, 4 samples per symbol) scaled so its peak is 32734, as
// used for pulse shaping. Any other set can be given through the COEF
// parameters of the filters.
package fir_pkg;

  localparam int NTAPS  = 16;
  localparam int DATA_W = 16;
  localparam int COEF_W = 16;
  localparam int OUT_W  = DATA_W + COEF_W + $clog2(NTAPS);  // 36

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [OUT_W-1:0]  acc_t;

  // h[0] .. h[15]; y[n] = sum_k h[k] * x[n-k]
  localparam coef_t H_DEFAULT [NTAPS] = '{
    -16'sd854,  -16'sd3092, -16'sd4498, -16'sd2681,
     16'sd3907,  16'sd14463, 16'sd25580, 16'sd32734,
     16'sd32734, 16'sd25580, 16'sd14463, 16'sd3907,
    -16'sd2681, -16'sd4498, -16'sd3092, -16'sd854
  };

endpackage
