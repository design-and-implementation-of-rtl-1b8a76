// lte_pkg: types and constants shared by the LTE rank-1 precoding transmitter.
//
// All baseband samples are complex numbers with 16-bit signed real and
// imaginary parts. Mapper outputs and precoding weights use the Q3.12 format
// (sign, 3 integer bits, 12 fraction bits), which is the format of the 16-bit
// codebook words 0000101101010000 (+1/sqrt(2)) and 1111010010110000
// (-1/sqrt(2)) that the precoding table of the design uses. The IFFT twiddle
// factors are this design's own Q1.14 choice.
package lte_pkg;

  // Sample width and fraction bits of the mapper/precoder samples.
  localparam int unsigned DW      = 16;
  localparam int unsigned FRAC    = 12;

  // Number of OFDM subcarriers (IFFT size) of the main configuration.
  localparam int unsigned NFFT    = 512;

  // Codebook words for +1/sqrt(2) and -1/sqrt(2) in Q3.12.
  localparam logic signed [DW-1:0] CB_POS = 16'sb0000101101010000; // 2896
  localparam logic signed [DW-1:0] CB_NEG = 16'sb1111010010110000; // -2896

  // 64-QAM amplitude levels 1,3,5,7 scaled by 1/sqrt(42), Q3.12, rounded.
  localparam logic signed [DW-1:0] QAM_L1 = 16'sd632;
  localparam logic signed [DW-1:0] QAM_L3 = 16'sd1896;
  localparam logic signed [DW-1:0] QAM_L5 = 16'sd3160;
  localparam logic signed [DW-1:0] QAM_L7 = 16'sd4424;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Precoder matrix indicator (2-bit precoder matrix estimation).
  typedef logic [1:0] pmi_t;

endpackage
