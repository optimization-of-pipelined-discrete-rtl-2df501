// dwpt_pkg: widths and number formats shared by the Db2 wavelet packet
// processor.
//
// Samples enter the processor as 16-bit signed integers. Every coefficient
// produced inside (between levels and at the outputs) is a 26-bit signed
// fixed-point word with 10 fractional bits, i.e. the 16-bit integer range
// extended by 10 bits of fraction. The 16-bit input word and the 10 fractional
// bits follow the design description; placing the input at the integer end
// of the 26-bit word is this design's reading of it.
//
// The shift-add coefficient network shifts its operand right by up to 14
// places. AFS_GUARD extra low-order bits are appended before the network so
// that every shift is exact; the filter sum is truncated back to 10
// fractional bits (rounding toward minus infinity) only once, at its output.
package dwpt_pkg;

  localparam int unsigned SAMPLE_W  = 16;  // input sample word
  localparam int unsigned FRAC_W    = 10;  // fractional bits of internal words
  localparam int unsigned DATA_W    = 26;  // internal / output word
  localparam int unsigned AFS_GUARD = 14;  // deepest right shift in the AFS network

  typedef logic signed [DATA_W-1:0] coef_t;

endpackage
