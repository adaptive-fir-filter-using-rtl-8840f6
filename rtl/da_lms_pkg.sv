// da_lms_pkg: constants shared by the distributed-arithmetic (DA) LMS filter.
//
// The filter works on L-bit two's-complement samples and weights. The weights
// are read one bit slice per fast "bit clock" cycle, so one sample period is L
// bit cycles. A four-point inner-product block is the building unit (P = 4);
// a filter of length N uses N/P of them. The barrel-shifter control word that
// stands in for mu*|e| is TW = 3 bits wide.
//
// N = 16 and P = 4 are the sizes of the large-order structure; N = 4 gives the
// small-order structure. L = 8 and the 3-bit control word are this design's
// choice for L (the source figures print only the 3-bit width of t).
package da_lms_pkg;

  localparam int unsigned DA_L  = 8;   // sample and weight word length
  localparam int unsigned DA_N  = 16;  // filter length of the top level
  localparam int unsigned DA_P  = 4;   // points per inner-product block
  localparam int unsigned DA_TW = 3;   // width of the barrel-shifter control word

endpackage
