// control_word_gen: turns the error magnitude into the barrel-shift amount t.
//
// The weight update w += mu * e * x is done without a multiplier: mu*|e| is
// rounded down to a power of two, 2^-t, so that the increment is x >> t. With
// the leading one of |e| at bit p, t = (L-1) - p, i.e. mu*|e| is taken as
// 2^p / 2^(L-1). For L = 8 that spans exactly the 3-bit t (0..7). A zero error
// gives upd = 0: no weight changes. If (L-1) - p does not fit in TW bits the
// update is skipped too, since the increment would be below the weight LSB.
// The 3-bit width of t is from the filter's description; the mapping from |e|
// to t (and so the effective step size) is this design's choice.
// Interface: mag in; t and upd out. Purely combinational.
module control_word_gen #(
  parameter int unsigned L  = da_lms_pkg::DA_L,
  parameter int unsigned TW = da_lms_pkg::DA_TW
) (
  input  logic [L-1:0]  mag,
  output logic [TW-1:0] t,
  output logic          upd
);
  int unsigned p;      // position of the leading one
  int unsigned shift;

  always_comb begin
    p = 0;
    for (int unsigned i = 0; i < L; i++) if (mag[i]) p = i;
    shift = (L - 1) - p;
    upd   = (mag != '0) && (shift < (1 << TW));
    t     = TW'(shift);
  end
endmodule
