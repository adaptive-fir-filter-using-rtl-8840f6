// sign_mag_separator: splits the L-bit two's-complement error e into its sign
// bit and its magnitude |e|. The magnitude is L bits wide so that |-2^(L-1)|
// fits. The sign steers the weight adders between add and subtract; the
// magnitude feeds the control-word generator. Purely combinational.
// The block's role is from the filter's description; its insides are the
// obvious ones.
module sign_mag_separator #(
  parameter int unsigned L = da_lms_pkg::DA_L
) (
  input  logic signed [L-1:0] e,
  output logic                sign,
  output logic        [L-1:0] mag
);
  assign sign = e[L-1];
  assign mag  = sign ? L'(-e) : L'(e);
endmodule
