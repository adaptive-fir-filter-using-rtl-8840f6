// weight_increment: weight registers and update logic of one four-point block.
//
// Holds the four L-bit weights w_k of a block. Each bit cycle it presents the
// bit slice a = {w3[l], w2[l], w1[l], w0[l]} selected by bit_idx to the
// inner-product block. At the sample edge (update = 1) it applies the
// delayed-LMS step with a power-of-two step size:
//     w_k <= w_k + (sign ? -(x_k >>> t) : (x_k >>> t))   if upd
// using four barrel shifters and four adder/subtractors. x_k are the samples
// that produced the error now in use (x(n-2) .. x(n-5) for the small filter:
// an adaptation delay of two sample periods). Sums beyond the L-bit range
// saturate; saturation and the reset value 0 are this design's choices.
// Interface: clk, rst_n, update (sample edge), bit_idx (0..L-1, LSB first),
// x[4], sign, t, upd in; a (bit slice) and w[4] out.
module weight_increment #(
  parameter int unsigned L  = da_lms_pkg::DA_L,
  parameter int unsigned TW = da_lms_pkg::DA_TW,
  parameter int unsigned CW = $clog2(L)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                update,
  input  logic        [CW-1:0] bit_idx,
  input  logic signed [L-1:0] x [4],
  input  logic                sign,
  input  logic        [TW-1:0] t,
  input  logic                upd,
  output logic        [3:0]   a,
  output logic signed [L-1:0] w [4]
);
  localparam logic signed [L+1:0] WMAX = (L+2)'((1 << (L - 1)) - 1);
  localparam logic signed [L+1:0] WMIN = -(L+2)'(1 << (L - 1));

  logic signed [L-1:0] w_next [4];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      logic signed [L-1:0] shifted;
      logic signed [L+1:0] total;
      shifted = x[k] >>> t;                               // barrel shifter
      total   = (L+2)'(w[k]) + (sign ? -(L+2)'(shifted) : (L+2)'(shifted));
      if (total > WMAX)      w_next[k] = WMAX[L-1:0];
      else if (total < WMIN) w_next[k] = WMIN[L-1:0];
      else                   w_next[k] = total[L-1:0];
      a[k] = w[k][bit_idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) w[k] <= '0;
    end else if (update && upd) begin
      for (int k = 0; k < 4; k++) w[k] <= w_next[k];
    end
  end
endmodule
