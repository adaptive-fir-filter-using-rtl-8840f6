// csa_accumulator: conditional signed carry-save shift accumulator.
//
// Over the L bit cycles of a sample period it accumulates the DA-table words
// selected by the weight bit slices, LSB slice first, and leaves the inner
// product as a sum word and a carry word, so no carry ever ripples inside the
// bit-cycle loop: the bit cycle is one table read plus one full-adder delay.
//
// Each cycle a row of W full adders adds the held sum word S, the held carry
// word C and the table word T. For the sign (MSB) slice of two's-complement
// weights the table word must be subtracted: `sub` inverts it and the matching
// +1 is not added here but left to the final adder as a carry-in. Between
// cycles the new sum word is shifted right by one (arithmetic) and the new
// carry word is kept as it is; that is exactly a right shift of S + 2C, so
// with V = S + C the recursion is V' = floor((V + T) / 2) with no error beyond
// the truncation a plain shift-accumulator makes. On `first` the held words
// are replaced by zero, which starts a new inner product.
// On the `sub` cycle the unshifted sum and carry words of the adder row are
// latched into s_o and c_o. The carry word has twice the weight of the sum
// word, and the result is
//     (s_o + 2*c_o + 1) / 2   =  floor(sum_k x_k w_k / 2^L)  for one block.
// s_o/c_o reset to -1/0, the words that an all-zero inner product leaves.
// Word widths W = L+2 follow the filter's description; the shift direction,
// the zero start and deferring the +1 to the final adder are this design's.
module csa_accumulator #(
  parameter int unsigned L = da_lms_pkg::DA_L,
  parameter int unsigned W = L + 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                first,   // first bit cycle of a sample period
  input  logic                sub,     // sign slice: subtract the table word
  input  logic signed [W-1:0] t_in,    // selected DA-table word
  output logic signed [W-1:0] s_o,     // sum word of the finished product
  output logic signed [W-1:0] c_o      // carry word, weight 2
);
  logic signed [W-1:0] s_q, c_q;
  logic        [W-1:0] a_op, b_op, t_op, sum_w, car_w;

  always_comb begin
    a_op = first ? '0 : s_q;
    b_op = first ? '0 : c_q;
    t_op = sub ? ~t_in : t_in;
  end

  for (genvar i = 0; i < W; i++) begin : g_row
    full_adder u_fa (
      .a(a_op[i]), .b(b_op[i]), .cin(t_op[i]),
      .s(sum_w[i]), .cout(car_w[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
      c_q <= '0;
      s_o <= '1;
      c_o <= '0;
    end else begin
      s_q <= $signed(sum_w) >>> 1;
      c_q <= $signed(car_w);
      if (sub) begin
        s_o <= $signed(sum_w);
        c_o <= $signed(car_w);
      end
    end
  end
endmodule
