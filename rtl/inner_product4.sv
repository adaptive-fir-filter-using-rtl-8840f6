// inner_product4: four-point distributed-arithmetic inner-product block.
//
// Computes y = sum_{k=0..3} w_k * x(n-k) without multipliers. The DA table
// holds all 16 subset sums of the four latest samples; each bit cycle the
// bit slice a = {w3[l], w2[l], w1[l], w0[l]} of the weights drives a 16-to-1
// multiplexer that picks the matching table word, and the carry-save
// accumulator shift-accumulates it, subtracting on the sign slice.
// Interface:
//   x_in          new sample x(n+1), taken into the table when `last` is high
//   a             weight bit slice for the current bit cycle (bit k from w_k)
//   first, last   first and last bit cycle of a sample period (from bit_timer)
//   s_o, c_o      sum and carry word of the product of the previous period;
//                 the product is (s_o + 2*c_o + 1) >> 1
//   x_tap[j]      x(n-j), the samples now in the table
// Timing: the bit slices must come LSB first, one per cycle, with `last` on the
// sign slice. The product of the samples and weights of a period appears in
// s_o/c_o at the sample edge that ends it, together with the table update.
// Structure and word widths follow the filter's description; the mux order
// follows the table-content formula (address bit j selects x(n-j)).
module inner_product4 #(
  parameter int unsigned L = da_lms_pkg::DA_L
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                first,
  input  logic                last,
  input  logic signed [L-1:0] x_in,
  input  logic        [3:0]   a,
  output logic signed [L+1:0] s_o,
  output logic signed [L+1:0] c_o,
  output logic signed [L-1:0] x_tap [4]
);
  logic signed [L+1:0] entry [16];
  logic signed [L+1:0] t_sel;

  da_table #(.L(L)) u_table (
    .clk(clk), .rst_n(rst_n), .load(last), .x_in(x_in),
    .entry(entry), .x_tap(x_tap)
  );

  assign t_sel = entry[a];   // 16-to-1 multiplexer

  csa_accumulator #(.L(L), .W(L + 2)) u_acc (
    .clk(clk), .rst_n(rst_n), .first(first), .sub(last),
    .t_in(t_sel), .s_o(s_o), .c_o(c_o)
  );
endmodule
