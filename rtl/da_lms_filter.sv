// da_lms_filter: delayed-LMS adaptive FIR filter on distributed arithmetic.
//
// Filter of length N (default 16; N = 4 gives the small-order filter) made of
// Q = N/4 four-point inner-product blocks, each paired with a weight-increment
// block holding its four weights. The output
//     y(n) = sum_k w_k(n) x(n-k)   (scaled: floor of the DA products / 2^L)
// is formed bit-serially: each of the L bit cycles of a sample period reads
// one bit slice of all weights, and the blocks carry-save accumulate the
// selected DA-table words. The sum words and the carry words of the blocks are
// added in two binary adder trees and combined as y = (S >> 1) + C, the pending
// carry-in bits of the sign-slice subtractions entering the carry tree.
// The error e = (d - y + N/2) >> log2(N) (a rounding shift) is registered,
// split into sign and magnitude, and the magnitude is turned into a
// barrel-shift amount t, so every weight moves by +-(x_k >> t) once per
// sample (power-of-two step size).
//
// Sample timing (one period = L clock cycles; sample_tick is high in the last
// cycle of a period, and inputs are taken at the clock edge that ends it):
//   edge n      x_in = x(n) enters the DA tables, d_in = d(n-1) is registered.
//   period n    y(n) is accumulated with weights w(n); y(n-1) is on y_out.
//   edge n+1    e(n-1) = (d(n-1) - y(n-1) + N/2) >> log2(N) is registered.
//   period n+1  the update w(n+2) = w(n+1) + mu e(n-1) x(n-1) is formed from
//               the samples x(n-1)..x(n-N) and applied at edge n+2.
// So d must be supplied one sample after its x, as in the source structure,
// and the adaptation delay is m = 2 sample periods. Samples move from block b
// to block b+1 through the oldest table entry of block b; two extra sample
// registers hold x(n-N) and x(n-N-1) for the last weight-increment block.
// Word widths (L+2 per block, L+log2(N) for y, L for e), the shift by log2(N),
// m = 2 and the block structure follow the filter's description. L = 8, the
// rounding of the error shift, the mapping of |e| to t, weight saturation,
// the single clock with a sample-rate enable and asynchronous active-low reset
// are this design's choices.
module da_lms_filter #(
  parameter int unsigned L  = da_lms_pkg::DA_L,
  parameter int unsigned N  = da_lms_pkg::DA_N,
  parameter int unsigned TW = da_lms_pkg::DA_TW
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [L-1:0]     x_in,        // reference input x(n+1)
  input  logic signed [L-1:0]     d_in,        // desired (primary) input d(n)
  output logic                    sample_tick, // inputs are taken after this cycle
  output logic signed [L+$clog2(N)-1:0] y_out, // filter output y(n-1)
  output logic signed [L-1:0]     e_out,       // registered error e(n-1)
  output logic signed [L-1:0]     w_out [N]    // current weights
);
  localparam int unsigned Q  = N / da_lms_pkg::DA_P;
  localparam int unsigned LN = $clog2(N);
  localparam int unsigned WY = L + LN;
  localparam int unsigned CW = $clog2(L);

  logic [CW-1:0] cnt;
  logic          first, last;

  bit_timer #(.L(L)) u_timer (
    .clk(clk), .rst_n(rst_n), .cnt(cnt), .first(first), .last(last)
  );
  assign sample_tick = last;

  // ---------------------------------------------------------------- blocks
  logic signed [L-1:0] blk_in [Q];
  logic signed [L-1:0] tap    [Q+1][4];  // tap[Q] = x(n-N), x(n-N-1)
  logic signed [L+1:0] s_w    [Q];
  logic signed [L+1:0] c_w    [Q];
  logic        [3:0]   a_w    [Q];
  logic signed [L-1:0] x_upd  [Q][4];
  logic signed [L-1:0] w_blk  [Q][4];
  logic signed [L-1:0] xd0, xd1;

  logic          e_sign, upd;
  logic [L-1:0]  e_mag;
  logic [TW-1:0] t;

  for (genvar b = 0; b < int'(Q); b++) begin : g_blk
    if (b == 0) begin : g_first
      assign blk_in[b] = x_in;
    end else begin : g_chain
      assign blk_in[b] = tap[b-1][3];
    end

    inner_product4 #(.L(L)) u_ip (
      .clk(clk), .rst_n(rst_n), .first(first), .last(last),
      .x_in(blk_in[b]), .a(a_w[b]), .s_o(s_w[b]), .c_o(c_w[b]),
      .x_tap(tap[b])
    );

    // samples of two periods ago: x(n-4b-2) .. x(n-4b-5)
    assign x_upd[b][0] = tap[b][2];
    assign x_upd[b][1] = tap[b][3];
    assign x_upd[b][2] = tap[b+1][0];
    assign x_upd[b][3] = tap[b+1][1];

    weight_increment #(.L(L), .TW(TW)) u_wi (
      .clk(clk), .rst_n(rst_n), .update(last), .bit_idx(cnt),
      .x(x_upd[b]), .sign(e_sign), .t(t), .upd(upd),
      .a(a_w[b]), .w(w_blk[b])
    );

    for (genvar k = 0; k < 4; k++) begin : g_w
      assign w_out[4*b+k] = w_blk[b][k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xd0 <= '0;
      xd1 <= '0;
    end else if (last) begin
      xd0 <= tap[Q-1][3];
      xd1 <= xd0;
    end
  end
  assign tap[Q][0] = xd0;
  assign tap[Q][1] = xd1;
  assign tap[Q][2] = '0;   // not used
  assign tap[Q][3] = '0;   // not used

  // ------------------------------------------------------- output and error
  if (Q == 1) begin : g_small
    // one block: its pending carry-in goes to the sum word
    logic signed [L+2:0] s_ci;
    assign s_ci  = (L+3)'(s_w[0]) + (L+3)'(1);
    assign y_out = WY'(s_ci >>> 1) + WY'(c_w[0]);
  end else begin : g_large
    logic signed [WY-1:0] s_sum, c_sum;
    adder_tree #(.Q(Q), .WI(L + 2), .WO(WY), .CIN(1'b0)) u_stree (
      .in(s_w), .sum(s_sum)
    );
    adder_tree #(.Q(Q), .WI(L + 2), .WO(WY), .CIN(1'b1)) u_ctree (
      .in(c_w), .sum(c_sum)
    );
    assign y_out = (s_sum >>> 1) + c_sum;
  end

  logic signed [L-1:0]  d_q;
  logic signed [WY:0]   diff;

  // |d - y| / N always fits L bits: |y| <= (N/4) 2^L and |d| <= 2^(L-1).
  // The shift rounds (half up): a truncating shift would bias every small
  // error towards -1 and stall the adaptation.
  assign diff = (WY+1)'(d_q) - (WY+1)'(y_out) + (WY+1)'(N / 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q   <= '0;
      e_out <= '0;
    end else if (last) begin
      d_q   <= d_in;
      e_out <= L'(diff >>> LN);
    end
  end

  sign_mag_separator #(.L(L)) u_smag (.e(e_out), .sign(e_sign), .mag(e_mag));

  control_word_gen #(.L(L), .TW(TW)) u_cwg (.mag(e_mag), .t(t), .upd(upd));
endmodule
