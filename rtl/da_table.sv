// da_table: register-based DA table of a four-point inner-product block.
//
// Entry k (k = 0..15) holds c_k = sum of x(n-j) over the bits j set in k, where
// bit 0 of k selects the newest sample x(n) and bit 3 the oldest x(n-3). Entry
// 0 is the constant zero, so only 15 words are registers. Entries are L+2 bits
// wide, enough for the sum of four L-bit samples.
//
// When a new sample arrives (load = 1 at a sample edge) the table is rebuilt
// from the old one without a separate delay line: shifting every sample one
// place older turns old entry m into new entry 2m, and new entry 2m+1 is the
// incoming sample plus old entry m. That takes seven adders. The recurrence is
// this design's choice; the table's contents and its size (15 registers plus a
// constant zero) follow the filter's description.
// The four samples themselves are entries 1, 2, 4 and 8, brought out as x_tap
// (x_tap[j] = x(n-j)) for the weight-increment logic and for chaining blocks.
// Timing: new contents are visible in the cycle after the load edge.
module da_table #(
  parameter int unsigned L = da_lms_pkg::DA_L
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [L-1:0] x_in,
  output logic signed [L+1:0] entry [16],
  output logic signed [L-1:0] x_tap [4]
);
  logic signed [L+1:0] word [1:15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < 16; k++) word[k] <= '0;
    end else if (load) begin
      word[1] <= (L+2)'(x_in);
      for (int m = 1; m < 8; m++) begin
        word[2*m]   <= word[m];
        word[2*m+1] <= word[m] + (L+2)'(x_in);
      end
    end
  end

  always_comb begin
    entry[0] = '0;
    for (int k = 1; k < 16; k++) entry[k] = word[k];
    for (int j = 0; j < 4; j++)  x_tap[j] = word[1 << j][L-1:0];
  end
endmodule
