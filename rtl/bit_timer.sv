// bit_timer: sequences the L bit cycles of one sample period.
//
// The filter runs its carry-save accumulation at a fast bit clock and every
// other register (DA table, weights, error, output words) at the sample rate,
// which is 1/L of the bit rate. Here both rates come from the one clock: the
// counter steps 0..L-1 and the slow-rate registers are clock-enabled by
// `last`, the final bit cycle of a period. Using a clock enable instead of a
// second, divided clock is this design's choice.
// Outputs: cnt (bit index of the cycle, LSB first), first (cnt == 0),
// last (cnt == L-1, the sample edge follows this cycle). Reset to cnt = 0.
module bit_timer #(
  parameter int unsigned L  = da_lms_pkg::DA_L,
  parameter int unsigned CW = $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [CW-1:0] cnt,
  output logic          first,
  output logic          last
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cnt <= '0;
    else if (last)     cnt <= '0;
    else               cnt <= cnt + CW'(1);
  end

  assign first = (cnt == '0);
  assign last  = (cnt == CW'(L - 1));
endmodule
