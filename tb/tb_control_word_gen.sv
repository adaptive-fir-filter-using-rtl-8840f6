// tb_control_word_gen: exhaustive check over all magnitudes that t is
// (L-1) - floor(log2 |e|), i.e. 2^-t is |e| / 2^(L-1) rounded down to a power
// of two, and that a zero magnitude asks for no update.
module tb_control_word_gen;
  import da_lms_pkg::*;
  localparam int L = DA_L;

  logic [L-1:0] mag;
  logic [DA_TW-1:0] t;
  logic upd;
  int checks = 0, failures = 0;

  control_word_gen dut (.mag(mag), .t(t), .upd(upd));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < (1 << L); m++) begin
      int et;
      mag = L'(m);
      #1;
      et = 0;
      while ((2 ** (et + 1)) * m < (1 << L) && m != 0) et++;   // largest et with m*2^et < 2^L
      checks++;
      if (m == 0) begin
        if (upd) begin failures++; $display("update on zero error"); end
      end else if (!upd || int'(t) != et) begin
        failures++;
        $display("mag=%0d: t=%0d upd=%0d, expected t=%0d", m, t, upd, et);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
