// tb_sign_mag_separator: exhaustive check over all L-bit errors that sign is
// e < 0 and mag is |e|.
module tb_sign_mag_separator;
  import da_lms_pkg::*;
  localparam int L = DA_L;

  logic signed [L-1:0] e;
  logic sign;
  logic [L-1:0] mag;
  int checks = 0, failures = 0;

  sign_mag_separator dut (.e(e), .sign(sign), .mag(mag));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (L-1)); v < (1 << (L-1)); v++) begin
      e = L'(v);
      #1;
      checks++;
      if (sign != (v < 0) || int'(mag) != ((v < 0) ? -v : v)) begin
        failures++;
        $display("e=%0d: sign=%0d mag=%0d", v, sign, mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
