// tb_csa_accumulator: feeds random (L+2)-bit table words for L bit cycles,
// subtracting on the last, and checks the finished words against the plain
// integer shift-accumulation: (s_o + 2 c_o + 1) >> 1 must equal
// floor(sum_j 2^j s_j T_j / 2^L), s_j = -1 for the last cycle, else +1.
// Also checks that s_o/c_o change only at the end of a period and that the
// first cycle of a period starts from zero.
module tb_csa_accumulator;
  import da_lms_pkg::*;
  localparam int L = DA_L;
  localparam int W = L + 2;

  logic clk = 1'b0, rst_n = 1'b0, first = 1'b0, sub = 1'b0;
  logic signed [W-1:0] t_in = '0, s_o, c_o;
  int checks = 0, failures = 0;

  csa_accumulator dut (.clk(clk), .rst_n(rst_n), .first(first), .sub(sub),
                       .t_in(t_in), .s_o(s_o), .c_o(c_o));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++;
    if ((longint'(s_o) + 2 * longint'(c_o) + 1) >>> 1 != 0) begin
      failures++; $display("reset value is not zero");
    end
    for (int n = 0; n < 1000; n++) begin
      longint p, got;
      logic signed [W-1:0] s_hold, c_hold;
      p = 0;
      s_hold = s_o; c_hold = c_o;
      for (int j = 0; j < L; j++) begin
        int tv;
        case (n % 4)
          0: tv = $urandom_range(0, (1 << W) - 1) - (1 << (W-1));
          1: tv = -(1 << (W-1));                 // extreme words
          2: tv = (j % 2) ? (1 << (W-1)) - 1 : -(1 << (W-1));
          default: tv = $urandom_range(0, 20) - 10;
        endcase
        t_in  = W'(tv);
        first = (j == 0);
        sub   = (j == L - 1);
        p += (sub ? -longint'(tv) : longint'(tv)) <<< j;
        @(negedge clk);
        if (j < L - 1) begin
          checks++;
          if (s_o != s_hold || c_o != c_hold) begin failures++; $display("output changed mid-period"); end
        end
      end
      got = (longint'(s_o) + 2 * longint'(c_o) + 1) >>> 1;
      checks++;
      if (got != (p >>> L)) begin
        failures++;
        if (failures < 10) $display("period %0d: result %0d expected %0d", n, got, p >>> L);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
