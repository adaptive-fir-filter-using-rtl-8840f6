// tb_bit_timer: checks the bit counter of a sample period.
// After reset the count must run 0, 1, .., L-1 and wrap, with `first` high
// exactly at 0 and `last` exactly at L-1, so that a sample period is L cycles.
module tb_bit_timer;
  import da_lms_pkg::*;
  localparam int L = DA_L;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [$clog2(L)-1:0] cnt;
  logic first, last;
  int checks = 0, failures = 0;

  bit_timer dut (.clk(clk), .rst_n(rst_n), .cnt(cnt), .first(first), .last(last));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_cnt, n_last;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    exp_cnt = 0; n_last = 0;
    for (int c = 0; c < 10 * L; c++) begin
      checks++;
      if (cnt != exp_cnt || first != (exp_cnt == 0) || last != (exp_cnt == L - 1)) begin
        failures++;
        $display("cycle %0d: cnt=%0d first=%0d last=%0d, expected cnt=%0d", c, cnt, first, last, exp_cnt);
      end
      if (last) n_last++;
      @(negedge clk);
      exp_cnt = (exp_cnt + 1) % L;
    end
    checks++;
    if (n_last != 10) begin failures++; $display("%0d sample edges in 10 periods", n_last); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
