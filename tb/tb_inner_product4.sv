// tb_inner_product4: runs the four-point block as the filter does, with a bit
// counter, a new random sample every period and random weights presented as
// bit slices, LSB slice first. After each period the block's words must give
// (s_o + 2 c_o + 1) >> 1 = floor(sum_k w_k x(n-k) / 2^L) for the samples and
// weights of the period just ended; the sample taps are checked too.
module tb_inner_product4;
  import da_lms_pkg::*;
  localparam int L = DA_L;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [$clog2(L)-1:0] cnt;
  logic first, last;
  logic signed [L-1:0] x_in = '0;
  logic [3:0] a;
  logic signed [L+1:0] s_o, c_o;
  logic signed [L-1:0] x_tap [4];
  logic signed [L-1:0] w [4] = '{default: '0};
  int checks = 0, failures = 0;

  bit_timer u_timer (.clk(clk), .rst_n(rst_n), .cnt(cnt), .first(first), .last(last));

  inner_product4 dut (.clk(clk), .rst_n(rst_n), .first(first), .last(last),
                      .x_in(x_in), .a(a), .s_o(s_o), .c_o(c_o), .x_tap(x_tap));

  always_comb for (int k = 0; k < 4; k++) a[k] = w[k][cnt];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (600 * L) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs [4] = '{0, 0, 0, 0};
    longint p_prev;
    p_prev = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      longint p, got;
      int v;
      // wait for the last bit cycle, then present the next sample
      while (!last) @(negedge clk);
      v = (n % 17 == 0) ? -(1 << (L-1)) : $urandom_range(0, 255) - 128;
      x_in = L'(v);
      @(negedge clk);   // sample edge passed: table updated, previous product out
      got = (longint'(s_o) + 2 * longint'(c_o) + 1) >>> 1;
      checks++;
      if (got != (p_prev >>> L)) begin
        failures++;
        if (failures < 10) $display("period %0d: product %0d expected %0d", n, got, p_prev >>> L);
      end
      for (int j = 3; j > 0; j--) xs[j] = xs[j-1];
      xs[0] = v;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (x_tap[j] != L'(xs[j])) begin failures++; $display("tap %0d wrong", j); end
      end
      // new weights for this period (held until its last cycle)
      for (int k = 0; k < 4; k++)
        w[k] = (n % 13 == 5) ? L'(-(1 << (L-1))) : L'($urandom);
      p = 0;
      for (int k = 0; k < 4; k++) p += longint'(xs[k]) * longint'(w[k]);
      p_prev = p;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
