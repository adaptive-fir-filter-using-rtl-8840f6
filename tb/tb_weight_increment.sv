// tb_weight_increment: applies random samples, signs and shift amounts at
// sample edges and checks each weight against w + sign * (x >> t), saturated
// to L bits, that nothing changes without update or with upd = 0, and that
// the bit slice a holds bit l of every weight for each l.
module tb_weight_increment;
  import da_lms_pkg::*;
  localparam int L = DA_L;

  logic clk = 1'b0, rst_n = 1'b0, update = 1'b0, sign = 1'b0, upd = 1'b0;
  logic [$clog2(L)-1:0] bit_idx = '0;
  logic signed [L-1:0] x [4] = '{default: '0};
  logic [DA_TW-1:0] t = '0;
  logic [3:0] a;
  logic signed [L-1:0] w [4];
  int checks = 0, failures = 0, n_sat = 0;
  int wm [4] = '{0, 0, 0, 0};

  weight_increment dut (.clk(clk), .rst_n(rst_n), .update(update), .bit_idx(bit_idx),
                        .x(x), .sign(sign), .t(t), .upd(upd), .a(a), .w(w));

  always #50 clk = ~clk;   // slow enough for the L one-unit slice checks

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      int xv [4];
      for (int k = 0; k < 4; k++) begin
        xv[k] = $urandom_range(0, 255) - 128;
        x[k]  = L'(xv[k]);
      end
      t      = DA_TW'((n < 400) ? 0 : $urandom);   // large steps first: saturation
      sign   = (n < 200) ? 1'b0 : (n < 400) ? 1'b1 : 1'($urandom);
      if (n < 400) for (int k = 0; k < 4; k++) begin xv[k] = 127 - k; x[k] = L'(xv[k]); end
      upd    = ($urandom_range(0, 9) != 0);
      update = ($urandom_range(0, 4) != 0);
      if (update && upd) begin
        for (int k = 0; k < 4; k++) begin
          int sh, nw;
          sh = xv[k] >>> t;
          nw = wm[k] + (sign ? -sh : sh);
          if (nw > 127) begin nw = 127; n_sat++; end
          if (nw < -128) begin nw = -128; n_sat++; end
          wm[k] = nw;
        end
      end
      @(negedge clk);
      update = 1'b0;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (w[k] != L'(wm[k])) begin
          failures++;
          if (failures < 10) $display("step %0d: w[%0d]=%0d expected %0d", n, k, w[k], wm[k]);
        end
      end
      for (int l = 0; l < L; l++) begin
        bit_idx = l[$clog2(L)-1:0];
        #1;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (a[k] != ((wm[k] >> l) & 1)) begin failures++; if (failures < 10) $display("slice %0d bit %0d wrong: a=%b w=%0d", l, k, a, wm[k]); end
        end
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
