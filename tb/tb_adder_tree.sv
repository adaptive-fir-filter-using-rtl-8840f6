// tb_adder_tree: random and extreme words into the default four-input tree,
// once without and once with first-level carry-ins; the results must be the
// plain sums and the plain sums plus Q/2.
module tb_adder_tree;
  import da_lms_pkg::*;
  localparam int Q  = 4;
  localparam int WI = DA_L + 2;
  localparam int WO = WI + 2;

  logic signed [WI-1:0] in [Q];
  logic signed [WO-1:0] sum0, sum1;
  int checks = 0, failures = 0;

  adder_tree dut0 (.in(in), .sum(sum0));
  adder_tree #(.CIN(1'b1)) dut1 (.in(in), .sum(sum1));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int s;
      s = 0;
      for (int i = 0; i < Q; i++) begin
        int v;
        v = (n < 2) ? ((n == 0) ? -(1 << (WI-1)) : (1 << (WI-1)) - 1)
                    : $urandom_range(0, (1 << WI) - 1) - (1 << (WI-1));
        in[i] = WI'(v);
        s += v;
      end
      #1;
      checks += 2;
      if (sum0 != WO'(s))         begin failures++; $display("sum %0d expected %0d", sum0, s); end
      if (sum1 != WO'(s + Q / 2)) begin failures++; $display("sum+cin %0d expected %0d", sum1, s + Q / 2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
