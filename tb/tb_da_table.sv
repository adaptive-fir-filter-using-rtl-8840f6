// tb_da_table: loads random samples into the DA table and checks all 16
// entries against subset sums of a reference delay line, entry k being the
// sum of x(n-j) over the bits j set in k, and the four sample taps. Loads are
// spaced irregularly to check that the table holds between loads.
module tb_da_table;
  import da_lms_pkg::*;
  localparam int L = DA_L;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic signed [L-1:0] x_in = '0;
  logic signed [L+1:0] entry [16];
  logic signed [L-1:0] x_tap [4];
  int checks = 0, failures = 0;
  int dl [4] = '{0, 0, 0, 0};

  da_table dut (.clk(clk), .rst_n(rst_n), .load(load), .x_in(x_in), .entry(entry), .x_tap(x_tap));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < 16; k++) begin
      int e = 0;
      for (int j = 0; j < 4; j++) if (k & (1 << j)) e += dl[j];
      checks++;
      if (entry[k] != (L+2)'(e)) begin
        failures++;
        if (failures < 10) $display("entry %0d = %0d, expected %0d", k, entry[k], e);
      end
    end
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (x_tap[j] != L'(dl[j])) begin failures++; $display("tap %0d wrong", j); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    compare();
    for (int n = 0; n < 300; n++) begin
      int v;
      v = (n % 50 == 7) ? -(1 << (L-1)) : (n % 50 == 8) ? (1 << (L-1)) - 1
                                       : $urandom_range(0, 255) - 128;
      if (n % 40 < 4) v = -(1 << (L-1));   // runs of the most negative sample
      x_in = L'(v);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int j = 3; j > 0; j--) dl[j] = dl[j-1];
      dl[0] = v;
      compare();
      repeat ($urandom_range(0, 3)) begin
        x_in = L'($urandom);
        @(negedge clk);
        compare();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
