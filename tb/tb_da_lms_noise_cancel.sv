// tb_da_lms_noise_cancel: end-to-end test of the DA LMS adaptive filter, noise cancellation at N = 16.
//
// The filter identifies an unknown FIR "plant": x is random, and d is the
// plant's output computed with the same scaling as the filter's, so a perfect
// match drives the error to zero. With SIGA > 0 (noise cancellation) d also
// carries a triangle-wave wanted signal s that x cannot predict; the filter
// must remove the plant's part of d and leave s in the error. A reference model written with plain integer
// arithmetic (no bit slices, no carry-save words) predicts, sample by sample,
// the filter output y, the registered error e and every weight; the DUT must
// match it exactly. After the identification phase, an impulse train with a
// target first too high and then too low for the filter drives the weights
// into saturation; a zero target then lets the error decay through all sizes.
// Mechanisms counted (each must occur): sign-slice subtraction, positive and
// negative weight steps, skipped steps (zero error), weight saturation, and
// every shift amount t = log2(N)..7 of the barrel shifters (smaller shifts
// need an error larger than the filter can produce). The test also checks
// that a sample is taken every L clock cycles and that the mean residual
// |d - y - s| (s: wanted-signal part of d) falls at least twofold during
// identification.
module tb_da_lms_noise_cancel;
  import da_lms_pkg::*;

  localparam int L     = DA_L;
  localparam int N     = DA_N;
  localparam int LN    = $clog2(N);
  localparam int WY    = L + LN;
  localparam int NID   = 3000;   // identification samples
  localparam int NSAT  = 120 * N; // saturation-phase samples
  localparam int NS    = NID + NSAT;
  localparam int SIGA  = 16;   // amplitude of the wanted signal in d
  localparam int HR    = 100;     // plant taps are drawn from -HR..HR

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [L-1:0]  x_in, d_in;
  logic                 tick;
  logic signed [WY-1:0] y_out;
  logic signed [L-1:0]  e_out;
  logic signed [L-1:0]  w_out [N];

  da_lms_filter dut (
    .clk(clk), .rst_n(rst_n), .x_in(x_in), .d_in(d_in),
    .sample_tick(tick), .y_out(y_out), .e_out(e_out), .w_out(w_out)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sub = 0, n_pos = 0, n_neg = 0, n_skip = 0, n_sat = 0;
  int t_seen [8];
  longint cycles = 0;

  always_ff @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    repeat (NS * L + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- reference model
  int xs [NS + 8];            // x(i), index i >= 0
  int ds [NS + 8];            // d(i)
  int ss [NS + 8];            // wanted-signal part of d(i), 0 for pure identification
  int h  [N];                 // plant
  int wm [N];                 // model weights in effect this period
  int y_reg, e_reg, d_q;      // model registers

  function automatic int xat(int i);
    return (i < 0) ? 0 : xs[i];
  endfunction

  // filter output for the samples ending at index i with coefficients c:
  // per 4-tap group floor(P / 2^(L-1)), then the sum halved (floored)
  function automatic int fir(int i, int c [N]);
    longint acc = 0;
    for (int b = 0; b < N / 4; b++) begin
      longint p = 0;
      for (int k = 0; k < 4; k++) p += longint'(xat(i - 4*b - k)) * c[4*b+k];
      acc += p >>> (L - 1);
    end
    return int'(acc >>> 1);
  endfunction

  // one weight step with error e and samples x(i-k)
  task automatic step(int e, int i);
    int mag, p, t;
    if (e == 0) begin n_skip++; return; end
    mag = (e < 0) ? -e : e;
    p = 0;
    for (int b = 0; b < L; b++) if ((mag >> b) & 1) p = b;
    t = L - 1 - p;
    t_seen[t]++;
    if (e < 0) n_neg++; else n_pos++;
    for (int k = 0; k < N; k++) begin
      int sh, nw;
      sh = xat(i - k) >>> t;
      nw = wm[k] + ((e < 0) ? -sh : sh);
      if (nw > (1 << (L-1)) - 1) begin nw = (1 << (L-1)) - 1; n_sat++; end
      if (nw < -(1 << (L-1)))    begin nw = -(1 << (L-1));    n_sat++; end
      wm[k] = nw;
    end
  endtask

  function automatic int abs_i(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int sat8(int v);
    if (v > (1 << (L-1)) - 1) return (1 << (L-1)) - 1;
    if (v < -(1 << (L-1)))    return -(1 << (L-1));
    return v;
  endfunction

  // --------------------------------------------------------------- stimulus
  initial begin : main
    longint t_prev;
    int     sum_first, sum_last;
    sum_first = 0; sum_last = 0;
    for (int k = 0; k < N; k++) h[k] = $urandom_range(0, 2 * HR) - HR;
    for (int i = 0; i < NS + 8; i++) begin
      xs[i] = $urandom_range(0, 255) - 128;
      ds[i] = 0;
      // triangle wave of amplitude SIGA and period 64 samples
      ss[i] = (SIGA == 0) ? 0 : ((i % 64 < 32) ? (i % 32) : 32 - (i % 32)) * SIGA / 16 - SIGA;
    end
    for (int i = 0; i < NID; i++) ds[i] = sat8(fir(i, h) + ss[i]);
    // saturation phase: an impulse every N samples
    for (int i = NID; i < NS + 8; i++) begin
      xs[i] = (i % N == 0) ? (1 << (L-1)) - 1 : 0;
      // target: high, then low (both unreachable), then zero (errors of every size)
      ds[i] = (i < NID + NSAT / 3) ? (1 << (L-1)) - 1 :
              (i < NID + 2 * NSAT / 3) ? -(1 << (L-1)) : 0;
    end
    for (int k = 0; k < N; k++) wm[k] = 0;
    y_reg = 0; e_reg = 0; d_q = 0;
    x_in = '0; d_in = '0;

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    t_prev = -1;
    for (int i = 0; i < NS; i++) begin
      int y_new, e_new, diff;
      // present x(i) and d(i-1) during the last bit cycle of period i-1
      @(negedge clk);
      while (!tick) @(negedge clk);
      if (t_prev >= 0) begin
        checks++;
        if (cycles - t_prev != L) begin
          failures++;
          $display("sample %0d: period %0d cycles, expected %0d", i, cycles - t_prev, L);
        end
      end
      t_prev = cycles;
      x_in = L'(xs[i]);
      d_in = L'((i > 0) ? ds[i-1] : 0);

      // model of edge i
      y_new = fir(i - 1, wm);
      diff  = d_q - y_reg;
      e_new = (diff + N / 2) >>> LN;
      checks++;
      if (e_new > (1 << (L-1)) - 1 || e_new < -(1 << (L-1))) begin failures++; $display("error out of range"); end
      for (int k = 0; k < N; k++) if (((wm[k] >> (L-1)) & 1) != 0) begin n_sub++; break; end
      step(e_reg, i - 3);
      y_reg = y_new;
      e_reg = e_new;
      d_q   = (i > 0) ? ds[i-1] : 0;

      // compare right after the edge
      @(negedge clk);
      checks++;
      if (y_out != WY'(y_reg)) begin
        failures++;
        if (failures < 10) $display("edge %0d: y %0d expected %0d", i, y_out, y_reg);
      end
      checks++;
      if (e_out != L'(e_reg) ) begin
        failures++;
        if (failures < 10) $display("edge %0d: e %0d expected %0d", i, e_out, e_reg);
      end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (w_out[k] != L'(wm[k])) begin
          failures++;
          if (failures < 10) $display("edge %0d: w[%0d] %0d expected %0d", i, k, w_out[k], wm[k]);
        end
      end
      // residual: what is left of the plant output in d - y (sample i-2)
      if (i >= 3 && i < 103)         sum_first += abs_i(diff - ss[i-2]);
      if (i >= NID - 100 && i < NID) sum_last  += abs_i(diff - ss[i-2]);
    end

    $display("mean |d - y - s|: first 100 samples %0d/100, last 100 of identification %0d/100",
             sum_first, sum_last);
    checks++;
    if (!(sum_last * 2 < sum_first)) begin
      failures++;
      $display("residual did not fall to half during identification");
    end
    $display("mechanisms: sign-slice subtractions %0d, positive steps %0d, negative steps %0d, skipped steps %0d, weight saturations %0d",
             n_sub, n_pos, n_neg, n_skip, n_sat);
    checks += 5;
    if (n_sub == 0)  begin failures++; $display("no sign-slice subtraction"); end
    if (n_pos == 0)  begin failures++; $display("no positive step"); end
    if (n_neg == 0)  begin failures++; $display("no negative step"); end
    if (n_skip == 0) begin failures++; $display("no skipped step"); end
    if (n_sat == 0)  begin failures++; $display("no weight saturation"); end
    // |e| stays below 2^(L-LN+1), so shifts below LN cannot occur
    for (int t = LN; t < 8; t++) begin
      checks++;
      if (t_seen[t] == 0) begin failures++; $display("shift t=%0d never used", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
