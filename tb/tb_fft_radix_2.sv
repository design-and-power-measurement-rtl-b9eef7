// tb_fft_radix_2: self-checking testbench of the two-point butterfly.
//
// A free-running clock paces the test: on each cycle a new set of operands is
// applied and, one time step later, the four outputs are compared with a
// reference computed here in real arithmetic: w*y is scaled by 2**-TW_FRAC,
// rounded towards minus infinity, added to / subtracted from x and reduced
// modulo 2**DATA_W to a signed value. The vectors are directed corner cases
// (extreme values, the trivial twiddles +1, -1, +j, -j, where the result must
// be the exact two-point DFT) followed by random operands over the full range.
// The butterfly is combinational, so the outputs must be correct within the
// same cycle the operands are applied (zero cycles of latency).
module tb_fft_radix_2;
  import fft_pkg::*;

  localparam int N_RANDOM = 20000;
  localparam int WATCHDOG_CYCLES = N_RANDOM + 1000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [DATA_W-1:0] x_r, x_i, y_r, y_i;
  logic signed [TW_W-1:0]   w_r, w_i;
  logic signed [DATA_W-1:0] A_r, A_i, B_r, B_i;

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  fft_radix_2 dut (.*);

  // Signed value of v reduced modulo 2**DATA_W.
  function automatic int wrap(input longint v);
    longint m;
    m = v % (64'sd1 << DATA_W);
    if (m < 0) m += (64'sd1 << DATA_W);
    if (m >= (64'sd1 << (DATA_W - 1))) m -= (64'sd1 << DATA_W);
    return int'(m);
  endfunction

  task automatic apply_and_check(input int xr, xi, yr, yi, wr, wi, input bit exact_dft);
    real scale;
    longint pr, pi;
    int er_a, ei_a, er_b, ei_b;
    @(posedge clk);
    x_r = DATA_W'(xr); x_i = DATA_W'(xi);
    y_r = DATA_W'(yr); y_i = DATA_W'(yi);
    w_r = TW_W'(wr);   w_i = TW_W'(wi);
    #1;
    scale = real'(longint'(1) << TW_FRAC);
    pr = longint'($floor((real'(wr) * real'(yr) - real'(wi) * real'(yi)) / scale));
    pi = longint'($floor((real'(wr) * real'(yi) + real'(wi) * real'(yr)) / scale));
    er_a = wrap(longint'(xr) + pr); ei_a = wrap(longint'(xi) + pi);
    er_b = wrap(longint'(xr) - pr); ei_b = wrap(longint'(xi) - pi);
    checks++;
    if (int'(A_r) != er_a || int'(A_i) != ei_a || int'(B_r) != er_b || int'(B_i) != ei_b) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=(%0d,%0d) y=(%0d,%0d) w=(%0d,%0d): A=(%0d,%0d) B=(%0d,%0d) expected A=(%0d,%0d) B=(%0d,%0d)",
                 xr, xi, yr, yi, wr, wi, A_r, A_i, B_r, B_i, er_a, ei_a, er_b, ei_b);
    end
    // With w = +1 the butterfly is the two-point DFT: A = x + y, B = x - y.
    if (exact_dft) begin
      checks++;
      if (int'(A_r) != wrap(longint'(xr) + longint'(yr)) || int'(A_i) != wrap(longint'(xi) + longint'(yi)) ||
          int'(B_r) != wrap(longint'(xr) - longint'(yr)) || int'(B_i) != wrap(longint'(xi) - longint'(yi))) begin
        failures++;
        $display("FAIL two-point DFT x=(%0d,%0d) y=(%0d,%0d)", xr, xi, yr, yi);
      end
    end
  endtask

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired after %0d cycles", WATCHDOG_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int one, lo, hi, wlo, whi;
    int start_cycle;
    one = 1 << TW_FRAC;
    lo  = -(1 << (DATA_W - 1));
    hi  = (1 << (DATA_W - 1)) - 1;
    wlo = -(1 << (TW_W - 1));
    whi = (1 << (TW_W - 1)) - 1;
    x_r = '0; x_i = '0; y_r = '0; y_i = '0; w_r = '0; w_i = '0;

    // Two-point DFT with w = +1.
    apply_and_check(3, -2, 5, 7, one, 0, 1'b1);
    apply_and_check(12, 0, 4, 0, one, 0, 1'b1);
    apply_and_check(hi, lo, hi, lo, one, 0, 1'b1);
    apply_and_check(lo, lo, lo, lo, one, 0, 1'b1);
    for (int i = 0; i < 200; i++)
      apply_and_check(rnd(lo, hi), rnd(lo, hi), rnd(lo, hi), rnd(lo, hi), one, 0, 1'b1);
    // Trivial twiddles -1, -j, +j and extreme twiddle values.
    apply_and_check(10, 20, 30, -40, -one, 0, 1'b0);
    apply_and_check(10, 20, 30, -40, 0, -one, 1'b0);
    apply_and_check(10, 20, 30, -40, 0, one, 1'b0);
    apply_and_check(hi, hi, lo, lo, wlo, wlo, 1'b0);
    apply_and_check(lo, hi, lo, hi, whi, wlo, 1'b0);
    apply_and_check(-1, -1, -1, 1, 45, -45, 1'b0);   // negative product rounds down
    // Random operands over the full range; result valid in the same cycle.
    start_cycle = cycles;
    for (int i = 0; i < N_RANDOM; i++)
      apply_and_check(rnd(lo, hi), rnd(lo, hi), rnd(lo, hi), rnd(lo, hi),
                      rnd(wlo, whi), rnd(wlo, whi), 1'b0);
    checks++;
    if (cycles - start_cycle != N_RANDOM) begin
      failures++;
      $display("FAIL %0d vectors took %0d cycles, expected one per cycle", N_RANDOM, cycles - start_cycle);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
