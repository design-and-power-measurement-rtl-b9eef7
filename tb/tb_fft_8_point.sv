// tb_fft_8_point: end-to-end self-checking testbench of the eight-point FFT,
// run at the design's default sizes (8-bit samples, 8-bit twiddles).
//
// The twiddle inputs carry W_8^k = exp(-j*2*pi*k/8), k = 0..3, rounded to the
// twiddle format. Each clock cycle applies one block of eight samples; one
// time step later all sixteen output words are compared with two references
// computed here:
//   * a bit-exact model: the textbook in-place radix-2 DIT algorithm
//     (bit-reversal permutation, then stages of span 1, 2, 4) using the same
//     fixed-point butterfly rule (product scaled by 2**-TW_FRAC, rounded
//     down, sums wrapped to DATA_W bits), its natural-order result X_k
//     mapped to the design's butterfly-order outputs y_{2k} = X_k,
//     y_{2k+1} = X_{k+4};
//   * for inputs small enough not to overflow, the exact DFT in real
//     arithmetic, which every output must match within TOL.
// Directed blocks: an impulse (flat spectrum), a constant (all energy in X_0),
// single complex tones (one bin each). Random blocks follow, first small ones,
// then full-range ones in which the wrap-around of the 8-bit sums occurs.
// The transform is combinational, so one block is finished per cycle; the
// cycle count is checked. Counted events: blocks checked against the DFT,
// blocks checked bit-exactly, and blocks whose result wrapped around; each
// must happen at least once.
module tb_fft_8_point;
  import fft_pkg::*;

  localparam int N = N_POINTS;
  localparam int NB = N_TWIDDLE;
  localparam int N_SMALL = 3000;
  localparam int N_FULL = 3000;
  localparam int SMALL_MAX = 13;
  localparam real TOL = 2.0;
  localparam real PI = 3.14159265358979323846;
  localparam int WATCHDOG_CYCLES = N_SMALL + N_FULL + 1000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N*DATA_W-1:0] S_r, S_i, Y_r, Y_i;
  logic [NB*TW_W-1:0]  Win_r, Win_i;

  fft_8_point dut (.*);

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int n_dft_blocks = 0;
  int n_exact_blocks = 0;
  int n_wrap_blocks = 0;
  int tw_r [NB];
  int tw_i [NB];

  always @(posedge clk) cycles++;

  function automatic int wrap(input int v);
    int m;
    m = v & ((1 << DATA_W) - 1);
    if (m >= (1 << (DATA_W - 1))) m -= (1 << DATA_W);
    return m;
  endfunction

  function automatic int floor_scale(input int v);
    return int'($floor(real'(v) / real'(1 << TW_FRAC)));
  endfunction

  function automatic int bitrev3(input int v);
    return ((v & 1) << 2) | (v & 2) | ((v >> 2) & 1);
  endfunction

  // In-place radix-2 DIT over natural-order input; returns natural-order
  // X_k. When do_wrap is 0 the sums are kept at full precision, which shows
  // whether a block overflowed.
  task automatic model_fft(input int xr [N], input int xi [N], input bit do_wrap,
                           output int fr [N], output int fi [N]);
    for (int n = 0; n < N; n++) begin
      fr[n] = xr[bitrev3(n)];
      fi[n] = xi[bitrev3(n)];
    end
    for (int half = 1; half < N; half *= 2) begin
      for (int base = 0; base < N; base += 2 * half) begin
        for (int k = 0; k < half; k++) begin
          int t = k * (N / (2 * half));
          int ur = fr[base + k], ui = fi[base + k];
          int vr = fr[base + k + half], vi = fi[base + k + half];
          int pr = floor_scale(tw_r[t] * vr - tw_i[t] * vi);
          int pi = floor_scale(tw_r[t] * vi + tw_i[t] * vr);
          fr[base + k] = ur + pr;        fi[base + k] = ui + pi;
          fr[base + k + half] = ur - pr; fi[base + k + half] = ui - pi;
          if (do_wrap) begin
            fr[base + k] = wrap(fr[base + k]);               fi[base + k] = wrap(fi[base + k]);
            fr[base + k + half] = wrap(fr[base + k + half]); fi[base + k + half] = wrap(fi[base + k + half]);
          end
        end
      end
    end
  endtask

  // Output position of DFT bin k in the design's butterfly order.
  function automatic int ypos(input int k);
    return (k < N / 2) ? 2 * k : 2 * (k - N / 2) + 1;
  endfunction

  task automatic run_block(input int xr [N], input int xi [N], input bit check_dft);
    int er [N], ei [N], ur [N], ui [N];
    int gr, gi;
    bit bad;
    @(posedge clk);
    for (int n = 0; n < N; n++) begin
      S_r[DATA_W*n +: DATA_W] = DATA_W'(xr[n]);
      S_i[DATA_W*n +: DATA_W] = DATA_W'(xi[n]);
    end
    #1;
    model_fft(xr, xi, 1'b1, er, ei);
    model_fft(xr, xi, 1'b0, ur, ui);
    bad = 1'b0;
    for (int k = 0; k < N; k++) begin
      gr = int'($signed(Y_r[DATA_W*ypos(k) +: DATA_W]));
      gi = int'($signed(Y_i[DATA_W*ypos(k) +: DATA_W]));
      checks++;
      if (gr != er[k] || gi != ei[k]) begin
        failures++;
        bad = 1'b1;
        if (failures < 10)
          $display("FAIL bin %0d (y_%0d): got (%0d,%0d) expected (%0d,%0d)", k, ypos(k), gr, gi, er[k], ei[k]);
      end
      if (check_dft) begin
        real dr, di;
        dr = 0.0;
        di = 0.0;
        for (int n = 0; n < N; n++) begin
          real a;
          a = -2.0 * PI * real'(n * k) / real'(N);
          dr += real'(xr[n]) * $cos(a) - real'(xi[n]) * $sin(a);
          di += real'(xr[n]) * $sin(a) + real'(xi[n]) * $cos(a);
        end
        checks++;
        if ((real'(gr) - dr > TOL) || (dr - real'(gr) > TOL) ||
            (real'(gi) - di > TOL) || (di - real'(gi) > TOL)) begin
          failures++;
          bad = 1'b1;
          if (failures < 10)
            $display("FAIL DFT bin %0d: got (%0d,%0d) expected (%f,%f)", k, gr, gi, dr, di);
        end
      end
    end
    n_exact_blocks++;
    if (check_dft) n_dft_blocks++;
    for (int k = 0; k < N; k++)
      if (ur[k] != er[k] || ui[k] != ei[k]) begin
        n_wrap_blocks++;
        break;
      end
    if (bad && failures < 10) begin
      for (int n = 0; n < N; n++) $display("  s_%0d = (%0d,%0d)", n, xr[n], xi[n]);
    end
  endtask

  initial begin : watchdog
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired after %0d cycles", WATCHDOG_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int xr [N], xi [N];
    int start_cycle, n_blocks;
    int lo, hi;
    lo = -(1 << (DATA_W - 1));
    hi = (1 << (DATA_W - 1)) - 1;

    // Twiddle factors W_8^k, rounded to TW_FRAC fractional bits.
    for (int k = 0; k < NB; k++) begin
      real a;
      a = -2.0 * PI * real'(k) / real'(N);
      tw_r[k] = int'($rtoi($floor($cos(a) * real'(1 << TW_FRAC) + 0.5)));
      tw_i[k] = int'($rtoi($floor($sin(a) * real'(1 << TW_FRAC) + 0.5)));
      Win_r[TW_W*k +: TW_W] = TW_W'(tw_r[k]);
      Win_i[TW_W*k +: TW_W] = TW_W'(tw_i[k]);
    end
    S_r = '0;
    S_i = '0;

    // Impulse at n = 0: every bin equals the impulse height.
    foreach (xr[n]) begin xr[n] = 0; xi[n] = 0; end
    xr[0] = 12; xi[0] = -5;
    run_block(xr, xi, 1'b1);
    // Constant: all energy in X_0 = 8 * value.
    foreach (xr[n]) begin xr[n] = 9; xi[n] = -3; end
    run_block(xr, xi, 1'b1);
    // Complex tones exp(+j*2*pi*m*n/8), amplitude 12: one bin each.
    for (int m = 0; m < N; m++) begin
      for (int n = 0; n < N; n++) begin
        real a;
        a = 2.0 * PI * real'(m * n) / real'(N);
        xr[n] = int'($rtoi($floor(12.0 * $cos(a) + 0.5)));
        xi[n] = int'($rtoi($floor(12.0 * $sin(a) + 0.5)));
      end
      run_block(xr, xi, 1'b1);
    end

    // Random small blocks (no overflow possible), then full-range blocks.
    start_cycle = cycles;
    n_blocks = 0;
    for (int b = 0; b < N_SMALL; b++) begin
      for (int n = 0; n < N; n++) begin
        xr[n] = int'($urandom_range(2 * SMALL_MAX)) - SMALL_MAX;
        xi[n] = int'($urandom_range(2 * SMALL_MAX)) - SMALL_MAX;
      end
      run_block(xr, xi, 1'b1);
      n_blocks++;
    end
    for (int b = 0; b < N_FULL; b++) begin
      for (int n = 0; n < N; n++) begin
        xr[n] = lo + int'($urandom_range(hi - lo));
        xi[n] = lo + int'($urandom_range(hi - lo));
      end
      run_block(xr, xi, 1'b0);
      n_blocks++;
    end
    // Zero latency: one transform per clock cycle.
    checks++;
    if (cycles - start_cycle != n_blocks) begin
      failures++;
      $display("FAIL %0d blocks took %0d cycles, expected one per cycle", n_blocks, cycles - start_cycle);
    end

    $display("blocks checked bit-exactly: %0d, against the DFT: %0d, with wrap-around: %0d",
             n_exact_blocks, n_dft_blocks, n_wrap_blocks);
    checks++;
    if (n_exact_blocks == 0 || n_dft_blocks == 0 || n_wrap_blocks == 0) begin
      failures++;
      $display("FAIL an event never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
