// fft_8_point: eight-point radix-2 decimation-in-time FFT made of twelve
// fft_radix_2 butterflies in three stages of four.
//
// The eight complex samples s_0..s_7 arrive in natural order; the first stage
// pairs them in bit-reversed order, so no reordering is needed in front of it.
// Every butterfly writes its two results (A, B) to consecutive positions 2b and
// 2b+1 of its stage's output. The pairing and twiddle factor of each
// butterfly follow the published stage table:
//
//   stage 1 (s  -> g1): (s_0,s_4) (s_2,s_6) (s_1,s_5) (s_3,s_7)      w_0 w_0 w_0 w_0
//   stage 2 (g1 -> g2): (g1_0,g1_2) (g1_1,g1_3) (g1_4,g1_6) (g1_5,g1_7) w_0 w_2 w_0 w_2
//   stage 3 (g2 -> y ): (g2_0,g2_4) (g2_2,g2_6) (g2_1,g2_5) (g2_3,g2_7) w_0 w_1 w_2 w_3
//
// Stage 1 forms the four two-point DFTs, stage 2 the two four-point DFTs
// (even samples in g2_0..g2_3, odd samples in g2_4..g2_7) and stage 3 merges
// them. Because each stage-3 butterfly writes to y_{2b} and y_{2b+1}, the
// output is in butterfly order, as the stage table labels it: with X_k the
// DFT bin k = sum_n s_n W_8^{nk},
//     y_{2k} = X_k  and  y_{2k+1} = X_{k+4}   for k = 0..3,
// that is y_0..y_7 = X_0 X_4 X_1 X_5 X_2 X_6 X_3 X_7.
//
// Interface: the port names and widths follow the published block symbol.
// S_r/S_i carry s_n in bits [DATA_W*n +: DATA_W]; Y_r/Y_i carry y_n the same
// way; Win_r/Win_i carry the twiddle w_k = W_8^k = exp(-j*2*pi*k/8) in bits
// [TW_W*k +: TW_W], k = 0..3, in the twiddle format of fft_radix_2 (signed,
// TW_FRAC fractional bits, so W_8^0 = 64 + j0 by default). The twiddle factors
// are inputs, as in the published symbol, not a table inside the block. The
// order of the samples within the packed ports is this design's choice.
//
// Arithmetic: every butterfly returns DATA_W-bit results that wrap around on
// overflow, with no scaling between stages (see fft_radix_2). An input whose
// real and imaginary parts stay within +/-13 cannot overflow.
//
// Timing: purely combinational, three butterflies deep, with no clock, as in
// the published block; one transform per evaluation of the inputs.
module fft_8_point #(
  parameter int unsigned DATA_W  = fft_pkg::DATA_W,
  parameter int unsigned TW_W    = fft_pkg::TW_W,
  parameter int unsigned TW_FRAC = fft_pkg::TW_FRAC
) (
  input  logic [fft_pkg::N_POINTS*DATA_W-1:0]  S_r,
  input  logic [fft_pkg::N_POINTS*DATA_W-1:0]  S_i,
  input  logic [fft_pkg::N_TWIDDLE*TW_W-1:0]   Win_r,
  input  logic [fft_pkg::N_TWIDDLE*TW_W-1:0]   Win_i,
  output logic [fft_pkg::N_POINTS*DATA_W-1:0]  Y_r,
  output logic [fft_pkg::N_POINTS*DATA_W-1:0]  Y_i
);

  localparam int unsigned N  = fft_pkg::N_POINTS;
  localparam int unsigned NB = N / 2;  // butterflies per stage

  // Input positions (top x, bottom y) and twiddle index of butterfly b.
  localparam int unsigned ST1_X  [NB] = '{0, 2, 1, 3};
  localparam int unsigned ST1_Y  [NB] = '{4, 6, 5, 7};
  localparam int unsigned ST1_W  [NB] = '{0, 0, 0, 0};
  localparam int unsigned ST2_X  [NB] = '{0, 1, 4, 5};
  localparam int unsigned ST2_Y  [NB] = '{2, 3, 6, 7};
  localparam int unsigned ST2_W  [NB] = '{0, 2, 0, 2};
  localparam int unsigned ST3_X  [NB] = '{0, 2, 1, 3};
  localparam int unsigned ST3_Y  [NB] = '{4, 6, 5, 7};
  localparam int unsigned ST3_W  [NB] = '{0, 1, 2, 3};

  logic signed [DATA_W-1:0] s_r  [N], s_i  [N];   // inputs
  logic signed [DATA_W-1:0] g1_r [N], g1_i [N];   // after stage 1
  logic signed [DATA_W-1:0] g2_r [N], g2_i [N];   // after stage 2
  logic signed [DATA_W-1:0] y_r  [N], y_i  [N];   // after stage 3
  logic signed [TW_W-1:0]   w_r  [NB], w_i [NB];  // twiddle factors w_0..w_3

  for (genvar n = 0; n < N; n++) begin : g_unpack_s
    assign s_r[n] = S_r[DATA_W*n +: DATA_W];
    assign s_i[n] = S_i[DATA_W*n +: DATA_W];
    assign Y_r[DATA_W*n +: DATA_W] = y_r[n];
    assign Y_i[DATA_W*n +: DATA_W] = y_i[n];
  end

  for (genvar k = 0; k < NB; k++) begin : g_unpack_w
    assign w_r[k] = Win_r[TW_W*k +: TW_W];
    assign w_i[k] = Win_i[TW_W*k +: TW_W];
  end

  for (genvar b = 0; b < NB; b++) begin : g_stage1
    fft_radix_2 #(.DATA_W(DATA_W), .TW_W(TW_W), .TW_FRAC(TW_FRAC)) u_bf (
      .x_r(s_r[ST1_X[b]]), .x_i(s_i[ST1_X[b]]),
      .y_r(s_r[ST1_Y[b]]), .y_i(s_i[ST1_Y[b]]),
      .w_r(w_r[ST1_W[b]]), .w_i(w_i[ST1_W[b]]),
      .A_r(g1_r[2*b]),     .A_i(g1_i[2*b]),
      .B_r(g1_r[2*b+1]),   .B_i(g1_i[2*b+1])
    );
  end

  for (genvar b = 0; b < NB; b++) begin : g_stage2
    fft_radix_2 #(.DATA_W(DATA_W), .TW_W(TW_W), .TW_FRAC(TW_FRAC)) u_bf (
      .x_r(g1_r[ST2_X[b]]), .x_i(g1_i[ST2_X[b]]),
      .y_r(g1_r[ST2_Y[b]]), .y_i(g1_i[ST2_Y[b]]),
      .w_r(w_r[ST2_W[b]]),  .w_i(w_i[ST2_W[b]]),
      .A_r(g2_r[2*b]),      .A_i(g2_i[2*b]),
      .B_r(g2_r[2*b+1]),    .B_i(g2_i[2*b+1])
    );
  end

  for (genvar b = 0; b < NB; b++) begin : g_stage3
    fft_radix_2 #(.DATA_W(DATA_W), .TW_W(TW_W), .TW_FRAC(TW_FRAC)) u_bf (
      .x_r(g2_r[ST3_X[b]]), .x_i(g2_i[ST3_X[b]]),
      .y_r(g2_r[ST3_Y[b]]), .y_i(g2_i[ST3_Y[b]]),
      .w_r(w_r[ST3_W[b]]),  .w_i(w_i[ST3_W[b]]),
      .A_r(y_r[2*b]),       .A_i(y_i[2*b]),
      .B_r(y_r[2*b+1]),     .B_i(y_i[2*b+1])
    );
  end

endmodule
