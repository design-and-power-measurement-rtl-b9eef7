// fft_radix_2: the two-point radix-2 decimation-in-time butterfly.
//
// It takes two complex samples x and y and one complex twiddle factor w and
// returns
//     A = x + w*y
//     B = x - w*y
// which, with w = 1, is the two-point DFT of (x, y), and inside a larger
// transform is the butterfly that merges two half-size DFTs.
//
// How it works: the complex product w*y is formed from four signed
// DATA_W x TW_W multiplications at full precision, then shifted right
// arithmetically by TW_FRAC to undo the twiddle's binary point (the shift
// truncates towards minus infinity). The shifted product is added to and
// subtracted from x at full width and the low DATA_W bits are returned, so a
// result outside the DATA_W range wraps around as in plain two's-complement
// adders; there is no saturation and no per-stage scaling. Keeping the
// magnitude of every input part at or below 13 keeps an eight-point transform
// free of wrap-around.
//
// Interface: port names and their 8-bit widths follow the published block
// symbol (x_r, x_i, y_r, y_i, w_r, w_i in; A_r, A_i, B_r, B_i out). The twiddle
// format (signed, TW_FRAC fractional bits), the truncation of the product and
// the wrap-around of the sums are this design's choices.
//
// Timing: purely combinational, no clock and no registers, as in the
// published block, which has no clock pin. A result is valid one
// propagation delay after the inputs.
module fft_radix_2 #(
  parameter int unsigned DATA_W  = fft_pkg::DATA_W,
  parameter int unsigned TW_W    = fft_pkg::TW_W,
  parameter int unsigned TW_FRAC = fft_pkg::TW_FRAC
) (
  input  logic signed [DATA_W-1:0] x_r,
  input  logic signed [DATA_W-1:0] x_i,
  input  logic signed [DATA_W-1:0] y_r,
  input  logic signed [DATA_W-1:0] y_i,
  input  logic signed [TW_W-1:0]   w_r,
  input  logic signed [TW_W-1:0]   w_i,
  output logic signed [DATA_W-1:0] A_r,
  output logic signed [DATA_W-1:0] A_i,
  output logic signed [DATA_W-1:0] B_r,
  output logic signed [DATA_W-1:0] B_i
);

  // One real product, and a sum of two products plus a sample.
  localparam int unsigned PROD_W = DATA_W + TW_W;
  localparam int unsigned SUM_W  = PROD_W + 2;

  logic signed [PROD_W-1:0] p_rr, p_ii, p_ri, p_ir;
  logic signed [SUM_W-1:0]  wy_r_full, wy_i_full;  // w*y, TW_FRAC fraction bits
  logic signed [SUM_W-1:0]  wy_r, wy_i;            // w*y at the sample's scale
  logic signed [SUM_W-1:0]  x_r_ext, x_i_ext;
  logic signed [SUM_W-1:0]  a_r_full, a_i_full, b_r_full, b_i_full;

  always_comb begin
    p_rr = w_r * y_r;
    p_ii = w_i * y_i;
    p_ri = w_r * y_i;
    p_ir = w_i * y_r;

    wy_r_full = SUM_W'(p_rr) - SUM_W'(p_ii);
    wy_i_full = SUM_W'(p_ri) + SUM_W'(p_ir);
    wy_r      = wy_r_full >>> TW_FRAC;
    wy_i      = wy_i_full >>> TW_FRAC;

    x_r_ext   = SUM_W'(x_r);
    x_i_ext   = SUM_W'(x_i);
    a_r_full  = x_r_ext + wy_r;
    a_i_full  = x_i_ext + wy_i;
    b_r_full  = x_r_ext - wy_r;
    b_i_full  = x_i_ext - wy_i;

    A_r = a_r_full[DATA_W-1:0];
    A_i = a_i_full[DATA_W-1:0];
    B_r = b_r_full[DATA_W-1:0];
    B_i = b_i_full[DATA_W-1:0];
  end

endmodule
