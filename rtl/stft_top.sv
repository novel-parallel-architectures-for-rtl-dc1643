// stft_top: the recursive short-time Fourier transform processors (1-D filter bank, 2-D
// and 3-D) side by side, plus the pseudo-random binary front end of a multiplierless
// adaptive filter.
//
//  * fb_*: windowed DFT analysis filter bank (stft_filterbank). A sliding N-point STFT
//    (one comb adder, N channel adders, N-1 rotators) produces all N bins after every
//    sample; every D-th spectrum is kept and optionally Hanning-windowed by a shift-add
//    network (fb_win_sel). Output three clocks after the sample, one frame per D samples.
//  * s2_*: 2-D sliding STFT (stft2d) over an N x N window moving along the columns: one
//    column in per N clocks, then N clocks of recursive update; a new N x N spectrum
//    leaves row by row (s2_out_k) every 2N clocks. The input stalls via s2_in_ready.
//  * s3_*: 3-D sliding STFT (stft3d), the next step of the same dimension recursion: a
//    difference slice through a 2-D STFT, then an update loop with N*N linear arrays.
//    One N x N slice per 2N^2 clocks; the spectrum leaves as N rows of N*N bins.
//  * pn_*: 10-bit maximal-length LFSR feeding a TAPS-long binary delay line, whose taps
//    pn_taps (1 = +1, 0 = -1) are the sign controls of the switched-capacitor weights of
//    an analog LMS filter. The analog part is outside this RTL, so the taps are outputs.
//
// The four parts share only clock and reset. Defaults: N = 16 channels, 16-bit input.
module stft_top
  import stft_pkg::*;
#(
  parameter int N    = 16,
  parameter int DW   = 16,
  parameter int D    = 16,
  parameter int GF   = 4,
  parameter int CF   = 16,
  parameter int TAPS = 16,
  parameter int AW1  = acc_width(DW, N, GF),
  parameter int AW2  = acc_width(DW + $clog2(N), N, GF),
  parameter int AW3  = acc_width(DW + 2 * $clog2(N), N, GF)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // 1-D windowed filter bank
  input  logic                  fb_in_valid,
  input  logic signed [DW-1:0]  fb_in_x,
  input  logic                  fb_win_sel,
  output logic                  fb_out_valid,
  output logic signed [AW1-1:0] fb_out_re [N],
  output logic signed [AW1-1:0] fb_out_im [N],
  // 2-D sliding STFT
  input  logic                  s2_in_valid,
  output logic                  s2_in_ready,
  input  logic signed [DW-1:0]  s2_in_x,
  output logic                  s2_out_valid,
  output logic [$clog2(N)-1:0]  s2_out_k,
  output logic signed [AW2-1:0] s2_out_re [N],
  output logic signed [AW2-1:0] s2_out_im [N],
  // 3-D sliding STFT
  input  logic                  s3_in_valid,
  output logic                  s3_in_ready,
  input  logic signed [DW-1:0]  s3_in_x,
  output logic                  s3_out_valid,
  output logic [$clog2(N)-1:0]  s3_out_k,
  output logic signed [AW3-1:0] s3_out_re [N*N],
  output logic signed [AW3-1:0] s3_out_im [N*N],
  // PN source and binary delay line of the adaptive filter
  input  logic                  pn_en,
  output logic                  pn_bit,
  output logic [TAPS-1:0]       pn_taps
);

  stft_filterbank #(.N(N), .DW(DW), .D(D), .GF(GF), .CF(CF), .AW(AW1)) u_fb (
    .clk(clk), .rst_n(rst_n), .in_valid(fb_in_valid), .in_x(fb_in_x), .win_sel(fb_win_sel),
    .out_valid(fb_out_valid), .out_re(fb_out_re), .out_im(fb_out_im));

  stft2d #(.N(N), .DW(DW), .GF(GF), .CF(CF), .AW(AW2)) u_2d (
    .clk(clk), .rst_n(rst_n), .in_valid(s2_in_valid), .clear(1'b0), .in_ready(s2_in_ready), .in_x(s2_in_x),
    .out_valid(s2_out_valid), .out_k(s2_out_k), .out_re(s2_out_re), .out_im(s2_out_im));

  stft3d #(.N(N), .DW(DW), .GF(GF), .CF(CF), .AW(AW3)) u_3d (
    .clk(clk), .rst_n(rst_n), .in_valid(s3_in_valid), .in_ready(s3_in_ready), .in_x(s3_in_x),
    .out_valid(s3_out_valid), .out_k(s3_out_k), .out_re(s3_out_re), .out_im(s3_out_im));

  lfsr10 u_pn (
    .clk(clk), .rst_n(rst_n), .en(pn_en), .bit_out(pn_bit), .state());

  binary_delay_line #(.TAPS(TAPS)) u_dl (
    .clk(clk), .rst_n(rst_n), .en(pn_en), .din(pn_bit), .d(pn_taps));

endmodule
