// stft_filterbank: windowed, decimated DFT analysis filter bank built from the sliding
// STFT array.
//
// stft1d produces a full N-bin spectrum of the last N samples after every sample; the
// downsampler keeps every D-th spectrum (D = N gives non-overlapping windows) and
// window_net optionally converts it to the Hanning window by shifts and adds. The order
// decimate-then-window is this design's choice (both steps act on one frame at a time,
// so the order does not change the result, and windowing after decimation runs the
// network only once per kept frame).
//
// Timing: the spectrum that includes the sample accepted at edge t appears with
// out_valid three clocks later (array, decimator and window register, one each).
module stft_filterbank
  import stft_pkg::*;
#(
  parameter int N          = 16,
  parameter int DW         = 16,
  parameter int D          = 16,
  parameter int GF         = 4,
  parameter int CF         = 16,
  parameter int USE_CORDIC = 0,
  parameter int AW         = acc_width(DW, N, GF)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_x,
  input  logic                 win_sel,
  output logic                 out_valid,
  output logic signed [AW-1:0] out_re [N],
  output logic signed [AW-1:0] out_im [N]
);

  logic                 s_valid, d_valid;
  logic signed [AW-1:0] s_re [N];
  logic signed [AW-1:0] s_im [N];
  logic signed [AW-1:0] d_re [N];
  logic signed [AW-1:0] d_im [N];

  stft1d #(.N(N), .DW(DW), .GF(GF), .CF(CF), .USE_CORDIC(USE_CORDIC), .AW(AW)) u_stft (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .clear(1'b0), .in_x(in_x),
    .out_valid(s_valid), .out_re(s_re), .out_im(s_im));

  downsampler #(.N(N), .D(D), .AW(AW)) u_dec (
    .clk(clk), .rst_n(rst_n), .in_valid(s_valid), .in_re(s_re), .in_im(s_im),
    .out_valid(d_valid), .out_re(d_re), .out_im(d_im));

  window_net #(.N(N), .AW(AW)) u_win (
    .clk(clk), .rst_n(rst_n), .win_sel(win_sel), .in_valid(d_valid),
    .in_re(d_re), .in_im(d_im), .out_valid(out_valid), .out_re(out_re), .out_im(out_im));

endmodule
