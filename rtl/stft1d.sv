// stft1d: the parallel 1-D short-time Fourier transform array.
//
// One shared comb (comb_diff) forms x(n0+N) - x(n0) and broadcasts it to N channels
// (stft_channel); channel k adds it to its state and rotates by exp(+j*2*pi*k/N). After
// every input sample all N bins of the DFT of the last N samples are available in
// parallel, i.e. one new short-time spectrum per clock (a hop of one sample), using N-1
// rotators and N+1 adders. The phase reference is the start of the window:
//   X(n0, k) = sum_{i=0}^{N-1} x(n0+i) * exp(-j*2*pi*k*i/N).
//
// Timing: a sample accepted with in_valid at edge t gives out_valid and the new bins after
// that edge (one-cycle latency). Before N samples have arrived the bins are those of a
// window padded with zeros in front. clear, given with a sample, restarts the array as
// if that sample were the first after reset; the plain sliding STFT never needs it, but
// the 2-D transform uses it to compute one column's DFT at a time. Word widths, reset
// and the clear input are this design's choices.
module stft1d
  import stft_pkg::*;
#(
  parameter int N          = 16,  // DFT size (number of channels)
  parameter int DW         = 16,  // input width
  parameter int GF         = 4,   // guard fraction bits of the bins
  parameter int CF         = 16,  // coefficient fraction bits
  parameter int USE_CORDIC = 0,   // rotator implementation, see stft_channel
  parameter int AW         = acc_width(DW, N, GF)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 clear,
  input  logic signed [DW-1:0] in_x,
  output logic                 out_valid,
  output logic signed [AW-1:0] out_re [N],
  output logic signed [AW-1:0] out_im [N]
);

  logic signed [DW:0] diff;

  comb_diff #(.N(N), .DW(DW)) u_comb (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .clear(clear), .in_x(in_x), .diff(diff));

  for (genvar k = 0; k < N; k++) begin : g_ch
    stft_channel #(.N(N), .K(k), .IW(DW + 1), .GF(GF), .CF(CF), .USE_CORDIC(USE_CORDIC), .AW(AW)) u_ch (
      .clk(clk), .rst_n(rst_n), .en(in_valid), .clear(clear), .diff(diff),
      .x_re(out_re[k]), .x_im(out_im[k]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
