// stft_channel: one frequency channel k of the recursive (sliding) STFT,
//   X(n0+1, k) = exp(+j*2*pi*k/N) * ( X(n0, k) + diff ),
// where diff = x(n0+N) - x(n0) comes from the shared comb.
//
// The channel is an adder, a complex rotation and a state register: the FIR comb plus
// this one-pole IIR section realise an N-point DFT over a sliding rectangular window.
// Channel 0 rotates by 1 and needs no rotator, so it is a plain accumulator. The
// rotation is the constant-coefficient multiplier (USE_CORDIC = 0) or the shift-add CORDIC
// (USE_CORDIC = 1); both are described for this structure, the multiplier is the default.
// Coefficients are truncated toward zero so the pole stays on or inside the unit circle.
//
// Timing: when en is high the state is updated at the clock edge (with clear also high
// the old state is taken as zero, restarting the sum); x_re/x_im are the
// registered state, available the cycle after the sample. The state carries GF fraction
// bits so rounding noise of the recursion stays below the input LSB.
module stft_channel
  import stft_pkg::*;
#(
  parameter int N          = 16,  // DFT size
  parameter int K          = 1,   // channel index, 0..N-1
  parameter int IW         = 17,  // width of diff
  parameter int GF         = 4,   // guard fraction bits of the state
  parameter int CF         = 16,  // coefficient fraction bits
  parameter int USE_CORDIC = 0,   // 0: multiplier, 1: CORDIC rotator
  parameter int AW         = acc_width(IW - 1, N, GF)  // state width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 clear,
  input  logic signed [IW-1:0] diff,
  output logic signed [AW-1:0] x_re,
  output logic signed [AW-1:0] x_im
);

  localparam logic signed [CF+1:0] C_RE = (CF+2)'(twiddle_re(K, N, CF));
  localparam logic signed [CF+1:0] C_IM = (CF+2)'(twiddle_im(K, N, CF));

  logic signed [AW-1:0] s_re, s_im;   // X + diff, before rotation
  logic signed [AW-1:0] n_re, n_im;   // next state

  assign s_re = (clear ? '0 : x_re) + (AW'(diff) <<< GF);
  assign s_im = clear ? '0 : x_im;

  if (K == 0) begin : g_norot
    assign n_re = s_re;
    assign n_im = s_im;
  end else if (USE_CORDIC != 0) begin : g_cordic
    cordic_rotator #(.AW(AW), .N(N), .K(K), .CF(CF)) u_rot (
      .a_re(s_re), .a_im(s_im), .b_re(n_re), .b_im(n_im));
  end else begin : g_mult
    complex_rotator #(.AW(AW), .CF(CF)) u_rot (
      .a_re(s_re), .a_im(s_im), .c_re(C_RE), .c_im(C_IM), .b_re(n_re), .b_im(n_im));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_re <= '0;
      x_im <= '0;
    end else if (en) begin
      x_re <= n_re;
      x_im <= n_im;
    end
  end

endmodule
