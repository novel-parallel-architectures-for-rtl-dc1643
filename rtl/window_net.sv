// window_net: shift-and-add network that turns rectangular-window STFT bins into
// Hanning-window bins without multipliers.
//
// For the Hanning window w(n) = (1 - cos(2*pi*n/N))/2 the windowed spectrum is
//   XH(k) = X(k)/2 - X(k-1)/4 - X(k+1)/4   (indices modulo N),
// so each output needs only its two neighbouring bins: the network is local and regular.
// It is computed as (2X(k) - X(k-1) - X(k+1)) >>> 2 (arithmetic shift, rounding toward
// minus infinity). win_sel = 0 passes the rectangular bins through. The formula is the
// one given for this structure; the bypass mode and the single register stage are this
// design's choices. Latency: one clock from in_valid to out_valid.
module window_net #(
  parameter int N  = 16,
  parameter int AW = 26
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 win_sel,  // 0: rectangular, 1: Hanning
  input  logic                 in_valid,
  input  logic signed [AW-1:0] in_re  [N],
  input  logic signed [AW-1:0] in_im  [N],
  output logic                 out_valid,
  output logic signed [AW-1:0] out_re [N],
  output logic signed [AW-1:0] out_im [N]
);

  logic signed [AW+1:0] h_re [N];
  logic signed [AW+1:0] h_im [N];

  always_comb begin
    for (int k = 0; k < N; k++) begin
      h_re[k] = ((AW+2)'(in_re[k]) <<< 1) - (AW+2)'(in_re[(k + N - 1) % N]) - (AW+2)'(in_re[(k + 1) % N]);
      h_im[k] = ((AW+2)'(in_im[k]) <<< 1) - (AW+2)'(in_im[(k + N - 1) % N]) - (AW+2)'(in_im[(k + 1) % N]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int k = 0; k < N; k++) begin
        out_re[k] <= win_sel ? AW'(h_re[k] >>> 2) : in_re[k];
        out_im[k] <= win_sel ? AW'(h_im[k] >>> 2) : in_im[k];
      end
    end
  end

endmodule
