// downsampler: keeps one short-time spectrum in every D, turning the sliding STFT (a
// new spectrum every sample) into a decimated DFT analysis filter bank. With D = N the
// kept spectra belong to non-overlapping windows.
//
// A counter of valid input frames; the D-th, 2D-th, ... frame after reset is registered
// and flagged with out_valid for one cycle (latency one clock). The factor and the phase
// of the kept frame are this design's choices; the decimation itself is the filter-bank
// use of the STFT array.
module downsampler #(
  parameter int N  = 16,  // bins per frame
  parameter int D  = 16,  // decimation factor
  parameter int AW = 26   // bin width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [AW-1:0] in_re  [N],
  input  logic signed [AW-1:0] in_im  [N],
  output logic                 out_valid,
  output logic signed [AW-1:0] out_re [N],
  output logic signed [AW-1:0] out_im [N]
);

  localparam int CW = (D > 1) ? $clog2(D) : 1;

  logic [CW-1:0] cnt;
  logic          keep;

  assign keep = in_valid && (cnt == CW'(D - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= keep;
      if (in_valid) cnt <= (cnt == CW'(D - 1)) ? '0 : cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (keep) begin
      out_re <= in_re;
      out_im <= in_im;
    end
  end

endmodule
