// comb_diff: the input comb of the recursive STFT, diff = x(n0+N) - x(n0).
//
// An N-stage shift register holds the last N samples; on every accepted sample the
// oldest one is subtracted from the newest. This single adder is shared by all N
// channels. The subtraction follows the update equation of the sliding DFT; the register
// implementation and the reset to zero (so that samples before reset count as zero) are
// this design's choices.
//
// Interface: in_valid/in_x one sample per clock; diff is combinational from in_x and the
// oldest stored sample and is meant to be used in the same cycle as in_valid. clear
// (with in_valid) restarts the window: the delay line is emptied, so the sample taken
// with clear is the first of a new, zero-padded history.
module comb_diff #(
  parameter int N  = 16,   // window length
  parameter int DW = 16    // input sample width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 clear,
  input  logic signed [DW-1:0] in_x,
  output logic signed [DW:0]   diff
);

  logic signed [DW-1:0] dl [N];  // dl[0] newest, dl[N-1] = x(n0)

  assign diff = (DW+1)'(in_x) - (clear ? '0 : (DW+1)'(dl[N-1]));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) dl[i] <= '0;
    end else if (in_valid) begin
      dl[0] <= in_x;
      for (int i = 1; i < N; i++) dl[i] <= clear ? '0 : dl[i-1];
    end
  end

endmodule
