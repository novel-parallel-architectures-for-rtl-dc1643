// binary_delay_line: shift register that delays a binary (+1/-1) input sequence and
// presents its last TAPS values d1..dn in parallel.
//
// In a multiplierless LMS adaptive FIR filter with a binary input these bits replace
// both the analog delay line and the multipliers: d_i only selects whether the error is
// added to or subtracted from weight i and whether weight i is added to or subtracted
// from the output sum. d[0] is d1, the newest sample; a 1 means +1 and a 0 means -1.
// Shifts on en; reset clears all taps. Tap count and reset are this design's choices.
module binary_delay_line #(
  parameter int TAPS = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            din,
  output logic [TAPS-1:0] d
);

  always_ff @(posedge clk) begin
    if (!rst_n)  d <= '0;
    else if (en) d <= {d[TAPS-2:0], din};
  end

endmodule
