// complex_rotator: b = a * c for complex a and a complex coefficient c of magnitude <= 1,
// the planar rotation [br; bi] = [cr -ci; ci cr] [ar; ai].
//
// Four real products and two sums are formed at full width, rounded half up at bit CF
// and cut back to the AW-bit format of a. The coefficient has CF fraction bits and two
// integer bits, so +1 and -1 are exact. Purely combinational: in the STFT channel it sits
// inside the one-cycle recursion loop. Rounding and widths are this design's choices.
module complex_rotator #(
  parameter int AW = 26,   // data width (two's complement)
  parameter int CF = 16    // coefficient fraction bits; coefficient width CF+2
) (
  input  logic signed [AW-1:0]   a_re,
  input  logic signed [AW-1:0]   a_im,
  input  logic signed [CF+1:0]   c_re,
  input  logic signed [CF+1:0]   c_im,
  output logic signed [AW-1:0]   b_re,
  output logic signed [AW-1:0]   b_im
);

  localparam int PW = AW + CF + 3;  // product width plus one bit for the sum

  logic signed [PW-1:0] s_re, s_im;

  always_comb begin
    s_re = PW'(a_re) * PW'(c_re) - PW'(a_im) * PW'(c_im);
    s_im = PW'(a_re) * PW'(c_im) + PW'(a_im) * PW'(c_re);
    b_re = AW'((s_re + (PW'(1) <<< (CF - 1))) >>> CF);
    b_im = AW'((s_im + (PW'(1) <<< (CF - 1))) >>> CF);
  end

endmodule
