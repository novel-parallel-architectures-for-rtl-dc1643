// cordic_rotator: rotates a complex word by the fixed angle 2*pi*K/N using shifts and
// adds only, the CORDIC alternative to the channel multiplier.
//
// How it works: a quarter-turn pre-rotation (swap and negate) leaves a residual angle in
// [-pi/4, pi/4]; ITER unrolled micro-rotations by +/-atan(2^-i) then approach it. Since
// the angle is a constant, every micro-rotation direction is fixed while the design is
// elaborated (stft_pkg::cordic_dirs), so each stage is just two shifted adds. The CORDIC
// gain is removed at the end by a constant factor (a fixed shift-add network after
// synthesis) truncated so the overall gain stays at or below one. GB extra fraction bits
// carry the intermediate values. Combinational; the use of a CORDIC in place of the
// multiplier follows the text, the unrolled form and all widths are this design's choices.
module cordic_rotator
  import stft_pkg::*;
#(
  parameter int AW   = 26,  // data width
  parameter int N    = 16,  // angle unit 2*pi/N
  parameter int K    = 1,   // rotation by 2*pi*K/N
  parameter int ITER = 18,  // micro-rotations (at most 32)
  parameter int CF   = 16,  // fraction bits of the gain-correction constant
  parameter int GB   = 6    // extra fraction bits inside the iterations
) (
  input  logic signed [AW-1:0] a_re,
  input  logic signed [AW-1:0] a_im,
  output logic signed [AW-1:0] b_re,
  output logic signed [AW-1:0] b_im
);

  localparam int          IW   = AW + 2 + GB;                 // internal width
  localparam int          Q    = cordic_quadrant(K, N);
  localparam logic [31:0] DIRS = cordic_dirs(K, N, ITER);
  localparam int          KINV = cordic_inv_gain(ITER, CF);
  localparam int          PW   = IW + CF + 2;

  logic signed [IW-1:0] xs [ITER+1];
  logic signed [IW-1:0] ys [ITER+1];
  logic signed [IW-1:0] ar, ai;
  logic signed [PW-1:0] pr, pi_;

  always_comb begin
    ar = IW'(a_re) <<< GB;
    ai = IW'(a_im) <<< GB;
    unique case (Q)
      0:       begin xs[0] =  ar; ys[0] =  ai; end
      1:       begin xs[0] = -ai; ys[0] =  ar; end
      2:       begin xs[0] = -ar; ys[0] = -ai; end
      default: begin xs[0] =  ai; ys[0] = -ar; end
    endcase
    for (int i = 0; i < ITER; i++) begin
      if (DIRS[i]) begin
        xs[i+1] = xs[i] - (ys[i] >>> i);
        ys[i+1] = ys[i] + (xs[i] >>> i);
      end else begin
        xs[i+1] = xs[i] + (ys[i] >>> i);
        ys[i+1] = ys[i] - (xs[i] >>> i);
      end
    end
    pr  = PW'(xs[ITER]) * PW'(KINV);
    pi_ = PW'(ys[ITER]) * PW'(KINV);
    b_re = AW'((pr  + (PW'(1) <<< (CF + GB - 1))) >>> (CF + GB));
    b_im = AW'((pi_ + (PW'(1) <<< (CF + GB - 1))) >>> (CF + GB));
  end

endmodule
