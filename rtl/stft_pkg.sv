// stft_pkg: constants and elaboration-time helpers shared by the sliding-STFT blocks.
//
// The recursive STFT rotates every channel state by W_k = exp(+j*2*pi*k/N) once per
// sample. The coefficients are fixed-point numbers with CF fraction bits, computed here
// from $cos/$sin while the design is elaborated, so no table file is needed. Both parts
// are truncated toward zero, which keeps |W_k| <= 1: the resonator poles never leave the
// unit circle (the stability argument made for the normal-form IIR section). The CORDIC
// helpers give the micro-rotation directions and gain correction for a fixed angle.
package stft_pkg;

  localparam real PI = 3.14159265358979323846;

  // Width of a channel accumulator: input width, log2(N) bits of growth for the window
  // sum, two guard bits (the adder output before rotation and the sign), GF fraction bits.
  function automatic int acc_width(int dw, int n, int gf);
    return dw + $clog2(n) + 2 + gf;
  endfunction

  // Real and imaginary part of exp(+j*2*pi*k/n), scaled by 2**cf, truncated toward zero.
  function automatic int twiddle_re(int k, int n, int cf);
    return $rtoi($cos(2.0 * PI * real'(k) / real'(n)) * (2.0 ** cf));
  endfunction

  function automatic int twiddle_im(int k, int n, int cf);
    return $rtoi($sin(2.0 * PI * real'(k) / real'(n)) * (2.0 ** cf));
  endfunction

  // Number of quarter turns (0..3) taken out of 2*pi*k/n before the CORDIC iterations,
  // leaving a residual angle in [-pi/4, pi/4].
  function automatic int cordic_quadrant(int k, int n);
    real th;
    int  q;
    th = 2.0 * PI * real'(k % n) / real'(n);
    q  = $rtoi($floor(th / (PI / 2.0) + 0.5));
    return q % 4;
  endfunction

  // Direction of each micro-rotation (bit i = 1: rotate by +atan(2^-i)) for the residual
  // angle of 2*pi*k/n, found by running the angle recursion at elaboration.
  function automatic logic [31:0] cordic_dirs(int k, int n, int iters);
    real th;
    real r;
    logic [31:0] d;
    th = 2.0 * PI * real'(k % n) / real'(n);
    r  = th - real'($rtoi($floor(th / (PI / 2.0) + 0.5))) * (PI / 2.0);
    d  = '0;
    for (int i = 0; i < iters; i++) begin
      if (r >= 0.0) begin
        d[i] = 1'b1;
        r    = r - $atan(1.0 / (2.0 ** i));
      end else begin
        r    = r + $atan(1.0 / (2.0 ** i));
      end
    end
    return d;
  endfunction

  // 1/K for iters CORDIC stages, scaled by 2**cf and truncated (gain stays below one).
  function automatic int cordic_inv_gain(int iters, int cf);
    real g;
    g = 1.0;
    for (int i = 0; i < iters; i++) g = g * $sqrt(1.0 + 1.0 / (4.0 ** i));
    return $rtoi((2.0 ** cf) / g);
  endfunction

endpackage
