// tb_cordic_rotator: instantiates the CORDIC for several fixed angles 2*pi*K/N (one in
// each quadrant and the exact quarter turns) and compares each output with the rotation
// computed in floating point. The error allowed is a few LSB plus 2^-15 of the input
// magnitude (residual angle and gain truncation). Watchdog included.
module tb_cordic_rotator;
  localparam int AW = 26, N = 16, NK = 6;
  localparam int KS [NK] = '{1, 3, 4, 7, 10, 13};
  logic signed [AW-1:0] a_re, a_im;
  logic signed [AW-1:0] b_re [NK];
  logic signed [AW-1:0] b_im [NK];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NK; i++) begin : g_dut
    cordic_rotator #(.AW(AW), .N(N), .K(KS[i])) dut (
      .a_re(a_re), .a_im(a_im), .b_re(b_re[i]), .b_im(b_im[i]));
  end

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, wr, wi, tol, mag;
    for (int t = 0; t < 1000; t++) begin
      a_re = AW'($signed($urandom_range(0, 1 << 24)) - (1 << 23));
      a_im = AW'($signed($urandom_range(0, 1 << 24)) - (1 << 23));
      #1;
      mag = absr(real'(a_re)) + absr(real'(a_im));
      tol = 3.0 + mag / 32768.0;
      for (int i = 0; i < NK; i++) begin
        th = 6.283185307179586 * KS[i] / N;
        wr = real'(a_re) * $cos(th) - real'(a_im) * $sin(th);
        wi = real'(a_re) * $sin(th) + real'(a_im) * $cos(th);
        checks++;
        if (absr(real'(b_re[i]) - wr) > tol || absr(real'(b_im[i]) - wi) > tol) begin
          failures++;
          if (failures < 10) $display("K=%0d got (%0d,%0d) want (%f,%f)", KS[i], b_re[i], b_im[i], wr, wi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
