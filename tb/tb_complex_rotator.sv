// tb_complex_rotator: random complex inputs and coefficients; the output must equal the
// exact complex product computed in floating point, rounded to the data LSB (within one
// LSB). Corner coefficients +1, -1, +j are checked exactly. Watchdog included.
module tb_complex_rotator;
  localparam int AW = 26, CF = 16;
  logic signed [AW-1:0] a_re, a_im, b_re, b_im;
  logic signed [CF+1:0] c_re, c_im;
  int checks = 0, failures = 0;

  complex_rotator #(.AW(AW), .CF(CF)) dut (.*);

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, wr, wi, er, ei;
    for (int t = 0; t < 2000; t++) begin
      th = 6.283185307179586 * $urandom_range(0, 9999) / 10000.0;
      c_re = (CF+2)'($rtoi($cos(th) * 65536.0));
      c_im = (CF+2)'($rtoi($sin(th) * 65536.0));
      if (t == 0) begin c_re = 18'sd65536;  c_im = '0; end
      if (t == 1) begin c_re = -18'sd65536; c_im = '0; end
      if (t == 2) begin c_re = '0; c_im = 18'sd65536; end
      a_re = AW'($signed($urandom_range(0, 1 << 24)) - (1 << 23));
      a_im = AW'($signed($urandom_range(0, 1 << 24)) - (1 << 23));
      #1;
      wr = (real'(a_re) * c_re - real'(a_im) * c_im) / 65536.0;
      wi = (real'(a_re) * c_im + real'(a_im) * c_re) / 65536.0;
      er = absr(real'(b_re) - wr);
      ei = absr(real'(b_im) - wi);
      checks++;
      if (er > 0.5001 || ei > 0.5001 || (t < 3 && (er != 0.0 || ei != 0.0))) begin
        failures++;
        if (failures < 10) $display("t=%0d got (%0d,%0d) want (%f,%f)", t, b_re, b_im, wr, wi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
