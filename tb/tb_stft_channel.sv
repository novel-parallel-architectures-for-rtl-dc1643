// tb_stft_channel: drives one channel (K = 3 of N = 16, and channel 0) with random diff
// values and compares the state after each update with the recursion
// X <- W (X + diff) evaluated in floating point, W = exp(+j*2*pi*K/N) with both parts
// truncated toward zero to 16 fraction bits as specified; the state must hold when en is
// low, and restart from zero on clear. The tolerance covers the accumulated rounding. Watchdog included.
module tb_stft_channel;
  import stft_pkg::*;
  localparam int N = 16, IW = 17, GF = 4;
  localparam int AW = acc_width(IW - 1, N, GF);
  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  logic signed [IW-1:0] diff = '0;
  logic signed [AW-1:0] x_re, x_im, z_re, z_im;
  int checks = 0, failures = 0;

  stft_channel #(.N(N), .K(3), .IW(IW), .GF(GF)) dut (.*);
  stft_channel #(.N(N), .K(0), .IW(IW), .GF(GF)) dut0 (
    .clk(clk), .rst_n(rst_n), .en(en), .clear(clear), .diff(diff), .x_re(z_re), .x_im(z_im));
  always #5 clk = ~clk;

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rr = 0.0, ri = 0.0, t, th, cr, ci;
    int acc0 = 0;
    th = 6.283185307179586 * 3 / N;
    cr = $rtoi($cos(th) * 65536.0) / 65536.0;
    ci = $rtoi($sin(th) * 65536.0) / 65536.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 400; s++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      diff = IW'($signed($urandom_range(0, 4000)) - 2000);
      clear = ($urandom_range(0, 50) == 0);
      if (en && clear) begin rr = 0.0; ri = 0.0; acc0 = 0; end
      if (en) begin
        t  = (rr + diff) * cr - ri * ci;
        ri = (rr + diff) * ci + ri * cr;
        rr = t;
        acc0 += int'(diff);
      end
      @(posedge clk);
      #1;
      checks += 2;
      if (absr(real'(x_re) / 16.0 - rr) > 2.0 || absr(real'(x_im) / 16.0 - ri) > 2.0) begin
        failures++;
        $display("s=%0d got (%f,%f) want (%f,%f)", s, real'(x_re) / 16.0, real'(x_im) / 16.0, rr, ri);
      end
      if (z_re != AW'(acc0 * 16) || z_im != 0) begin
        failures++;
        $display("s=%0d channel 0 got %0d want %0d", s, z_re, acc0 * 16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
