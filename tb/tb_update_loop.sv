// tb_update_loop: runs update passes with random column spectra D(l) and random idle gaps,
// keeping a floating-point copy of the N x N spectrum updated by
// X(k,l) <- W_k (X(k,l) + D(l)), W_k = exp(+j*2*pi*k/N) truncated to 16 fraction bits.
// Passes started with clear must treat the stored spectrum as zero. Each pass must take N cycles (busy/done), and must emit rows k = 0..N-1 on consecutive
// clocks starting one clock after start, each matching the model. Watchdog included.
module tb_update_loop;
  localparam int N = 16, IW = 27, AW = 30, CF = 16;
  logic clk = 0, rst_n = 0, start = 0, clear = 0;
  logic signed [IW-1:0] d_re [N];
  logic signed [IW-1:0] d_im [N];
  logic busy, done, out_valid;
  logic [$clog2(N)-1:0] out_k;
  logic signed [AW-1:0] out_re [N];
  logic signed [AW-1:0] out_im [N];
  real xr [N][N];
  real xi [N][N];
  real cr [N];
  real ci [N];
  int checks = 0, failures = 0;

  update_loop #(.N(N), .IW(IW), .AW(AW), .CF(CF)) dut (.*);
  always #5 clk = ~clk;

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t;
    for (int k = 0; k < N; k++) begin
      cr[k] = $rtoi($cos(6.283185307179586 * k / N) * 65536.0) / 65536.0;
      ci[k] = $rtoi($sin(6.283185307179586 * k / N) * 65536.0) / 65536.0;
      for (int l = 0; l < N; l++) begin xr[k][l] = 0.0; xi[k][l] = 0.0; end
    end
    for (int l = 0; l < N; l++) begin d_re[l] = '0; d_im[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 30; p++) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      @(negedge clk);
      for (int l = 0; l < N; l++) begin
        d_re[l] = IW'($signed($urandom_range(0, 1 << 20)) - (1 << 19));
        d_im[l] = IW'($signed($urandom_range(0, 1 << 20)) - (1 << 19));
      end
      start = 1;
      clear = (p % 7 == 3);
      if (clear)
        for (int k = 0; k < N; k++)
          for (int l = 0; l < N; l++) begin xr[k][l] = 0.0; xi[k][l] = 0.0; end
      for (int k = 0; k < N; k++) begin
        for (int l = 0; l < N; l++) begin
          t        = (xr[k][l] + d_re[l]) * cr[k] - (xi[k][l] + d_im[l]) * ci[k];
          xi[k][l] = (xr[k][l] + d_re[l]) * ci[k] + (xi[k][l] + d_im[l]) * cr[k];
          xr[k][l] = t;
        end
        #1;
        checks++;
        if (done != (k == N - 1) || busy != (k != 0)) begin
          failures++;
          $display("pass %0d cycle %0d: busy %0d done %0d", p, k, busy, done);
        end
        @(posedge clk);
        #1;
        start = 0;
        clear = 0;
        checks++;
        if (!out_valid || out_k != k) begin
          failures++;
          $display("pass %0d: row %0d missing (valid %0d k %0d)", p, k, out_valid, out_k);
        end
        for (int l = 0; l < N; l++) begin
          checks++;
          if (absr(out_re[l] - xr[k][l]) > 8.0 || absr(out_im[l] - xi[k][l]) > 8.0) begin
            failures++;
            if (failures < 10) $display("pass %0d k %0d l %0d got (%0d,%0d) want (%f,%f)",
                                        p, k, l, out_re[l], out_im[l], xr[k][l], xi[k][l]);
          end
        end
      end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("busy after pass"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
