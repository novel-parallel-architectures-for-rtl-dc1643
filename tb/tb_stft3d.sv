// tb_stft3d: streams random N x N slices into the 3-D sliding STFT (N = 8 here to keep
// the run short) and checks every emitted row against a direct 3-D DFT of the last N
// slices, computed in floating point as a 2-D DFT of each slice followed by the DFT
// across slices. Checks that each slice takes 2N^2 clocks with in_valid held high, that
// N rows follow each slice, and that the 3-D update overlaps the loading of the next
// slice. Watchdog included.
module tb_stft3d;
  import stft_pkg::*;
  localparam int N = 8, DW = 16, GF = 4;
  localparam int AW = acc_width(DW + 2 * $clog2(N), N, GF);
  localparam int NSL = 14;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic signed [DW-1:0] in_x = '0;
  logic [$clog2(N)-1:0] out_k;
  logic signed [AW-1:0] out_re [N*N];
  logic signed [AW-1:0] out_im [N*N];
  real img [NSL + N][N][N];
  real f2r [NSL + N][N][N];   // 2-D DFT of each slice
  real f2i [NSL + N][N][N];
  int checks = 0, failures = 0, rows = 0, overlap = 0;
  int win = 1;         // window = padded slices win .. win+N-1
  longint cyc = 0, last_cyc = -1;
  real maxerr = 0.0;

  stft3d #(.N(N), .DW(DW), .GF(GF)) dut (.*);
  always #5 clk = ~clk;

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid && in_valid && in_ready) overlap++;
    if (rst_n && out_valid) begin
      checks++;
      if (out_k != (rows % N)) begin failures++; $display("row order wrong"); end
      for (int l = 0; l < N * N; l++) begin
        real rr, ri, e;
        rr = 0.0; ri = 0.0;
        for (int i = 0; i < N; i++) begin
          rr += f2r[win + i][l / N][l % N] * $cos(2.0 * PI * ((out_k * i) % N) / N)
              + f2i[win + i][l / N][l % N] * $sin(2.0 * PI * ((out_k * i) % N) / N);
          ri += f2i[win + i][l / N][l % N] * $cos(2.0 * PI * ((out_k * i) % N) / N)
              - f2r[win + i][l / N][l % N] * $sin(2.0 * PI * ((out_k * i) % N) / N);
        end
        e = absr(real'(out_re[l]) / 16.0 - rr);
        if (absr(real'(out_im[l]) / 16.0 - ri) > e) e = absr(real'(out_im[l]) / 16.0 - ri);
        if (e > maxerr) maxerr = e;
        checks++;
        if (e > 0.001 * N * N * N * 32768.0) begin
          failures++;
          if (failures < 10) $display("window %0d k %0d l %0d error %f", win, out_k, l, e);
        end
      end
      rows++;
      if (out_k == N - 1) win++;
    end
  end

  initial begin
    for (int c = 0; c < NSL + N; c++)
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++)
          img[c][a][b] = (c < N) ? 0.0 : real'($signed($urandom_range(0, 65535)) - 32768);
    for (int c = 0; c < NSL + N; c++)
      for (int l1 = 0; l1 < N; l1++)
        for (int l2 = 0; l2 < N; l2++) begin
          f2r[c][l1][l2] = 0.0; f2i[c][l1][l2] = 0.0;
          for (int a = 0; a < N; a++)
            for (int b = 0; b < N; b++) begin
              f2r[c][l1][l2] += img[c][a][b] * $cos(2.0 * PI * ((l1 * a + l2 * b) % N) / N);
              f2i[c][l1][l2] -= img[c][a][b] * $sin(2.0 * PI * ((l1 * a + l2 * b) % N) / N);
            end
        end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NSL; c++) begin
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++) begin
          @(negedge clk);
          in_valid = 1;
          in_x = DW'($rtoi(img[c + N][a][b]));
          do @(posedge clk); while (!in_ready);
        end
      checks++;
      if (last_cyc >= 0 && cyc - last_cyc != 2 * N * N) begin
        failures++;
        $display("slice %0d took %0d cycles, expected %0d", c, cyc - last_cyc, 2 * N * N);
      end
      last_cyc = cyc;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4 * N + 8) @(posedge clk);
    checks += 2;
    if (rows != NSL * N) begin failures++; $display("rows %0d, expected %0d", rows, NSL * N); end
    if (overlap == 0) begin failures++; $display("3-D update never overlapped loading"); end
    $display("rows %0d, overlapped load cycles %0d, max abs error %f", rows, overlap, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
