// tb_stft2d: streams random image columns (N samples each, in_valid held high) into the
// 2-D sliding STFT and, after every column, compares the N rows it emits with a direct
// 2-D DFT of the last N columns (zeros before the first), computed in floating point:
//   X(k,l) = sum_i sum_n x(m0+i, n) exp(-j*2*pi*(k*i + l*n)/N).
// It also checks the schedule: a column is accepted in N clocks, in_ready then stays low
// for N clocks (the update), so a new spectrum is produced every 2N clocks. Watchdog.
module tb_stft2d;
  import stft_pkg::*;
  localparam int N = 16, DW = 16, GF = 4;
  localparam int AW = acc_width(DW + $clog2(N), N, GF);
  localparam int NCOL = 40;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, in_valid = 0, clear = 0, in_ready, out_valid;
  logic signed [DW-1:0] in_x = '0;
  logic [$clog2(N)-1:0] out_k;
  logic signed [AW-1:0] out_re [N];
  logic signed [AW-1:0] out_im [N];
  real img [NCOL + N][N];
  real cs [N * N];
  real sn [N * N];
  int checks = 0, failures = 0, stalls = 0, rows = 0;
  int col = 0;        // columns fully accepted
  longint cyc = 0, last_col_cyc = -1;
  real maxerr = 0.0;

  stft2d #(.N(N), .DW(DW), .GF(GF)) dut (.*);
  always #5 clk = ~clk;

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: window = columns col-N .. col-1 of img (img rows 0..N-1 are zero padding)
  task automatic check_row(int k);
    real rr, ri, e;
    for (int l = 0; l < N; l++) begin
      rr = 0.0; ri = 0.0;
      for (int i = 0; i < N; i++)
        for (int n = 0; n < N; n++) begin
          rr += img[col + i][n] * cs[(k * i + l * n) % N];
          ri -= img[col + i][n] * sn[(k * i + l * n) % N];
        end
      e = absr(real'(out_re[l]) / 16.0 - rr);
      if (absr(real'(out_im[l]) / 16.0 - ri) > e) e = absr(real'(out_im[l]) / 16.0 - ri);
      if (e > maxerr) maxerr = e;
      checks++;
      if (e > 0.001 * N * N * 32768.0) begin
        failures++;
        if (failures < 10) $display("col %0d k %0d l %0d got (%f,%f) want (%f,%f)", col, k, l,
                                    real'(out_re[l]) / 16.0, real'(out_im[l]) / 16.0, rr, ri);
      end
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid && !in_ready) stalls++;
    if (rst_n && out_valid) begin
      checks++;
      if (out_k != (rows % N)) begin failures++; $display("row order wrong"); end
      check_row(rows % N);
      rows++;
    end
  end

  initial begin
    for (int i = 0; i < N * N; i++) begin
      cs[i] = $cos(2.0 * PI * (i % N) / N);
      sn[i] = $sin(2.0 * PI * (i % N) / N);
    end
    for (int c = 0; c < NCOL + N; c++)
      for (int n = 0; n < N; n++)
        img[c][n] = (c < N) ? 0.0 : real'($signed($urandom_range(0, 65535)) - 32768);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCOL; c++) begin
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        in_valid = 1;
        in_x = DW'($rtoi(img[c + N][n]));
        do @(posedge clk); while (!in_ready);
      end
      // the column is in; the window now ends at column c+N of img
      col = c + 1;
      checks++;
      if (last_col_cyc >= 0 && cyc - last_col_cyc != 2 * N) begin
        failures++;
        $display("column %0d took %0d cycles, expected %0d", c, cyc - last_col_cyc, 2 * N);
      end
      last_col_cyc = cyc;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (N + 4) @(posedge clk);
    checks += 2;
    if (rows != NCOL * N) begin failures++; $display("rows %0d", rows); end
    if (stalls == 0) begin failures++; $display("input never stalled"); end
    $display("stall cycles %0d, rows %0d, max abs error %f", stalls, rows, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
