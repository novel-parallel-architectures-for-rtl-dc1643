// tb_stft_top: end-to-end test of stft_top at its default parameters (N = 16 channels,
// 16-bit samples, decimation 16), all three parts running at once.
//
//  * Filter bank: random samples with gaps; every 16th sample must give, three clocks
//    later, the DFT of the last 16 samples, plain or Hanning-windowed according to
//    fb_win_sel, which alternates between frames (floating-point reference).
//  * 2-D STFT: random 16-sample columns offered continuously; after each column the 16
//    emitted rows must match a direct 2-D DFT of the last 16 columns, and each column
//    must take 2N = 32 clocks, the input stalling during the update.
//  * 3-D STFT: random 16 x 16 slices offered continuously; every emitted row must match
//    a direct 3-D DFT of the last 16 slices (2-D DFT per slice, then across slices), and
//    each slice must take 2N^2 = 512 clocks; more than N slices are sent so that slices
//    also leave the window.
//  * PN front end: taps must be the LFSR output delayed by 1..TAPS enabled clocks, and
//    the LFSR output must follow its stage-7/stage-10 recurrence.
// Each mechanism is counted (kept frames, frames per window mode, dropped frames between
// kept ones, 2-D and 3-D input stalls and update passes, 3-D updates overlapping the next
// load, PN shifts); one that never happens is a
// failure. Ends with one TB_RESULT line; a watchdog stops a hung run.
module tb_stft_top;
  import stft_pkg::*;
  localparam int N = 16, DW = 16, TAPS = 16, GF = 4;
  localparam int AW1 = acc_width(DW, N, GF);
  localparam int AW2 = acc_width(DW + $clog2(N), N, GF);
  localparam int AW3 = acc_width(DW + 2 * $clog2(N), N, GF);
  localparam int NSL = N + 3;
  localparam int NCOL = 24, NSAMP = 700;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic fb_in_valid = 0, fb_win_sel = 0, fb_out_valid;
  logic signed [DW-1:0] fb_in_x = '0;
  logic signed [AW1-1:0] fb_out_re [N];
  logic signed [AW1-1:0] fb_out_im [N];
  logic s2_in_valid = 0, s2_in_ready, s2_out_valid;
  logic signed [DW-1:0] s2_in_x = '0;
  logic [$clog2(N)-1:0] s2_out_k;
  logic signed [AW2-1:0] s2_out_re [N];
  logic signed [AW2-1:0] s2_out_im [N];
  logic s3_in_valid = 0, s3_in_ready, s3_out_valid;
  logic signed [DW-1:0] s3_in_x = '0;
  logic [$clog2(N)-1:0] s3_out_k;
  logic signed [AW3-1:0] s3_out_re [N*N];
  logic signed [AW3-1:0] s3_out_im [N*N];
  logic pn_en = 0, pn_bit;
  logic [TAPS-1:0] pn_taps;

  stft_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_kept = 0, n_hann = 0, n_rect = 0, n_dropped = 0, n_stall = 0, n_update = 0, n_shift = 0;
  longint cyc = 0;
  int n3_stall = 0, n3_update = 0, n3_overlap = 0;
  bit fb_done = 0, s2_done = 0, s3_done = 0, pn_done = 0;

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- filter bank ----------------
  real fhist [$];
  longint fdue [$];
  real fre [$];
  real fim [$];

  always @(posedge clk) begin
    if (rst_n && fb_out_valid) begin
      checks++;
      if (fdue.size() == 0 || fdue[0] != cyc) begin
        failures++;
        $display("filter bank: unexpected frame at cycle %0d", cyc);
      end else begin
        void'(fdue.pop_front());
        for (int k = 0; k < N; k++) begin
          real er, ei;
          er = absr(real'(fb_out_re[k]) / 16.0 - fre.pop_front());
          ei = absr(real'(fb_out_im[k]) / 16.0 - fim.pop_front());
          checks++;
          if (er > 0.002 * N * 32768.0 || ei > 0.002 * N * 32768.0) begin
            failures++;
            if (failures < 10) $display("filter bank frame %0d bin %0d error (%f,%f)", n_kept, k, er, ei);
          end
        end
      end
      n_kept++;
    end
  end

  initial begin : fb_drive
    real rr, ri, w;
    for (int i = 0; i < N; i++) fhist.push_back(0.0);
    wait (rst_n);
    for (int s = 0; s < NSAMP; s++) begin
      @(negedge clk);
      fb_in_valid = ($urandom_range(0, 3) != 0);
      fb_in_x = DW'($signed($urandom_range(0, 65535)) - 32768);
      @(posedge clk);
      if (fb_in_valid) begin
        fhist.push_back(real'(fb_in_x));
        if ((fhist.size() - N) % N == 0) begin
          fdue.push_back(cyc + 3);
          if (fb_win_sel) n_hann++; else n_rect++;
          for (int k = 0; k < N; k++) begin
            rr = 0.0; ri = 0.0;
            for (int i = 0; i < N; i++) begin
              w = fb_win_sel ? 0.5 * (1.0 - $cos(2.0 * PI * i / N)) : 1.0;
              rr += w * fhist[fhist.size() - N + i] * $cos(2.0 * PI * k * i / N);
              ri -= w * fhist[fhist.size() - N + i] * $sin(2.0 * PI * k * i / N);
            end
            fre.push_back(rr);
            fim.push_back(ri);
          end
          fork begin
            repeat (4) @(posedge clk);
            fb_win_sel = ~fb_win_sel;
          end join_none
        end else if (fhist.size() > N) begin
          n_dropped++;
        end
      end
    end
    @(negedge clk);
    fb_in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (fdue.size() != 0) begin failures++; $display("filter bank: %0d frames missing", fdue.size()); end
    fb_done = 1;
  end

  // ---------------- 2-D STFT ----------------
  real img [NCOL + N][N];
  int s2_col = 0, rows = 0;
  longint last_col_cyc = -1;

  always @(posedge clk) begin
    if (rst_n && s2_in_valid && !s2_in_ready) n_stall++;
    if (rst_n && s2_out_valid) begin
      checks++;
      if (s2_out_k != (rows % N)) begin failures++; $display("2-D: row order wrong"); end
      if (s2_out_k == 0) n_update++;
      for (int l = 0; l < N; l++) begin
        real rr, ri, e;
        rr = 0.0; ri = 0.0;
        for (int i = 0; i < N; i++)
          for (int n = 0; n < N; n++) begin
            rr += img[s2_col + i][n] * $cos(2.0 * PI * ((s2_out_k * i + l * n) % N) / N);
            ri -= img[s2_col + i][n] * $sin(2.0 * PI * ((s2_out_k * i + l * n) % N) / N);
          end
        e = absr(real'(s2_out_re[l]) / 16.0 - rr);
        if (absr(real'(s2_out_im[l]) / 16.0 - ri) > e) e = absr(real'(s2_out_im[l]) / 16.0 - ri);
        checks++;
        if (e > 0.001 * N * N * 32768.0) begin
          failures++;
          if (failures < 10) $display("2-D col %0d k %0d l %0d error %f", s2_col, s2_out_k, l, e);
        end
      end
      rows++;
    end
  end

  initial begin : s2_drive
    for (int c = 0; c < NCOL + N; c++)
      for (int n = 0; n < N; n++)
        img[c][n] = (c < N) ? 0.0 : real'($signed($urandom_range(0, 65535)) - 32768);
    wait (rst_n);
    for (int c = 0; c < NCOL; c++) begin
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        s2_in_valid = 1;
        s2_in_x = DW'($rtoi(img[c + N][n]));
        do @(posedge clk); while (!s2_in_ready);
      end
      s2_col = c + 1;
      checks++;
      if (last_col_cyc >= 0 && cyc - last_col_cyc != 2 * N) begin
        failures++;
        $display("2-D: column %0d took %0d cycles, expected %0d", c, cyc - last_col_cyc, 2 * N);
      end
      last_col_cyc = cyc;
    end
    @(negedge clk);
    s2_in_valid = 0;
    repeat (N + 4) @(posedge clk);
    checks++;
    if (rows != NCOL * N) begin failures++; $display("2-D: %0d rows", rows); end
    s2_done = 1;
  end

  // ---------------- 3-D STFT ----------------
  real vol [NSL + N][N][N];
  real g2r [NSL + N][N][N];
  real g2i [NSL + N][N][N];
  real cs [N];
  real sn [N];
  int s3_win = 1, rows3 = 0;
  longint last_sl_cyc = -1;

  always @(posedge clk) begin
    if (rst_n && s3_in_valid && !s3_in_ready) n3_stall++;
    if (rst_n && s3_out_valid && s3_in_valid && s3_in_ready) n3_overlap++;
    if (rst_n && s3_out_valid) begin
      checks++;
      if (s3_out_k != (rows3 % N)) begin failures++; $display("3-D: row order wrong"); end
      if (s3_out_k == 0) n3_update++;
      for (int l = 0; l < N * N; l++) begin
        real rr, ri, e;
        rr = 0.0; ri = 0.0;
        for (int i = 0; i < N; i++) begin
          rr += g2r[s3_win + i][l / N][l % N] * cs[(s3_out_k * i) % N]
              + g2i[s3_win + i][l / N][l % N] * sn[(s3_out_k * i) % N];
          ri += g2i[s3_win + i][l / N][l % N] * cs[(s3_out_k * i) % N]
              - g2r[s3_win + i][l / N][l % N] * sn[(s3_out_k * i) % N];
        end
        e = absr(real'(s3_out_re[l]) / 16.0 - rr);
        if (absr(real'(s3_out_im[l]) / 16.0 - ri) > e) e = absr(real'(s3_out_im[l]) / 16.0 - ri);
        checks++;
        if (e > 0.001 * N * N * N * 32768.0) begin
          failures++;
          if (failures < 10) $display("3-D window %0d k %0d l %0d error %f", s3_win, s3_out_k, l, e);
        end
      end
      rows3++;
      if (s3_out_k == N - 1) s3_win++;
    end
  end

  initial begin : s3_drive
    for (int i = 0; i < N; i++) begin
      cs[i] = $cos(2.0 * PI * i / N);
      sn[i] = $sin(2.0 * PI * i / N);
    end
    for (int c = 0; c < NSL + N; c++)
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++)
          vol[c][a][b] = (c < N) ? 0.0 : real'($signed($urandom_range(0, 65535)) - 32768);
    for (int c = N; c < NSL + N; c++)
      for (int l1 = 0; l1 < N; l1++)
        for (int l2 = 0; l2 < N; l2++) begin
          g2r[c][l1][l2] = 0.0; g2i[c][l1][l2] = 0.0;
          for (int a = 0; a < N; a++)
            for (int b = 0; b < N; b++) begin
              g2r[c][l1][l2] += vol[c][a][b] * cs[(l1 * a + l2 * b) % N];
              g2i[c][l1][l2] -= vol[c][a][b] * sn[(l1 * a + l2 * b) % N];
            end
        end
    for (int c = 0; c < N; c++)
      for (int l1 = 0; l1 < N; l1++)
        for (int l2 = 0; l2 < N; l2++) begin g2r[c][l1][l2] = 0.0; g2i[c][l1][l2] = 0.0; end
    wait (rst_n);
    for (int c = 0; c < NSL; c++) begin
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++) begin
          @(negedge clk);
          s3_in_valid = 1;
          s3_in_x = DW'($rtoi(vol[c + N][a][b]));
          do @(posedge clk); while (!s3_in_ready);
        end
      checks++;
      if (last_sl_cyc >= 0 && cyc - last_sl_cyc != 2 * N * N) begin
        failures++;
        $display("3-D: slice %0d took %0d cycles, expected %0d", c, cyc - last_sl_cyc, 2 * N * N);
      end
      last_sl_cyc = cyc;
    end
    @(negedge clk);
    s3_in_valid = 0;
    repeat (4 * N + 8) @(posedge clk);
    checks++;
    if (rows3 != NSL * N) begin failures++; $display("3-D: %0d rows", rows3); end
    s3_done = 1;
  end

  // ---------------- PN generator and delay line ----------------
  initial begin : pn_drive
    bit b [$];
    wait (rst_n);
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      pn_en = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      if (pn_en) begin
        b.push_back(pn_bit);   // bit shifted into the delay line at this edge
        n_shift++;
      end
      #1;
      for (int i = 0; i < TAPS; i++) begin
        checks++;
        if (pn_taps[i] != ((b.size() > i) ? b[b.size() - 1 - i] : 1'b0)) failures++;
      end
      if (b.size() > 10) begin
        checks++;
        if (b[b.size()-1] != (b[b.size()-8] ^ b[b.size()-11])) failures++;
      end
    end
    pn_done = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fb_done && s2_done && s3_done && pn_done);
    $display("kept frames %0d (rect %0d, Hanning %0d), dropped frames %0d", n_kept, n_rect, n_hann, n_dropped);
    $display("2-D stall cycles %0d, update passes %0d; PN shifts %0d", n_stall, n_update, n_shift);
    $display("3-D stall cycles %0d, update passes %0d, overlapped load cycles %0d", n3_stall, n3_update, n3_overlap);
    checks += 9;
    if (n3_stall == 0)   begin failures++; $display("3-D input never stalled"); end
    if (n3_update == 0)  begin failures++; $display("3-D update never ran"); end
    if (n3_overlap == 0) begin failures++; $display("3-D update never overlapped loading"); end
    if (n_rect == 0)    begin failures++; $display("rectangular mode never used"); end
    if (n_hann == 0)    begin failures++; $display("Hanning mode never used"); end
    if (n_dropped == 0) begin failures++; $display("decimation never dropped a frame"); end
    if (n_stall == 0)   begin failures++; $display("2-D input never stalled"); end
    if (n_update == 0)  begin failures++; $display("2-D update never ran"); end
    if (n_shift == 0)   begin failures++; $display("PN line never shifted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
