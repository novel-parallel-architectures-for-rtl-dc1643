// tb_stft_filterbank: random samples (with gaps) into the windowed, decimated filter
// bank. Every D-th accepted sample must produce, exactly three clocks later, a frame
// equal to the DFT of the last N samples, either plain (win_sel = 0) or multiplied by the
// Hanning window w(i) = (1 - cos(2*pi*i/N))/2 (win_sel = 1), computed directly in floating
// point. win_sel alternates between frames, so both modes are exercised. Watchdog.
module tb_stft_filterbank;
  import stft_pkg::*;
  localparam int N = 16, DW = 16, D = 16, GF = 4;
  localparam int AW = acc_width(DW, N, GF);
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, in_valid = 0, win_sel = 0, out_valid;
  logic signed [DW-1:0] in_x = '0;
  logic signed [AW-1:0] out_re [N];
  logic signed [AW-1:0] out_im [N];
  int checks = 0, failures = 0, frames = 0, hann_frames = 0;
  real hist [$];
  longint cyc = 0;
  longint due [$];     // cycle at which a frame is expected
  real exp_re [$];     // expected bins, N per expected frame
  real exp_im [$];

  stft_filterbank #(.N(N), .DW(DW), .D(D), .GF(GF)) dut (.*);
  always #5 clk = ~clk;

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push_expected(bit hann);
    real rr, ri, w;
    for (int k = 0; k < N; k++) begin
      rr = 0.0; ri = 0.0;
      for (int i = 0; i < N; i++) begin
        w = hann ? 0.5 * (1.0 - $cos(2.0 * PI * i / N)) : 1.0;
        rr += w * hist[hist.size() - N + i] * $cos(2.0 * PI * k * i / N);
        ri -= w * hist[hist.size() - N + i] * $sin(2.0 * PI * k * i / N);
      end
      exp_re.push_back(rr);
      exp_im.push_back(ri);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (due.size() == 0 || due[0] != cyc) begin
        failures++;
        $display("unexpected frame at cycle %0d", cyc);
      end else begin
        void'(due.pop_front());
        for (int k = 0; k < N; k++) begin
          real er, ei;
          er = absr(real'(out_re[k]) / 16.0 - exp_re.pop_front());
          ei = absr(real'(out_im[k]) / 16.0 - exp_im.pop_front());
          checks++;
          if (er > 0.002 * N * 32768.0 || ei > 0.002 * N * 32768.0) begin
            failures++;
            if (failures < 10) $display("frame %0d bin %0d error (%f,%f)", frames, k, er, ei);
          end
        end
      end
      frames++;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) hist.push_back(0.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 1200; s++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_x = DW'($signed($urandom_range(0, 65535)) - 32768);
      @(posedge clk);
      if (in_valid) begin
        hist.push_back(real'(in_x));
        if ((hist.size() - N) % D == 0) begin
          due.push_back(cyc + 3);
          push_expected(win_sel);
          if (win_sel) hann_frames++;
          fork begin
            repeat (4) @(posedge clk);
            win_sel = ~win_sel;
          end join_none
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(posedge clk);
    checks += 2;
    if (due.size() != 0) begin failures++; $display("%0d frames missing", due.size()); end
    if (hann_frames == 0 || hann_frames == frames) begin failures++; $display("one window mode unused"); end
    $display("frames %0d (Hanning %0d)", frames, hann_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
