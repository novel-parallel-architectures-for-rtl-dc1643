// tb_stft1d: checks the sliding 1-D STFT array against a direct DFT.
//
// A random stream (with gaps in in_valid) is fed in; after every accepted sample all N
// bins are compared with sum_i x(t-N+1+i) exp(-j*2*pi*k*i/N), computed here in floating
// point from the sample history (zeros before the first sample). The tolerance covers
// fixed-point rounding and coefficient truncation. Also checks the one-clock latency of
// out_valid. An occasional clear must restart the history (zeros before the sample taken
// with it). A second instance uses the CORDIC rotators (USE_CORDIC = 1) and is held to
// the same reference. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_stft1d;
  import stft_pkg::*;
  localparam int N  = 16;
  localparam int DW = 16;
  localparam int GF = 4;
  localparam int AW = acc_width(DW, N, GF);
  localparam real PI = 3.14159265358979323846;
  localparam int NS = 600;

  logic clk = 0, rst_n = 0, in_valid = 0, clear = 0;
  logic signed [DW-1:0] in_x = '0;
  logic out_valid;
  logic signed [AW-1:0] out_re [N];
  logic signed [AW-1:0] out_im [N];
  int checks = 0, failures = 0;
  real hist [$];
  real maxerr = 0.0;

  logic c_valid;
  logic signed [AW-1:0] c_re [N];
  logic signed [AW-1:0] c_im [N];

  stft1d #(.N(N), .DW(DW), .GF(GF)) dut (.*);
  stft1d #(.N(N), .DW(DW), .GF(GF), .USE_CORDIC(1)) dut_cordic (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .clear(clear), .in_x(in_x),
    .out_valid(c_valid), .out_re(c_re), .out_im(c_im));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  task automatic compare();
    real rr, ri, er, ei, tol;
    tol = 0.002 * N * 32768.0;
    for (int k = 0; k < N; k++) begin
      rr = 0.0; ri = 0.0;
      for (int i = 0; i < N; i++) begin
        rr += hist[hist.size()-N+i] * $cos(2.0*PI*k*i/N);
        ri -= hist[hist.size()-N+i] * $sin(2.0*PI*k*i/N);
      end
      er = absr(real'(out_re[k]) / (2.0**GF) - rr);
      ei = absr(real'(out_im[k]) / (2.0**GF) - ri);
      checks++;
      if (absr(real'(c_re[k]) / (2.0**GF) - rr) > tol || absr(real'(c_im[k]) / (2.0**GF) - ri) > tol) begin
        failures++;
        if (failures < 10) $display("CORDIC bin %0d: got (%f, %f) want (%f, %f)", k,
          real'(c_re[k]) / (2.0**GF), real'(c_im[k]) / (2.0**GF), rr, ri);
      end
      if (er > maxerr) maxerr = er;
      if (ei > maxerr) maxerr = ei;
      checks++;
      if (er > tol || ei > tol) begin
        failures++;
        if (failures < 10) $display("bin %0d: got (%f, %f) want (%f, %f)", k,
          real'(out_re[k]) / (2.0**GF), real'(out_im[k]) / (2.0**GF), rr, ri);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) hist.push_back(0.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NS; s++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_x = DW'($signed($urandom_range(0, 65535)) - 32768);
      clear = (s > 40) && ($urandom_range(0, 60) == 0);
      if (s < 40) in_x = DW'(int'(20000.0 * $cos(2.0*PI*3.0*s/N)));   // a pure tone first
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== in_valid) begin
        failures++;
        $display("out_valid latency wrong at sample %0d", s);
      end
      if (in_valid) begin
        if (clear) for (int i = 0; i < N; i++) hist.push_back(0.0);
        hist.push_back(real'(in_x));
        compare();
      end
    end
    $display("max abs error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
