// tb_downsampler: feeds numbered frames (bin k of frame f holds f*100+k) with random
// gaps; exactly frames D-1, 2D-1, ... must come out, one clock after they went in.
// Watchdog included.
module tb_downsampler;
  localparam int N = 16, D = 16, AW = 26;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [AW-1:0] in_re [N];
  logic signed [AW-1:0] in_im [N];
  logic signed [AW-1:0] out_re [N];
  logic signed [AW-1:0] out_im [N];
  int checks = 0, failures = 0;

  downsampler #(.N(N), .D(D), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f = 0, kept = 0, expect_frame = -1;
    for (int k = 0; k < N; k++) begin in_re[k] = '0; in_im[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      for (int k = 0; k < N; k++) begin
        in_re[k] = AW'(f * 100 + k);
        in_im[k] = -AW'(f * 100 + k);
      end
      @(posedge clk);
      expect_frame = (in_valid && (f % D == D - 1)) ? f : -1;
      if (in_valid) f++;
      #1;
      checks++;
      if (out_valid != (expect_frame >= 0)) begin
        failures++;
        $display("cycle %0d: out_valid %0d, expected frame %0d", c, out_valid, expect_frame);
      end else if (out_valid) begin
        kept++;
        for (int k = 0; k < N; k++) begin
          checks++;
          if (out_re[k] != AW'(expect_frame * 100 + k) || out_im[k] != -AW'(expect_frame * 100 + k)) begin
            failures++;
            $display("frame %0d bin %0d wrong", expect_frame, k);
          end
        end
      end
    end
    checks++;
    if (kept != f / D) begin
      failures++;
      $display("kept %0d frames of %0d", kept, f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
