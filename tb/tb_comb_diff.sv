// tb_comb_diff: random samples with random gaps; diff must equal the newest sample minus
// the one accepted N samples earlier (zero before N samples, and zero again after an
// occasional clear, which starts a new history). Self-checking, watchdog.
module tb_comb_diff;
  localparam int N = 16, DW = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, clear = 0;
  logic signed [DW-1:0] in_x = '0;
  logic signed [DW:0] diff;
  int checks = 0, failures = 0;
  int hist [$];

  comb_diff #(.N(N), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) hist.push_back(0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 500; s++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      in_x = DW'($signed($urandom_range(0, 65535)) - 32768);
      clear = ($urandom_range(0, 40) == 0);
      if (in_valid && clear) for (int i = 0; i < N; i++) hist.push_back(0);
      #1;
      if (in_valid) begin
        checks++;
        if (int'(diff) != int'(in_x) - hist[hist.size()-N]) begin
          failures++;
          $display("sample %0d: diff %0d want %0d", s, diff, int'(in_x) - hist[hist.size()-N]);
        end
        hist.push_back(int'(in_x));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
