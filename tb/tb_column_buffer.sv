// tb_column_buffer: random writes with gaps; rd_data must be the sample written N*N
// writes earlier, or zero while fewer than N*N samples have been written since reset or
// since the last clear (tried a few times). Watchdog.
module tb_column_buffer;
  localparam int N = 16, DW = 16;
  logic clk = 0, rst_n = 0, wr_en = 0, clear = 0;
  logic signed [DW-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  int hist [$];

  column_buffer #(.N(N), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3 * N * N * 2; c++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 3) != 0);
      wr_data = DW'($signed($urandom_range(0, 65535)) - 32768);
      clear = (c == 700 || c == 1200);
      #1;
      if (wr_en && clear) hist.delete();
      if (wr_en) begin
        want = (hist.size() >= N * N) ? hist[hist.size() - N * N] : 0;
        checks++;
        if (int'(rd_data) != want) begin
          failures++;
          if (failures < 10) $display("write %0d: got %0d want %0d", hist.size(), rd_data, want);
        end
        hist.push_back(int'(wr_data));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
