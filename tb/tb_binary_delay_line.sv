// tb_binary_delay_line: random bits with random enables; tap d[i] must equal the bit
// shifted in i+1 enabled clocks ago (0 before that). Watchdog included.
module tb_binary_delay_line;
  localparam int TAPS = 16;
  logic clk = 0, rst_n = 0, en = 0, din = 0;
  logic [TAPS-1:0] d;
  int checks = 0, failures = 0;
  bit hist [$];

  binary_delay_line #(.TAPS(TAPS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) != 0);
      din = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (en) hist.push_back(din);
      #1;
      for (int i = 0; i < TAPS; i++) begin
        checks++;
        if (d[i] != ((hist.size() > i) ? hist[hist.size() - 1 - i] : 1'b0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
