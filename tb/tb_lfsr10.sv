// tb_lfsr10: the PN sequence must be maximal length (state returns to the seed after
// exactly 1023 steps and never earlier, never all-zero), contain 512 ones per period,
// satisfy the recurrence b(t) = b(t-7) xor b(t-10) of the taps at stages 7 and 10, and hold when en
// is low. Watchdog included.
module tb_lfsr10;
  logic clk = 0, rst_n = 0, en = 0, bit_out;
  logic [9:0] state;
  int checks = 0, failures = 0;
  bit bits [$];

  lfsr10 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] seed;
    int ones = 0, period = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    seed = state;
    checks++;
    if (seed == 10'd0) failures++;
    for (int t = 1; t <= 1023 * 2; t++) begin
      @(negedge clk);
      en = 1;
      @(posedge clk);
      #1;
      bits.push_back(bit_out);
      if (t <= 1023 && bit_out) ones++;
      if (state == 10'd0) failures++;
      if (state == seed && period == 0) period = t;
      if (bits.size() > 10) begin
        checks++;
        if (bits[bits.size()-1] != (bits[bits.size()-8] ^ bits[bits.size()-11])) failures++;
      end
      if (t % 97 == 0) begin
        logic [9:0] held;
        held = state;
        @(negedge clk);
        en = 0;
        @(posedge clk);
        #1;
        checks++;
        if (state != held) failures++;
      end
    end
    checks += 2;
    if (period != 1023) begin failures++; $display("period %0d", period); end
    if (ones != 512) begin failures++; $display("ones %0d", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
