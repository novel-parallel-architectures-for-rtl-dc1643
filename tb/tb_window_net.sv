// tb_window_net: random bin vectors in both modes. Rectangular mode must pass the bins
// unchanged; Hanning mode must give floor((2X(k) - X(k-1) - X(k+1)) / 4) with circular
// neighbours, one clock after in_valid. Watchdog included.
module tb_window_net;
  localparam int N = 16, AW = 26;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, win_sel = 0;
  logic signed [AW-1:0] in_re [N];
  logic signed [AW-1:0] in_im [N];
  logic signed [AW-1:0] out_re [N];
  logic signed [AW-1:0] out_im [N];
  longint ex_re [N];
  longint ex_im [N];
  int checks = 0, failures = 0;

  window_net #(.N(N), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  function automatic longint fdiv4(longint v);
    return (v >= 0) ? v / 4 : -((-v + 3) / 4);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      win_sel = t[0] ^ t[3];
      for (int k = 0; k < N; k++) begin
        in_re[k] = AW'($signed($urandom_range(0, 1 << 24)) - (1 << 23));
        in_im[k] = AW'($signed($urandom_range(0, 1 << 24)) - (1 << 23));
      end
      for (int k = 0; k < N; k++) begin
        if (win_sel) begin
          ex_re[k] = fdiv4(2 * longint'(in_re[k]) - in_re[(k + N - 1) % N] - in_re[(k + 1) % N]);
          ex_im[k] = fdiv4(2 * longint'(in_im[k]) - in_im[(k + N - 1) % N] - in_im[(k + 1) % N]);
        end else begin
          ex_re[k] = in_re[k];
          ex_im[k] = in_im[k];
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != in_valid) begin
        failures++;
        $display("t=%0d out_valid wrong", t);
      end
      if (in_valid)
        for (int k = 0; k < N; k++) begin
          checks++;
          if (longint'(out_re[k]) != ex_re[k] || longint'(out_im[k]) != ex_im[k]) begin
            failures++;
            if (failures < 10) $display("t=%0d k=%0d sel=%0d got %0d want %0d", t, k, win_sel, out_re[k], ex_re[k]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
