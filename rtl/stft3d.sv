// stft3d: 3-D short-time Fourier transform over an N x N x N window sliding along m,
// the next step of the dimension recursion
//   X(m0+1, k, l1, l2) = exp(+j*2*pi*k/N) * [ X(m0, k, l1, l2) + F2(dx)(l1, l2) ],
//   dx(n1, n2) = x(m0+N, n1, n2) - x(m0, n1, n2),
// where F2 is the 2-D DFT of the difference slice. The structure one dimension up is the
// same as for 2-D: a difference, a lower-dimension STFT, and an update loop.
//
// Each new slice arrives as N columns (n1) of N samples (n2), one sample per clock. A
// slice buffer (column_buffer with N^3 words) returns the sample N slices older, and the
// difference stream feeds a 2-D STFT (stft2d) that is restarted (clear) at the first
// sample of every slice, so the N rows it emits after the slice's last column are the
// 2-D DFT F2(dx) of that difference slice. (A free-running 2-D array would give the same
// in exact arithmetic, but its rounding residue would be summed without decay by the
// 3-D update row k = 0.) They are collected into an
// N x N register file, then an update_loop with N*N linear arrays (one adder and one
// rotator each) adds them into the stored 3-D spectrum in N clocks. That update runs
// while the next slice is already being loaded, so a slice takes the 2-D array's
// 2N clocks per column, 2N^2 clocks in all.
//
// Interface: in_valid/in_ready (in_ready is stft2d's: low during its update passes).
// The new spectrum leaves as N rows: out_valid, out_k = k, and out_re/out_im[l1*N + l2]
// = X(m0+1, k, l1, l2). Phase reference at the window origin; slices before the first N
// count as zero. Building the M = 3 case, the slice order and the overlap of the 3-D
// update with the next load are this design's choices.
module stft3d
  import stft_pkg::*;
#(
  parameter int N  = 16,
  parameter int DW = 16,
  parameter int GF = 4,
  parameter int CF = 16,
  parameter int AW = acc_width(DW + 2 * $clog2(N), N, GF)  // 3-D bin width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_x,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_k,
  output logic signed [AW-1:0] out_re [N*N],
  output logic signed [AW-1:0] out_im [N*N]
);

  localparam int A2 = acc_width(DW + 1 + $clog2(N), N, GF);  // 2-D bins of the difference
  localparam int KW = $clog2(N);

  logic                 take;
  logic signed [DW-1:0] old_x;
  logic signed [DW:0]   dx;
  logic                 r_valid;
  logic [KW-1:0]        r_k;
  logic signed [A2-1:0] r_re [N];
  logic signed [A2-1:0] r_im [N];
  logic [KW-1:0]        pass_cnt;     // 2-D update passes within the current slice
  logic signed [A2-1:0] d_re [N*N];   // F2 of the difference slice, index l1*N + l2
  logic signed [A2-1:0] d_im [N*N];
  logic                 ul_start, ul_busy;
  logic [2*KW-1:0]      s_cnt;        // sample within the slice

  assign take = in_valid && in_ready;
  assign dx   = (DW+1)'(in_x) - (DW+1)'(old_x);

  column_buffer #(.N(N), .DW(DW), .DEPTH(N * N * N)) u_slices (
    .clk(clk), .rst_n(rst_n), .wr_en(take), .clear(1'b0), .wr_data(in_x), .rd_data(old_x));

  stft2d #(.N(N), .DW(DW + 1), .GF(GF), .CF(CF), .AW(A2)) u_slice_dft (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .clear(s_cnt == '0), .in_ready(in_ready), .in_x(dx),
    .out_valid(r_valid), .out_k(r_k), .out_re(r_re), .out_im(r_im));

  // Collect the rows of the last 2-D pass of each slice; start the 3-D update after it.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pass_cnt <= '0;
      ul_start <= 1'b0;
      s_cnt    <= '0;
    end else begin
      if (take) s_cnt <= (s_cnt == (2*KW)'(N * N - 1)) ? '0 : s_cnt + 1'b1;
      ul_start <= r_valid && (r_k == KW'(N - 1)) && (pass_cnt == KW'(N - 1));
      if (r_valid && (r_k == KW'(N - 1)))
        pass_cnt <= (pass_cnt == KW'(N - 1)) ? '0 : pass_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (r_valid && (pass_cnt == KW'(N - 1))) begin
      for (int l2 = 0; l2 < N; l2++) begin
        d_re[int'(r_k) * N + l2] <= r_re[l2];
        d_im[int'(r_k) * N + l2] <= r_im[l2];
      end
    end
  end

  update_loop #(.N(N), .NA(N * N), .IW(A2), .AW(AW), .CF(CF)) u_upd (
    .clk(clk), .rst_n(rst_n), .start(ul_start), .clear(1'b0), .d_re(d_re), .d_im(d_im),
    .busy(ul_busy), .done(), .out_valid(out_valid), .out_k(out_k),
    .out_re(out_re), .out_im(out_im));

  // The collected slice spectrum is only rewritten long after the update has used it.
  a_update_free: assert property (@(posedge clk) disable iff (!rst_n) ul_start |-> !ul_busy);
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    (r_valid && (pass_cnt == KW'(N - 1))) |-> !(ul_busy || ul_start));

endmodule
