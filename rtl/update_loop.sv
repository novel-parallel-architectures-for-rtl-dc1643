// update_loop: the recursive update of the stored 2-D spectrum,
//   X(m0+1, k, l) = exp(+j*2*pi*k/N) * ( X(m0, k, l) + D(l) ),
// where D(l) is the 1-D DFT (along n) of the difference between the newest column and
// the column leaving the window.
//
// The spectrum is held in NA linear arrays, one per column frequency l (NA = N for the
// 2-D transform, N*N for 3-D, where l stands for a pair of lower-dimension frequencies),
// each a shift register of N complex words ordered by k. After start, the loop runs N cycles; in
// cycle k every array takes its head word X(k, l), adds D(l), rotates by exp(+j*2*pi*k/N)
// and pushes the result in at the tail, so after N cycles every array is back in order.
// Each array needs one adder and one rotator whose coefficient steps through a shared
// table indexed by k; no transpose of the spectrum is ever needed. The per-array
// adder/multiplier and the linear arrays follow the described structure; the stepping
// coefficient table, the registered output and reset to zero are this design's choices.
//
// Timing: the cycle in which start is high (ignored while busy) is cycle k = 0 of the
// N-cycle pass; busy is high for the remaining N-1 cycles and done marks the last one.
// d_re/d_im must stay stable during the pass. clear, given with start, makes the pass
// treat the stored spectrum as zero (it then simply loads D into every row). Each cycle k is followed, one clock later,
// by out_valid with out_k = k and the NA updated words X(m0+1, k, l), l = 0..NA-1.
module update_loop
  import stft_pkg::*;
#(
  parameter int N  = 16,
  parameter int NA = N,   // number of linear arrays
  parameter int IW = 27,  // width of D(l), same fraction bits as the state
  parameter int AW = 30,  // state width
  parameter int CF = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 clear,
  input  logic signed [IW-1:0] d_re   [NA],
  input  logic signed [IW-1:0] d_im   [NA],
  output logic                 busy,
  output logic                 done,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_k,
  output logic signed [AW-1:0] out_re [NA],
  output logic signed [AW-1:0] out_im [NA]
);

  localparam int KW = $clog2(N);

  logic signed [AW-1:0] arr_re [NA][N];  // [l][position], position 0 is the head
  logic signed [AW-1:0] arr_im [NA][N];
  logic signed [CF+1:0] tw_re  [N];
  logic signed [CF+1:0] tw_im  [N];
  logic [KW-1:0]        k;
  logic                 active;
  logic                 clr_pass;   // this pass started with clear
  logic                 zero_head;
  logic signed [AW-1:0] s_re   [NA];
  logic signed [AW-1:0] s_im   [NA];
  logic signed [AW-1:0] n_re   [NA];
  logic signed [AW-1:0] n_im   [NA];

  assign active    = busy || start;
  assign zero_head = busy ? clr_pass : clear;
  assign done   = active && (k == KW'(N - 1));

  for (genvar i = 0; i < N; i++) begin : g_tw
    assign tw_re[i] = (CF+2)'(twiddle_re(i, N, CF));
    assign tw_im[i] = (CF+2)'(twiddle_im(i, N, CF));
  end

  // Control: cycle counter k and the row strobe.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      clr_pass  <= 1'b0;
      k         <= '0;
      out_valid <= 1'b0;
      out_k     <= '0;
    end else begin
      out_valid <= active;
      if (active) begin
        out_k <= k;
        if (!busy) clr_pass <= clear;
        if (done) begin
          k    <= '0;
          busy <= 1'b0;
        end else begin
          k    <= k + 1'b1;
          busy <= 1'b1;
        end
      end
    end
  end

  // One linear array with its adder and rotator per column frequency l.
  for (genvar l = 0; l < NA; l++) begin : g_arr
    assign s_re[l] = (zero_head ? '0 : arr_re[l][0]) + AW'(d_re[l]);
    assign s_im[l] = (zero_head ? '0 : arr_im[l][0]) + AW'(d_im[l]);
    complex_rotator #(.AW(AW), .CF(CF)) u_rot (
      .a_re(s_re[l]), .a_im(s_im[l]), .c_re(tw_re[k]), .c_im(tw_im[k]),
      .b_re(n_re[l]), .b_im(n_im[l]));

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < N; i++) begin
          arr_re[l][i] <= '0;
          arr_im[l][i] <= '0;
        end
      end else if (active) begin
        for (int i = 0; i < N - 1; i++) begin
          arr_re[l][i] <= arr_re[l][i+1];
          arr_im[l][i] <= arr_im[l][i+1];
        end
        arr_re[l][N-1] <= n_re[l];
        arr_im[l][N-1] <= n_im[l];
      end
    end

    always_ff @(posedge clk) begin
      if (active) begin
        out_re[l] <= n_re[l];
        out_im[l] <= n_im[l];
      end
    end
  end

endmodule
