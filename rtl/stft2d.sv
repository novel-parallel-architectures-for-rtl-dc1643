// stft2d: 2-D short-time Fourier transform over an N x N window that slides along m,
// updated recursively instead of recomputed:
//   X(m0+1, k, l) = exp(+j*2*pi*k/N) * [ X(m0, k, l) + sum_n dx(n) exp(-j*2*pi*n*l/N) ],
//   dx(n) = x(m0+N, n) - x(m0, n).
//
// Each new column (N samples x(m0+N, n), n = 0..N-1, one per clock) is differenced
// against the column N steps older (column_buffer) and streamed into a 1-D sliding STFT
// array (stft1d), restarted (clear) at the first sample of every column, so that after
// the N samples of a column it holds exactly the 1-D DFT D(l) of that difference column.
// Without the restart the array would give the same D in exact arithmetic (its window
// covers just that column), but its slowly varying rounding residue would be summed
// without decay by the update row k = 0, whose coefficient is exactly 1. The
// update loop (update_loop) then spends N cycles adding D(l) into the N stored column
// spectra and rotating row k by exp(+j*2*pi*k/N). Loading and updating alternate, so a
// new 2-D spectrum is ready every 2N clocks; no transpose of data is needed.
//
// Interface: in_valid/in_ready handshake, a sample is taken when both are high; in_ready
// is low for the N update cycles (the input stalls). The new spectrum leaves row by row:
// out_valid with out_k = k and X(m0+1, k, l) for all l in parallel, N consecutive rows.
// Phase reference is the window origin (k over columns m0..m0+N-1, l over rows 0..N-1);
// columns before the first N are taken as zero. clear, given with the first sample of a
// column, restarts the whole transform (empty history, stored spectrum taken as zero);
// the 3-D transform uses it to get the 2-D DFT of one slice at a time. Strip height equal
// to N, the sequential load/update schedule, the per-column restart of the 1-D array,
// the clear input and all widths are this design's choices.
module stft2d
  import stft_pkg::*;
#(
  parameter int N  = 16,
  parameter int DW = 16,
  parameter int GF = 4,
  parameter int CF = 16,
  parameter int AW = acc_width(DW + $clog2(N), N, GF)  // 2-D bin width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 clear,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_x,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_k,
  output logic signed [AW-1:0] out_re [N],
  output logic signed [AW-1:0] out_im [N]
);

  localparam int A1 = acc_width(DW + 1, N, GF);  // 1-D bins of the difference column
  localparam int KW = $clog2(N);

  typedef enum logic {S_LOAD, S_UPDATE} state_t;

  state_t               state;
  logic [KW-1:0]        n_cnt;
  logic                 take;
  logic signed [DW-1:0] old_x;
  logic signed [DW:0]   dx;
  logic                 d_valid;
  logic signed [A1-1:0] d_re [N];
  logic signed [A1-1:0] d_im [N];
  logic                 ul_busy, ul_done, ul_start;
  logic                 col_start, clr_col;   // first sample of a column; clear seen

  assign in_ready = (state == S_LOAD);
  assign take     = in_valid && in_ready;
  assign dx       = (DW+1)'(in_x) - (DW+1)'(old_x);
  assign ul_start  = (state == S_UPDATE) && !ul_busy;
  assign col_start = take && (n_cnt == '0);

  column_buffer #(.N(N), .DW(DW)) u_cols (
    .clk(clk), .rst_n(rst_n), .wr_en(take), .clear(take && clear), .wr_data(in_x), .rd_data(old_x));

  stft1d #(.N(N), .DW(DW + 1), .GF(GF), .CF(CF), .AW(A1)) u_col_dft (
    .clk(clk), .rst_n(rst_n), .in_valid(take), .clear(col_start), .in_x(dx),
    .out_valid(d_valid), .out_re(d_re), .out_im(d_im));

  update_loop #(.N(N), .IW(A1), .AW(AW), .CF(CF)) u_upd (
    .clk(clk), .rst_n(rst_n), .start(ul_start), .clear(clr_col), .d_re(d_re), .d_im(d_im),
    .busy(ul_busy), .done(ul_done), .out_valid(out_valid), .out_k(out_k),
    .out_re(out_re), .out_im(out_im));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_LOAD;
      n_cnt   <= '0;
      clr_col <= 1'b0;
    end else begin
      if (col_start) clr_col <= clear;
      unique case (state)
        S_LOAD: if (take) begin
          if (n_cnt == KW'(N - 1)) begin
            n_cnt <= '0;
            state <= S_UPDATE;
          end else begin
            n_cnt <= n_cnt + 1'b1;
          end
        end
        S_UPDATE: if (ul_done) state <= S_LOAD;
        default: state <= S_LOAD;
      endcase
    end
  end

  // The column spectrum must not change while the update loop reads it, and it must be
  // fresh (updated by the last sample of the column) when the loop starts.
  a_clear_at_column_start: assert property (@(posedge clk) disable iff (!rst_n)
    (take && clear) |-> (n_cnt == '0));
  a_spectrum_ready: assert property (@(posedge clk) disable iff (!rst_n) ul_start |-> d_valid);
  a_no_load_during_update: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_UPDATE) |-> !take);

endmodule
