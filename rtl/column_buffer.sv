// column_buffer: delay of N columns (N*N samples) for the 2-D sliding STFT, or of N
// slices (DEPTH = N*N*N samples) for the 3-D one.
//
// When sample x(m0+N, n) of the newest column is written, rd_data returns x(m0, n), the
// sample at the same row N columns earlier, so the 2-D array can form the error term
// x(m0+N, n) - x(m0, n). It is a circular array of DEPTH words with one pointer: the word
// at the pointer is read (combinationally) and then overwritten. Until DEPTH samples have
// been written rd_data is zero, as if the image were preceded by zeros; this fill flag
// means the array itself needs no reset. clear restarts the buffer in the same way (the
// sample written with it is the first of a new history). The organisation is this
// design's choice.
module column_buffer #(
  parameter int N  = 16,
  parameter int DW = 16,
  parameter int DEPTH = N * N  // delay in samples
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic                 clear,
  input  logic signed [DW-1:0] wr_data,
  output logic signed [DW-1:0] rd_data
);

  localparam int PW    = $clog2(DEPTH);

  logic signed [DW-1:0] mem [DEPTH];
  logic [PW-1:0]        ptr;
  logic                 full;

  assign rd_data = (full && !clear) ? mem[ptr] : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr  <= '0;
      full <= 1'b0;
    end else if (wr_en && clear) begin
      ptr  <= PW'(1);
      full <= 1'b0;
    end else if (wr_en) begin
      if (ptr == PW'(DEPTH - 1)) begin
        ptr  <= '0;
        full <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[clear ? '0 : ptr] <= wr_data;
  end

endmodule
