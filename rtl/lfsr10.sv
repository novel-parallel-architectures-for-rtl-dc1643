// lfsr10: 10-bit maximal-length linear feedback shift register, a pseudo-random binary
// sequence generator used as a white-noise substitute for stimulating an unknown plant
// in adaptive system identification.
//
// Fibonacci form: on every enabled clock the register shifts toward its MSB and the new
// LSB is the XOR of stages 10 and 7 (feedback polynomial x^10 + x^7 + 1), giving a
// sequence of period 2^10 - 1 = 1023. bit_out is stage 10. Reset loads SEED, which
// must be nonzero. The 10-bit maximal-length generator is the described part; the
// particular polynomial, the Fibonacci form and the seed are this design's choices.
module lfsr10 #(
  parameter logic [9:0] SEED = 10'h001
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  output logic       bit_out,
  output logic [9:0] state
);

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[8:0], state[9] ^ state[6]};
  end

  assign bit_out = state[9];

endmodule
