// chaotic_keygen: key generator built on a one-dimensional piecewise linear
// chaotic map (the tent map on [-1, 1]):
//   x(n+1) = 1 + 2 x(n)   for x(n) < 0
//   x(n+1) = 1 - 2 x(n)   for x(n) >= 0
// iterated once per clock. The user key does not enter this generator: it
// starts from the fixed initial condition SEED at reset and runs freely, so
// it yields a different key every clock.
//
// x is held as a 64-bit two's complement fixed-point number with 62
// fraction bits (1.0 = 2^62). Doubling is a left shift, which in finite
// precision would drain all information out of the state after 64 steps
// and end in a fixed point. To keep the orbit alive, the bit shifted out at
// the top (bit 62 of the old state) is fed back into the LSB of the new
// state; this perturbation is this design's choice. The 64-bit state is the
// key output.
module chaotic_keygen
  import des_pkg::*;
#(
  parameter block_t SEED = 64'h1333_3333_3333_3333  // x0 = 0.3
) (
  input  logic   clk,
  input  logic   rst,
  output block_t key
);

  localparam block_t ONE = 64'h4000_0000_0000_0000;

  block_t x_q, twice, x_next;

  assign twice  = {x_q[62:0], 1'b0};
  assign x_next = (x_q[63] ? (ONE + twice) : (ONE - twice)) ^ {63'd0, x_q[62]};

  always_ff @(posedge clk) begin
    if (rst) x_q <= SEED;
    else     x_q <= x_next;
  end

  assign key = x_q;

endmodule
