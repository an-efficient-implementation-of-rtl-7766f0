// lfsr_keygen: 64-bit linear feedback shift register used as a key
// generator. A new 64-bit key appears every clock.
//
// Stages B63..B0 shift towards B0 each clock, and the new B63 is the
// feedback function B0 xor B1 xor B3 xor B4, which is the characteristic
// polynomial x^64 + x^63 + x^61 + x^60 + 1 (a maximal-length choice; the
// taps are this design's own). While rst is high the register loads the
// user key as its seed, so the key sequence depends on the user key. As
// with any XOR feedback register, an all-zero seed stays all-zero. The key
// output is the register itself.
module lfsr_keygen
  import des_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  block_t seed,  // user key, loaded during reset
  output block_t key
);

  block_t b_q;
  logic   feedback;

  assign feedback = b_q[0] ^ b_q[1] ^ b_q[3] ^ b_q[4];

  always_ff @(posedge clk) begin
    if (rst) b_q <= seed;
    else     b_q <= {feedback, b_q[63:1]};
  end

  assign key = b_q;

endmodule
