// twos_comp_keygen: forms the two's complement of the user key, that is
// its one's complement plus one (2^64 - key, modulo 2^64), as a further
// key source. Combinational.
module twos_comp_keygen
  import des_pkg::*;
(
  input  block_t din,
  output block_t dout
);
  assign dout = ~din + 64'd1;
endmodule
