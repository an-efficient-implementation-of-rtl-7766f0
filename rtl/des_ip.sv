// des_ip: the DES initial permutation IP, applied to the 64-bit block
// before the first round, as the block diagram of the cipher shows it. The
// table is the standard one (see des_pkg). In hardware a fixed bit
// permutation is only routing: every output bit is one input bit, and the
// module costs no gates. Combinational; DES bit 1 is din[63].
module des_ip
  import des_pkg::*;
(
  input  block_t din,
  output block_t dout
);
  assign dout = ip(din);
endmodule
