// des_ip_inv: the DES final permutation IP^-1, the inverse of the initial
// permutation, applied to R16 L16 after the last round. The table is the
// standard one (see des_pkg). Like IP it is pure routing: every output bit
// is one input bit, and the module costs no gates. Combinational; DES bit 1
// is din[63].
module des_ip_inv
  import des_pkg::*;
(
  input  block_t din,
  output block_t dout
);
  assign dout = ip_inv(din);
endmodule
