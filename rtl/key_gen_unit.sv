// key_gen_unit: the dynamic (enhanced) key generation unit. Four key
// sources feed a 4:1 multiplexer whose output is the key given to DES:
//   s = 00  direct key: the user key unchanged
//   s = 01  LFSR: 64-bit LFSR seeded with the user key during reset
//   s = 10  chaotic map: free-running tent-map generator, not fed by the
//           user key
//   s = 11  two's complement of the user key
// The LFSR and chaotic sources advance every clock from reset, so the key
// they give depends on the cycle at which DES loads it; the DES core
// captures the multiplexer output when an operation starts. For a block to
// decrypt correctly in those modes it has to be started the same number of
// cycles after reset as its encryption was. The multiplexer is
// combinational.
module key_gen_unit
  import des_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  block_t     inkey,
  input  logic [1:0] s,
  output block_t     desin    // selected key
);

  block_t muxin1;  // LFSR key
  block_t muxin2;  // chaotic key
  block_t muxin3;  // two's complement key

  lfsr_keygen u_lfsr (.clk, .rst, .seed(inkey), .key(muxin1));

  chaotic_keygen u_chaos (.clk, .rst, .key(muxin2));

  twos_comp_keygen u_twos (.din(inkey), .dout(muxin3));

  always_comb begin
    unique case (key_src_e'(s))
      KEY_DIRECT: desin = inkey;
      KEY_LFSR:   desin = muxin1;
      KEY_CHAOS:  desin = muxin2;
      KEY_TWOS:   desin = muxin3;
    endcase
  end

endmodule
