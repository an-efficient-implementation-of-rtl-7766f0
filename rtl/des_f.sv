// des_f: the DES round function F(R, K).
//
// The 32-bit right half is expanded to 48 bits by the expansion E (16 bits
// are repeated), XORed with the 48-bit round key, cut into eight 6-bit
// groups, each substituted by its S-box into 4 bits, and the 32-bit result
// is permuted by P. Purely combinational; the order of the steps and the
// widths are those of the standard round function.
module des_f
  import des_pkg::*;
(
  input  logic [31:0] r_in,    // R(n-1)
  input  subkey_t     subkey,  // Kn
  output logic [31:0] f_out    // F(R(n-1), Kn)
);

  logic [47:0] mixed;
  logic [31:0] subst;

  assign mixed = expand(r_in) ^ subkey;

  // S-box 1 takes the six most significant bits.
  for (genvar i = 0; i < 8; i++) begin : g_sbox
    des_sbox #(.BOX(i)) u_sbox (
      .din  (mixed[47-6*i -: 6]),
      .dout (subst[31-4*i -: 4])
    );
  end

  assign f_out = pbox(subst);

endmodule
