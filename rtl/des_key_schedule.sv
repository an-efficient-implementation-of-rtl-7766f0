// des_key_schedule: produces the 48-bit round key of each of the 16 rounds,
// one round per clock, for encryption (K1 first) or decryption (K16 first).
//
// On load the 64-bit key passes through PC-1 into the two 28-bit halves C
// and D, and the direction (decipher) is latched with it, so the key
// sources may change while a block is being processed. During round r
// (round = 0..15, step = 1):
//   encryption: Kr+1 = PC-2(rotl(C,s[r]) , rotl(D,s[r])), and C,D take the
//               rotated values;
//   decryption: K16-r = PC-2(C, D), then C,D are rotated right by s[15-r].
// Since the 16 left shifts add up to 28, C0 D0 = C16 D16, so decryption can
// start from the same loaded value. The subkey output is combinational from
// the registers and the round number. Reset is synchronous, active high.
module des_key_schedule
  import des_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       load,      // capture key and decipher
  input  block_t     key,       // 64-bit key, parity bits ignored
  input  logic       decipher,  // 0 encrypt, 1 decrypt
  input  logic       step,      // a round is executed this cycle
  input  logic [3:0] round,     // 0..15, round being executed
  output subkey_t    subkey     // round key for this round
);

  half_key_t c_q, d_q;
  half_key_t c_enc, d_enc;
  logic      dec_q;
  int unsigned shift_now;

  assign shift_now = SHIFT_TBL[round];
  assign c_enc = rotl(c_q, shift_now);
  assign d_enc = rotl(d_q, shift_now);

  assign subkey = dec_q ? pc2({c_q, d_q}) : pc2({c_enc, d_enc});

  always_ff @(posedge clk) begin
    if (rst) begin
      c_q   <= '0;
      d_q   <= '0;
      dec_q <= 1'b0;
    end else if (load) begin
      {c_q, d_q} <= pc1(key);
      dec_q      <= decipher;
    end else if (step) begin
      if (dec_q) begin
        c_q <= rotr(c_q, SHIFT_TBL[15 - round]);
        d_q <= rotr(d_q, SHIFT_TBL[15 - round]);
      end else begin
        c_q <= c_enc;
        d_q <= d_enc;
      end
    end
  end

endmodule
