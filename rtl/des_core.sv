// des_core: iterative DES encryption/decryption, one Feistel round per
// clock.
//
// Starting an operation (ds while idle) captures IP(indata) into the L/R
// register and the key into the key schedule; the direction comes from
// decipher at the same edge. Each of the next 16 cycles computes
//   L(n) = R(n-1),  R(n) = L(n-1) xor F(R(n-1), Kn)
// and, on the last round, the swapped halves R16 L16 go through IP^-1 into
// outdata, where they stay until the next result. Decryption is the same
// datapath with the round keys applied in reverse order. The result is
// ready 16 clock edges after the loading edge; see des_control for the
// ready flags. The key is a plain input here: in the enhanced design it is
// the output of the key generation unit.
module des_core
  import des_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   ds,
  input  logic   decipher,
  input  block_t indata,
  input  block_t key,
  output block_t outdata,
  output logic   rdy_next_next_cycle,
  output logic   rdy_next_cycle,
  output logic   rdy
);

  logic        load, step, last;
  logic [3:0]  round;
  subkey_t     subkey;
  block_t      ip_out, fp_out;
  logic [31:0] l_q, r_q, f_out, r_next;

  des_control u_ctrl (
    .clk, .rst, .ds,
    .load, .step, .last, .round,
    .rdy_next_next_cycle, .rdy_next_cycle, .rdy
  );

  des_key_schedule u_ks (
    .clk, .rst, .load, .key, .decipher, .step, .round, .subkey
  );

  des_ip u_ip (.din(indata), .dout(ip_out));

  des_f u_f (.r_in(r_q), .subkey, .f_out);

  assign r_next = l_q ^ f_out;

  // After round 16 the halves are swapped: the output is R16 L16.
  des_ip_inv u_fp (.din({r_next, r_q}), .dout(fp_out));

  always_ff @(posedge clk) begin
    if (rst) begin
      l_q     <= '0;
      r_q     <= '0;
      outdata <= '0;
    end else if (load) begin
      {l_q, r_q} <= ip_out;
    end else if (step) begin
      l_q <= r_q;
      r_q <= r_next;
      if (last) outdata <= fp_out;
    end
  end

endmodule
