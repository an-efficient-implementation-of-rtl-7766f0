// topdes112: DES with an enhanced key generation unit.
//
// The key used by the cipher is chosen by s from four sources (see
// key_gen_unit): the user key itself, a 64-bit LFSR seeded with it, a
// free-running chaotic-map generator, or its two's complement. The chosen
// key and indata are captured when ds starts an operation (ds is ignored
// while one runs); decipher = 0 encrypts and 1 decrypts. The iterative
// DES core runs one round per clock and presents outdata with rdy 16
// clock edges after the loading edge; rdy_next_next_cycle and
// rdy_next_cycle announce it two and one cycles ahead. The port list
// (201 pins) is that of the published design; reset is synchronous and
// active high. DES bit 1 is bit 63 of each 64-bit port.
module topdes112
  import des_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  block_t     indata,
  input  block_t     inkey,
  input  logic [1:0] s,
  input  logic       decipher,
  input  logic       ds,
  output block_t     outdata,
  output logic       rdy_next_next_cycle,
  output logic       rdy_next_cycle,
  output logic       rdy
);

  block_t desin;

  key_gen_unit u_keygen (
    .clk, .rst, .inkey, .s, .desin
  );

  des_core u_des (
    .clk, .rst, .ds, .decipher, .indata,
    .key(desin),
    .outdata, .rdy_next_next_cycle, .rdy_next_cycle, .rdy
  );

endmodule
