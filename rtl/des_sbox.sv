// des_sbox: one DES substitution box (6 bits in, 4 bits out), built as a
// tree of multiplexers as the design calls for.
//
// The 6-bit input b1..b6 (b1 = din[5]) splits into the row, {b1,b6}, and the
// column, {b2..b5}. Four 16:1 multiplexers, one per row, each pick a
// constant from their row of the table by the column; a 4:1 multiplexer then
// picks one of the four by the row. BOX (0..7) selects which of the eight
// standard DES S-boxes this instance holds. Purely combinational.
module des_sbox
  import des_pkg::*;
#(
  parameter int unsigned BOX = 0
) (
  input  logic [5:0] din,
  output logic [3:0] dout
);

  logic [1:0] row;
  logic [3:0] col;
  logic [3:0] row_out [4];

  assign row = {din[5], din[0]};
  assign col = din[4:1];

  // First level: one column multiplexer per row.
  for (genvar r = 0; r < 4; r++) begin : g_row
    logic [3:0] row_tbl [16];
    for (genvar c = 0; c < 16; c++) begin : g_col
      assign row_tbl[c] = SBOX_TBL[BOX][16*r + c];
    end
    assign row_out[r] = row_tbl[col];
  end

  // Second level: the row multiplexer.
  assign dout = row_out[row];

endmodule
