// des_control: control unit of the iterative DES core. It counts the 16
// rounds and raises the ready flags.
//
// When idle, a high ds starts an operation: load is high for that cycle and
// the datapath captures the block and the key at its end. The 16 following
// cycles execute rounds 0..15 (step high, round = number of the round). The
// last round (last high) also writes the result register, and rdy rises
// with it, 16 clock edges after the loading edge. rdy_next_next_cycle is
// high during round 14 and rdy_next_cycle during round 15, that is two and
// one cycles before rdy. rdy stays high until the next operation is
// started. A ds that arrives while busy is ignored. Reset is synchronous,
// active high.
module des_control
  import des_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ds,
  output logic       load,
  output logic       step,
  output logic       last,
  output logic [3:0] round,
  output logic       rdy_next_next_cycle,
  output logic       rdy_next_cycle,
  output logic       rdy
);

  logic [3:0] round_q;
  logic       busy_q;
  logic       rdy_q;

  assign load  = ds && !busy_q;
  assign step  = busy_q;
  assign round = round_q;
  assign last  = busy_q && (round_q == 4'(NUM_ROUNDS - 1));

  assign rdy_next_next_cycle = busy_q && (round_q == 4'(NUM_ROUNDS - 2));
  assign rdy_next_cycle      = last;
  assign rdy                 = rdy_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      round_q <= '0;
      busy_q  <= 1'b0;
      rdy_q   <= 1'b0;
    end else if (load) begin
      round_q <= '0;
      busy_q  <= 1'b1;
      rdy_q   <= 1'b0;
    end else if (busy_q) begin
      round_q <= round_q + 4'd1;
      if (last) begin
        busy_q <= 1'b0;
        rdy_q  <= 1'b1;
      end
    end
  end

  // A round is only ever executed while busy, and round wraps to 0 only
  // after the last one.
  assert property (@(posedge clk) disable iff (rst) last |=> !busy_q && rdy_q);
  assert property (@(posedge clk) disable iff (rst) load |=> busy_q && round_q == 0);

endmodule
