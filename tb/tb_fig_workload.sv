// tb_fig_workload: replays the published operating point the way its
// waveforms drive it: ds held high from the end of reset, key 0000000000000000,
// s constant. It encrypts 8000000000000000, then after a fresh reset
// decrypts the first result with the same timing, in each of the four key
// modes. With a zero user key the direct, LFSR and two's complement keys
// are all zero, so those modes must give the standard answer
// 95F8A5E5DD31D900; the chaotic mode uses the chaotic state at the first
// start (step 0 after reset), worked out by the reference model. Every
// decryption must return the plaintext.
module tb_fig_workload;
  import des_pkg::*;
  import des_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam block_t CHAOS_SEED = 64'h1333_3333_3333_3333;
  localparam block_t PT = 64'h8000_0000_0000_0000;

  logic       clk = 0, rst, ds, decipher;
  logic [1:0] s;
  block_t     indata, inkey, outdata;
  logic       rdy_nn, rdy_n, rdy;

  topdes112 u_dut (
    .clk, .rst, .indata, .inkey, .s, .decipher, .ds, .outdata,
    .rdy_next_next_cycle(rdy_nn), .rdy_next_cycle(rdy_n), .rdy
  );

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reset, then hold ds high and return the first result and its latency.
  task automatic first_result(input block_t din, input logic [1:0] sel, input logic dec,
                              output block_t res, output int cyc);
    @(negedge clk);
    rst = 1; ds = 0; s = sel; inkey = '0; indata = din; decipher = dec;
    repeat (3) @(negedge clk);
    rst = 0; ds = 1;
    @(negedge clk);
    cyc = 0;
    while (!rdy && cyc < 40) begin
      @(negedge clk);
      cyc++;
    end
    res = outdata;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t ct, pt, exp;
    int cyc;
    for (int m = 0; m < 4; m++) begin
      exp = (m == 2) ? des_ref(PT, chaos_ref(CHAOS_SEED, 0), 1'b0) : 64'h95F8_A5E5_DD31_D900;
      first_result(PT, 2'(m), 1'b0, ct, cyc);
      check(ct == exp && cyc == 16, $sformatf("s=%0d encrypt: %h after %0d, expected %h", m, ct, cyc, exp));
      first_result(ct, 2'(m), 1'b1, pt, cyc);
      check(pt == PT && cyc == 16, $sformatf("s=%0d decrypt: %h after %0d", m, pt, cyc));
      $display("s=%0d%0d  ciphertext %h  decrypted %h", m / 2, m % 2, ct, pt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
