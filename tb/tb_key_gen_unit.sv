// tb_key_gen_unit: drives the dynamic key generation unit with a random
// select every clock and checks the selected key against reference models of
// the four sources: the user key, the LFSR seeded with the user key at
// reset, the free-running chaotic map, and the two's complement. The user
// key is changed after reset, so the LFSR must follow its seed and the
// direct and two's complement sources the present key. Every mode is
// counted and must occur.
module tb_key_gen_unit;
  import des_pkg::*;
  import des_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam block_t CHAOS_SEED = 64'h1333_3333_3333_3333;

  logic       clk = 0, rst;
  block_t     inkey, desin;
  logic [1:0] s;

  key_gen_unit u_dut (.clk, .rst, .inkey, .s, .desin);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mode_count [4] = '{0, 0, 0, 0};
    block_t seed, exp;
    for (int t = 0; t < 3; t++) begin
      seed = {$urandom, $urandom};
      inkey = seed;
      s = 2'b00;
      rst = 1;
      repeat (2) @(negedge clk);
      rst = 0;
      for (int n = 0; n < 200; n++) begin
        if (n % 17 == 5) inkey = {$urandom, $urandom};
        s = 2'($urandom);
        #1;
        case (s)
          2'b00: exp = inkey;
          2'b01: exp = lfsr_ref(seed, n);
          2'b10: exp = chaos_ref(CHAOS_SEED, n);
          default: exp = 64'd0 - inkey;
        endcase
        mode_count[s]++;
        check(desin == exp, $sformatf("s=%b step %0d: %h expected %h", s, n, desin, exp));
        @(negedge clk);
      end
    end
    for (int m = 0; m < 4; m++) check(mode_count[m] > 0, $sformatf("mode %0d never selected", m));
    $display("modes: direct %0d lfsr %0d chaotic %0d twos %0d",
             mode_count[0], mode_count[1], mode_count[2], mode_count[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
