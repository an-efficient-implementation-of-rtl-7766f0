// tb_chaotic_keygen: runs the chaotic key generator from reset and compares
// every key with a reference that iterates the tent map in signed integer
// arithmetic. It also checks that the state stays in [-1, 1], that the first
// iterate from x0 = 0.3 is about 0.4, and that no key repeats over the run.
module tb_chaotic_keygen;
  import des_pkg::*;
  import des_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam block_t SEED = 64'h1333_3333_3333_3333;
  localparam longint ONE  = 64'sh4000_0000_0000_0000;

  logic   clk = 0, rst;
  block_t key;

  chaotic_keygen u_dut (.clk, .rst, .key);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [block_t];
    int repeats = 0;
    real x1;
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    check(key == SEED, "initial condition after reset");
    @(negedge clk);
    x1 = real'(longint'(key)) / real'(ONE);
    check(x1 > 0.3999 && x1 < 0.4001, $sformatf("x1 = %f, expected 0.4", x1));
    rst = 1;
    @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      check(key == chaos_ref(SEED, n), $sformatf("step %0d: %h", n, key));
      check(longint'(key) >= -ONE && longint'(key) <= ONE, $sformatf("step %0d out of range", n));
      if (seen.exists(key)) repeats++;
      seen[key] = 1;
      @(negedge clk);
    end
    check(repeats == 0, $sformatf("%0d repeated keys", repeats));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
