// tb_lfsr_keygen: seeds the LFSR key generator through reset and compares
// its key every clock with a reference that evaluates the feedback
// polynomial from scratch; also checks that the seed appears right after
// reset and that an all-zero seed stays all-zero.
module tb_lfsr_keygen;
  import des_pkg::*;
  import des_ref_pkg::*;
  int checks = 0, failures = 0;

  logic   clk = 0, rst;
  block_t seed, key;

  lfsr_keygen u_dut (.clk, .rst, .seed, .key);

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
    block_t prev;
    int changes;
    for (int t = 0; t < 4; t++) begin
      seed = (t == 3) ? 64'd0 : {$urandom, $urandom};
      rst = 1;
      repeat (2) @(negedge clk);
      rst = 0;
      check(key == seed, "seed loaded during reset");
      changes = 0;
      for (int n = 0; n < 300; n++) begin
        check(key == lfsr_ref(seed, n), $sformatf("seed %h step %0d: %h", seed, n, key));
        prev = key;
        @(negedge clk);
        if (key != prev) changes++;
      end
      if (t == 3) check(changes == 0 && key == 0, "zero seed stays zero");
      else        check(changes == 300, "key changes every clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
