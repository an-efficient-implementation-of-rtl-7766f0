// tb_des_control: checks the round sequencing of the control unit: load only
// when idle, rounds 0..15 on consecutive cycles, rdy exactly 16 clock edges
// after the loading edge, rdy_next_next_cycle and rdy_next_cycle two and
// one cycles before it, ds ignored while busy, and back-to-back operations
// with ds held high.
module tb_des_control;
  int checks = 0, failures = 0;

  logic       clk = 0, rst, ds;
  logic       load, step, last;
  logic [3:0] round;
  logic       rdy_nn, rdy_n, rdy;

  des_control u_dut (
    .clk, .rst, .ds, .load, .step, .last, .round,
    .rdy_next_next_cycle(rdy_nn), .rdy_next_cycle(rdy_n), .rdy
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One operation started by a single-cycle ds pulse; ds pulses again in
  // the middle to check it is ignored.
  task automatic one_op();
    int cyc;
    @(negedge clk);
    ds = 1;
    #1 check(load == 1, "load with ds when idle");
    @(negedge clk);  // loading edge passed
    ds = 0;
    cyc = 0;
    while (!rdy) begin
      check(step == 1 && round == 4'(cyc), $sformatf("round %0d seen as %0d", cyc, round));
      check(rdy_nn == (cyc == 14), $sformatf("rdy_next_next_cycle at round %0d", cyc));
      check(rdy_n == (cyc == 15) && last == (cyc == 15), $sformatf("rdy_next_cycle at round %0d", cyc));
      if (cyc == 5) begin
        ds = 1;
        #1 check(load == 0, "ds ignored while busy");
      end
      @(negedge clk);
      ds = 0;
      cyc++;
      if (cyc > 40) break;
    end
    check(cyc == 16, $sformatf("rdy after %0d edges, expected 16", cyc));
    @(negedge clk);
    check(rdy == 1 && step == 0, "rdy held while idle");
  endtask

  initial begin
    int edges;
    rst = 1; ds = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    #1 check(rdy == 0 && step == 0, "idle after reset");
    one_op();
    one_op();
    // ds held high: a new operation starts on the cycle after rdy.
    @(negedge clk);
    ds = 1;
    edges = 0;
    repeat (3) begin
      @(negedge clk);
      edges = 0;
      while (!rdy && edges < 40) begin
        @(negedge clk);
        edges++;
      end
      check(edges == 16, $sformatf("back-to-back rdy after %0d edges", edges));
      #1 check(load == 1, "restart with ds high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
