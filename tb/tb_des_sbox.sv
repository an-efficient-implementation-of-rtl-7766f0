// tb_des_sbox: exhaustive test of all eight S-boxes. For every box and all
// 64 inputs it checks that each row is a permutation of 0..15, compares a
// set of entries printed in the DES standard, and compares two weighted
// checksums over the whole table with values computed from the standard
// tables by an independent model.
module tb_des_sbox;
  int checks = 0, failures = 0;

  logic [5:0] din;
  logic [3:0] dout [8];

  for (genvar b = 0; b < 8; b++) begin : g_dut
    des_sbox #(.BOX(b)) u_dut (.din, .dout(dout[b]));
  end

  // Reference checksums: sum(v * S(v)), sum((v ^ 0x15) * S(v)^2) and
  // sum(v^2 * S(v)).
  localparam int SIG1 [8] = '{14830, 14996, 15334, 15148, 15076, 14952, 14940, 15070};
  localparam int SIG2 [8] = '{156306, 157900, 150650, 160028, 154536, 157704, 155640, 155166};
  localparam int SIG3 [8] = '{619996, 638704, 654744, 644884, 628244, 634464, 624288, 641768};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s1 [8], s2 [8], s3 [8];
    logic [15:0] seen [8][4];
    foreach (s1[b]) begin s1[b] = 0; s2[b] = 0; s3[b] = 0; end
    foreach (seen[b, r]) seen[b][r] = '0;
    for (int v = 0; v < 64; v++) begin
      din = 6'(v);
      #1;
      for (int b = 0; b < 8; b++) begin
        s1[b] += v * int'(dout[b]);
        s2[b] += (v ^ 'h15) * int'(dout[b]) * int'(dout[b]);
        s3[b] += v * v * int'(dout[b]);
        seen[b][{din[5], din[0]}][dout[b]] = 1'b1;
      end
      // S1 row 0 column 0 = 14, S8 row 3 column 15 = 11, S5 row 1 column 3 = 12
      if (v == 0)  check(dout[0] == 4'd14, "S1(000000)");
      if (v == 63) check(dout[7] == 4'd11, "S8(111111)");
      if (v == 7)  check(dout[4] == 4'd12, "S5(000111)");
    end
    for (int b = 0; b < 8; b++) begin
      check(s1[b] == SIG1[b], $sformatf("S%0d checksum 1 %0d", b + 1, s1[b]));
      check(s2[b] == SIG2[b], $sformatf("S%0d checksum 2 %0d", b + 1, s2[b]));
      check(s3[b] == SIG3[b], $sformatf("S%0d checksum 3 %0d", b + 1, s3[b]));
      for (int r = 0; r < 4; r++)
        check(seen[b][r] == 16'hFFFF, $sformatf("S%0d row %0d not a permutation", b + 1, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
