// tb_twos_comp_keygen: checks the two's complement key source: key + result
// wraps to zero, the result equals 0 - key, and the corner values 0, 1 and
// 2^63 give 0, all ones and 2^63.
module tb_twos_comp_keygen;
  import des_pkg::*;
  int checks = 0, failures = 0;

  block_t din, dout;
  twos_comp_keygen u_dut (.din, .dout);

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
    din = 64'd0;                   #1 check(dout == 64'd0, "-0");
    din = 64'd1;                   #1 check(dout == '1, "-1");
    din = 64'h8000_0000_0000_0000; #1 check(dout == 64'h8000_0000_0000_0000, "-2^63");
    din = 64'h0123_4567_89AB_CDEF; #1 check(dout == 64'hFEDC_BA98_7654_3211, "-0123456789ABCDEF");
    repeat (200) begin
      din = {$urandom, $urandom};
      #1;
      check(din + dout == 64'd0, $sformatf("%h + %h != 0", din, dout));
      check(dout == 64'd0 - din, $sformatf("-%h = %h", din, dout));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
