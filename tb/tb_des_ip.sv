// tb_des_ip: checks the initial permutation on the standard's example block
// (IP(0123456789ABCDEF) = CC00CCFFF0AAF0AA), on vectors from an independent
// model, and that it moves single bits where the IP table says.
module tb_des_ip;
  import des_pkg::*;
  int checks = 0, failures = 0;

  block_t din, dout;
  des_ip u_dut (.din, .dout);

  localparam block_t VIN  [5] = '{64'h0123456789ABCDEF, 64'hf2a74de452e6b438, 64'h6513270e269e0d37,
                                  64'h0c5c7fd0a6a3a450, 64'hd23f0824128b2f33};
  localparam block_t VOUT [5] = '{64'hCC00CCFFF0AAF0AA, 64'h3dd16e066beb8433, 64'h01a2fdc7209568be,
                                  64'h8e8e572478740734, 64'h01934ae221ca66f3};

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
    foreach (VIN[i]) begin
      din = VIN[i];
      #1;
      check(dout == VOUT[i], $sformatf("IP(%h)=%h expected %h", din, dout, VOUT[i]));
    end
    // DES bit 58 goes to output bit 1, bit 7 to output bit 64.
    din = 64'd1 << (64 - 58);
    #1 check(dout == 64'h8000_0000_0000_0000, "bit 58 -> 1");
    din = 64'd1 << (64 - 7);
    #1 check(dout == 64'd1, "bit 7 -> 64");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
