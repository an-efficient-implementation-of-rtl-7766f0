// tb_des_ip_inv: checks the final permutation IP^-1 on vectors from an
// independent model and that it undoes the initial permutation for random
// blocks.
module tb_des_ip_inv;
  import des_pkg::*;
  int checks = 0, failures = 0;

  block_t din, dout, ip_out;
  des_ip_inv u_dut (.din, .dout);
  des_ip     u_ip  (.din(dout), .dout(ip_out));

  localparam block_t VIN  [4] = '{64'hf2a74de452e6b438, 64'h6513270e269e0d37,
                                  64'h0c5c7fd0a6a3a450, 64'hd23f0824128b2f33};
  localparam block_t VOUT [4] = '{64'h14f03d06ca7be579, 64'h5eb7ef2932c64020,
                                  64'h24a4dc5417ac17a9, 64'h3afa193cd21b4060};

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
      check(dout == VOUT[i], $sformatf("IP^-1(%h)=%h expected %h", din, dout, VOUT[i]));
    end
    repeat (100) begin
      din = {$urandom, $urandom};
      #1;
      check(ip_out == din, $sformatf("IP(IP^-1(%h)) = %h", din, ip_out));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
