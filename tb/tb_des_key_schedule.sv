// tb_des_key_schedule: loads the standard's example key 133457799BBCDFF1
// and checks the 16 round keys K1..K16 (published values, also produced by
// an independent model) in encryption order, then in reverse order for
// decryption, then for random keys against the behavioural reference.
module tb_des_key_schedule;
  import des_pkg::*;
  import des_ref_pkg::*;
  int checks = 0, failures = 0;

  logic       clk = 0, rst, load, decipher, step;
  logic [3:0] round;
  block_t     key;
  subkey_t    subkey;

  des_key_schedule u_dut (.clk, .rst, .load, .key, .decipher, .step, .round, .subkey);

  always #5 clk = ~clk;

  localparam subkey_t KS [16] = '{
    48'h1b02effc7072, 48'h79aed9dbc9e5, 48'h55fc8a42cf99, 48'h72add6db351d,
    48'h7cec07eb53a8, 48'h63a53e507b2f, 48'hec84b7f618bc, 48'hf78a3ac13bfb,
    48'he0dbebede781, 48'hb1f347ba464f, 48'h215fd3ded386, 48'h7571f59467e9,
    48'h97c5d1faba41, 48'h5f43b7f2e73a, 48'hbf918d3d3f0a, 48'hcb3d8b0e17f5
  };

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Loads k, then steps through 16 rounds comparing against exp.
  task automatic run(input block_t k, input logic dec, input subkey_t exp [16]);
    @(negedge clk);
    key = k; decipher = dec; load = 1; step = 0; round = 0;
    @(negedge clk);
    load = 0; decipher = ~dec;  // must have been latched
    key = ~k;
    for (int r = 0; r < 16; r++) begin
      step = 1; round = 4'(r);
      #1;
      check(subkey == (dec ? exp[15-r] : exp[r]),
            $sformatf("key %h dec %0d round %0d: %h", k, dec, r, subkey));
      @(negedge clk);
    end
    step = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    subkey_t ref_ks [16];
    block_t k;
    rst = 1; load = 0; step = 0; round = 0; decipher = 0; key = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    run(64'h133457799BBCDFF1, 1'b0, KS);
    run(64'h133457799BBCDFF1, 1'b1, KS);
    repeat (10) begin
      k = {$urandom, $urandom};
      subkeys_ref(k, ref_ks);
      run(k, 1'b0, ref_ks);
      run(k, 1'b1, ref_ks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
