// tb_des_f: checks the round function F against the worked value of the
// standard's example key (F(F0AAF0AA, 1B02EFFC7072) = 234AA9BB), against
// vectors computed by an independent model, and against the behavioural
// reference for random inputs.
module tb_des_f;
  import des_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] r_in, f_out;
  logic [47:0] subkey;

  des_f u_dut (.r_in, .subkey, .f_out);

  typedef struct packed { logic [31:0] r; logic [47:0] k; logic [31:0] f; } vec_t;
  localparam vec_t VECS [7] = '{
    '{32'hF0AAF0AA, 48'h1B02EFFC7072, 32'h234AA9BB},
    '{32'h892f902b, 48'h5d9d1818e811, 32'hc3b43025},
    '{32'h9531985d, 48'he8e20ed90475, 32'hd0007ed1},
    '{32'h81e74ef5, 48'h099936f675cc, 32'hb492b9ac},
    '{32'h1600a35a, 48'h6b0d6f03675a, 32'ha023f1df},
    '{32'h11e20b8f, 48'h17383d9c1724, 32'h210a5ecd},
    '{32'h8d116ece, 48'h0f216cad4a26, 32'h62e82a69}
  };

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
    foreach (VECS[i]) begin
      r_in = VECS[i].r;
      subkey = VECS[i].k;
      #1;
      check(f_out == VECS[i].f, $sformatf("F(%h,%h)=%h expected %h", r_in, subkey, f_out, VECS[i].f));
    end
    repeat (200) begin
      r_in = $urandom;
      subkey = {16'($urandom), $urandom};
      #1;
      check(f_out == f_ref(r_in, subkey), $sformatf("F(%h,%h)=%h", r_in, subkey, f_out));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
