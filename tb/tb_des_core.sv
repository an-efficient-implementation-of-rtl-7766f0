// tb_des_core: end-to-end test of the iterative DES datapath. It encrypts
// the published variable-plaintext known-answer vectors (key 0), the
// standard's worked example and random blocks (expected values from an
// independent model and from the behavioural reference), decrypts every
// ciphertext back, and checks that each result arrives 16 clock edges after
// the loading edge with the two early-ready flags before it.
module tb_des_core;
  import des_pkg::*;
  import des_ref_pkg::*;
  int checks = 0, failures = 0;

  logic   clk = 0, rst, ds, decipher;
  block_t indata, key, outdata;
  logic   rdy_nn, rdy_n, rdy;

  des_core u_dut (
    .clk, .rst, .ds, .decipher, .indata, .key, .outdata,
    .rdy_next_next_cycle(rdy_nn), .rdy_next_cycle(rdy_n), .rdy
  );

  always #5 clk = ~clk;

  typedef struct packed { block_t pt; block_t k; block_t ct; } vec_t;
  localparam vec_t VECS [15] = '{
    '{64'h8000000000000000, 64'h0, 64'h95f8a5e5dd31d900},
    '{64'h4000000000000000, 64'h0, 64'hdd7f121ca5015619},
    '{64'h2000000000000000, 64'h0, 64'h2e8653104f3834ea},
    '{64'h1000000000000000, 64'h0, 64'h4bd388ff6cd81d4f},
    '{64'h0800000000000000, 64'h0, 64'h20b9e767b2fb1456},
    '{64'h0400000000000000, 64'h0, 64'h55579380d77138ef},
    '{64'h0200000000000000, 64'h0, 64'h6cc5defaaf04512f},
    '{64'h0100000000000000, 64'h0, 64'h0d9f279ba5d87260},
    '{64'h0123456789ABCDEF, 64'h133457799BBCDFF1, 64'h85E813540F0AB405},
    '{64'h90c192cfd3ac94af, 64'hf28c105d1fb17c23, 64'h09532cce0a5e4391},
    '{64'ha170b33839263059, 64'h953f48f1a09f76b5, 64'h2c031244279ed106},
    '{64'h0fd630f1f29d0da9, 64'h95e60af593bd04cf, 64'hed869b21dafe41ff},
    '{64'h0cb1e29c658cda14, 64'h3898d190f9ebdacc, 64'h8b7ae4f28d97b9af},
    '{64'h8e81973e0becd7b0, 64'h2217beaddbc496cb, 64'h7d0dd625eaf7d083},
    '{64'h6b4cb2424a23d596, 64'h8a6a63ec24ede6a4, 64'h49efc73c8e0b185b}
  };

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Starts one operation with a one-cycle ds; inputs change right after the
  // loading edge to show they were captured. Returns the result.
  task automatic run(input block_t din, input block_t k, input logic dec, output block_t res);
    int cyc = 0;
    bit seen_nn = 0, seen_n = 0;
    @(negedge clk);
    indata = din; key = k; decipher = dec; ds = 1;
    @(negedge clk);
    ds = 0; indata = ~din; key = ~k; decipher = ~dec;
    while (!rdy && cyc < 40) begin
      if (rdy_nn) seen_nn = (cyc == 14);
      if (rdy_n)  seen_n  = (cyc == 15);
      @(negedge clk);
      cyc++;
    end
    check(cyc == 16, $sformatf("latency %0d, expected 16", cyc));
    check(seen_nn && seen_n, "early ready flags");
    res = outdata;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t ct, pt, p, k;
    rst = 1; ds = 0; decipher = 0; indata = '0; key = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    foreach (VECS[i]) begin
      run(VECS[i].pt, VECS[i].k, 1'b0, ct);
      check(ct == VECS[i].ct, $sformatf("E(%h,%h)=%h expected %h", VECS[i].pt, VECS[i].k, ct, VECS[i].ct));
      run(ct, VECS[i].k, 1'b1, pt);
      check(pt == VECS[i].pt, $sformatf("D(%h,%h)=%h expected %h", ct, VECS[i].k, pt, VECS[i].pt));
    end
    repeat (20) begin
      p = {$urandom, $urandom};
      k = {$urandom, $urandom};
      run(p, k, 1'b0, ct);
      check(ct == des_ref(p, k, 1'b0), $sformatf("E(%h,%h)=%h", p, k, ct));
      run(ct, k, 1'b1, pt);
      check(pt == p, $sformatf("D(%h,%h)=%h expected %h", ct, k, pt, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
