// tb_topdes112: end-to-end test of DES with the enhanced key generation
// unit, at the design's default (and only) configuration.
//
// Each operation starts from reset: the user key is applied during reset
// (it seeds the LFSR), ds is raised a chosen number of cycles after reset,
// and the expected key for the selected source is worked out by reference
// models; the expected result comes from a behavioural DES. Each
// ciphertext is then decrypted after a fresh reset with the same timing and
// must give the plaintext back. The published operating point, plaintext
// 8000000000000000 with key 0000000000000000, is run in all four modes
// first. The test also holds ds high for back-to-back operations and pulses
// ds while busy. Every mechanism (four key sources, encryption,
// decryption, early ready flags, ignored ds, back-to-back restart, LFSR and
// chaotic keys changing with the start cycle) is counted and must occur.
module tb_topdes112;
  import des_pkg::*;
  import des_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam block_t CHAOS_SEED = 64'h1333_3333_3333_3333;

  logic       clk = 0, rst, ds, decipher;
  logic [1:0] s;
  block_t     indata, inkey, outdata;
  logic       rdy_nn, rdy_n, rdy;

  topdes112 u_dut (
    .clk, .rst, .indata, .inkey, .s, .decipher, .ds, .outdata,
    .rdy_next_next_cycle(rdy_nn), .rdy_next_cycle(rdy_n), .rdy
  );

  always #5 clk = ~clk;

  // Mechanism counters.
  int n_mode [4] = '{0, 0, 0, 0};
  int n_enc = 0, n_dec = 0, n_early = 0, n_ignored = 0, n_b2b = 0, n_keys_differ = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic block_t key_for(input logic [1:0] sel, input block_t k, input int n);
    case (sel)
      2'b00:   return k;
      2'b01:   return lfsr_ref(k, n);
      2'b10:   return chaos_ref(CHAOS_SEED, n);
      default: return 64'd0 - k;
    endcase
  endfunction

  // Reset with key k applied, wait w cycles, run one operation. A ds pulse
  // in the middle of the operation must be ignored.
  task automatic op(input block_t din, input block_t k, input logic [1:0] sel,
                    input logic dec, input int w, output block_t res);
    int cyc = 0;
    bit nn = 0, n1 = 0;
    @(negedge clk);
    rst = 1; ds = 0; inkey = k; s = sel;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (w) @(negedge clk);
    indata = din; decipher = dec; ds = 1;
    @(negedge clk);
    ds = 0; indata = ~din; decipher = ~dec;
    while (!rdy && cyc < 40) begin
      if (rdy_nn && cyc == 14) nn = 1;
      if (rdy_n && cyc == 15) n1 = 1;
      if (cyc == 7) ds = 1;  // must be ignored
      @(negedge clk);
      ds = 0;
      cyc++;
    end
    check(cyc == 16, $sformatf("latency %0d, expected 16", cyc));
    if (cyc == 16) n_ignored++;
    check(nn && n1, "early ready flags");
    if (nn && n1) n_early++;
    res = outdata;
  endtask

  // Encrypt then decrypt, both started w cycles after reset.
  task automatic round_trip(input block_t p, input block_t k, input logic [1:0] sel, input int w,
                            input bit has_exp, input block_t exp);
    block_t ct, pt, key_used, expect_ct;
    key_used  = key_for(sel, k, w);
    expect_ct = has_exp ? exp : des_ref(p, key_used, 1'b0);
    op(p, k, sel, 1'b0, w, ct);
    check(ct == expect_ct, $sformatf("s=%b E(%h) key %h = %h expected %h", sel, p, key_used, ct, expect_ct));
    n_enc++;
    op(ct, k, sel, 1'b1, w, pt);
    check(pt == p, $sformatf("s=%b D(%h) = %h expected %h", sel, ct, pt, p));
    n_dec++;
    n_mode[sel]++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t p, k;
    int w;
    rst = 1; ds = 0; decipher = 0; s = 0; indata = '0; inkey = '0;

    // Published operating point in every mode. With a zero user key the
    // direct, LFSR (zero seed) and two's complement keys are all zero.
    for (int m = 0; m < 4; m++)
      round_trip(64'h8000_0000_0000_0000, 64'd0, 2'(m), 20, m != 2, 64'h95F8_A5E5_DD31_D900);

    // Random blocks and keys, random start cycles.
    for (int i = 0; i < 24; i++) begin
      p = {$urandom, $urandom};
      k = {$urandom, $urandom};
      w = int'($urandom_range(0, 40));
      round_trip(p, k, 2'(i % 4), w, 1'b0, 64'd0);
    end

    // The LFSR and chaotic keys depend on the start cycle.
    k = 64'h0123_4567_89AB_CDEF;
    if (key_for(2'b01, k, 3) != key_for(2'b01, k, 4)) n_keys_differ++;
    if (key_for(2'b10, k, 3) != key_for(2'b10, k, 4)) n_keys_differ++;
    begin
      block_t c3, c4;
      op(64'h8000_0000_0000_0000, k, 2'b10, 1'b0, 3, c3);
      op(64'h8000_0000_0000_0000, k, 2'b10, 1'b0, 4, c4);
      check(c3 != c4, "chaotic key changes with the start cycle");
    end

    // ds held high: operations follow back to back, direct key.
    @(negedge clk);
    rst = 1; s = 2'b00;
    inkey = 64'h1334_5779_9BBC_DFF1;
    @(negedge clk);
    rst = 0;
    indata = 64'h0123_4567_89AB_CDEF; decipher = 0; ds = 1;
    repeat (3) begin
      int e;
      e = 0;
      @(negedge clk);
      while (!rdy && e < 40) begin
        @(negedge clk);
        e++;
      end
      check(e == 16 && outdata == 64'h85E8_1354_0F0A_B405,
            $sformatf("back-to-back: %h after %0d", outdata, e));
      if (outdata == 64'h85E8_1354_0F0A_B405) n_b2b++;
    end
    ds = 0;

    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, $sformatf("key source %0d never used", m));
    check(n_enc > 0 && n_dec > 0, "encryption and decryption");
    check(n_early > 0, "early ready flags");
    check(n_ignored > 0, "ds ignored while busy");
    check(n_b2b == 3, "back-to-back operations");
    check(n_keys_differ == 2, "time-varying keys");
    $display("mechanisms: direct %0d lfsr %0d chaotic %0d twos %0d enc %0d dec %0d early %0d ignored %0d b2b %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_enc, n_dec, n_early, n_ignored, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
