// des_ref_pkg: behavioural reference models used by the testbenches.
//
// des_ref() is a straight-line DES: it computes all 16 round keys up front
// from the standard tables, then runs the 16 rounds. It shares only the
// constant tables with the design (the tables themselves are checked by the
// published known-answer vectors in the testbenches). The key-source models
// restate the generators' defining equations in integer arithmetic.
package des_ref_pkg;
  import des_pkg::*;

  // Bit t (1-based from the MSB) of an n-bit value.
  function automatic logic get_bit(input logic [63:0] v, input int n, input int t);
    return v[n - t];
  endfunction

  // Table lookups by table id, so one permutation routine serves all.
  typedef enum int {T_IP, T_FP, T_E, T_P, T_PC1, T_PC2} tbl_e;

  function automatic int tbl_entry(input tbl_e t, input int i);
    case (t)
      T_IP:    return int'(IP_TBL[i]);
      T_FP:    return int'(FP_TBL[i]);
      T_E:     return int'(E_TBL[i]);
      T_P:     return int'(P_TBL[i]);
      T_PC1:   return int'(PC1_TBL[i]);
      default: return int'(PC2_TBL[i]);
    endcase
  endfunction

  // Output bits are shifted in MSB first: output bit i+1 = input bit tbl[i].
  function automatic logic [63:0] permute(input logic [63:0] v, input int n_in,
                                          input tbl_e t, input int n_out);
    logic [63:0] o = '0;
    for (int i = 0; i < n_out; i++) o = {o[62:0], get_bit(v, n_in, tbl_entry(t, i))};
    return o;
  endfunction

  function automatic logic [3:0] sbox_ref(input int b, input logic [5:0] v);
    int row = int'({v[5], v[0]});
    int col = int'(v[4:1]);
    return SBOX_TBL[b][row*16 + col];
  endfunction

  function automatic logic [31:0] f_ref(input logic [31:0] r, input logic [47:0] k);
    logic [47:0] x;
    logic [31:0] s = '0;
    x = 48'(permute({32'd0, r}, 32, T_E, 48)) ^ k;
    for (int i = 0; i < 8; i++) s = {s[27:0], sbox_ref(i, x[47-6*i -: 6])};
    return 32'(permute({32'd0, s}, 32, T_P, 32));
  endfunction

  function automatic void subkeys_ref(input logic [63:0] key, output logic [47:0] ks [16]);
    logic [55:0] cd;
    logic [27:0] c, d;
    cd = 56'(permute(key, 64, T_PC1, 56));
    c = cd[55:28];
    d = cd[27:0];
    for (int r = 0; r < 16; r++) begin
      for (int n = 0; n < int'(SHIFT_TBL[r]); n++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
      ks[r] = 48'(permute({8'd0, c, d}, 56, T_PC2, 48));
    end
  endfunction

  function automatic logic [63:0] des_ref(input logic [63:0] din, input logic [63:0] key,
                                          input logic decrypt);
    logic [47:0] ks [16];
    logic [63:0] x;
    logic [31:0] l, r, t;
    subkeys_ref(key, ks);
    x = permute(din, 64, T_IP, 64);
    l = x[63:32];
    r = x[31:0];
    for (int i = 0; i < 16; i++) begin
      t = r;
      r = l ^ f_ref(r, decrypt ? ks[15-i] : ks[i]);
      l = t;
    end
    return permute({r, l}, 64, T_FP, 64);
  endfunction

  // 64-bit LFSR, polynomial x^64 + x^63 + x^61 + x^60 + 1, shifting towards
  // bit 0, after n steps from seed.
  function automatic logic [63:0] lfsr_ref(input logic [63:0] seed, input int n);
    logic [63:0] v = seed;
    for (int i = 0; i < n; i++) v = {^(v & 64'h1B), v[63:1]};
    return v;
  endfunction

  // Tent map on [-1, 1] in Q2.62, with the bit lost by doubling fed back
  // into the LSB, after n steps from seed.
  function automatic logic [63:0] chaos_ref(input logic [63:0] seed, input int n);
    longint x = longint'(seed);
    longint one = 64'sh4000_0000_0000_0000;
    logic lost;
    for (int i = 0; i < n; i++) begin
      lost = x[62];
      x = (x < 0) ? one + 2*x : one - 2*x;
      x[0] = x[0] ^ lost;
    end
    return x;
  endfunction

endpackage
