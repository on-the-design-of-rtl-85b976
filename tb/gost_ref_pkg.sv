// gost_ref_pkg: behavioural reference models used by the testbenches.
//
// Written independently of the RTL: a plain GOST 28147-89 block cipher
// (simple replacement, encryption and decryption key orders), the gamma
// counter step, the residue modulo 2^s - 1 computed by long division, and the
// Hamming SEC-DED check bits computed from an explicit position table.
package gost_ref_pkg;

  typedef logic [31:0] word_t;
  typedef logic [3:0]  sbox_t [8][16];
  typedef word_t       key_t  [8];

  // residue modulo 2^s - 1 by plain division
  function automatic int ref_res(input logic [31:0] x, input int s);
    longint unsigned v;
    v = x;
    return int'(v % ((longint'(1) << s) - 1));
  endfunction

  // Hamming position table: 3,5,6,7,9,10,...
  function automatic int ref_pos(input int i);
    int cnt;
    cnt = 0;
    for (int p = 3; p < 256; p++) begin
      if ((p & (p - 1)) != 0) begin
        if (cnt == i) return p;
        cnt++;
      end
    end
    return -1;
  endfunction

  // check bits: R-1 Hamming bits then overall parity in the top bit
  function automatic logic [7:0] ref_chk(input logic [31:0] d, input int k, input int r);
    logic [7:0] c;
    logic       par;
    c = '0;
    for (int i = 0; i < k; i++)
      for (int j = 0; j < r - 1; j++)
        if (ref_pos(i) & (1 << j)) c[j] = c[j] ^ d[i];
    par = 1'b0;
    for (int i = 0; i < k; i++) par = par ^ d[i];
    for (int j = 0; j < r - 1; j++) par = par ^ c[j];
    c[r-1] = par;
    return c;
  endfunction

  function automatic word_t f_round(input word_t n1, input word_t x, input sbox_t sb);
    word_t t, y;
    t = n1 + x;
    for (int i = 0; i < 8; i++) y[4*i +: 4] = sb[i][t[4*i +: 4]];
    return {y[20:0], y[31:21]};
  endfunction

  // simple replacement; blk[31:0] = N1, blk[63:32] = N2
  function automatic logic [63:0] gost_ecb(input logic [63:0] blk, input key_t key,
                                           input sbox_t sb, input bit dec);
    word_t n1, n2, g;
    int    k;
    n1 = blk[31:0];
    n2 = blk[63:32];
    for (int j = 0; j < 32; j++) begin
      if (!dec) k = (j < 24) ? (j % 8) : (7 - (j % 8));
      else      k = (j < 8)  ? j       : (7 - (j % 8));
      g = f_round(n1, key[k], sb) ^ n2;
      if (j < 31) begin
        n2 = n1;
        n1 = g;
      end else begin
        n2 = g;
      end
    end
    return {n2, n1};
  endfunction

  // gamma counter step: low word + C2 mod 2^32, high word + C1 mod 2^32-1
  function automatic logic [63:0] gamma_step(input logic [63:0] n);
    longint unsigned lo, hi;
    lo = (longint'(n[31:0]) + 64'h0101_0101) % (64'd1 << 32);
    hi = longint'(n[63:32]) + 64'h0101_0104;
    if (hi >= (64'd1 << 32)) hi = hi - 64'hFFFF_FFFF;
    return {hi[31:0], lo[31:0]};
  endfunction

endpackage
