// gost_pkg: types, constants and arithmetic helpers shared by the fault-tolerant
// GOST 28147-89 cipher datapath.
//
// Two families of helpers live here.
//  * Residue ("control code") arithmetic modulo p = 2^RES_S - 1. A 32-bit word is
//    split into 32/RES_S groups of RES_S bits and the groups are summed modulo p
//    (end-around carry). Because RES_S divides 32, p divides 2^32 - 1, so
//    2^32 == 1 (mod p) and a one-bit circular shift of a word multiplies its
//    residue by 2, which is a one-bit circular shift of the residue itself.
//    Residues are kept normalised to 0..p-1 (the all-ones pattern, the second
//    representation of zero, is mapped to 0). The modulus family p = 2^s - 1 and
//    the grouping into s-bit digits follow the check-unit description; the value
//    s = 8 is this design's choice.
//  * Sizing of the systematic single-error-correcting, double-error-detecting
//    Hamming code used by every store: R Hamming check bits plus one overall
//    parity bit. For 32 data bits this is a (39,32) code, for the 4-bit
//    substitution-table entries an (8,4) code. The code family is this design's
//    choice; the document only asks for a systematic (32+r, 32) correcting code.
//
// Word convention for a 64-bit block: bits [31:0] go to/come from store N1,
// bits [63:32] to/from store N2.
package gost_pkg;

  // ---------------------------------------------------------------- residues
  localparam int RES_S = 8;                 // digit width s (p = 2^s - 1 = 255)
  typedef logic [RES_S-1:0] res_t;

  // a + b modulo 2^s - 1, normalised
  function automatic res_t res_add(input res_t a, input res_t b);
    logic [RES_S:0] t;
    res_t           u;
    t = {1'b0, a} + {1'b0, b};
    u = t[RES_S-1:0] + res_t'(t[RES_S]);      // end-around carry, cannot overflow
    return (u == {RES_S{1'b1}}) ? '0 : u;
  endfunction

  // -a modulo 2^s - 1 (ones complement), normalised
  function automatic res_t res_neg(input res_t a);
    return (a == '0) ? '0 : ~a;
  endfunction

  // 2*a modulo 2^s - 1: the shifted code plus its former high bit (eqs. 7, 8)
  function automatic res_t res_rol1(input res_t a);
    return {a[RES_S-2:0], a[RES_S-1]};
  endfunction

  // residue of a 32-bit word: sum of its s-bit digits modulo 2^s - 1 (eqs. 1-3)
  function automatic res_t res_of(input logic [31:0] x);
    res_t acc;
    acc = '0;
    for (int i = 0; i < 32 / RES_S; i++) begin
      acc = res_add(acc, x[i*RES_S +: RES_S]);
    end
    return acc;
  endfunction

  // ------------------------------------------------------------- SEC-DED code
  // number of Hamming check bits for k data bits (overall parity not included)
  function automatic int ham_r(input int k);
    int r;
    r = 1;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

  // Hamming position (1-based, never a power of two) of data bit i
  function automatic int ham_pos(input int i);
    int p;
    int n;
    p = 2;
    n = -1;
    while (n < i) begin
      p++;
      if ((p & (p - 1)) != 0) n++;
    end
    return p;
  endfunction

  // data bits (of k) that check bit j covers: bit i is set when ham_pos(i) has bit j set
  function automatic logic [63:0] ham_mask(input int k, input int j);
    logic [63:0] m;
    m = '0;
    for (int i = 0; i < k; i++) m[i] = ((ham_pos(i) >> j) & 1) == 1;
    return m;
  endfunction

  localparam int W_WORD  = 32;
  localparam int R_WORD  = ham_r(W_WORD) + 1;   // 7 check bits per 32-bit word
  localparam int W_ENTRY = 4;
  localparam int R_ENTRY = ham_r(W_ENTRY) + 1;  // 4 check bits per S-box entry

  // ------------------------------------------------------------ cipher constants
  localparam logic [31:0] C1 = 32'h0101_0104;   // held in N6, added mod 2^32-1 (Cm4)
  localparam logic [31:0] C2 = 32'h0101_0101;   // held in N5, added mod 2^32   (Cm3)

  // ---------------------------------------------------------------- modes
  typedef enum logic [2:0] {
    MODE_ECB_ENC   = 3'd0,   // simple replacement, encryption
    MODE_ECB_DEC   = 3'd1,   // simple replacement, decryption
    MODE_GAMMA     = 3'd2,   // gamma (counter) mode, N3..N6 + Cm3/Cm4
    MODE_GFB_ENC   = 3'd3,   // gamma with feedback, encryption
    MODE_GFB_DEC   = 3'd4    // gamma with feedback, decryption
  } mode_e;

  // check units that can report an arithmetic/logic error
  typedef enum logic [2:0] {
    U_CM1 = 3'd0,
    U_R   = 3'd1,
    U_CM2 = 3'd2,
    U_CM3 = 3'd3,
    U_CM4 = 3'd4,
    U_CM5 = 3'd5
  } unit_e;
  localparam int N_UNITS = 6;

  // stores that carry check bits
  typedef enum logic [2:0] {
    ST_X  = 3'd0,
    ST_K  = 3'd1,
    ST_N1 = 3'd2,
    ST_N2 = 3'd3,
    ST_N3 = 3'd4,
    ST_N4 = 3'd5,
    ST_N5 = 3'd6,
    ST_N6 = 3'd7
  } store_e;
  localparam int N_STORES = 8;

endpackage
