// cm_asm_pkg: testbench helpers for the CryptoManiac processing element:
// instruction encoders, a demonstration program and reference models of
// its handlers (test cipher, Blowfish, IDEA) written from their arithmetic.
//
// Demonstration program (bundle addresses):
//   0      RECV: wait for a request, jump to 8 + code
//   8..15  vector table: CREATE -> 16, ENCRYPT -> 24, DECRYPT -> 49,
//          BLOWFISH -> 38, IDEA -> 58, all others -> 34
//   16..23 CREATE: key K = request word 0. Fill SBOX table k (k = 0..3) with
//          T0[i] = (i+K) ^ 0x1A5A5, Tk[i] = (i^K) <<< 8k; store K at data
//          word 768 (first key word of the context); reply {K, 0, 0, 0}.
//   24..32 ENCRYPT: L, R = request words 0, 1; K = data word 768. ROUNDS
//          rounds of  L' = R,
//          R' = ((((T0[R.b0]^K) + T1[R.b1]) ^ T2[R.b2]) + T3[R.b3])
//               ^ mulmod(R[15:0], K[15:0]) ^ (L <<< 5);
//          reply {L, R, K, tag}.
//   34..37 ACK (delete and unknown codes): reply {code, 0, 0, 0}.
//   49..57 DECRYPT: the inverse rounds. With F(x) the round function above
//          (tables, key and mulmod applied to x), each round computes
//          L = (R ^ F(L)) >>> 5, R = old L; reply {L, R, K, tag}. Placed so
//          its loop branch does not share a BTB entry with the vector jumps.
//   14, 38..48 BLOWFISH (code 6): the Blowfish kernel, 16 rounds of
//          X = L ^ P[i]; R ^= F(X); swap, with
//          F(X) = ((S0[X.b3] + S1[X.b2]) ^ S2[X.b1]) + S3[X.b0],
//          then R ^= P[16], L ^= P[17] after undoing the last swap.
//          S0..S3 are the four SBOX tables and P[0..17] data words
//          769..786 of the session context. One round takes three bundles:
//          four XOR-SBOX pairs; ADD-XOR, X and the next P load; ADD-XOR
//          into R. Two rounds per loop pass so the swap costs nothing.
//          Reply {L, R, 0, tag}.
//   15, 58..60, 1..7, 61..63 IDEA (code 7): the IDEA kernel on the block
//          {X1,X2} = word 0, {X3,X4} = word 1, 8 rounds and the output
//          transformation, reply {{Y1,Y2}, {Y3,Y4}, 0, tag}. Subkeys of
//          round i sit in the SBOX tables at index 3i+j, found with byte j
//          of one index register: T0[3i] = Z2, T0[3i+1] = Z3,
//          T0[3i+2] = Z5, T1[3i] = Z6, T2[3i] = Z1, T3[3i] = Z4 (round 8
//          holds the output subkeys). Values are kept mod 2^16 only in
//          their low half (MULMOD reads 16 bits), so the loop needs no
//          masking. One round is six bundles, three of them MULMOD
//          bundles, so 3 + 3 x MUL_LAT = 12 cycles. The new X2 = c ^ f is
//          folded into the next round's XOR-ADD. Bundle 63 falls through
//          to RECV at bundle 0.
package cm_asm_pkg;
  import cm_pkg::*;

  localparam int ROUNDS = 4;
  localparam int BF_ROUNDS = 16;
  localparam logic [2:0] RQ_BLOWFISH = 3'd6;
  localparam logic [2:0] RQ_IDEA     = 3'd7;
  localparam int IDEA_ROUNDS = 8;

  function automatic logic [31:0] ins(op_e op1, op_e op2, int rd, int ra, int rb, int rc,
                                      int bsel = 0);
    instr_t i;
    i = '0;
    i.op1 = op1; i.op2 = op2; i.rd = RW'(rd); i.ra = RW'(ra); i.rb = RW'(rb); i.rc = RW'(rc);
    i.bsel = 2'(bsel);
    return i;
  endfunction

  function automatic logic [31:0] spc(special_e s, int rd, int ra, int rb, int imm9);
    logic [31:0] w;
    w = {OP_SPECIAL, 4'(s), 5'(rd), 5'(ra), 5'(rb), 9'(imm9)};
    return w;
  endfunction

  function automatic logic [31:0] ldi(int rd, int imm19);
    return {OP_SPECIAL, 4'(SP_LDI), 5'(rd), 19'(imm19)};
  endfunction

  function automatic bundle_t bnd(logic [31:0] s0, logic [31:0] s1 = 0,
                                  logic [31:0] s2 = 0, logic [31:0] s3 = 0);
    return {s3, s2, s1, s0};
  endfunction

  typedef bundle_t prog_t [64];

  function automatic prog_t demo_program();
    prog_t p;
    for (int i = 0; i < 64; i++) p[i] = '0;
    p[0] = bnd(0, 0, 0, spc(SP_RECV, 0, 0, 0, 0));
    for (int c = 0; c < 8; c++) p[8+c] = bnd(0, 0, 0, spc(SP_JMP, 0, 0, 0, 34));
    p[8 + int'(RQ_CREATE)]  = bnd(0, 0, 0, spc(SP_JMP, 0, 0, 0, 16));
    p[8 + int'(RQ_ENCRYPT)] = bnd(0, 0, 0, spc(SP_JMP, 0, 0, 0, 24));
    p[8 + int'(RQ_DECRYPT)] = bnd(0, 0, 0, spc(SP_JMP, 0, 0, 0, 49));
    p[8 + int'(RQ_BLOWFISH)] = bnd(ldi(15, 769), spc(SP_RQR, 20, 0, 0, 0), spc(SP_RQR, 21, 0, 0, 1),
                                   spc(SP_JMP, 0, 0, 0, 38));
    p[8 + int'(RQ_IDEA)] = bnd(ldi(15, 'h20100), spc(SP_RQR, 12, 0, 0, 0), spc(SP_RQR, 23, 0, 0, 1),
                               spc(SP_JMP, 0, 0, 0, 58));
    // CREATE
    p[16] = bnd(ldi(8, -1), ldi(3, 255), ldi(1, 0), spc(SP_RQR, 2, 0, 0, 0));
    p[17] = bnd(ldi(7, 'h1A5A5), ldi(10, 8), ldi(12, 16), ldi(14, 24));
    p[18] = bnd(ins(OP_ADD, OP_XOR, 4, 1, 2, 7), ins(OP_XOR, OP_ROL, 9, 1, 2, 10),
                ins(OP_XOR, OP_ROL, 11, 1, 2, 12), ins(OP_XOR, OP_ROL, 13, 1, 2, 14));
    p[19] = bnd(spc(SP_SBW, 0, 1, 4, 0), spc(SP_SBW, 0, 1, 9, 0),
                spc(SP_SBW, 0, 1, 11, 0), spc(SP_SBW, 0, 1, 13, 0));
    p[20] = bnd(ins(OP_INC, OP_NOP, 1, 1, 0, 0), ins(OP_ADD, OP_NOP, 3, 3, 8, 0), 0,
                spc(SP_BNEZ, 0, 3, 0, 18));
    p[21] = bnd(ldi(15, 768), spc(SP_RSW, 0, 2, 0, 0), ldi(6, 0), 0);
    p[22] = bnd(spc(SP_ST, 0, 15, 2, 0), spc(SP_RSW, 0, 6, 0, 1), spc(SP_RSW, 0, 6, 0, 2),
                spc(SP_SEND, 0, 0, 0, 0));
    p[23] = bnd(spc(SP_RSW, 0, 6, 0, 3), 0, 0, spc(SP_JMP, 0, 0, 0, 0));
    // ENCRYPT
    p[24] = bnd(ldi(15, 768), spc(SP_RQR, 20, 0, 0, 0), spc(SP_RQR, 21, 0, 0, 1), ldi(3, ROUNDS));
    p[25] = bnd(spc(SP_LD, 22, 15, 0, 0), ldi(8, -1), ldi(30, -1), ldi(31, 5));
    p[26] = bnd(ins(OP_SBOX, OP_XOR, 23, 21, 0, 22, 0), ins(OP_SBOX, OP_NOP, 24, 21, 0, 0, 1),
                ins(OP_SBOX, OP_NOP, 25, 21, 0, 0, 2), ins(OP_SBOX, OP_NOP, 26, 21, 0, 0, 3));
    p[27] = bnd(ins(OP_ADD, OP_XOR, 27, 23, 24, 25), ins(OP_MULMOD, OP_NOP, 28, 21, 22, 0),
                ins(OP_AND, OP_ROL, 29, 20, 30, 31), ins(OP_ADD, OP_NOP, 3, 3, 8, 0));
    p[28] = bnd(ins(OP_ADD, OP_XOR, 19, 27, 26, 28));
    p[29] = bnd(ins(OP_XOR, OP_NOP, 21, 19, 29, 0), ins(OP_AND, OP_NOP, 20, 21, 21, 0), 0,
                spc(SP_BNEZ, 0, 3, 0, 26));
    p[30] = bnd(spc(SP_RSW, 0, 20, 0, 0), spc(SP_RSW, 0, 21, 0, 1), spc(SP_RQR, 5, 0, 0, 6), 0);
    p[31] = bnd(spc(SP_RSW, 0, 22, 0, 2), spc(SP_RSW, 0, 5, 0, 3), 0, spc(SP_SEND, 0, 0, 0, 0));
    p[32] = bnd(0, 0, 0, spc(SP_JMP, 0, 0, 0, 0));
    // ACK
    p[34] = bnd(spc(SP_RQR, 5, 0, 0, 5), ldi(6, 0));
    p[35] = bnd(spc(SP_RSW, 0, 5, 0, 0), spc(SP_RSW, 0, 6, 0, 1), spc(SP_RSW, 0, 6, 0, 2), 0);
    p[36] = bnd(spc(SP_RSW, 0, 6, 0, 3), 0, 0, spc(SP_SEND, 0, 0, 0, 0));
    p[37] = bnd(0, 0, 0, spc(SP_JMP, 0, 0, 0, 0));
    // BLOWFISH: r20/r21 = L/R (roles swap every round), r22 = P[i], r15 -> P[i]
    p[38] = bnd(spc(SP_LD, 22, 15, 0, 0), ldi(8, -1), ldi(3, BF_ROUNDS / 2), 0);
    for (int h = 0; h < 2; h++) begin
      int L, R, b;
      L = h ? 21 : 20; R = h ? 20 : 21; b = 39 + 3 * h;
      p[b]   = bnd(ins(OP_XOR, OP_SBOX, 23, L, 22, 0, 3), ins(OP_XOR, OP_SBOX, 24, L, 22, 0, 2),
                   ins(OP_XOR, OP_SBOX, 25, L, 22, 0, 1), ins(OP_XOR, OP_SBOX, 26, L, 22, 0, 0));
      p[b+1] = bnd(spc(SP_LD, 22, 15, 0, 1), ins(OP_ADD, OP_XOR, 27, 23, 24, 25),
                   ins(OP_XOR, OP_NOP, L, L, 22, 0), ins(OP_INC, OP_NOP, 15, 15, 0, 0));
      p[b+2] = bnd(0, ins(OP_ADD, OP_XOR, R, 27, 26, R),
                   h ? 0 : ins(OP_ADD, OP_NOP, 3, 3, 8, 0),
                   h ? spc(SP_BNEZ, 0, 3, 0, 39) : 0);
    end
    p[45] = bnd(spc(SP_LD, 16, 15, 0, 1), ins(OP_XOR, OP_NOP, 20, 20, 22, 0), spc(SP_RQR, 5, 0, 0, 6), 0);
    p[46] = bnd(spc(SP_RSW, 0, 20, 0, 1), ins(OP_XOR, OP_NOP, 21, 21, 16, 0), spc(SP_RSW, 0, 5, 0, 3), 0);
    p[47] = bnd(spc(SP_RSW, 0, 21, 0, 0), spc(SP_RSW, 0, 3, 0, 2), 0, spc(SP_SEND, 0, 0, 0, 0));
    p[48] = bnd(0, 0, 0, spc(SP_JMP, 0, 0, 0, 0));
    // IDEA: X1..X4 = r20..r23, Z1..Z6 = r24..r29, a,b,c,d = r10..r13, e = r14,
    // f = r6, e*Z5 = r17, f+e = r18, f2 = r19, index r15, step r9, count r3
    p[58] = bnd(ins(OP_SBOX, OP_NOP, 25, 15, 0, 0, 0), ldi(16, 16),
                ins(OP_SBOX, OP_NOP, 24, 15, 0, 0, 0), ins(OP_SBOX, OP_NOP, 27, 15, 0, 0, 0));
    p[59] = bnd(ins(OP_SBOX, OP_NOP, 26, 15, 0, 0, 1), ldi(9, 'h30303), ldi(3, -IDEA_ROUNDS), ldi(19, 0));
    p[60] = bnd(ins(OP_ROL, OP_NOP, 20, 12, 16, 0), ins(OP_ROL, OP_NOP, 22, 23, 16, 0), ldi(1, 'hFFFF),
                spc(SP_JMP, 0, 0, 0, 1));
    p[1] = bnd(ins(OP_MULMOD, OP_NOP, 10, 20, 24, 0), ins(OP_MULMOD, OP_NOP, 13, 23, 27, 0),
               ins(OP_XOR, OP_ADD, 11, 12, 19, 25), ins(OP_ADD, OP_NOP, 12, 22, 26, 0));
    p[2] = bnd(ins(OP_SBOX, OP_NOP, 28, 15, 0, 0, 2), ins(OP_SBOX, OP_NOP, 29, 15, 0, 0, 0),
               ins(OP_XOR, OP_NOP, 14, 10, 12, 0), ins(OP_XOR, OP_NOP, 6, 11, 13, 0));
    p[3] = bnd(ins(OP_MULMOD, OP_NOP, 17, 14, 28, 0), 0,
               ins(OP_ADD, OP_NOP, 15, 15, 9, 0), ins(OP_INC, OP_NOP, 3, 3, 0, 0));
    p[4] = bnd(ins(OP_SBOX, OP_NOP, 25, 15, 0, 0, 0), ins(OP_ADD, OP_NOP, 18, 6, 17, 0),
               ins(OP_SBOX, OP_NOP, 24, 15, 0, 0, 0), ins(OP_SBOX, OP_NOP, 27, 15, 0, 0, 0));
    p[5] = bnd(ins(OP_SBOX, OP_NOP, 26, 15, 0, 0, 1), ins(OP_MULMOD, OP_NOP, 19, 18, 29, 0));
    p[6] = bnd(ins(OP_ADD, OP_XOR, 23, 17, 19, 13), ins(OP_ADD, OP_XOR, 22, 17, 19, 11),
               ins(OP_XOR, OP_NOP, 20, 10, 19, 0), spc(SP_BNEZ, 0, 3, 0, 1));
    p[7] = bnd(ins(OP_MULMOD, OP_NOP, 30, 20, 24, 0), ins(OP_MULMOD, OP_NOP, 31, 23, 27, 0),
               ins(OP_XOR, OP_NOP, 21, 12, 19, 0), spc(SP_JMP, 0, 0, 0, 61));
    p[61] = bnd(ins(OP_ADD, OP_AND, 7, 22, 25, 1), ins(OP_ADD, OP_AND, 4, 21, 26, 1),
                spc(SP_RQR, 5, 0, 0, 6), 0);
    p[62] = bnd(ins(OP_ROL, OP_XOR, 2, 30, 16, 7), ins(OP_ROL, OP_XOR, 8, 4, 16, 31),
                spc(SP_RSW, 0, 5, 0, 3), 0);
    p[63] = bnd(spc(SP_RSW, 0, 2, 0, 0), spc(SP_RSW, 0, 8, 0, 1), spc(SP_RSW, 0, 3, 0, 2),
                spc(SP_SEND, 0, 0, 0, 0));
    // DECRYPT
    p[49] = bnd(ldi(15, 768), spc(SP_RQR, 20, 0, 0, 0), spc(SP_RQR, 21, 0, 0, 1), ldi(3, ROUNDS));
    p[50] = bnd(spc(SP_LD, 22, 15, 0, 0), ldi(8, -1), 0, ldi(31, 5));
    p[51] = bnd(ins(OP_SBOX, OP_XOR, 23, 20, 0, 22, 0), ins(OP_SBOX, OP_NOP, 24, 20, 0, 0, 1),
                ins(OP_SBOX, OP_NOP, 25, 20, 0, 0, 2), ins(OP_SBOX, OP_NOP, 26, 20, 0, 0, 3));
    p[52] = bnd(ins(OP_ADD, OP_XOR, 27, 23, 24, 25), ins(OP_MULMOD, OP_NOP, 28, 20, 22, 0),
                0, ins(OP_ADD, OP_NOP, 3, 3, 8, 0));
    p[53] = bnd(ins(OP_ADD, OP_XOR, 19, 27, 26, 28));
    p[54] = bnd(ins(OP_XOR, OP_ROR, 20, 21, 19, 31), ins(OP_AND, OP_NOP, 21, 20, 20, 0), 0,
                spc(SP_BNEZ, 0, 3, 0, 51));
    p[55] = bnd(spc(SP_RSW, 0, 20, 0, 0), spc(SP_RSW, 0, 21, 0, 1), spc(SP_RQR, 5, 0, 0, 6), 0);
    p[56] = bnd(spc(SP_RSW, 0, 22, 0, 2), spc(SP_RSW, 0, 5, 0, 3), 0, spc(SP_SEND, 0, 0, 0, 0));
    p[57] = bnd(0, 0, 0, spc(SP_JMP, 0, 0, 0, 0));
    return p;
  endfunction

  // ---------------- reference model ----------------
  function automatic logic [31:0] rol32(logic [31:0] x, int n);
    n = n % 32;
    return (n == 0) ? x : ((x << n) | (x >> (32 - n)));
  endfunction

  function automatic logic [31:0] ref_table(int k, int i, logic [31:0] key);
    logic [31:0] s;
    s = 32'(i) + key;
    return (k == 0) ? (s ^ 32'h0001A5A5) : rol32(32'(i) ^ key, 8 * k);
  endfunction

  function automatic logic [15:0] ref_mulmod(logic [15:0] a, logic [15:0] b);
    longint unsigned x, y, r;
    x = (a == 0) ? 65536 : a;
    y = (b == 0) ? 65536 : b;
    r = (x * y) % 65537;
    return (r == 65536) ? 16'd0 : 16'(r);
  endfunction

  typedef logic [3:0][31:0] words_t;

  function automatic words_t ref_encrypt(logic [31:0] l, logic [31:0] r, logic [31:0] key,
                                         logic [7:0] tag);
    logic [31:0] a, b, c, d, e, m, f, g;
    for (int n = 0; n < ROUNDS; n++) begin
      a = ref_table(0, int'(r[7:0]), key) ^ key;
      b = ref_table(1, int'(r[15:8]), key);
      c = ref_table(2, int'(r[23:16]), key);
      d = ref_table(3, int'(r[31:24]), key);
      e = (a + b) ^ c;
      m = {16'd0, ref_mulmod(r[15:0], key[15:0])};
      f = rol32(l, 5);
      g = ((e + d) ^ m) ^ f;
      l = r;
      r = g;
    end
    return {32'(tag), key, r, l};
  endfunction

  // round function of the demonstration cipher
  function automatic logic [31:0] ref_f(logic [31:0] x, logic [31:0] key);
    logic [31:0] e;
    e = ((ref_table(0, int'(x[7:0]), key) ^ key) + ref_table(1, int'(x[15:8]), key))
        ^ ref_table(2, int'(x[23:16]), key);
    return (e + ref_table(3, int'(x[31:24]), key)) ^ {16'd0, ref_mulmod(x[15:0], key[15:0])};
  endfunction

  function automatic words_t ref_decrypt(logic [31:0] l, logic [31:0] r, logic [31:0] key,
                                         logic [7:0] tag);
    logic [31:0] t;
    for (int n = 0; n < ROUNDS; n++) begin
      t = r ^ ref_f(l, key);
      r = l;
      l = (t >> 5) | (t << 27);
    end
    return {32'(tag), key, r, l};
  endfunction

  // Blowfish P-array word i as stored in the test contexts
  function automatic logic [31:0] ref_bf_p(int i);
    return 32'(1025 + i) * 32'h9E37_79B9;
  endfunction

  // Blowfish encryption with S-box k = ref_table(k, *, key) and P = ref_bf_p
  function automatic words_t ref_blowfish(logic [31:0] l, logic [31:0] r, logic [31:0] key,
                                          logic [7:0] tag);
    logic [31:0] t, f;
    for (int n = 0; n < BF_ROUNDS; n++) begin
      l = l ^ ref_bf_p(n);
      f = ((ref_table(0, int'(l[31:24]), key) + ref_table(1, int'(l[23:16]), key))
           ^ ref_table(2, int'(l[15:8]), key)) + ref_table(3, int'(l[7:0]), key);
      r = r ^ f;
      t = l; l = r; r = t;
    end
    t = l; l = r; r = t;
    r = r ^ ref_bf_p(16);
    l = l ^ ref_bf_p(17);
    return {32'(tag), 32'd0, r, l};
  endfunction

  typedef logic [15:0] idea_keys_t [52];

  // IDEA encryption subkeys: the 128-bit key in 16-bit pieces, rotated left
  // by 25 bits after every eight
  function automatic idea_keys_t ref_idea_keys(logic [127:0] key);
    idea_keys_t z;
    for (int i = 0; i < 52; i++) begin
      z[i] = key[127 - 16 * (i % 8) -: 16];
      if (i % 8 == 7) key = {key[102:0], key[127:103]};
    end
    return z;
  endfunction

  // IDEA encryption of {X1,X2} = w0, {X3,X4} = w1
  function automatic words_t ref_idea(logic [31:0] w0, logic [31:0] w1, idea_keys_t z,
                                      logic [7:0] tag);
    logic [15:0] x1, x2, x3, x4, a, b, c, d, e, f;
    {x1, x2} = w0; {x3, x4} = w1;
    for (int n = 0; n < IDEA_ROUNDS; n++) begin
      a = ref_mulmod(x1, z[6*n]); b = x2 + z[6*n+1]; c = x3 + z[6*n+2]; d = ref_mulmod(x4, z[6*n+3]);
      e = ref_mulmod(a ^ c, z[6*n+4]);
      f = ref_mulmod((b ^ d) + e, z[6*n+5]);
      e = e + f;
      x1 = a ^ f; x4 = d ^ e; x2 = c ^ f; x3 = b ^ e;
    end
    // output transformation: Y1 = X1*Z49, Y2 = X3+Z50, Y3 = X2+Z51, Y4 = X4*Z52
    a = ref_mulmod(x1, z[48]); b = x3 + z[49]; c = x2 + z[50]; d = ref_mulmod(x4, z[51]);
    return {32'(tag), 32'd0, c, d, a, b};
  endfunction
endpackage
