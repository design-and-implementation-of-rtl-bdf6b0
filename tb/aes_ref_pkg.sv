// aes_ref_pkg: a software-style AES-128 reference used by the testbenches.
//
// It is written independently of the RTL: the S-box comes from log/antilog
// tables of GF(2^8) built with generator 3, the state is an array of bytes,
// and the full 44-word key schedule is expanded up front.  Call init() once
// before encrypt().
package aes_ref_pkg;

  byte unsigned sb[256];
  bit           ready_flag = 0;

  function automatic void init();
    byte unsigned lg[256];
    byte unsigned alg[256];
    int x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      alg[i] = 8'(x);
      lg[x]  = 8'(i);
      // multiply by 3 = x ^ xtime(x)
      x = x ^ ((x << 1) ^ (((x >> 7) & 1) != 0 ? 'h11b : 0));
      x = x & 'hff;
    end
    for (int a = 0; a < 256; a++) begin
      byte unsigned inv, r;
      inv = (a == 0) ? 8'h00 : alg[(255 - lg[a]) % 255];
      r = inv;
      for (int k = 1; k <= 4; k++) r ^= 8'((inv << k) | (inv >> (8 - k)));
      sb[a] = r ^ 8'h63;
    end
    ready_flag = 1;
  endfunction

  function automatic byte unsigned mul2(byte unsigned a);
    return 8'((a << 1) ^ ((a & 8'h80) != 0 ? 8'h1b : 8'h00));
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    logic [31:0] w[44];
    byte unsigned s[16], t[16];
    logic [127:0] res;
    if (!ready_flag) init();
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] tmp;
      tmp = w[i-1];
      if (i % 4 == 0) begin
        byte unsigned rc;
        rc = 1;
        for (int j = 1; j < i / 4; j++) rc = mul2(rc);
        tmp = {sb[tmp[23:16]] ^ rc, sb[tmp[15:8]], sb[tmp[7:0]], sb[tmp[31:24]]};
      end
      w[i] = w[i-4] ^ tmp;
    end
    for (int i = 0; i < 16; i++) s[i] = pt[127 - 8*i -: 8] ^ w[i/4][31 - 8*(i%4) -: 8];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int i = 0; i < 16; i++) s[i] = sb[s[i]];
      // shift rows: row r rotates left by r
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) t[4*c + r] = s[4*((c + r) % 4) + r];
      if (rnd != 10)
        for (int c = 0; c < 4; c++) begin
          byte unsigned a0, a1, a2, a3, all;
          a0 = t[4*c]; a1 = t[4*c+1]; a2 = t[4*c+2]; a3 = t[4*c+3];
          all = a0 ^ a1 ^ a2 ^ a3;
          t[4*c]   = a0 ^ all ^ mul2(a0 ^ a1);
          t[4*c+1] = a1 ^ all ^ mul2(a1 ^ a2);
          t[4*c+2] = a2 ^ all ^ mul2(a2 ^ a3);
          t[4*c+3] = a3 ^ all ^ mul2(a3 ^ a0);
        end
      for (int i = 0; i < 16; i++) s[i] = t[i] ^ w[4*rnd + i/4][31 - 8*(i%4) -: 8];
    end
    for (int i = 0; i < 16; i++) res[127 - 8*i -: 8] = s[i];
    return res;
  endfunction

endpackage
