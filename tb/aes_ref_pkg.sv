// aes_ref_pkg: plain reference model of AES-128 encryption for the
// testbenches, written from the textbook round structure (SubBytes,
// ShiftRows, MixColumns, AddRoundKey on a 4x4 byte matrix) and
// independent of the T-table hardware. The S-box is found by searching
// for each byte's multiplicative inverse, once, on first use.
package aes_ref_pkg;

  function automatic logic [7:0] gm(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] sb(input logic [7:0] x);
    logic [7:0] inv, r;
    inv = 0;
    for (int y = 1; y < 256; y++) if (gm(x, 8'(y)) == 8'h01) inv = 8'(y);
    r = 8'h63;
    for (int i = 0; i < 8; i++)
      r[i] = r[i] ^ inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return r;
  endfunction

  logic [7:0] sbt [256];
  bit         sbt_ready = 0;

  function automatic logic [127:0] encrypt(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0] s [4][4], t [4][4], k [4][4], nk [4][4];
    logic [7:0] rc;
    if (!sbt_ready) begin
      for (int x = 0; x < 256; x++) sbt[x] = sb(8'(x));
      sbt_ready = 1;
    end
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        s[r][c] = pt[127 - 8*(4*c+r) -: 8] ^ key[127 - 8*(4*c+r) -: 8];
        k[r][c] = key[127 - 8*(4*c+r) -: 8];
      end
    rc = 8'h01;
    for (int rnd = 1; rnd <= 10; rnd++) begin
      // key schedule
      for (int r = 0; r < 4; r++) nk[r][0] = k[r][0] ^ sbt[k[(r+1)%4][3]] ^ ((r == 0) ? rc : 8'h00);
      for (int c = 1; c < 4; c++) for (int r = 0; r < 4; r++) nk[r][c] = nk[r][c-1] ^ k[r][c];
      k = nk;
      rc = gm(rc, 8'h02);
      // SubBytes + ShiftRows
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[r][c] = sbt[s[r][(c+r)%4]];
      // MixColumns
      if (rnd != 10) begin
        for (int c = 0; c < 4; c++) begin
          s[0][c] = gm(t[0][c],2) ^ gm(t[1][c],3) ^ t[2][c] ^ t[3][c];
          s[1][c] = t[0][c] ^ gm(t[1][c],2) ^ gm(t[2][c],3) ^ t[3][c];
          s[2][c] = t[0][c] ^ t[1][c] ^ gm(t[2][c],2) ^ gm(t[3][c],3);
          s[3][c] = gm(t[0][c],3) ^ t[1][c] ^ t[2][c] ^ gm(t[3][c],2);
        end
      end else s = t;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) s[r][c] ^= k[r][c];
    end
    encrypt = '0;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) encrypt[127 - 8*(4*c+r) -: 8] = s[r][c];
  endfunction

endpackage
