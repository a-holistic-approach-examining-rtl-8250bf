// Reference AES-128 encryption for the testbenches.
//
// Written independently of the RTL engine: the S-box is generated with the
// classic walk over the multiplicative group (p steps by multiplication with 3,
// q by division by 3, S(p) = affine(q)), the key schedule is expanded in full
// up front, and the rounds work on a 128-bit vector.
`timescale 1ns/1ps
package aes_ref_pkg;

  function automatic logic [7:0] rotl8(input logic [7:0] x, input int s);
    return (x << s) | (x >> (8 - s));
  endfunction

  function automatic void make_sbox(output logic [7:0] sb [256]);
    logic [7:0] p, q;
    p = 8'h01;
    q = 8'h01;
    do begin
      p = p ^ (p << 1) ^ ((p & 8'h80) != 0 ? 8'h1b : 8'h00);
      q ^= q << 1;
      q ^= q << 2;
      q ^= q << 4;
      if (q[7]) q ^= 8'h09;
      sb[p] = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4) ^ 8'h63;
    end while (p != 8'h01);
    sb[0] = 8'h63;
  endfunction

  function automatic logic [7:0] mul2(input logic [7:0] a);
    return (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Byte i of a block is bits [127-8*i -: 8].
  function automatic logic [127:0] encrypt(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0]  sb [256];
    logic [31:0] w [44];
    logic [7:0]  s [16], t [16];
    logic [31:0] tmp;
    logic [7:0]  rc;
    logic [127:0] out;
    make_sbox(sb);
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      tmp = w[i-1];
      if (i % 4 == 0) begin
        tmp = {tmp[23:0], tmp[31:24]};
        tmp = {sb[tmp[31:24]] ^ rc, sb[tmp[23:16]], sb[tmp[15:8]], sb[tmp[7:0]]};
        rc  = mul2(rc);
      end
      w[i] = w[i-4] ^ tmp;
    end
    for (int i = 0; i < 16; i++) s[i] = pt[127-8*i -: 8] ^ w[i/4][31-8*(i%4) -: 8];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = sb[s[i]];
      for (int c = 0; c < 4; c++)
        for (int rw = 0; rw < 4; rw++) t[4*c+rw] = s[4*((c+rw)%4)+rw];
      if (r != 10) begin
        for (int c = 0; c < 4; c++) begin
          s[4*c+0] = mul2(t[4*c]) ^ mul2(t[4*c+1]) ^ t[4*c+1] ^ t[4*c+2] ^ t[4*c+3];
          s[4*c+1] = t[4*c] ^ mul2(t[4*c+1]) ^ mul2(t[4*c+2]) ^ t[4*c+2] ^ t[4*c+3];
          s[4*c+2] = t[4*c] ^ t[4*c+1] ^ mul2(t[4*c+2]) ^ mul2(t[4*c+3]) ^ t[4*c+3];
          s[4*c+3] = mul2(t[4*c]) ^ t[4*c] ^ t[4*c+1] ^ t[4*c+2] ^ mul2(t[4*c+3]);
        end
      end else begin
        for (int i = 0; i < 16; i++) s[i] = t[i];
      end
      for (int i = 0; i < 16; i++) s[i] ^= w[4*r + i/4][31-8*(i%4) -: 8];
    end
    for (int i = 0; i < 16; i++) out[127-8*i -: 8] = s[i];
    return out;
  endfunction

endpackage
