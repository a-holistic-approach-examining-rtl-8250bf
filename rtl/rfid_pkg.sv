// Shared types, constants and arithmetic for the secure 125 kHz RFID tag core.
//
// Holds the over-the-air command codes, the layout of the configuration word
// kept in NVRAM, the air-interface timing constants (all in cycles of the
// field clock) and the GF(2^8) helpers used by the byte-serial AES engine.
// The S-box is computed (multiplicative inverse followed by the affine
// transform) rather than stored, so no table file is needed.
//
// Document-given numbers: reader-to-tag bit period averages 27 field-clock
// cycles (the 21/33 split is derived from the minimum and maximum IV reception
// times), Manchester half bit of 16 cycles, 64-bit nonces, 128-bit key, 4 sync
// bits.  Opcode values, configuration bit positions and the RNG sampling
// interval of 64 cycles per nonce bit are choices of this design.
`timescale 1ns/1ps
package rfid_pkg;

  // Four commands define the whole protocol.
  typedef enum logic [1:0] {
    OP_CFG     = 2'b00,   // CFG(m): write the 8-bit configuration word
    OP_KEY     = 2'b01,   // KEY(k): write the 128-bit key
    OP_IV      = 2'b10,   // IV(Nr): 64-bit reader nonce, triggers the MAC
    OP_SILENCE = 2'b11    // SILENCE: stop replying, reset, refresh Nt
  } opcode_e;

  // Configuration word, NVRAM address 0, read at every reset.
  typedef struct packed {
    logic [4:0] spare;
    logic       rng_noise;  // keep the RNG running while the AES works
    logic       anticoll;   // insert 1..16 silent message periods between replies
    logic       write_en;   // CFG and KEY may write the NVRAM
  } cfg_t;

  localparam int unsigned OP_BITS       = 2;
  localparam int unsigned NONCE_BITS    = 64;
  localparam int unsigned KEY_BYTES     = 16;
  localparam int unsigned CFG_BITS      = 8;
  localparam int unsigned SILENCE_BITS  = 2;    // argument bits after the SILENCE opcode

  // Reader-to-tag pulse-interval coding, in field-clock cycles.
  localparam int unsigned RX_T_ZERO     = 21;
  localparam int unsigned RX_T_ONE      = 33;
  localparam int unsigned RX_T_SPLIT    = 27;   // intervals >= this decode as '1'
  localparam int unsigned RX_T_END      = 48;   // no gap for this long ends a frame

  // Tag-to-reader Manchester coding.
  localparam int unsigned TX_HALF_BIT   = 16;
  localparam int unsigned TX_SYNC_BITS  = 4;
  localparam int unsigned TX_MSG_BITS   = 128;

  // One nonce bit is taken from the RNG every RNG_BIT_CYCLES clocks.
  localparam int unsigned RNG_BIT_CYCLES = 64;

  // NVRAM map.
  localparam logic [6:0] NV_ADDR_CFG = 7'd0;
  localparam logic [6:0] NV_ADDR_KEY = 7'd1;    // key bytes at 1..16

  // ---------------------------------------------------------------- GF(2^8)
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // a^254 = a^-1 in GF(2^8) (0 maps to 0).
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] a2, a4, a8, a16, a32, a64, a128;
    a2   = gf_mul(a, a);
    a4   = gf_mul(a2, a2);
    a8   = gf_mul(a4, a4);
    a16  = gf_mul(a8, a8);
    a32  = gf_mul(a16, a16);
    a64  = gf_mul(a32, a32);
    a128 = gf_mul(a64, a64);
    return gf_mul(gf_mul(gf_mul(a2, a4), gf_mul(a8, a16)),
                  gf_mul(gf_mul(a32, a64), a128));
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] b, s;
    b = gf_inv(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

  // One MixColumns column: c = {c0, c1, c2, c3} with c0 in the top byte.
  function automatic logic [31:0] mix_column(input logic [31:0] c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

endpackage
