// Byte-serial AES-128 encryption engine with a single S-box.
//
// The engine keeps two 16-byte memories, the state and the key, and shares one
// S-box between SubBytes and the key schedule, which is what keeps it small.
// Bytes are indexed as in the AES standard: byte 0 is the first (most
// significant) byte of the block, and byte i sits in row i%4, column i/4.
// The round key is expanded in place and overwritten round by round, so the
// key memory must be reloaded before the next encryption.
//
// Sequence after start (cycles):
//   1   initial AddRoundKey, all 16 bytes at once
//   per round r = 1..10:
//     4   key schedule: S-box of key bytes 13,14,15,12 (RotWord+SubWord), Rcon
//     16  SubBytes, one state byte per clock; in the same clock key byte i is
//         updated (k[i] ^= t[i] for i<4, k[i] ^= k[i-4] otherwise)
//     1   ShiftRows (in the last round together with AddRoundKey)
//     4   MixColumns + AddRoundKey, one column per clock (rounds 1..9)
// Total 1 + 9*25 + 21 = 247 clocks from start to done; loading key and data
// takes 16 clocks each through the byte ports and reading the result 16 more.
//
// Ports: key_we/key_addr/key_in and din_we/din_addr/din write key and state
// bytes (only while idle); start (pulse); busy; done (pulse when the
// ciphertext is in the state memory); dout_addr/dout read a state byte.
//
// From the document: AES-128 with an 8-bit datapath, a single 8-bit SubBytes
// unit and two 128-bit memories.  The document's engine needs 356 clocks
// including key and data input and output; this schedule is this design's own
// and is shorter (247 + 48).
`timescale 1ns/1ps
module aes8
  import rfid_pkg::*;
(
  input  logic       clk,
  input  logic       nrst,
  input  logic       key_we,
  input  logic [3:0] key_addr,
  input  logic [7:0] key_in,
  input  logic       din_we,
  input  logic [3:0] din_addr,
  input  logic [7:0] din,
  input  logic       start,
  output logic       busy,
  output logic       done,
  input  logic [3:0] dout_addr,
  output logic [7:0] dout
);

  typedef enum logic [2:0] {A_IDLE, A_ARK0, A_KS, A_SUB, A_SR, A_MC} aes_state_e;

  logic [7:0] st_mem [16];
  logic [7:0] key    [16];
  logic [7:0] t      [4];    // RotWord/SubWord result of the key schedule
  aes_state_e st;
  logic [3:0] step;
  logic [3:0] round;
  logic [7:0] rcon;
  logic [7:0] sb_in, sb_out;
  logic [7:0] knew;
  logic [31:0] col_mixed;
  logic [1:0] ks_idx;

  assign ks_idx = step[1:0];

  // The one S-box.
  always_comb begin
    if (st == A_KS) sb_in = key[{2'b11, ks_idx + 2'd1}];   // 13, 14, 15, 12
    else            sb_in = st_mem[step];
  end
  assign sb_out = sbox(sb_in);

  // Next round-key byte for the byte being processed in A_SUB.
  always_comb begin
    if (step < 4) knew = key[step] ^ t[step[1:0]];
    else          knew = key[step] ^ key[step - 4'd4];
  end

  assign col_mixed = mix_column({st_mem[{step[1:0], 2'd0}], st_mem[{step[1:0], 2'd1}],
                                 st_mem[{step[1:0], 2'd2}], st_mem[{step[1:0], 2'd3}]});

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      st    <= A_IDLE;
      step  <= '0;
      round <= '0;
      rcon  <= 8'h01;
      done  <= 1'b0;
      for (int i = 0; i < 4; i++) t[i] <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        A_IDLE: begin
          if (key_we) key[key_addr] <= key_in;
          if (din_we) st_mem[din_addr] <= din;
          if (start) begin
            st    <= A_ARK0;
            round <= 4'd1;
            rcon  <= 8'h01;
          end
        end
        A_ARK0: begin
          for (int i = 0; i < 16; i++) st_mem[i] <= st_mem[i] ^ key[i];
          st   <= A_KS;
          step <= '0;
        end
        A_KS: begin
          t[ks_idx] <= (ks_idx == 2'd0) ? (sb_out ^ rcon) : sb_out;
          if (step == 4'd3) begin
            st   <= A_SUB;
            step <= '0;
          end else begin
            step <= step + 1'b1;
          end
        end
        A_SUB: begin
          st_mem[step] <= sb_out;
          key[step]    <= knew;
          step         <= step + 1'b1;
          if (step == 4'd15) st <= A_SR;
        end
        A_SR: begin
          for (int c = 0; c < 4; c++)
            for (int r = 0; r < 4; r++)
              st_mem[4*c + r] <= st_mem[4*((c + r) % 4) + r] ^
                                 ((round == 4'd10) ? key[4*c + r] : 8'h00);
          step <= '0;
          if (round == 4'd10) begin
            st   <= A_IDLE;
            done <= 1'b1;
          end else begin
            st <= A_MC;
          end
        end
        A_MC: begin
          for (int r = 0; r < 4; r++)
            st_mem[{step[1:0], r[1:0]}] <= col_mixed[8*(3-r) +: 8] ^ key[{step[1:0], r[1:0]}];
          if (step == 4'd3) begin
            st    <= A_KS;
            step  <= '0;
            round <= round + 1'b1;
            rcon  <= xtime(rcon);
          end else begin
            step <= step + 1'b1;
          end
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  assign busy = (st != A_IDLE);
  assign dout = st_mem[dout_addr];

  assert property (@(posedge clk) disable iff (!nrst) busy |-> !(key_we || din_we));

endmodule
