// Protocol controller (global control) of the tag.
//
// After every reset the controller
//   1. reads the configuration word from NVRAM address 0,
//   2. reads the 16 key bytes (addresses 1..16) straight into the AES key
//      memory,
//   3. gathers the 64-bit tag nonce Nt, one RNG bit every RNG_BIT_CYCLES
//      clocks, through the 8-bit shift register into bytes 0..7 of the
//      transmit register,
// and then waits for commands.  A command frame is a 2-bit opcode followed by
// its argument, assembled bit by bit in the same 8-bit shift register:
//   CFG(m)    8 bits   written to NVRAM and to the configuration register
//   KEY(k)  128 bits   written byte by byte to NVRAM (new key used after reset)
//   IV(Nr)   64 bits   stored in AES state bytes 0..7
//   SILENCE   2 bits   stops the reply and restarts from step 1
// CFG and KEY act only if the write-enable bit of the configuration word or
// the SECURITY OVERRIDE input is set.  On a complete IV the controller copies
// Nt from the transmit register into AES state bytes 8..15, encrypts
// X = AES(key, Nr || Nt), copies X bytes 0..7 (the MAC) into transmit bytes
// 8..15 and starts the transmitter, which repeats Nt || MAC until SILENCE.
// Only one IV is answered per reset, because the key is consumed by the
// in-place key expansion.  A frame is dropped if the receiver reports its end
// early or if no bit arrives for FRAME_TIMEOUT clocks (the 11-bit counter), so
// corrupted traffic cannot lock the tag.
//
// The RNG runs while Nt is gathered, during encryption when the rng_noise
// configuration bit is set, and in anti-collision mode while the sync token of
// each reply is sent, to draw a fresh silence length for every message.
//
// From the document: the command set and argument sizes, the order of
// operations, the 8-bit shift register fed from the RNG or the receiver, the
// 7-bit and 11-bit counters, the configuration register, timeouts, and
// Nt || half of X as the reply.  Opcode values, the NVRAM map, which half of
// X is sent, and the one-IV-per-reset rule are this design's choices.
`timescale 1ns/1ps
module protocol_ctrl
  import rfid_pkg::*;
#(
  parameter int unsigned RNG_CYCLES    = RNG_BIT_CYCLES,
  parameter int unsigned FRAME_TIMEOUT = 2047
) (
  input  logic       clk,
  input  logic       nrst,
  input  logic       security_override,
  // NVRAM interface
  output logic       nv_req,
  output logic       nv_we,
  output logic [6:0] nv_addr,
  output logic [7:0] nv_wdata,
  input  logic       nv_done,
  input  logic [7:0] nv_rdata,
  // random number generator
  output logic       rng_en,
  input  logic       rnd,
  input  logic [7:0] rng_state,
  // receiver
  input  logic       rx_frame_start,
  input  logic       rx_bit_valid,
  input  logic       rx_bit,
  input  logic       rx_frame_end,
  // AES
  output logic       aes_key_we,
  output logic [3:0] aes_key_addr,
  output logic [7:0] aes_key_in,
  output logic       aes_din_we,
  output logic [3:0] aes_din_addr,
  output logic [7:0] aes_din,
  output logic       aes_start,
  input  logic       aes_done,
  output logic [3:0] aes_dout_addr,
  input  logic [7:0] aes_dout,
  // transmitter
  output logic       tx_wr,
  output logic [3:0] tx_wr_addr,
  output logic [7:0] tx_din,
  output logic [3:0] tx_rd_addr,
  input  logic [7:0] tx_dout,
  output logic       tx_start,
  output logic       tx_stop,
  output logic       tx_anticoll,
  output logic [3:0] tx_gap,
  input  logic       tx_token,
  // status
  output cfg_t       cfg_q,
  output logic       nt_ready
);

  typedef enum logic [3:0] {
    M_RESET, M_RD_CFG, M_RD_KEY, M_GEN_NT, M_IDLE,
    M_LOAD_NT, M_AES, M_LOAD_MAC, M_TX
  } main_state_e;

  typedef enum logic [1:0] {R_IDLE, R_OP, R_PAY} rx_state_e;

  main_state_e ms;
  rx_state_e   rs;
  logic [10:0] timer;      // 11-bit counter: RNG pacing, frame timeout
  logic [6:0]  bitcnt;     // 7-bit counter: bits of Nt or of an argument
  logic [7:0]  sr;         // 8-bit shift register
  logic [3:0]  idx;        // byte index for NVRAM and register copies
  opcode_e     op;
  logic        op_lo;      // first opcode bit received
  logic        mac_done;
  logic        wr_ok;
  logic [7:0]  sr_next;
  logic        pay_last;

  assign wr_ok   = cfg_q.write_en | security_override;
  assign sr_next = {sr[6:0], rx_bit};

  always_comb begin
    case (op)
      OP_CFG:  pay_last = (bitcnt == 7'(CFG_BITS - 1));
      OP_KEY:  pay_last = (bitcnt == 7'd127);
      OP_IV:   pay_last = (bitcnt == 7'(NONCE_BITS - 1));
      default: pay_last = (bitcnt == 7'(SILENCE_BITS - 1));
    endcase
  end

  assign rng_en      = (ms == M_GEN_NT) | (cfg_q.rng_noise & (ms == M_AES)) |
                       (cfg_q.anticoll & (ms == M_TX) & tx_token);
  assign tx_anticoll = cfg_q.anticoll;
  assign tx_gap      = rng_state[3:0];
  assign aes_key_in  = nv_rdata;
  assign tx_rd_addr  = idx;
  assign aes_dout_addr = idx;

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      ms           <= M_RESET;
      rs           <= R_IDLE;
      timer        <= '0;
      bitcnt       <= '0;
      sr           <= '0;
      idx          <= '0;
      op           <= OP_CFG;
      op_lo        <= 1'b0;
      mac_done     <= 1'b0;
      nt_ready     <= 1'b0;
      cfg_q        <= '0;
      nv_req       <= 1'b0;
      nv_we        <= 1'b0;
      nv_addr      <= '0;
      nv_wdata     <= '0;
      aes_key_we   <= 1'b0;
      aes_key_addr <= '0;
      aes_din_we   <= 1'b0;
      aes_din_addr <= '0;
      aes_din      <= '0;
      aes_start    <= 1'b0;
      tx_wr        <= 1'b0;
      tx_wr_addr   <= '0;
      tx_din       <= '0;
      tx_start     <= 1'b0;
      tx_stop      <= 1'b0;
    end else begin
      nv_req     <= 1'b0;
      aes_key_we <= 1'b0;
      aes_din_we <= 1'b0;
      aes_start  <= 1'b0;
      tx_wr      <= 1'b0;
      tx_start   <= 1'b0;
      tx_stop    <= 1'b0;

      // ------------------------------------------------ main sequence
      case (ms)
        M_RESET: begin
          nt_ready <= 1'b0;
          mac_done <= 1'b0;
          nv_req   <= 1'b1;
          nv_we    <= 1'b0;
          nv_addr  <= NV_ADDR_CFG;
          ms       <= M_RD_CFG;
        end
        M_RD_CFG: if (nv_done) begin
          cfg_q   <= cfg_t'(nv_rdata);
          idx     <= '0;
          nv_req  <= 1'b1;
          nv_addr <= NV_ADDR_KEY;
          ms      <= M_RD_KEY;
        end
        M_RD_KEY: if (nv_done) begin
          aes_key_we   <= 1'b1;
          aes_key_addr <= idx;
          idx          <= idx + 1'b1;
          if (idx == 4'd15) begin
            ms     <= M_GEN_NT;
            timer  <= '0;
            bitcnt <= '0;
          end else begin
            nv_req  <= 1'b1;
            nv_addr <= NV_ADDR_KEY + 7'(idx) + 7'd1;
          end
        end
        M_GEN_NT: begin
          if (32'(timer) == RNG_CYCLES - 1) begin
            timer  <= '0;
            sr     <= {sr[6:0], rnd};
            bitcnt <= bitcnt + 1'b1;
            if (bitcnt[2:0] == 3'd7) begin
              tx_wr      <= 1'b1;
              tx_wr_addr <= {1'b0, bitcnt[5:3]};
              tx_din     <= {sr[6:0], rnd};
            end
            if (bitcnt == 7'(NONCE_BITS - 1)) begin
              ms       <= M_IDLE;
              nt_ready <= 1'b1;
              bitcnt   <= '0;
            end
          end else begin
            timer <= timer + 1'b1;
          end
        end
        M_LOAD_NT: begin
          aes_din_we   <= 1'b1;
          aes_din_addr <= 4'd8 + idx;
          aes_din      <= tx_dout;
          idx          <= idx + 1'b1;
          if (idx == 4'd7) begin
            aes_start <= 1'b1;
            ms        <= M_AES;
          end
        end
        M_AES: if (aes_done) begin
          idx <= '0;
          ms  <= M_LOAD_MAC;
        end
        M_LOAD_MAC: begin
          tx_wr      <= 1'b1;
          tx_wr_addr <= 4'd8 + idx;
          tx_din     <= aes_dout;
          idx        <= idx + 1'b1;
          if (idx == 4'd7) begin
            tx_start <= 1'b1;
            mac_done <= 1'b1;
            ms       <= M_TX;
          end
        end
        default: ;   // M_IDLE, M_TX: driven by commands below
      endcase

      // ------------------------------------------------ command frames
      if (ms == M_IDLE || ms == M_TX) begin
        case (rs)
          R_IDLE: if (rx_frame_start) begin
            rs     <= R_OP;
            op_lo  <= 1'b0;
            bitcnt <= '0;
            timer  <= '0;
          end
          R_OP, R_PAY: begin
            if (rx_frame_end || 32'(timer) >= FRAME_TIMEOUT) begin
              rs <= R_IDLE;                     // incomplete frame: drop it
            end else if (!rx_bit_valid) begin
              timer <= timer + 1'b1;
            end else begin
              timer <= '0;
              if (rs == R_OP) begin
                op_lo <= 1'b1;
                op    <= opcode_e'({op[0], rx_bit});
                if (op_lo) rs <= R_PAY;
              end else begin
                sr     <= sr_next;
                bitcnt <= bitcnt + 1'b1;
                if (bitcnt[2:0] == 3'd7) begin
                  case (op)
                    OP_IV: if (ms == M_IDLE) begin
                      aes_din_we   <= 1'b1;
                      aes_din_addr <= {1'b0, bitcnt[5:3]};
                      aes_din      <= sr_next;
                    end
                    OP_KEY: if (wr_ok) begin
                      nv_req   <= 1'b1;
                      nv_we    <= 1'b1;
                      nv_addr  <= NV_ADDR_KEY + 7'(bitcnt[6:3]);
                      nv_wdata <= sr_next;
                    end
                    OP_CFG: if (wr_ok) begin
                      nv_req   <= 1'b1;
                      nv_we    <= 1'b1;
                      nv_addr  <= NV_ADDR_CFG;
                      nv_wdata <= sr_next;
                      cfg_q    <= cfg_t'(sr_next);
                    end
                    default: ;
                  endcase
                end
                if (pay_last) begin
                  rs <= R_IDLE;
                  if (op == OP_IV && ms == M_IDLE && nt_ready && !mac_done) begin
                    idx <= '0;
                    ms  <= M_LOAD_NT;
                  end
                  if (op == OP_SILENCE) begin
                    tx_stop <= 1'b1;
                    ms      <= M_RESET;
                  end
                end
              end
            end
          end
          default: rs <= R_IDLE;
        endcase
      end else begin
        rs <= R_IDLE;
      end
    end
  end

endmodule
