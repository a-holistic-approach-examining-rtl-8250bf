// Tag-to-reader transmitter: 128-bit reply register and Manchester encoder.
//
// The reply (tag nonce Nt followed by half of the AES output) is written byte by
// byte into a 16-byte register (byte 0 is sent first, most significant bit
// first) and can be read back byte by byte.  After start the transmitter sends
// the reply over and over until stop: each message is a synchronisation token
// of SYNC_BITS bit times followed by the 128 data bits.  A data bit lasts
// 2*HALF_BIT clocks; a '1' is sent high then low, a '0' low then high.  The
// token is high for the first half of its length and low for the second, a run
// that Manchester data can never contain, so the reader can find the start of
// every message.  In anti-collision mode each message is followed by
// (gap_periods+1) silent message periods, 1 to 16, with gap_periods sampled
// from the random source at the end of every message.
//
// Ports: clk, nrst; wr/wr_addr/din write a byte, rd_addr/dout read one back;
// start, stop (single-clock pulses), anticoll, gap_periods; mod is the
// modulation output, busy is high from start to stop, token while the sync
// token is being sent, msg_done pulses at the end of each message.
//
// From the document: Manchester coding at RF/16 (data rate RF/32), a 128-bit
// transmit register with 8-bit access, 4+64+64 bits per message, repetition
// until SILENCE and silences of 1 to 16 message periods in anti-collision mode.
// The bit polarity and the shape of the token are this design's choices.
`timescale 1ns/1ps
module tx_manchester
  import rfid_pkg::*;
#(
  parameter int unsigned HALF_BIT  = TX_HALF_BIT,
  parameter int unsigned SYNC_BITS = TX_SYNC_BITS,
  parameter int unsigned MSG_BITS  = TX_MSG_BITS
) (
  input  logic       clk,
  input  logic       nrst,
  input  logic       wr,
  input  logic [3:0] wr_addr,
  input  logic [7:0] din,
  input  logic [3:0] rd_addr,
  output logic [7:0] dout,
  input  logic       start,
  input  logic       stop,
  input  logic       anticoll,
  input  logic [3:0] gap_periods,
  output logic       mod,
  output logic       busy,
  output logic       token,
  output logic       msg_done
);

  localparam int unsigned BITS     = SYNC_BITS + MSG_BITS;
  localparam int unsigned MSG_CYC  = BITS * 2 * HALF_BIT;
  localparam int unsigned HW       = $clog2(HALF_BIT);
  localparam int unsigned IW       = $clog2(BITS);
  localparam int unsigned SW       = $clog2(16 * MSG_CYC + 1);
  localparam int unsigned NBYTES   = MSG_BITS / 8;

  typedef enum logic [1:0] {TX_IDLE, TX_SEND, TX_QUIET} tx_state_e;

  logic [7:0]    mem [NBYTES];
  tx_state_e     st;
  logic [HW-1:0] hcnt;    // clocks within the current half bit
  logic          half;    // 0 = first half of the bit, 1 = second
  logic [IW-1:0] idx;     // bit index within the message, token first
  logic [SW-1:0] quiet;   // remaining silent clocks
  logic          dbit, level;
  int unsigned   didx;

  always_ff @(posedge clk)
    if (wr) mem[wr_addr] <= din;

  assign dout = mem[rd_addr];

  always_comb begin
    didx  = 32'(idx) - SYNC_BITS;
    dbit  = mem[didx[$clog2(NBYTES)+2:3]][3'd7 - didx[2:0]];
    if (32'(idx) < SYNC_BITS)
      level = (32'(idx) * 2 + 32'(half)) < SYNC_BITS;
    else
      level = half ? ~dbit : dbit;
  end

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      st       <= TX_IDLE;
      hcnt     <= '0;
      half     <= 1'b0;
      idx      <= '0;
      quiet    <= '0;
      mod      <= 1'b0;
      msg_done <= 1'b0;
    end else begin
      msg_done <= 1'b0;
      if (stop) begin
        st  <= TX_IDLE;
        mod <= 1'b0;
      end else begin
        case (st)
          TX_IDLE: begin
            mod <= 1'b0;
            if (start) begin
              st   <= TX_SEND;
              hcnt <= '0;
              half <= 1'b0;
              idx  <= '0;
            end
          end
          TX_SEND: begin
            mod <= level;
            if (32'(hcnt) == HALF_BIT - 1) begin
              hcnt <= '0;
              half <= ~half;
              if (half) begin
                if (32'(idx) == BITS - 1) begin
                  idx      <= '0;
                  msg_done <= 1'b1;
                  if (anticoll) begin
                    st    <= TX_QUIET;
                    quiet <= SW'((32'(gap_periods) + 1) * MSG_CYC);
                  end
                end else begin
                  idx <= idx + 1'b1;
                end
              end
            end else begin
              hcnt <= hcnt + 1'b1;
            end
          end
          TX_QUIET: begin
            mod <= 1'b0;
            if (32'(quiet) <= 1) st <= TX_SEND;
            quiet <= quiet - 1'b1;
          end
          default: st <= TX_IDLE;
        endcase
      end
    end
  end

  assign busy  = (st != TX_IDLE);
  assign token = (st == TX_SEND) && (32'(idx) < SYNC_BITS);

  // The register may only be rewritten while idle.
  assert property (@(posedge clk) disable iff (!nrst) wr |-> st == TX_IDLE);

endmodule
