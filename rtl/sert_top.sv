// Secure RFID transponder core (125 kHz, battery-less), top level.
//
// The tag proves knowledge of a secret 128-bit key without ever sending a
// predictable bit sequence: for every reader challenge Nr (64 bits) it draws a
// fresh 64-bit nonce Nt from an on-chip true random generator, computes
// X = AES-128(key, Nr || Nt) and replies with Nt and the first 64 bits of X.
// Nothing is written to NVRAM in normal operation.
//
// Blocks and their wiring:
//   clock_clean    FIELD_CLOCK + DELAYED_CLK -> clean core clock
//   ring_osc x2    gated fast oscillators (behavioural models) -> rng
//   rng            random bits -> protocol_ctrl
//   rx_decoder     GAP_DETECT -> command bits -> protocol_ctrl
//   protocol_ctrl  sequencing; drives nvram_if, aes8 and tx_manchester
//   nvram_if       MEM_CLK / MEM_DATA serial NVRAM port
//   aes8           byte-serial AES-128
//   tx_manchester  reply register and Manchester encoder -> MODULATION
//
// Pads: field_clock and delayed_clk (the field clock after the external RC
// network), nreset (active low), gap_detect, security_override, modulation,
// mem_clk and the bidirectional MEM_DATA line split into mem_data_o,
// mem_data_oe and mem_data_i.  Every flip-flop of the core runs on the clean
// clock and is reset asynchronously by nreset.
//
// The block set and the connections follow the document's block diagram; the
// pad-level split of the bidirectional line is this design's choice.  Because
// it contains the two behavioural oscillator models, this top is meant for
// simulation; every other block is synthesizable.  The two latch bits a
// synthesis run reports for this top are the two oscillator models.
`timescale 1ns/1ps
module sert_top
  import rfid_pkg::*;
#(
  parameter int unsigned OSC_HALF_PERIOD_PS = 250
) (
  input  logic field_clock,
  input  logic delayed_clk,
  input  logic nreset,
  input  logic gap_detect,
  input  logic security_override,
  output logic modulation,
  output logic mem_clk,
  output logic mem_data_o,
  output logic mem_data_oe,
  input  logic mem_data_i
);

  logic       clk;
  logic       osc_en_r, osc_en_f, osc_r, osc_f;
  logic       rng_en, rnd;
  logic [7:0] rng_state;
  logic       nv_req, nv_we, nv_busy, nv_done;
  logic [6:0] nv_addr;
  logic [7:0] nv_wdata, nv_rdata;
  logic       rx_frame_start, rx_bit_valid, rx_bit, rx_frame_end, rx_in_frame;
  logic       aes_key_we, aes_din_we, aes_start, aes_busy, aes_done;
  logic [3:0] aes_key_addr, aes_din_addr, aes_dout_addr;
  logic [7:0] aes_key_in, aes_din, aes_dout;
  logic       tx_wr, tx_start, tx_stop, tx_anticoll, tx_busy, tx_token, tx_msg_done;
  logic [3:0] tx_wr_addr, tx_rd_addr, tx_gap;
  logic [7:0] tx_din, tx_dout;
  cfg_t       cfg_q;
  logic       nt_ready;

  clock_clean u_clk (
    .field_clock, .delayed_clk, .nrst(nreset), .clean_clock(clk)
  );

  ring_osc #(.HALF_PERIOD_PS(OSC_HALF_PERIOD_PS)) u_osc_r (.en(osc_en_r), .osc(osc_r));
  ring_osc #(.HALF_PERIOD_PS(OSC_HALF_PERIOD_PS)) u_osc_f (.en(osc_en_f), .osc(osc_f));

  rng u_rng (
    .clk, .nrst(nreset), .enable(rng_en), .field_clock, .delayed_clk,
    .osc_r, .osc_f, .osc_en_r, .osc_en_f, .rnd, .state(rng_state)
  );

  rx_decoder u_rx (
    .clk, .nrst(nreset), .gap(gap_detect),
    .frame_start(rx_frame_start), .bit_valid(rx_bit_valid), .bit_val(rx_bit),
    .frame_end(rx_frame_end), .in_frame(rx_in_frame)
  );

  nvram_if u_nv (
    .clk, .nrst(nreset), .req(nv_req), .we(nv_we), .addr(nv_addr), .wdata(nv_wdata),
    .busy(nv_busy), .done(nv_done), .rdata(nv_rdata),
    .mem_clk, .mem_data_o, .mem_data_oe, .mem_data_i
  );

  aes8 u_aes (
    .clk, .nrst(nreset),
    .key_we(aes_key_we), .key_addr(aes_key_addr), .key_in(aes_key_in),
    .din_we(aes_din_we), .din_addr(aes_din_addr), .din(aes_din),
    .start(aes_start), .busy(aes_busy), .done(aes_done),
    .dout_addr(aes_dout_addr), .dout(aes_dout)
  );

  tx_manchester u_tx (
    .clk, .nrst(nreset), .wr(tx_wr), .wr_addr(tx_wr_addr), .din(tx_din),
    .rd_addr(tx_rd_addr), .dout(tx_dout), .start(tx_start), .stop(tx_stop),
    .anticoll(tx_anticoll), .gap_periods(tx_gap), .mod(modulation),
    .busy(tx_busy), .token(tx_token), .msg_done(tx_msg_done)
  );

  protocol_ctrl u_ctrl (
    .clk, .nrst(nreset), .security_override,
    .nv_req, .nv_we, .nv_addr, .nv_wdata, .nv_done, .nv_rdata,
    .rng_en, .rnd, .rng_state,
    .rx_frame_start, .rx_bit_valid, .rx_bit, .rx_frame_end,
    .aes_key_we, .aes_key_addr, .aes_key_in, .aes_din_we, .aes_din_addr, .aes_din,
    .aes_start, .aes_done, .aes_dout_addr, .aes_dout,
    .tx_wr, .tx_wr_addr, .tx_din, .tx_rd_addr, .tx_dout, .tx_start, .tx_stop,
    .tx_anticoll, .tx_gap, .tx_token, .cfg_q, .nt_ready
  );

endmodule
