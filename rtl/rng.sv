// True random bit generator fed by two gated fast oscillators.
//
// A random bit is needed only every few hundred microseconds, but the only
// clock is the 125 kHz field clock.  Two fast oscillators (outside this module,
// see ring_osc) are therefore run only briefly: osc_en_r is high in the window
// just after each rising field-clock edge (FIELD_CLOCK high, DELAYED_CLK still
// low) and osc_en_f just after each falling edge (FIELD_CLOCK low, DELAYED_CLK
// still high).  The two windows can never overlap.  Each oscillator clocks a
// toggle flip-flop, so the flip-flop holds the parity of the number of
// oscillator cycles seen, which is dominated by jitter.  Both parities are
// sampled once per core clock and XORed into the feedback of an LFSR_W-bit
// linear feedback shift register (polynomial TAPS, maximal length without the
// entropy input).  If the register ever reaches the all-zero state it is
// reloaded from a free-running counter that steps through 1..2^LFSR_W-1, so the
// restart point is spread uniformly.
//
// Ports: clk (clean core clock), nrst, enable (from the controller; everything
// holds and both oscillators are gated off while low), field_clock and
// delayed_clk (to form the windows), osc_r/osc_f (oscillator outputs),
// osc_en_r/osc_en_f (oscillator gates), rnd (one new bit per enabled clock,
// the LFSR's top bit) and state (whole LFSR, used for random counts).
//
// From the document: two gated oscillators active around the two clock edges
// and never together, latches, an LFSR with feedback polynomial, a counter that
// restarts it out of the all-zero state, and the 8 in the LFSR width.  The exact
// windows, the polynomial and the restart rule are this design's choices.
`timescale 1ns/1ps
module rng #(
  parameter int unsigned        LFSR_W = 8,
  parameter logic [LFSR_W-1:0]  TAPS   = 8'hB8   // x^8 + x^6 + x^5 + x^4 + 1
) (
  input  logic              clk,
  input  logic              nrst,
  input  logic              enable,
  input  logic              field_clock,
  input  logic              delayed_clk,
  input  logic              osc_r,
  input  logic              osc_f,
  output logic              osc_en_r,
  output logic              osc_en_f,
  output logic              rnd,
  output logic [LFSR_W-1:0] state
);

  logic              tog_r, tog_f;     // oscillator-cycle parities
  logic              smp_r, smp_f;     // parities sampled on the core clock
  logic [LFSR_W-1:0] lfsr, restart_cnt;
  logic              fb;

  assign osc_en_r = enable & field_clock & ~delayed_clk;
  assign osc_en_f = enable & ~field_clock & delayed_clk;

  always_ff @(posedge osc_r or negedge nrst)
    if (!nrst) tog_r <= 1'b0;
    else       tog_r <= ~tog_r;

  always_ff @(posedge osc_f or negedge nrst)
    if (!nrst) tog_f <= 1'b0;
    else       tog_f <= ~tog_f;

  assign fb = ^(lfsr & TAPS) ^ smp_r ^ smp_f;

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      smp_r       <= 1'b0;
      smp_f       <= 1'b0;
      lfsr        <= '0;
      restart_cnt <= LFSR_W'(1);
    end else if (enable) begin
      smp_r       <= tog_r;
      smp_f       <= tog_f;
      restart_cnt <= (restart_cnt == '1) ? LFSR_W'(1) : restart_cnt + 1'b1;
      if (lfsr == '0) lfsr <= restart_cnt;
      else            lfsr <= {lfsr[LFSR_W-2:0], fb};
    end
  end

  assign rnd   = lfsr[LFSR_W-1];
  assign state = lfsr;

endmodule
