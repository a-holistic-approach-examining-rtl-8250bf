// Behavioural model (not synthesizable) of a gated high-speed ring oscillator.
//
// The random number generator uses two of these as its physical entropy
// source.  On silicon each is a short ring of inverters, free running near
// 2 GHz while its enable is high and frozen in its last state while the enable
// is low.  The model toggles OSC every HALF_PERIOD_PS picoseconds plus a random
// jitter of 0..JITTER_PS picoseconds per half period, so that the phase at which
// it is frozen, and hence the number of toggles seen per enable window, varies
// from window to window the way thermal jitter makes it vary on silicon.
//
// Ports: en (gate, high = run), osc (oscillator output).
// The ~2 GHz free-running frequency follows the document; the jitter figure is
// this model's choice.  A synthesis tool that reads this model anyway sees
// the enable-gated feedback as one latch bit (one per instance in the top);
// that is expected, since on silicon the block is a hand-placed ring, not logic.
`timescale 1ns/1ps
module ring_osc #(
  parameter int unsigned HALF_PERIOD_PS = 250,
  parameter int unsigned JITTER_PS      = 40
) (
  input  logic en,
  output logic osc
);

  initial osc = 1'b0;

  // Each toggle schedules the next one while the gate is open.  A toggle
  // already scheduled when the gate closes still happens, as the last edge
  // travelling round a real ring would.
  always @(en or osc)
    if (en) osc <= #((HALF_PERIOD_PS + $urandom_range(JITTER_PS)) * 1ps) ~osc;

endmodule
