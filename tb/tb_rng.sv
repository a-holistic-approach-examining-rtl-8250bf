// Self-checking testbench for rng driven by two ring_osc models (slowed to a
// 2.5 ns half period to keep the run short).  Checks, every clock, the LFSR
// step against a model built here (shift with x^8+x^6+x^5+x^4+1 feedback XOR
// the two sampled oscillator parities, reload from a 1..255 counter out of the
// all-zero state), that the two oscillator windows never overlap and stay shut
// while disabled, that the state holds while disabled, that the restart
// happened, that the oscillators did inject entropy, and that the output bits
// taken every 64 clocks are roughly balanced.
`timescale 1ns/1ps
module tb_rng;

  logic clk;
  logic field_clock = 1'b0, delayed_clk = 1'b0, nrst = 1'b0, enable = 1'b0;
  logic osc_r, osc_f, osc_en_r, osc_en_f, rnd;
  logic [7:0] state;
  logic [7:0] exp_state, cnt_model;
  int checks = 0, failures = 0;
  int n_restart = 0, n_entropy = 0, n_ones = 0, n_samples = 0, n_overlap = 0, n_leak = 0;
  int n_win_r = 0, n_win_f = 0;

  rng dut (.*);
  ring_osc #(.HALF_PERIOD_PS(2500), .JITTER_PS(400)) u_or (.en(osc_en_r), .osc(osc_r));
  ring_osc #(.HALF_PERIOD_PS(2500), .JITTER_PS(400)) u_of (.en(osc_en_f), .osc(osc_f));

  assign clk = field_clock;

  // 125 kHz field clock, RC-delayed copy 1 us later
  always begin
    #4000 field_clock = ~field_clock;
  end
  always @(field_clock) delayed_clk <= #1000 field_clock;

  always #100 begin
    if (osc_en_r && osc_en_f) n_overlap++;
    if (!enable && (osc_en_r || osc_en_f)) n_leak++;
  end
  always @(posedge osc_en_r) n_win_r++;
  always @(posedge osc_en_f) n_win_f++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // Predict the next state from what is visible before the edge.
  always @(posedge clk) begin
    logic [7:0] s;
    logic e;
    s = state;
    e = dut.smp_r ^ dut.smp_f;
    if (nrst && enable) begin
      if (s == 8'h00) begin
        exp_state = cnt_model;
        n_restart++;
      end else begin
        exp_state = {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3] ^ e};
      end
      if (e) n_entropy++;
      cnt_model = (cnt_model == 8'hff) ? 8'h01 : cnt_model + 8'h01;
    end else begin
      exp_state = nrst ? s : 8'h00;
    end
  end

  always @(negedge clk) if (nrst) check(state == exp_state, "LFSR step");

  initial begin
    cnt_model = 8'h01;
    repeat (3) @(negedge clk);
    nrst = 1'b1;
    enable = 1'b1;
    for (int i = 0; i < 128 * 64; i++) begin
      @(negedge clk);
      if (i % 64 == 63) begin
        n_samples++;
        if (rnd) n_ones++;
      end
      if (i == 3000) enable = 1'b0;
      if (i == 3100) enable = 1'b1;
    end
    check(n_overlap == 0, "oscillator windows never overlap");
    check(n_leak == 0, "oscillators off while disabled");
    check(n_win_r > 1000 && n_win_f > 1000, "both oscillator windows opened");
    check(n_restart >= 1, "restart from the all-zero state happened");
    check(n_entropy > 100, "oscillators injected entropy");
    check(n_ones > n_samples * 35 / 100 && n_ones < n_samples * 65 / 100,
          $sformatf("output balance %0d of %0d", n_ones, n_samples));
    $display("restarts=%0d entropy=%0d ones=%0d/%0d", n_restart, n_entropy, n_ones, n_samples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
