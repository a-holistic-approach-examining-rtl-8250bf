// Self-checking testbench for clock_clean.  The field clock (8 us period) is
// given 0 to 3 spurious re-crossings just after each rising edge, as a slow
// edge on a noisy supply would produce; the delayed clock is the ideal field
// clock delayed by 1 us.  Checks one clean rising edge per period at the first
// crossing, the falling edge at the field clock's falling edge, and that reset
// holds the output low.
`timescale 1ns/1ps
module tb_clock_clean;

  logic field_clock = 1'b0, delayed_clk = 1'b0, nrst = 1'b0;
  logic clean_clock;
  int checks = 0, failures = 0;
  int n_clean_rise = 0, n_raw_rise = 0, n_bounces = 0;
  realtime t_rise, t_fall;

  clock_clean dut (.*);

  always @(posedge clean_clock) begin
    n_clean_rise++;
    t_rise = $realtime;
  end
  always @(negedge clean_clock) t_fall = $realtime;
  always @(posedge field_clock) n_raw_rise++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  task automatic period(input int bounces);
    realtime t0;
    t0 = $realtime;
    field_clock = 1'b1;
    for (int b = 0; b < bounces; b++) begin
      #(40 + $urandom_range(60)) field_clock = 1'b0;
      #(20 + $urandom_range(30)) field_clock = 1'b1;
      n_bounces++;
    end
    #(1000 - ($realtime - t0)) delayed_clk = 1'b1;
    #3000 field_clock = 1'b0;
    #1000 delayed_clk = 1'b0;
    #3000;
  endtask

  initial begin
    int n_prev;
    // clock held low by reset
    period(1);
    check(n_clean_rise == 0 && clean_clock == 1'b0, "output low during reset");
    nrst = 1'b1;
    for (int p = 0; p < 40; p++) begin
      realtime t0;
      n_prev = n_clean_rise;
      t0 = $realtime;
      period(p % 4);
      check(n_clean_rise == n_prev + 1, "exactly one clean rising edge per period");
      check(t_rise - t0 < 1.0, "clean edge at the first crossing");
      check(t_fall - (t0 + 4000.0) < 1.0 && t_fall >= t0 + 4000.0, "clean falling edge with the field clock");
    end
    check(n_bounces > 0 && n_raw_rise > n_clean_rise, "bounces were present on the raw clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
