// Self-checking testbench for the ring_osc model: no toggles while disabled,
// the state is held across a disabled period, and the toggle count in a 1 us
// window matches the ~2 GHz frequency (half period 250..290 ps) and varies
// from window to window.
`timescale 1ns/1ps
module tb_ring_osc;

  logic en = 1'b0;
  logic osc;
  int checks = 0, failures = 0, n = 0;
  int counts [8];

  ring_osc dut (.*);

  always @(osc) n++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic held;
    bit varied;
    #100;
    n = 0;
    #1000;
    check(n == 0, "no toggles while disabled");
    for (int w = 0; w < 8; w++) begin
      n = 0;
      en = 1'b1;
      #1000;
      en = 1'b0;
      #1;                  // a toggle already under way may still land
      counts[w] = n;
      check(n >= 1000 / 0.290 - 2 && n <= 1000 / 0.250 + 2, $sformatf("toggle count %0d in 1 us", n));
      held = osc;
      n = 0;
      #500;
      check(n == 0 && osc == held, "state held while disabled");
    end
    varied = 0;
    for (int w = 1; w < 8; w++) if (counts[w] != counts[0]) varied = 1;
    check(varied, "toggle count varies between windows");
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
