// Self-checking testbench for rx_decoder: random frames of pulse-interval
// coded bits with +-2 clocks of jitter on the nominal 21/33 clock intervals.
// Checks every decoded bit, the frame start and end pulses, the three-clock
// latency from the start of a gap to bit_valid, and the frame length in clocks
// of a 2+64-bit IV frame against the 11.1 ms / 17.4 ms bounds.
`timescale 1ns/1ps
module tb_rx_decoder;
  import rfid_pkg::*;

  logic clk = 1'b0, nrst = 1'b0, gap = 1'b0;
  logic frame_start, bit_valid, bit_val, frame_end, in_frame;
  int checks = 0, failures = 0;
  int n_starts = 0, n_ends = 0, n_bits = 0, n_ones = 0;
  logic exp_bits [$];
  longint gap_cycle = 0, cycle = 0;

  rx_decoder dut (.*);

  always #4000 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  task automatic one_gap(input int interval);
    @(negedge clk);
    gap = 1'b1;
    gap_cycle = cycle;
    repeat (5) @(negedge clk);
    gap = 1'b0;
    repeat (interval - 6) @(negedge clk);
  endtask

  task automatic send_frame(input int nbits, input int force_val);
    logic b;
    int iv;
    longint t0;
    t0 = cycle;
    for (int i = 0; i < nbits; i++) begin
      b  = (force_val < 0) ? 1'($urandom) : 1'(force_val);
      iv = (b ? RX_T_ONE : RX_T_ZERO) + int'($urandom_range(4)) - 2;
      if (force_val >= 0) iv = b ? RX_T_ONE : RX_T_ZERO;
      exp_bits.push_back(b);
      one_gap(iv);
    end
    one_gap(RX_T_END + 10);   // closing gap, then idle
    if (force_val == 0) check(cycle - t0 <= 1400 + RX_T_END + 10, "all-zero 66-bit frame within 11.1 ms");
    if (force_val == 1) check(cycle - t0 <= 2180 + RX_T_END + 10, "all-one 66-bit frame within 17.4 ms");
  endtask

  // Outputs are sampled mid-cycle, away from the active clock edge.
  always @(negedge clk) begin
    if (frame_start) n_starts++;
    if (frame_end) begin
      n_ends++;
      check(exp_bits.size() == 0, "frame ended with bits missing");
    end
    if (bit_valid) begin
      n_bits++;
      if (bit_val) n_ones++;
      check(cycle - gap_cycle == 3, "bit_valid three clocks after the gap");
      if (exp_bits.size() == 0) check(0, "unexpected bit");
      else check(bit_val == exp_bits.pop_front(), "decoded bit value");
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    nrst = 1'b1;
    send_frame(66, -1);
    send_frame(4, -1);
    send_frame(66, 0);
    send_frame(66, 1);
    send_frame(130, -1);
    repeat (60) @(negedge clk);
    check(n_starts == 5 && n_ends == 5, "five frames seen");
    check(n_bits == 66 + 4 + 66 + 66 + 130, "bit count");
    check(n_ones > 66 && n_ones < 66 + 4 + 130 + 66, "both bit values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
