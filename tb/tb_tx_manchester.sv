// Self-checking testbench for tx_manchester.  Writes a random 128-bit reply,
// reads it back, then compares the modulation output clock by clock with an
// independently built waveform: sync token (2 bit times high, 2 low) followed
// by Manchester bits ('1' = high/low), 4224 clocks per message (33.8 ms at
// 125 kHz).  Checks back-to-back repetition, stop, and in anti-collision mode
// a silence of (gap_periods+1) message periods between messages.
`timescale 1ns/1ps
module tb_tx_manchester;
  import rfid_pkg::*;

  localparam int MSG_CYC = (TX_SYNC_BITS + TX_MSG_BITS) * 2 * TX_HALF_BIT;

  logic clk = 1'b0, nrst = 1'b0;
  logic wr = 1'b0, start = 1'b0, stop = 1'b0, anticoll = 1'b0;
  logic [3:0] wr_addr = '0, rd_addr = '0, gap_periods = '0;
  logic [7:0] din = '0, dout;
  logic mod, busy, token, msg_done;
  logic [127:0] msg;
  logic wave [MSG_CYC];
  int checks = 0, failures = 0, n_done = 0, mism = 0;

  tx_manchester dut (.*);

  always #4000 clk = ~clk;
  always @(negedge clk) if (msg_done) n_done++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic build_wave();
    int k = 0;
    for (int h = 0; h < 2 * TX_SYNC_BITS; h++)
      for (int c = 0; c < TX_HALF_BIT; c++) wave[k++] = (h < TX_SYNC_BITS);
    for (int b = 127; b >= 0; b--) begin
      for (int c = 0; c < TX_HALF_BIT; c++) wave[k++] = msg[b];
      for (int c = 0; c < TX_HALF_BIT; c++) wave[k++] = ~msg[b];
    end
  endtask

  // Compare one message, starting at the next negedge.
  task automatic expect_msg();
    mism = 0;
    for (int k = 0; k < MSG_CYC; k++) begin
      @(negedge clk);
      if (mod !== wave[k]) mism++;
    end
    check(mism == 0, $sformatf("message waveform (%0d clocks differ)", mism));
  endtask

  task automatic expect_quiet(input int n);
    mism = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      if (mod !== 1'b0) mism++;
    end
    check(mism == 0, "silent period");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    nrst = 1'b1;
    msg = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      wr = 1'b1; wr_addr = 4'(i); din = msg[127-8*i -: 8];
    end
    @(negedge clk);
    wr = 1'b0;
    for (int i = 0; i < 16; i++) begin
      rd_addr = 4'(i);
      #1 check(dout == msg[127-8*i -: 8], "read back");
    end
    build_wave();
    // plain repetition
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    expect_msg();
    expect_msg();
    stop = 1'b1;
    @(negedge clk);
    stop = 1'b0;
    @(negedge clk);
    check(n_done == 2, "two messages completed");
    check(!busy && !mod, "stopped");
    // anti-collision: 3 silent message periods
    anticoll = 1'b1; gap_periods = 4'd2;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    expect_msg();
    expect_quiet(3 * MSG_CYC);
    expect_msg();
    stop = 1'b1;
    @(negedge clk);
    stop = 1'b0;
    @(negedge clk);
    check(n_done == 4, "four messages completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * MSG_CYC) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
