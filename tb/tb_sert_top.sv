// End-to-end testbench for sert_top at its default parameters.
//
// The testbench plays the front end and the reader.  It produces the 125 kHz
// field clock (with spurious re-crossings on some rising edges) and its RC-
// delayed copy, holds the tag's key and configuration in the NVRAM model,
// sends commands as field gaps (pulse-interval coding, 21 or 33 clocks per
// bit) and decodes the Manchester reply from the modulation pin.  It runs the
// reader side of the double challenge-response protocol: challenge Nr1, search
// a small database of keys for one whose AES output matches the first reply,
// then challenge Nr2 and require a second match with a different MAC.
// Each mechanism is counted and must occur: clock clean-up, RNG restart out
// of the all-zero state, frame drop on a truncated frame, write protection,
// security override, reply repetition, SILENCE reset, RNG running during AES
// (noise mode) and anti-collision silences.  Cycle counts are checked for the
// nonce generation (4096 clocks) and for one reply message (4224 clocks,
// 33.8 ms).
`timescale 1ns/1ps
module tb_sert_top;
  import rfid_pkg::*;
  import aes_ref_pkg::*;

  localparam int MSG_CYC = (TX_SYNC_BITS + TX_MSG_BITS) * 2 * TX_HALF_BIT;
  localparam int NDB     = 4;

  logic fclk = 1'b0;                  // ideal field clock (reader timing)
  logic field_clock = 1'b0, delayed_clk = 1'b0, nreset = 1'b1;
  logic gap_detect = 1'b0, security_override = 1'b0;
  logic modulation, mem_clk, mem_data_o, mem_data_oe, mem_data_i;

  logic [127:0] db [NDB];
  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_bounce = 0, n_raw_rise = 0, n_clean_rise = 0, n_restart = 0, n_drop = 0;
  int n_protect = 0, n_override = 0, n_repeat = 0, n_silence = 0, n_noise = 0;
  int n_anticoll = 0, n_auth = 0, n_gen = 0, gen_cycles = 0;

  sert_top dut (.*);
  nvram_model u_mem (.mem_clk, .mem_data_o, .mem_data_oe, .mem_data_i);

  // ------------------------------------------------------------ clocks
  always #4000 fclk = ~fclk;
  always @(posedge fclk) begin
    cycle++;
    field_clock = 1'b1;
    if (cycle % 5 == 0) begin         // a slow, noisy edge
      #60 field_clock = 1'b0;
      #30 field_clock = 1'b1;
      n_bounce++;
    end
  end
  always @(negedge fclk) field_clock = 1'b0;
  always @(fclk) delayed_clk <= #1000 fclk;

  always @(posedge field_clock) n_raw_rise++;
  always @(posedge dut.clk) begin
    n_clean_rise++;
    if (dut.u_rng.enable && dut.u_rng.lfsr == 8'h00) n_restart++;
    if (dut.rng_en && dut.u_ctrl.ms == dut.u_ctrl.M_AES) n_noise++;
    if (dut.u_ctrl.ms == dut.u_ctrl.M_GEN_NT) gen_cycles++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // ------------------------------------------------------------ reader: send
  task automatic gap_at_start(input int interval);
    @(negedge fclk);
    gap_detect = 1'b1;
    repeat (5) @(negedge fclk);
    gap_detect = 1'b0;
    repeat (interval - 6) @(negedge fclk);
  endtask

  // Sends the n leftmost bits of v as one frame.
  task automatic send_frame(input logic [129:0] v, input int n);
    gap_at_start(v[129] ? RX_T_ONE : RX_T_ZERO);
    for (int i = 129; i > 129 - n; i--)
      gap_at_start(i == 130 - n ? RX_T_END + 20 : (v[i-1] ? RX_T_ONE : RX_T_ZERO));
  endtask

  // ------------------------------------------------------------ reader: receive
  // Finds a sync token (>= 2 bit times high, then 2 low) and decodes 128
  // Manchester bits; returns the data and the cycle after the last bit.
  task automatic receive(output logic [63:0] nt, output logic [63:0] px,
                         output longint t_end, output longint t_sync);
    int run;
    logic [127:0] d;
    logic a, b;
    int bad;
    run = 0;
    while (run < 2 * 2 * TX_HALF_BIT) begin
      @(negedge fclk);
      run = modulation ? run + 1 : 0;
    end
    t_sync = cycle - longint'(run);
    do @(negedge fclk); while (modulation);
    repeat (2 * 2 * TX_HALF_BIT - 1) @(negedge fclk);
    bad = 0;
    for (int i = 127; i >= 0; i--) begin
      repeat (TX_HALF_BIT / 2) @(negedge fclk);
      a = modulation;
      repeat (TX_HALF_BIT) @(negedge fclk);
      b = modulation;
      repeat (TX_HALF_BIT / 2) @(negedge fclk);
      if (a == b) bad++;
      d[i] = a;
    end
    check(bad == 0, "valid Manchester symbols");
    check(cycle - t_sync == longint'(MSG_CYC), $sformatf("message took %0d clocks", cycle - t_sync));
    t_end = cycle;
    nt = d[127:64];
    px = d[63:0];
  endtask

  task automatic wait_ready();
    int guard = 0;
    int g0;
    g0 = gen_cycles;
    while (!dut.nt_ready && guard < 20000) begin
      @(negedge fclk);
      guard++;
    end
    check(dut.nt_ready, "tag ready");
    check(gen_cycles - g0 == 4096, $sformatf("nonce generation took %0d clocks", gen_cycles - g0));
    n_gen++;
    repeat (20) @(negedge fclk);
  endtask

  task automatic silence();
    int r0;
    r0 = u_mem.n_reads;
    send_frame({OP_SILENCE, 2'b00, 126'h0}, 4);
    repeat (100) @(negedge fclk);
    check(!dut.tx_busy && u_mem.n_reads > r0, "SILENCE stopped the reply and restarted the tag");
    n_silence++;
  endtask

  // One challenge: IV(nr), then read one reply.
  task automatic challenge(input logic [63:0] nr, output logic [63:0] nt, output logic [63:0] px,
                           output longint t_end, output longint t_sync);
    send_frame({OP_IV, nr, 64'h0}, 66);
    receive(nt, px, t_end, t_sync);
  endtask

  initial begin
    logic [63:0] nr1, nr2, nt1, nt2, px1, px2, ntb, pxb;
    logic [127:0] x;
    longint te, ts, te2, ts2;
    int found, w0, q;

    for (int i = 0; i < NDB; i++) db[i] = {$urandom, $urandom, $urandom, $urandom};
    u_mem.mem[0] = 8'h00;                            // write protected, plain mode
    for (int i = 0; i < 16; i++) u_mem.mem[1+i] = db[2][127-8*i -: 8];
    // power-on reset pulse (the core clock is stopped while reset is low)
    #100 nreset = 1'b0;
    repeat (4) @(negedge fclk);
    nreset = 1'b1;
    wait_ready();

    // write protection: KEY is ignored
    w0 = u_mem.n_writes;
    send_frame({OP_KEY, 128'h0123_4567_89ab_cdef_0123_4567_89ab_cdef}, 130);
    repeat (50) @(negedge fclk);
    check(u_mem.n_writes == w0 && u_mem.mem[1] == db[2][127:120], "KEY ignored while protected");
    if (u_mem.n_writes == w0) n_protect++;

    // a truncated IV frame is dropped
    send_frame({OP_IV, 64'hdead_beef_0000_0000, 64'h0}, 20);
    repeat (100) @(negedge fclk);
    check(dut.u_ctrl.ms == dut.u_ctrl.M_IDLE && !dut.tx_busy, "truncated frame dropped");
    if (dut.u_ctrl.ms == dut.u_ctrl.M_IDLE) n_drop++;

    // ---------------- double challenge-response (reader side)
    nr1 = {$urandom, $urandom};
    challenge(nr1, nt1, px1, te, ts);
    receive(ntb, pxb, te2, ts2);                      // the reply repeats
    check(ntb == nt1 && pxb == px1 && ts2 == te, "reply repeated back to back");
    if (ntb == nt1 && ts2 == te) n_repeat++;
    silence();
    wait_ready();
    nr2 = {$urandom, $urandom};
    challenge(nr2, nt2, px2, te, ts);
    silence();
    check(nt2 != nt1, "fresh tag nonce per challenge");
    found = -1;
    for (int i = 0; i < NDB; i++) begin
      x = encrypt(db[i], {nr1, nt1});
      if (x[127:64] == px1) begin
        x = encrypt(db[i], {nr2, nt2});
        if (x[127:64] == px2 && px1 != px2) found = i;
      end
    end
    check(found == 2, $sformatf("reader identified tag as entry %0d", found));
    if (found == 2) n_auth++;

    // ---------------- security override: enable anti-collision and noise mode
    wait_ready();
    security_override = 1'b1;
    send_frame({OP_CFG, 8'b0000_0111, 120'h0}, 10);
    repeat (100) @(negedge fclk);
    check(u_mem.mem[0] == 8'h07, "CFG written under security override");
    if (u_mem.mem[0] == 8'h07) n_override++;
    security_override = 1'b0;
    silence();
    wait_ready();
    check(dut.cfg_q.anticoll && dut.cfg_q.rng_noise, "new configuration read after reset");

    // ---------------- anti-collision: silences of 1..16 message periods
    nr1 = {$urandom, $urandom};
    challenge(nr1, nt1, px1, te, ts);
    x = encrypt(db[2], {nr1, nt1});
    check(px1 == x[127:64], "MAC in anti-collision mode");
    for (int k = 0; k < 2; k++) begin
      receive(ntb, pxb, te2, ts2);
      q = int'(ts2 - te);
      check(q % MSG_CYC == 0 && q / MSG_CYC >= 1 && q / MSG_CYC <= 16,
            $sformatf("silence of %0d clocks between replies", q));
      check(ntb == nt1 && pxb == px1, "same reply after the silence");
      if (q >= MSG_CYC) n_anticoll++;
      te = te2;
    end
    silence();

    // ---------------- every mechanism must have happened
    check(n_bounce > 0 && n_raw_rise > n_clean_rise, "clock clean-up removed spurious edges");
    check(n_restart > 0, "RNG restarted from the all-zero state");
    check(n_drop > 0, "truncated frame dropped");
    check(n_protect > 0, "write protection");
    check(n_override > 0, "security override");
    check(n_repeat > 0, "reply repetition");
    check(n_silence > 0, "SILENCE reset");
    check(n_noise > 0, "RNG running during AES in noise mode");
    check(n_anticoll > 0, "anti-collision silence");
    check(n_auth > 0, "double challenge-response authentication");
    $display("bounces=%0d restarts=%0d drops=%0d protect=%0d override=%0d repeat=%0d silence=%0d noise=%0d anticoll=%0d auth=%0d nonces=%0d",
             n_bounce, n_restart, n_drop, n_protect, n_override, n_repeat, n_silence, n_noise,
             n_anticoll, n_auth, n_gen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3s;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
