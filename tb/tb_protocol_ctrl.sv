// Self-checking testbench for protocol_ctrl, wired to the real nvram_if, aes8
// and tx_manchester plus the NVRAM model.  The random bit and the receiver's
// bit stream are driven directly by the testbench.
// Checks: configuration and key read at reset; Nt gathered from one random bit
// every 64 clocks (4096 clocks for 64 bits); after IV(Nr) the reply register
// holds Nt || first half of AES(key, Nr || Nt) from the reference model and
// the transmitter is started; SILENCE stops it and restarts the sequence with
// a fresh Nt; KEY and CFG are ignored while write-protected and applied with
// the security override; an IV frame cut short is dropped by the timeout.
`timescale 1ns/1ps
module tb_protocol_ctrl;
  import rfid_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, nrst = 1'b0, security_override = 1'b0;
  logic nv_req, nv_we, nv_done, nv_busy;
  logic [6:0] nv_addr;
  logic [7:0] nv_wdata, nv_rdata;
  logic rng_en, rnd = 1'b0;
  logic [7:0] rng_state = 8'h5a;
  logic rx_frame_start = 1'b0, rx_bit_valid = 1'b0, rx_bit = 1'b0, rx_frame_end = 1'b0;
  logic aes_key_we, aes_din_we, aes_start, aes_done, aes_busy;
  logic [3:0] aes_key_addr, aes_din_addr, aes_dout_addr;
  logic [7:0] aes_key_in, aes_din, aes_dout;
  logic tx_wr, tx_start, tx_stop, tx_anticoll, tx_busy, tx_token, tx_msg_done, mod;
  logic [3:0] tx_wr_addr, tx_rd_addr, tx_gap;
  logic [7:0] tx_din, tx_dout;
  logic mem_clk, mem_data_o, mem_data_oe, mem_data_i;
  cfg_t cfg_q;
  logic nt_ready;

  logic [127:0] key;
  logic [63:0]  nt_fed, nr;
  int checks = 0, failures = 0, n_rng_cycles = 0, n_starts = 0, n_stops = 0;
  longint cycle = 0;

  protocol_ctrl dut (.*);
  nvram_if u_nv (.clk, .nrst, .req(nv_req), .we(nv_we), .addr(nv_addr), .wdata(nv_wdata),
                 .busy(nv_busy), .done(nv_done), .rdata(nv_rdata),
                 .mem_clk, .mem_data_o, .mem_data_oe, .mem_data_i);
  nvram_model u_mem (.mem_clk, .mem_data_o, .mem_data_oe, .mem_data_i);
  aes8 u_aes (.clk, .nrst, .key_we(aes_key_we), .key_addr(aes_key_addr), .key_in(aes_key_in),
              .din_we(aes_din_we), .din_addr(aes_din_addr), .din(aes_din),
              .start(aes_start), .busy(aes_busy), .done(aes_done),
              .dout_addr(aes_dout_addr), .dout(aes_dout));
  tx_manchester u_tx (.clk, .nrst, .wr(tx_wr), .wr_addr(tx_wr_addr), .din(tx_din),
                      .rd_addr(tx_rd_addr), .dout(tx_dout), .start(tx_start), .stop(tx_stop),
                      .anticoll(tx_anticoll), .gap_periods(tx_gap), .mod,
                      .busy(tx_busy), .token(tx_token), .msg_done(tx_msg_done));

  always #4000 clk = ~clk;

  always @(posedge clk) begin
    cycle++;
    if (tx_start) n_starts++;
    if (tx_stop) n_stops++;
  end
  always @(negedge clk) begin
    rnd = 1'($urandom);
    if (dut.ms == dut.M_GEN_NT) begin
      n_rng_cycles++;
      if (32'(dut.timer) == RNG_BIT_CYCLES - 1) nt_fed = {nt_fed[62:0], rnd};
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // Sends the n leftmost bits of v, one every `spacing` clocks.
  task automatic send_bits(input logic [129:0] v, input int n, input int spacing);
    @(negedge clk);
    rx_frame_start = 1'b1;
    @(negedge clk);
    rx_frame_start = 1'b0;
    for (int i = 129; i > 129 - n; i--) begin
      repeat (spacing - 1) @(negedge clk);
      rx_bit_valid = 1'b1;
      rx_bit = v[i];
      @(negedge clk);
      rx_bit_valid = 1'b0;
    end
  endtask

  task automatic end_frame();
    repeat (40) @(negedge clk);
    rx_frame_end = 1'b1;
    @(negedge clk);
    rx_frame_end = 1'b0;
  endtask

  function automatic logic [127:0] tx_reg();
    logic [127:0] r;
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = u_tx.mem[i];
    return r;
  endfunction

  task automatic wait_ready();
    int guard = 0;
    while (!nt_ready && guard < 20000) begin
      @(negedge clk);
      guard++;
    end
    check(nt_ready, "nonce ready");
  endtask

  task automatic challenge();
    logic [127:0] x, r;
    nr = {$urandom, $urandom};
    send_bits({OP_IV, nr, 64'h0}, 66, 27);
    end_frame();
    repeat (400) @(negedge clk);
    x = encrypt(key, {nr, nt_fed});
    r = tx_reg();
    check(r[127:64] == nt_fed, "reply carries Nt");
    check(r[63:0] == x[127:64], "reply carries the first half of AES(key, Nr||Nt)");
    check(tx_busy, "transmitter running");
  endtask

  initial begin
    int c0, starts0, w0;
    logic [63:0] nt_first;
    key = {$urandom, $urandom, $urandom, $urandom};
    u_mem.mem[0] = 8'h00;                          // write protected
    for (int i = 0; i < 16; i++) u_mem.mem[1+i] = key[127-8*i -: 8];
    repeat (3) @(negedge clk);
    nrst = 1'b1;
    wait_ready();
    check(u_mem.n_reads == 17, "configuration and 16 key bytes read");
    check(n_rng_cycles == 4096, $sformatf("nonce took %0d clocks", n_rng_cycles));
    @(negedge clk);
    check(tx_reg() >> 64 == 128'(nt_fed), "Nt stored in the reply register");
    // An IV frame cut short must be dropped
    send_bits({OP_IV, 32'h12345678, 96'h0}, 34, 27);
    end_frame();
    repeat (100) @(negedge clk);
    check(dut.ms == dut.M_IDLE && !tx_busy, "short frame dropped");
    // Truncated frame without end marker: timeout
    send_bits({OP_IV, 8'h12, 120'h0}, 10, 27);
    repeat (2100) @(negedge clk);
    check(dut.rs == dut.R_IDLE, "silent frame dropped by timeout");
    // KEY while write protected: ignored
    w0 = u_mem.n_writes;
    send_bits({OP_KEY, 128'hffff_0000_ffff_0000_ffff_0000_ffff_0000}, 130, 27);
    end_frame();
    check(u_mem.n_writes == w0, "KEY ignored while write protected");
    // First challenge
    starts0 = n_starts;
    challenge();
    check(n_starts == starts0 + 1, "transmitter started once");
    nt_first = nt_fed;
    // A second IV without SILENCE is not answered again
    send_bits({OP_IV, 64'h1, 64'h0}, 66, 27);
    end_frame();
    check(n_starts == starts0 + 1, "second IV ignored until SILENCE");
    // SILENCE: stop, restart, fresh nonce
    c0 = u_mem.n_reads;
    send_bits({OP_SILENCE, 2'b00, 126'h0}, 4, 27);
    end_frame();
    check(n_stops >= 1, "SILENCE stopped the transmitter");
    n_rng_cycles = 0;
    wait_ready();
    check(u_mem.n_reads == c0 + 17, "key re-read after SILENCE");
    check(nt_fed != nt_first, "fresh nonce after SILENCE");
    challenge();
    // Security override: KEY and CFG are written
    security_override = 1'b1;
    send_bits({OP_SILENCE, 2'b00, 126'h0}, 4, 27);
    end_frame();
    wait_ready();
    key = {$urandom, $urandom, $urandom, $urandom};
    send_bits({OP_KEY, key}, 130, 27);
    end_frame();
    for (int i = 0; i < 16; i++)
      check(u_mem.mem[1+i] == key[127-8*i -: 8], "KEY written with override");
    send_bits({OP_CFG, 8'b0000_0111, 120'h0}, 10, 27);
    end_frame();
    check(u_mem.mem[0] == 8'h07 && cfg_q == cfg_t'(8'h07), "CFG written with override");
    security_override = 1'b0;
    // After reset the new key and configuration are in force
    send_bits({OP_SILENCE, 2'b00, 126'h0}, 4, 27);
    end_frame();
    wait_ready();
    check(cfg_q.write_en && cfg_q.anticoll && cfg_q.rng_noise, "configuration re-read");
    challenge();
    check(tx_anticoll, "anti-collision mode passed to the transmitter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
