// Self-checking testbench for aes8: the FIPS-197 example vector plus random
// keys and blocks, compared with the reference model, and the start-to-done
// latency of 247 clocks (edges from the one that samples start to the one
// that raises done).
`timescale 1ns/1ps
module tb_aes8;
  import aes_ref_pkg::*;

  logic clk = 1'b0, nrst = 1'b0;
  logic key_we = 1'b0, din_we = 1'b0, start = 1'b0;
  logic [3:0] key_addr = '0, din_addr = '0, dout_addr = '0;
  logic [7:0] key_in = '0, din = '0, dout;
  logic busy, done;
  int checks = 0, failures = 0;

  aes8 dut (.*);

  always #4000 clk = ~clk;   // 125 kHz

  task automatic run(input logic [127:0] key, input logic [127:0] pt);
    logic [127:0] ct, expct;
    int cyc;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      key_we = 1'b1; key_addr = 4'(i); key_in = key[127-8*i -: 8];
      din_we = 1'b1; din_addr = 4'(i); din = pt[127-8*i -: 8];
    end
    @(negedge clk);
    key_we = 1'b0; din_we = 1'b0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    for (int i = 0; i < 16; i++) begin
      dout_addr = 4'(i);
      #1 ct[127-8*i -: 8] = dout;
    end
    expct = encrypt(key, pt);
    checks++;
    if (ct !== expct) begin
      failures++;
      $display("FAIL key=%h pt=%h got=%h exp=%h", key, pt, ct, expct);
    end
    checks++;
    if (cyc - 1 != 247) begin
      failures++;
      $display("FAIL latency %0d clocks, expected 247", cyc - 1);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    nrst = 1'b1;
    // FIPS-197 Appendix C.1
    checks++;
    if (encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++;
      $display("FAIL reference model");
    end
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734);
    for (int n = 0; n < 6; n++)
      run({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
