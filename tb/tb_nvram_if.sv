// Self-checking testbench for nvram_if against the serial NVRAM model: random
// writes followed by reads of every written address, compared with a copy kept
// here; checks the 34-clock transfer time, that no transfer drove the line from
// both ends, and that the model saw every request.
`timescale 1ns/1ps
module tb_nvram_if;

  logic clk = 1'b0, nrst = 1'b0;
  logic req = 1'b0, we = 1'b0;
  logic [6:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic busy, done, mem_clk, mem_data_o, mem_data_oe, mem_data_i;
  logic [7:0] shadow [128];
  int checks = 0, failures = 0;

  nvram_if dut (.*);
  nvram_model u_mem (.*);

  always #4000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic xfer(input logic w, input logic [6:0] a, input logic [7:0] d);
    int cyc = 0;
    @(negedge clk);
    req = 1'b1; we = w; addr = a; wdata = d;
    @(negedge clk);
    req = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc - 1 == 34, $sformatf("transfer took %0d clocks", cyc - 1));
  endtask

  initial begin
    logic [6:0] a;
    logic [7:0] d;
    repeat (3) @(negedge clk);
    nrst = 1'b1;
    for (int i = 0; i < 128; i++) u_mem.mem[i] = 8'(i * 37 + 5);
    for (int i = 0; i < 128; i++) shadow[i] = 8'(i * 37 + 5);
    for (int n = 0; n < 40; n++) begin
      a = 7'($urandom);
      d = 8'($urandom);
      if (n % 3 != 0) begin
        xfer(1'b1, a, d);
        shadow[a] = d;
      end
      a = 7'($urandom);
      xfer(1'b0, a, 8'h00);
      check(rdata == shadow[a], $sformatf("read addr %0d got %h expected %h", a, rdata, shadow[a]));
    end
    check(u_mem.n_conflicts == 0, "no bus conflict");
    check(u_mem.n_reads == 40 && u_mem.n_writes == 26, "model saw every transfer");
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
