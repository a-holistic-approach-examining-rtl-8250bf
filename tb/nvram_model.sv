// Behavioural model of the front end's serial NVRAM, for testbenches.
//
// 128 bytes.  A transfer starts with a '1' on MEM_DATA at a rising MEM_CLK
// edge while the model is idle, followed by R/W (1 = write) and 7 address bits
// sampled on rising edges.  A write then samples 8 data bits on rising edges and
// stores the byte; a read drives 8 data bits, each from the falling MEM_CLK edge
// that begins it, and releases the line after the last one.  Counts reads,
// writes and bus conflicts (both sides driving at a rising edge).
`timescale 1ns/1ps
module nvram_model (
  input  logic mem_clk,
  input  logic mem_data_o,
  input  logic mem_data_oe,
  output logic mem_data_i
);

  logic [7:0] mem [128];
  int n_reads = 0, n_writes = 0, n_conflicts = 0;
  logic drive = 1'b0, dval = 1'b0;

  assign mem_data_i = drive ? dval : 1'b0;

  always @(posedge mem_clk) if (drive && mem_data_oe) n_conflicts++;

  initial begin
    logic [7:0] cmd, data;
    forever begin
      @(posedge mem_clk);
      if (mem_data_oe && mem_data_o) begin
        cmd = '0;
        for (int i = 0; i < 8; i++) begin
          @(posedge mem_clk);
          cmd = {cmd[6:0], mem_data_o};
        end
        if (cmd[7]) begin
          for (int i = 0; i < 8; i++) begin
            @(posedge mem_clk);
            data = {data[6:0], mem_data_o};
          end
          mem[cmd[6:0]] = data;
          n_writes++;
        end else begin
          data = mem[cmd[6:0]];
          for (int i = 7; i >= 0; i--) begin
            @(negedge mem_clk);
            drive = 1'b1;
            dval  = data[i];
          end
          @(negedge mem_clk);
          drive = 1'b0;
          n_reads++;
        end
      end
    end
  end

endmodule
