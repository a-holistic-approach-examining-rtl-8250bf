// NVRAM interface: 8-bit RAM-style port to a two-wire serial NVRAM.
//
// The front end's NVRAM (configuration word and key) is reached over a clock
// line MEM_CLK and one bidirectional data line MEM_DATA.  This module turns a
// single-byte read or write request into one serial transfer of 17 bits, each
// bit two core clocks long (MEM_CLK low, then high; the NVRAM samples on the
// rising edge):
//   start bit '1', then R/W (1 = write) and the 7-bit address, MSB first,
//   then 8 data bits, MSB first.
// For a write the module drives all 17 bits.  For a read it releases MEM_DATA
// after the address; the NVRAM drives each data bit from the falling MEM_CLK
// edge that begins it and the module samples it at the end of the bit.  When
// idle, MEM_CLK is low and MEM_DATA is driven low.  A transfer takes 34 clocks
// from req to the done pulse.
//
// Ports: clk, nrst; req (pulse, only while !busy), we, addr, wdata; busy, done
// (pulse), rdata (valid with done and held); mem_clk, mem_data_o, mem_data_oe,
// mem_data_i (pad side of the bidirectional line).
//
// From the document: a bidirectional serial NVRAM converted to an 8-bit RAM
// style interface.  The frame format and timing are this design's choices.
`timescale 1ns/1ps
module nvram_if (
  input  logic       clk,
  input  logic       nrst,
  input  logic       req,
  input  logic       we,
  input  logic [6:0] addr,
  input  logic [7:0] wdata,
  output logic       busy,
  output logic       done,
  output logic [7:0] rdata,
  output logic       mem_clk,
  output logic       mem_data_o,
  output logic       mem_data_oe,
  input  logic       mem_data_i
);

  localparam int unsigned NBITS = 17;

  logic [NBITS-1:0] sh;       // bits still to send, MSB next
  logic [4:0]       bitn;     // index of the current bit
  logic             phase;    // 0: MEM_CLK low half, 1: high half
  logic             is_wr;

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      rdata       <= '0;
      sh          <= '0;
      bitn        <= '0;
      phase       <= 1'b0;
      is_wr       <= 1'b0;
      mem_clk     <= 1'b0;
      mem_data_o  <= 1'b0;
      mem_data_oe <= 1'b1;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        mem_clk     <= 1'b0;
        mem_data_oe <= 1'b1;
        mem_data_o  <= 1'b0;
        if (req) begin
          busy       <= 1'b1;
          is_wr      <= we;
          sh         <= {1'b1, we, addr, wdata};
          bitn       <= '0;
          phase      <= 1'b0;
          mem_data_o <= 1'b1;
        end
      end else if (!phase) begin
        mem_clk <= 1'b1;
        phase   <= 1'b1;
      end else begin
        // end of bit bitn: MEM_CLK falls, next bit starts
        mem_clk <= 1'b0;
        phase   <= 1'b0;
        if (bitn >= 5'd9 && !is_wr) rdata <= {rdata[6:0], mem_data_i};
        if (32'(bitn) == NBITS - 1) begin
          busy        <= 1'b0;
          done        <= 1'b1;
          mem_data_o  <= 1'b0;
          mem_data_oe <= 1'b1;
        end else begin
          bitn        <= bitn + 1'b1;
          sh          <= {sh[NBITS-2:0], 1'b0};
          mem_data_o  <= sh[NBITS-2];
          mem_data_oe <= is_wr || (bitn + 1'b1 < 5'd9);
        end
      end
    end
  end

endmodule
