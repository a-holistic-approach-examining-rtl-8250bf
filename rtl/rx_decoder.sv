// Reader-to-tag receiver: decodes on-off keyed field gaps into bits.
//
// The reader signals data by briefly switching its field off; the front end
// reports each gap on GAP DETECT.  Bits are carried in the interval between the
// starts of successive gaps (pulse-interval coding): about RX_T_ZERO clocks
// for a '0' and RX_T_ONE clocks for a '1', 27 clocks on average.  The first gap
// of a frame only marks its start; every later gap closes one bit, which is
// decoded by comparing the interval with T_SPLIT.  When no gap arrives for
// T_END clocks the frame is over.
//
// The gap input is asynchronous to the core clock and passes a two-flop
// synchroniser, so all outputs lag the gap by three clocks.
//
// Ports: clk, nrst, gap (high during a gap); single-clock pulses frame_start,
// bit_valid (with bit_val) and frame_end; in_frame is high between them.
//
// From the document: on-off keying at an average bit rate of RF/27, 2+64 bits
// for the IV taking 11.1 to 17.4 ms.  The interval coding, the 21/33 cycle
// split derived from those two times and the end-of-frame rule are this
// design's choices.
`timescale 1ns/1ps
module rx_decoder
  import rfid_pkg::*;
#(
  parameter int unsigned T_SPLIT = RX_T_SPLIT,
  parameter int unsigned T_END   = RX_T_END
) (
  input  logic clk,
  input  logic nrst,
  input  logic gap,
  output logic frame_start,
  output logic bit_valid,
  output logic bit_val,
  output logic frame_end,
  output logic in_frame
);

  localparam int unsigned CW = $clog2(T_END + 1);

  logic [2:0]    gap_sync;
  logic          gap_rise;
  logic [CW-1:0] cnt;

  assign gap_rise = gap_sync[1] & ~gap_sync[2];

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      gap_sync    <= '0;
      cnt         <= '0;
      in_frame    <= 1'b0;
      frame_start <= 1'b0;
      bit_valid   <= 1'b0;
      bit_val     <= 1'b0;
      frame_end   <= 1'b0;
    end else begin
      gap_sync    <= {gap_sync[1:0], gap};
      frame_start <= 1'b0;
      bit_valid   <= 1'b0;
      frame_end   <= 1'b0;
      if (gap_rise) begin
        cnt <= CW'(1);
        if (!in_frame) begin
          in_frame    <= 1'b1;
          frame_start <= 1'b1;
        end else begin
          bit_valid <= 1'b1;
          bit_val   <= (32'(cnt) >= T_SPLIT);
        end
      end else if (in_frame) begin
        if (32'(cnt) >= T_END - 1) begin
          in_frame  <= 1'b0;
          frame_end <= 1'b1;
          cnt       <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
