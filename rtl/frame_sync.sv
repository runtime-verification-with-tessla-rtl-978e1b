// frame_sync: CoreSight frame synchroniser.
//
// The trace port delivers the formatted CoreSight stream as 32-bit words
// (byte 0 of the stream in bits 7:0). Four consecutive words form one
// 16-byte formatter frame. The synchroniser collects words and hands on
// only complete frames. A synchronisation word 0xFFFFFFFF is never part of
// a frame: it is dropped and restarts frame collection at word 0, which
// discards a partly collected frame.
//
// A free-running 48-bit counter counts clock cycles from reset; each frame
// leaves with the counter value of the cycle in which its last word
// arrived. This timestamp travels with the frame's bytes through all
// parsers, so events keep their order whatever each parser's latency.
//
// Interface: in_valid/in_data/in_ready from a first-word-fall-through FIFO
// (in_ready is its read enable); out_valid/out_frame/out_ts/out_ready to the
// frame parser. One frame register: a word is accepted every cycle unless a
// completed frame is still waiting for out_ready.
// Frame size, the sync word, the 48-bit counter and the per-frame timestamp
// follow the design description; the single frame register and dropping
// the partial frame on a sync word are this implementation's choices.
module frame_sync
  import rv_pkg::*;
#(
  parameter logic [31:0] SYNC_WORD = 32'hFFFF_FFFF
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic [31:0]             in_data,
  output logic                    in_ready,
  output logic                    out_valid,
  output logic [FRAME_BYTES*8-1:0] out_frame,
  output logic [TS_W-1:0]         out_ts,
  input  logic                    out_ready,
  output logic [31:0]             sync_count    // sync words seen
);

  logic [TS_W-1:0] counter;
  logic [1:0]      wpos;        // next word position in the frame
  logic [2:0][31:0] partial;    // words 0..2 of the frame being collected

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      counter    <= '0;
      wpos       <= '0;
      partial    <= '0;
      out_valid  <= 1'b0;
      out_frame  <= '0;
      out_ts     <= '0;
      sync_count <= '0;
    end else begin
      counter <= counter + 1'b1;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (in_data == SYNC_WORD) begin
          wpos       <= '0;
          sync_count <= sync_count + 1'b1;
        end else if (wpos == 2'd3) begin
          out_frame <= {in_data, partial[2], partial[1], partial[0]};
          out_ts    <= counter;
          out_valid <= 1'b1;
          wpos      <= '0;
        end else begin
          partial[wpos] <= in_data;
          wpos          <= wpos + 1'b1;
        end
      end
    end
  end

endmodule
