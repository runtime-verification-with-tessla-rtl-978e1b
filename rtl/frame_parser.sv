// frame_parser: CoreSight trace-formatter frame demultiplexer.
//
// A 16-byte formatter frame holds 15 bytes of ID or data and, in byte 15,
// one auxiliary bit for each even byte. For an even byte with bit 0 set,
// bits 7:1 are a new trace ID; its auxiliary bit 0 means the ID applies from
// the next byte, 1 means the next byte still belongs to the previous ID.
// For an even byte with bit 0 clear, the data byte is {bits 7:1, aux bit}.
// Odd bytes are always data. The current ID carries over to the next frame.
// (Frame layout as defined by the CoreSight trace formatter.)
//
// Every byte is routed by its ID to one of four outputs, in the order of the
// TeSSLa inputs: 0 = PTM core 0 (ID 0x10), 1 = PTM core 1 (0x11),
// 2 = FTM (0x70), 3 = ITM (0x6F). Bytes of any other ID are dropped.
// A frame thus yields 0 to 15 bytes per output, written as one chunk with
// the frame timestamp, in the cycle after the frame is accepted.
//
// Interface: in_valid/in_frame/in_ts/in_ready from the frame synchroniser;
// per output out_valid[i]/out_chunk[i] with a shared out_ready, which must
// be high (all four downstream FIFOs have room) for the frame to move on.
// A chunk is written only to the outputs that received bytes.
// The IDs and the 0..15 bytes per frame and parser follow the design
// description; the one-frame-per-cycle register stage is this design's.
module frame_parser
  import rv_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic [FRAME_BYTES*8-1:0] in_frame,
  input  logic [TS_W-1:0]          in_ts,
  output logic                     in_ready,
  output logic [N_STREAMS-1:0]     out_valid,
  output chunk_t [N_STREAMS-1:0]   out_chunk,
  input  logic                     out_ready
);

  logic [6:0]                cur_id, next_id;
  chunk_t [N_STREAMS-1:0]    chunks;

  function automatic int dest_of(input logic [6:0] id);
    case (id)
      ID_PTM0: return 0;
      ID_PTM1: return 1;
      ID_FTM:  return 2;
      ID_ITM:  return 3;
      default: return -1;
    endcase
  endfunction

  always_comb begin
    logic [6:0] id, pend_id;
    logic       pend;
    logic [7:0] b, aux_byte, data;
    logic       aux, is_data;
    int         d;
    id      = cur_id;
    pend_id = cur_id;
    pend    = 1'b0;
    aux_byte = in_frame[15*8 +: 8];
    for (int s = 0; s < int'(N_STREAMS); s++) begin
      chunks[s]       = '0;
      chunks[s].ts    = in_ts;
    end
    for (int i = 0; i < 15; i++) begin
      b       = in_frame[i*8 +: 8];
      is_data = 1'b1;
      data    = b;
      if ((i % 2) == 0) begin
        aux = aux_byte[i/2];
        if (b[0]) begin
          is_data = 1'b0;
          if (aux) begin
            pend    = 1'b1;
            pend_id = b[7:1];
          end else begin
            id = b[7:1];
          end
        end else begin
          data = {b[7:1], aux};
        end
      end
      if (is_data) begin
        d = dest_of(id);
        if (d >= 0) begin
          chunks[d].bytes[chunks[d].count] = data;
          chunks[d].count                  = chunks[d].count + 1'b1;
        end
        if (pend) begin
          id   = pend_id;
          pend = 1'b0;
        end
      end
    end
    if (pend) id = pend_id;
    next_id = id;
  end

  assign in_ready = out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_id    <= '0;
      out_valid <= '0;
      out_chunk <= '0;
    end else if (out_ready) begin
      out_valid <= '0;
      if (in_valid) begin
        cur_id <= next_id;
        for (int s = 0; s < int'(N_STREAMS); s++) begin
          out_chunk[s] <= chunks[s];
          out_valid[s] <= (chunks[s].count != 0);
        end
      end
    end
  end

endmodule
