// byte_buffer: input buffer of a CoreSight packet parser.
//
// Packets of the PTM, ITM and FTM protocols span frames, so each parser
// keeps a byte buffer that is appended with the 0..15 bytes a frame brings
// and shifted down by the length of each packet its tokenizer recognises.
// The first WIN bytes (the window) are visible in parallel, so a tokenizer
// can find the length of the packet at the head in one cycle. Every byte
// keeps the timestamp of the frame it came in.
//
// Interface: in_valid/in_chunk/in_ready appends a chunk (accepted only when
// at least 15 bytes are free); win/win_ts/level show the head; consume
// (0..WIN) drops that many bytes at the clock edge. Appending and consuming
// in the same cycle is allowed. consume must not exceed level.
// The buffer principle follows the design description; its size and the
// per-byte timestamps are this implementation's choices.
module byte_buffer
  import rv_pkg::*;
#(
  parameter int unsigned BUF = 32,
  parameter int unsigned WIN = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  chunk_t                     in_chunk,
  output logic                       in_ready,
  output logic [WIN-1:0][7:0]        win,
  output logic [WIN-1:0][TS_W-1:0]   win_ts,
  output logic [$clog2(BUF+1)-1:0]   level,
  input  logic [$clog2(WIN+1)-1:0]   consume
);

  localparam int unsigned LW = $clog2(BUF+1);

  logic [BUF-1:0][7:0]      data_q;
  logic [BUF-1:0][TS_W-1:0] ts_q;

  assign in_ready = (BUF - int'(level)) >= CHUNK_BYTES;

  always_comb begin
    for (int i = 0; i < int'(WIN); i++) begin
      win[i]    = data_q[i];
      win_ts[i] = ts_q[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      level  <= '0;
      data_q <= '0;
      ts_q   <= '0;
    end else begin
      logic [BUF-1:0][7:0]      d;
      logic [BUF-1:0][TS_W-1:0] t;
      int unsigned              lv;
      d  = '0;
      t  = '0;
      lv = int'(level) - int'(consume);
      for (int i = 0; i < int'(BUF); i++) begin
        if (i + int'(consume) < int'(BUF)) begin
          d[i] = data_q[i + int'(consume)];
          t[i] = ts_q[i + int'(consume)];
        end
      end
      if (in_valid && in_ready) begin
        for (int k = 0; k < int'(CHUNK_BYTES); k++) begin
          if (k < int'(in_chunk.count)) begin
            d[lv + k] = in_chunk.bytes[k];
            t[lv + k] = in_chunk.ts;
          end
        end
        lv = lv + int'(in_chunk.count);
      end
      data_q <= d;
      ts_q   <= t;
      level  <= LW'(lv);
    end
  end

endmodule
