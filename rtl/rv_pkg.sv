// rv_pkg: types, widths and encodings shared by the CoreSight-to-TeSSLa
// runtime-verification pipeline.
//
// Event encoding (TeSSLa input/output word, 62 bits):
//   timestamp word: bit 61 = 1, bits 60:53 padding (0), bits 52:0 time
//   data word     : bit 61 = 0, bits 60:53 mux address, bits 52:0 value
// A parser event is written as one 124-bit pair {data word, timestamp word}
// so that a 2:1 width-ratio FIFO hands the timestamp word out first.
// The 53-bit time is {48-bit frame timestamp, 4-bit time extension} with a
// leading zero so it stays positive in a signed 53-bit integer.
// These widths, the trace IDs and the broom-wagon mux address 0xFF follow
// the design description; the placement of the two words inside the
// 124-bit pair follows its timestamp-driver description.
package rv_pkg;

  localparam int unsigned TS_W      = 48;   // frame timestamp counter
  localparam int unsigned EXT_W     = 4;    // time extension
  localparam int unsigned TIME_W    = 53;   // TeSSLa time field
  localparam int unsigned VAL_W     = 53;   // TeSSLa data field
  localparam int unsigned MUX_W     = 8;    // mux address width
  localparam int unsigned WORD_W    = 62;   // one TeSSLa word
  localparam int unsigned PAIR_W    = 124;  // timestamp word + data word
  localparam int unsigned FRAME_BYTES = 16; // CoreSight formatter frame
  localparam int unsigned CHUNK_BYTES = 15; // payload bytes per frame, max

  // CoreSight trace IDs of the multiplexed sources
  localparam logic [6:0] ID_PTM0 = 7'h10;
  localparam logic [6:0] ID_PTM1 = 7'h11;
  localparam logic [6:0] ID_ITM  = 7'h6F;
  localparam logic [6:0] ID_FTM  = 7'h70;

  // Mux addresses used by the parsers
  localparam logic [MUX_W-1:0] MUX_PTM_ADDR  = 8'h00;
  localparam logic [MUX_W-1:0] MUX_PTM_CTXID = 8'h01;
  localparam logic [MUX_W-1:0] MUX_FTM_DATA  = 8'h00;
  localparam logic [MUX_W-1:0] MUX_BROOM     = 8'hFF;

  // Data value carried by broom-wagon events (debug marker only)
  localparam logic [31:0] BROOM_DUMMY = 32'h00C0FFEE;

  // Number of parser streams into the TeSSLa network
  localparam int unsigned N_STREAMS = 4;

  // One frame's worth of bytes for one source, with the frame timestamp
  typedef struct packed {
    logic [CHUNK_BYTES-1:0][7:0] bytes;   // bytes[0] is the oldest
    logic [3:0]                  count;   // 0..15 valid bytes
    logic [TS_W-1:0]             ts;
  } chunk_t;

  // A decoded parser event before encoding
  typedef struct packed {
    logic [TS_W-1:0]  ts;
    logic [MUX_W-1:0] mux;
    logic [31:0]      value;
  } raw_event_t;

  function automatic logic [WORD_W-1:0] ts_word(input logic [TIME_W-1:0] t);
    return {1'b1, {MUX_W{1'b0}}, t};
  endfunction

  function automatic logic [WORD_W-1:0] data_word(input logic [MUX_W-1:0] mux,
                                                  input logic [VAL_W-1:0] v);
    return {1'b0, mux, v};
  endfunction

  function automatic logic [PAIR_W-1:0] make_pair(input logic [TIME_W-1:0] t,
                                                  input logic [MUX_W-1:0] mux,
                                                  input logic [VAL_W-1:0] v);
    return {data_word(mux, v), ts_word(t)};
  endfunction

  function automatic logic [TIME_W-1:0] pair_time(input logic [PAIR_W-1:0] p);
    return p[TIME_W-1:0];
  endfunction

  function automatic logic [MUX_W-1:0] pair_mux(input logic [PAIR_W-1:0] p);
    return p[WORD_W+VAL_W +: MUX_W];
  endfunction

  function automatic logic [VAL_W-1:0] pair_value(input logic [PAIR_W-1:0] p);
    return p[WORD_W +: VAL_W];
  endfunction

  function automatic logic is_ts_word(input logic [WORD_W-1:0] w);
    return w[WORD_W-1];
  endfunction

endpackage
