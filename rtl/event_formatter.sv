// event_formatter: embedding stage of the CoreSight parsers.
//
// Turns a decoded event (48-bit frame timestamp, 8-bit mux address, 32-bit
// value) into the 124-bit TeSSLa event pair {data word, timestamp word}.
// Several events can come from one frame and therefore share a frame
// timestamp; to keep the output time strictly increasing, a 4-bit time
// extension is appended: 0 for the first event of a frame timestamp, then
// 1, 2, ... for further events with the same frame timestamp. The time field
// is {0, frame timestamp, extension}.
//
// Interface: in_valid/in_event, out_valid/out_pair one cycle later (a FIFO
// write enable and data). No back-pressure: the parsers write one event per
// cycle at most. The extension saturates at 15; ext_saturated flags that
// (it cannot happen for 15-byte frames with the packet sizes of this design).
// The time extension and the encoding follow the design description.
module event_formatter
  import rv_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  raw_event_t        in_event,
  output logic              out_valid,
  output logic [PAIR_W-1:0] out_pair,
  output logic              ext_saturated
);

  logic [TS_W-1:0]  last_ts;
  logic [EXT_W-1:0] last_ext;
  logic             have_last;

  logic [EXT_W-1:0] ext;
  logic             same;
  assign same = have_last && (in_event.ts == last_ts);
  assign ext  = same ? ((last_ext == '1) ? last_ext : last_ext + 1'b1) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      last_ts       <= '0;
      last_ext      <= '0;
      have_last     <= 1'b0;
      out_valid     <= 1'b0;
      out_pair      <= '0;
      ext_saturated <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        last_ts   <= in_event.ts;
        last_ext  <= ext;
        have_last <= 1'b1;
        out_pair  <= make_pair({1'b0, in_event.ts, ext}, in_event.mux,
                               VAL_W'(in_event.value));
        if (same && last_ext == '1) ext_saturated <= 1'b1;
      end
    end
  end

endmodule
