// input_adapter: TeSSLa input adapter for one parser stream, with the
// broom-wagon handling of the multi-input design.
//
// Reads the stream of 62-bit TeSSLa words from a first-word-fall-through
// FIFO: a timestamp word, then the data word of the same event. The FIFO's
// read enable is driven directly by this adapter (fifo_rd_en), as the
// first-word-fall-through semantics require. Each (timestamp, data) pair
// becomes one item for the specification network:
//   * a pair whose time is not above the last forwarded time is dropped:
//     parsers send strictly increasing times, so it can only be a broom-wagon
//     event that fell behind a real one (n_filtered counts these);
//   * a pair with mux address 0xFF is a broom wagon: it is forwarded as a
//     time step only (is_event = 0), its data value is dropped;
//   * any other pair is forwarded as an event (is_event = 1).
// A data word where a timestamp word is expected is dropped (n_protocol).
//
// Timing: one word is read per cycle, so one event takes two cycles (25 M
// events/s at 50 MHz). Items leave through a one-entry output register with
// valid/ready.
// The word order, the 0xFF drop and the monotonicity filter follow the design
// description; the item interface towards the network is this design's.
module input_adapter
  import rv_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  // first-word-fall-through FIFO
  input  logic [WORD_W-1:0]   fifo_dout,
  input  logic                fifo_empty,
  output logic                fifo_rd_en,
  // items to the specification network
  output logic                out_valid,
  output logic [TIME_W-1:0]   out_time,
  output logic                out_is_event,
  output logic [MUX_W-1:0]    out_mux,
  output logic [VAL_W-1:0]    out_value,
  input  logic                out_ready,
  output logic [31:0]         n_filtered,
  output logic [31:0]         n_protocol
);

  logic              have_ts;
  logic [TIME_W-1:0] cur_ts;
  logic              have_last;
  logic [TIME_W-1:0] last_ts;

  logic slot_free;
  assign slot_free = !out_valid || out_ready;

  always_comb begin
    fifo_rd_en = 1'b0;
    if (!fifo_empty) begin
      if (!have_ts)        fifo_rd_en = 1'b1;   // timestamp word (or stray data)
      else if (slot_free)  fifo_rd_en = 1'b1;   // data word
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      have_ts      <= 1'b0;
      cur_ts       <= '0;
      have_last    <= 1'b0;
      last_ts      <= '0;
      out_valid    <= 1'b0;
      out_time     <= '0;
      out_is_event <= 1'b0;
      out_mux      <= '0;
      out_value    <= '0;
      n_filtered   <= '0;
      n_protocol   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fifo_rd_en) begin
        if (!have_ts) begin
          if (is_ts_word(fifo_dout)) begin
            have_ts <= 1'b1;
            cur_ts  <= fifo_dout[TIME_W-1:0];
          end else begin
            n_protocol <= n_protocol + 1'b1;
          end
        end else begin
          have_ts <= 1'b0;
          if (is_ts_word(fifo_dout)) begin
            // a second timestamp word: treat it as the new pending timestamp
            have_ts    <= 1'b1;
            cur_ts     <= fifo_dout[TIME_W-1:0];
            n_protocol <= n_protocol + 1'b1;
          end else if (have_last && cur_ts <= last_ts) begin
            n_filtered <= n_filtered + 1'b1;
          end else begin
            have_last    <= 1'b1;
            last_ts      <= cur_ts;
            out_valid    <= 1'b1;
            out_time     <= cur_ts;
            out_mux      <= fifo_dout[WORD_W-2 -: MUX_W];
            out_value    <= fifo_dout[VAL_W-1:0];
            out_is_event <= (fifo_dout[WORD_W-2 -: MUX_W] != MUX_BROOM);
          end
        end
      end
    end
  end

endmodule
