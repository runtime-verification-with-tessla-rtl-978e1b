// timestamp_driver: broom-wagon timestamp generator between the CoreSight
// parsers and the FIFOs into the TeSSLa network.
//
// The TeSSLa network only makes progress when every input has moved past a
// time. With one FIFO per parser, an idle parser (no FTM data, one core
// idle) would stall the whole network. The driver therefore looks at all
// parser outputs every cycle without merging them:
//   * no parser writes an event   -> nothing is written;
//   * every parser writes         -> events pass unchanged;
//   * some parsers write          -> each idle output gets a "broom wagon"
//     event: timestamp = t - DELTA_T (or 1 if t <= DELTA_T), where t is the
//     timestamp of the first writing parser in priority order 0,1,2,3 (the
//     PTM parsers first, as their longer pipelines give them the lowest
//     timestamps), mux address 0xFF and a dummy value 0x00C0FFEE.
// So in any cycle either all FIFOs are written or none. DELTA_T is larger
// than the longest parser pipeline, so a broom-wagon time lies below any
// time a parser can still produce; it may lie below a time already sent on
// the same input, which the TeSSLa input adapter filters out.
// At the end of a trace, after FINAL_WAIT cycles without any event, one final
// push is written to all outputs with time (last broom-wagon source time +
// FINAL_DELTA_T), so the network can process the last real events.
//
// Interface: in_wr_en[i]/in_din[i] are the parser FIFO writes; out_wr_en[i]/
// out_dout[i] go to the FIFOs, combinationally in the same cycle, except the
// final push, which comes from a register. Time values are in units of
// 1/16 parser clock cycle (4-bit time extension): DELTA_T = 1024 << 4 and
// FINAL_DELTA_T = 1 << 4. FINAL_WAIT = 12,500,000 is 100 ms at 125 MHz.
// The behaviour and all constants follow the design description. One choice
// is this design's own: a parser event arriving in the very cycle of the
// final push also ends that push, so the push is never repeated.
module timestamp_driver
  import rv_pkg::*;
#(
  parameter int unsigned N             = N_STREAMS,
  parameter logic [TIME_W-1:0] DELTA_T       = 53'd16384,
  parameter logic [TIME_W-1:0] FINAL_DELTA_T = 53'd16,
  parameter int unsigned FINAL_WAIT    = 12_500_000
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [N-1:0]              in_wr_en,
  input  logic [N-1:0][PAIR_W-1:0]  in_din,
  output logic [N-1:0]              out_wr_en,
  output logic [N-1:0][PAIR_W-1:0]  out_dout,
  output logic [31:0]               n_broom,      // broom-wagon events written
  output logic [31:0]               n_final       // final pushes written
);

  logic              sync_needed;
  logic [PAIR_W-1:0] sync_src;
  logic [TIME_W-1:0] src_time, broom_time;
  logic [PAIR_W-1:0] sync_out;

  logic              final_needed;
  logic [PAIR_W-1:0] final_out;
  logic [TIME_W-1:0] final_last;
  logic [31:0]       wait_cnt;

  function automatic logic [PAIR_W-1:0] broom_pair(input logic [TIME_W-1:0] t);
    return make_pair(t, MUX_BROOM, VAL_W'(BROOM_DUMMY));
  endfunction

  assign sync_needed = |in_wr_en;

  always_comb begin
    sync_src = in_din[N-1];
    for (int i = int'(N) - 1; i >= 0; i--) if (in_wr_en[i]) sync_src = in_din[i];
  end

  assign src_time   = pair_time(sync_src);
  assign broom_time = (src_time > DELTA_T) ? src_time - DELTA_T : TIME_W'(1);
  assign sync_out   = broom_pair(broom_time);

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      out_wr_en[i] = in_wr_en[i] | sync_needed | final_needed;
      if (in_wr_en[i])      out_dout[i] = in_din[i];
      else if (sync_needed) out_dout[i] = sync_out;
      else                  out_dout[i] = final_out;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      final_last   <= '0;
      wait_cnt     <= '0;
      final_needed <= 1'b0;
      final_out    <= '0;
      n_broom      <= '0;
      n_final      <= '0;
    end else begin
      if (sync_needed) begin
        final_last   <= src_time;
        wait_cnt     <= '0;
        final_needed <= 1'b0;
        if (!(&in_wr_en)) n_broom <= n_broom + 1'b1;
      end else if (wait_cnt == FINAL_WAIT) begin
        final_needed <= 1'b1;
        final_out    <= broom_pair(final_last + FINAL_DELTA_T);
        wait_cnt     <= wait_cnt + 1'b1;
      end else if (wait_cnt == FINAL_WAIT + 1) begin
        final_needed <= 1'b0;
      end else begin
        wait_cnt <= wait_cnt + 1'b1;
      end
      if (final_needed && !sync_needed) n_final <= n_final + 1'b1;
    end
  end

endmodule
