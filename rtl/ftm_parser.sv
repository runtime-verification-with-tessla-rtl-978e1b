// ftm_parser: Fabric Trace Monitor (FTM) parser.
//
// The FTM of the Zynq-7000 lets logic in the FPGA fabric send 32-bit words
// into the CoreSight stream. This parser tokenizes the FTM byte stream and
// turns each trace packet into a TeSSLa event with mux address 0x00 and the
// 32-bit word as value. Only one FTM trace ID (ATID 0, CoreSight ID 0x70) is
// parsed; another instance would serve each further ID. Same pipeline as the
// PTM parser: byte buffer, tokenizer, decode, formatter with time extension.
//
// Packet types tokenized: Synchronization (0x00 x n then 0x80), Trace,
// Trigger, Cycle count, Overflow, First. The design description names these
// types but not their byte layout, which this design assumes as follows:
//   Trace       0x03 followed by 4 data bytes, least significant first
//   Trigger     0x04
//   Cycle count 0x0C followed by up to 5 bytes with continuation bit 7
//   Overflow    0x70
//   First       0x14
// Any other byte is dropped.
//
// Interface: in_valid/in_chunk/in_ready from the frame parser's FIFO;
// out_valid/out_pair is a FIFO write (no back-pressure).
module ftm_parser
  import rv_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  chunk_t            in_chunk,
  output logic              in_ready,
  output logic              out_valid,
  output logic [PAIR_W-1:0] out_pair,
  output logic [15:0]       n_trace,
  output logic [15:0]       n_trigger,
  output logic              ext_saturated
);

  localparam int unsigned WIN = 16;
  localparam int unsigned BUF = 32;

  logic [WIN-1:0][7:0]      win;
  logic [WIN-1:0][TS_W-1:0] win_ts;
  logic [$clog2(BUF+1)-1:0] level;
  logic [$clog2(WIN+1)-1:0] consume;

  byte_buffer #(.BUF(BUF), .WIN(WIN)) u_buf (
    .clk, .rst, .in_valid, .in_chunk, .in_ready,
    .win, .win_ts, .level, .consume
  );

  int tok_len;
  bit tok_trace;
  bit tok_trig;

  always_comb begin
    int lv;
    lv        = int'(level);
    tok_len   = 0;
    tok_trace = 1'b0;
    tok_trig  = 1'b0;
    if (lv > 0) begin
      case (win[0])
        8'h00: begin
          for (int i = WIN - 1; i >= 1; i--) begin
            if (i < lv && win[i] != 8'h00) tok_len = (win[i] == 8'h80) ? i + 1 : i;
          end
          if (tok_len == 0 && lv >= int'(WIN)) tok_len = WIN - 1;
        end
        8'h03: begin tok_len = 5; tok_trace = 1'b1; end
        8'h04: begin tok_len = 1; tok_trig = 1'b1; end
        8'h0C: begin
          int n;
          n = 1;
          while (n < 5 && n < lv && win[n][7]) n++;
          tok_len = n + 1;
        end
        default: tok_len = 1;   // Overflow 0x70, First 0x14, unknown bytes
      endcase
      if (tok_len > lv) tok_len = 0;
    end
  end

  assign consume = tok_len[$clog2(WIN+1)-1:0];

  logic       ev_valid;
  raw_event_t ev;

  always_ff @(posedge clk) begin
    if (rst) begin
      ev_valid  <= 1'b0;
      ev        <= '0;
      n_trace   <= '0;
      n_trigger <= '0;
    end else begin
      ev_valid <= 1'b0;
      if (tok_len != 0) begin
        if (tok_trig) n_trigger <= n_trigger + 1'b1;
        if (tok_trace) begin
          ev_valid <= 1'b1;
          ev.ts    <= win_ts[4];
          ev.mux   <= MUX_FTM_DATA;
          ev.value <= {win[4], win[3], win[2], win[1]};
          n_trace  <= n_trace + 1'b1;
        end
      end
    end
  end

  event_formatter u_fmt (
    .clk, .rst, .in_valid(ev_valid), .in_event(ev),
    .out_valid, .out_pair, .ext_saturated
  );

endmodule
