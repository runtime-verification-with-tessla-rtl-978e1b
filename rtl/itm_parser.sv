// itm_parser: Instrumentation Trace Macrocell (ITM) parser.
//
// Software writes instrumentation values (for example the address returned
// by malloc, or a thread/lock word) to one of 32 ITM stimulus ports; the
// ITM emits them as SWIT packets. This parser tokenizes the ITM byte stream
// and turns each software SWIT packet into a TeSSLa event whose mux address
// is the stimulus port number (0x00..0x1F) and whose value is the 1, 2 or
// 4-byte payload, zero-extended. Same pipeline as the PTM parser: byte
// buffer, tokenizer (one packet per cycle), decode, formatter with time
// extension.
//
// Packet types tokenized: Synchronization (0x00 x n then 0x80, as PTM
// A-sync), Overflow (0x70), SWIT (header bits 1:0 = payload size code
// 01/10/11 for 1/2/4 bytes, bit 2 = 0 software source, bits 7:3 = port),
// hardware-source packets (bit 2 = 1, dropped), Timestamp (local: low
// nibble 0000; global/extension: bits 2:0 = 100; continuation bit 7 adds
// up to 4 bytes), Reserved (one byte, dropped). The packet types follow the
// design description; their byte layouts are taken from the ARM ITM
// architecture as this design reads it.
//
// Interface: in_valid/in_chunk/in_ready from the frame parser's FIFO;
// out_valid/out_pair is a FIFO write (no back-pressure).
module itm_parser
  import rv_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  chunk_t            in_chunk,
  output logic              in_ready,
  output logic              out_valid,
  output logic [PAIR_W-1:0] out_pair,
  output logic [15:0]       n_swit,
  output logic [15:0]       n_overflow,
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

  // ---------------- tokenizer ----------------
  int  tok_len;     // 0: incomplete
  bit  tok_swit;
  bit  tok_ovf;

  always_comb begin
    int lv, n;
    lv       = int'(level);
    n        = 0;
    tok_len  = 0;
    tok_swit = 1'b0;
    tok_ovf  = 1'b0;
    if (lv > 0) begin
      if (win[0] == 8'h00) begin
        for (int i = WIN - 1; i >= 1; i--) begin
          if (i < lv && win[i] != 8'h00) tok_len = (win[i] == 8'h80) ? i + 1 : i;
        end
        if (tok_len == 0 && lv >= int'(WIN)) tok_len = WIN - 1;
      end else if (win[0] == 8'h70) begin
        tok_len = 1;
        tok_ovf = 1'b1;
      end else if (win[0][1:0] != 2'b00) begin
        tok_len  = 1 + ((win[0][1:0] == 2'b11) ? 4 : int'(win[0][1:0]));
        tok_swit = !win[0][2];
      end else if (win[0][3:0] == 4'b0000 || win[0][2:0] == 3'b100) begin
        if (win[0][7]) begin
          n = 1;
          while (n < 4 && n < lv && win[n][7]) n++;
        end
        tok_len = n + 1;
      end else begin
        tok_len = 1;
      end
      if (tok_len > lv) tok_len = 0;
    end
  end

  assign consume = tok_len[$clog2(WIN+1)-1:0];

  // ---------------- decode (SWIT to event) ----------------
  logic       ev_valid;
  raw_event_t ev;

  always_ff @(posedge clk) begin
    if (rst) begin
      ev_valid   <= 1'b0;
      ev         <= '0;
      n_swit     <= '0;
      n_overflow <= '0;
    end else begin
      ev_valid <= 1'b0;
      if (tok_len != 0) begin
        if (tok_ovf) n_overflow <= n_overflow + 1'b1;
        if (tok_swit) begin
          logic [31:0] v;
          v = '0;
          for (int k = 0; k < 4; k++) if (k + 1 < tok_len) v[8*k +: 8] = win[1+k];
          ev_valid <= 1'b1;
          ev.ts    <= win_ts[tok_len-1];
          ev.mux   <= {3'b000, win[0][7:3]};
          ev.value <= v;
          n_swit   <= n_swit + 1'b1;
        end
      end
    end
  end

  event_formatter u_fmt (
    .clk, .rst, .in_valid(ev_valid), .in_event(ev),
    .out_valid, .out_pair, .ext_saturated
  );

endmodule
