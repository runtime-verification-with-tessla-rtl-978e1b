// ptm_parser: Program Trace Macrocell (PTM v1.1) parser for one core.
//
// The parser turns the byte stream of one core's program trace into TeSSLa
// events: decompressed branch target addresses (mux address 0x00) and the
// Context ID, i.e. the process ID (mux address 0x01). It is a pipeline:
//   byte buffer  - appended with 0..15 bytes per frame (byte_buffer)
//   tokenizer    - finds type and length of the packet at the buffer head and
//                  removes it, one packet per cycle; each packet keeps the
//                  timestamp of the frame its last byte came in
//   address parser and filter
//                - keeps the last address and instruction set (ARM/Thumb);
//                  I-sync packets load a full address; Branch address and
//                  Waypoint update packets carry only the changed low bits,
//                  the rest is taken from the last address. Addresses of
//                  Branch address and Waypoint update packets are forwarded;
//                  the Context ID of I-sync and Context ID packets is
//                  forwarded when it differs from the last one sent
//   formatter    - time extension and TeSSLa encoding (event_formatter)
// All PTM v1.1 packet types are tokenized: A-sync, I-sync, Atom, Branch
// address, Waypoint update, Trigger, Context ID, VMID, Timestamp, Exception
// return, Ignore. A byte that starts no known packet is dropped.
//
// Byte layouts (not given by the design description; taken from the PTM
// architecture as this design reads it, cycle-accurate mode off):
//   A-sync 0x00 x n then 0x80; I-sync 0x08, 4 address bytes (bit 0 of the
//   first = Thumb), 1 info byte, CTXID_BYTES Context ID bytes; Atom 1xxxxxx0;
//   Branch address: header xCAAAAAA1 (6 address bits), up to 4 more bytes
//   with continuation bit 7; a last byte other than the fifth has address in
//   bits 5:0 and an exception flag in bit 6; the fifth byte has the top
//   address bits in 2:0 (ARM) or 3:0 (Thumb), the new ISA in bits 5:4
//   (00 ARM, 01 Thumb) and the exception flag in bit 6. A five-byte address
//   is read in that new ISA, a shorter one in the current ISA. An exception
//   flag adds 1 or 2 exception bytes (continuation bit 7). Address bits
//   start at bit 2 (ARM) or bit 1 (Thumb). Waypoint update 0x72 followed by a Branch
//   address sequence; Trigger 0x0C; Context ID 0x6E + CTXID_BYTES; VMID 0x3C +
//   1; Timestamp 0x42/0x46 + up to 9 bytes with continuation bit 7;
//   Exception return 0x76; Ignore 0x66. Jazelle state is not tracked.
//
// Interface: in_valid/in_chunk/in_ready from the frame parser's FIFO;
// out_valid/out_pair is a FIFO write (no back-pressure), four cycles after
// the packet is complete in the buffer. Statistics count tokenized packets;
// ext_saturated reports that the 4-bit time extension ran out.
module ptm_parser
  import rv_pkg::*;
#(
  parameter int unsigned CTXID_BYTES   = 4,
  parameter bit          FWD_ADDR      = 1'b1,
  parameter bit          FWD_CTXID     = 1'b1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  chunk_t            in_chunk,
  output logic              in_ready,
  output logic              out_valid,
  output logic [PAIR_W-1:0] out_pair,
  output logic [15:0]       n_isync,
  output logic [15:0]       n_branch,
  output logic [15:0]       n_atom,
  output logic [15:0]       n_dropped,
  output logic              ext_saturated
);

  localparam int unsigned WIN = 16;
  localparam int unsigned BUF = 32;

  typedef enum logic [3:0] {
    P_ASYNC, P_ISYNC, P_ATOM, P_BRANCH, P_WAYPOINT, P_TRIGGER, P_CTXID,
    P_VMID, P_TSTAMP, P_EXCRET, P_IGNORE, P_UNKNOWN
  } ptype_e;

  typedef enum logic [1:0] { ISA_ARM = 2'd0, ISA_THUMB = 2'd1 } isa_e;

  logic [WIN-1:0][7:0]      win;
  logic [WIN-1:0][TS_W-1:0] win_ts;
  logic [$clog2(BUF+1)-1:0] level;
  logic [$clog2(WIN+1)-1:0] consume;

  byte_buffer #(.BUF(BUF), .WIN(WIN)) u_buf (
    .clk, .rst, .in_valid, .in_chunk, .in_ready,
    .win, .win_ts, .level, .consume
  );

  // ---------------- tokenizer ----------------
  // Length of a branch-address byte sequence starting at window offset o;
  // 0 if it is not yet complete in the buffer.
  function automatic int branch_len(input logic [WIN-1:0][7:0] w, input int lv,
                                    input int o);
    int  n;
    bit  exc;
    n = 1;
    while (n < 5 && o + n - 1 < lv && w[o+n-1][7]) n++;
    if (o + n > lv) return 0;
    if (n == 5)     exc = w[o+4][6];
    else if (n > 1) exc = w[o+n-1][6];
    else            exc = 1'b0;
    if (!exc) return n;
    if (o + n + 1 > lv) return 0;
    if (!w[o+n][7]) return n + 1;
    if (o + n + 2 > lv) return 0;
    return n + 2;
  endfunction

  ptype_e tok_type;
  int     tok_len;    // 0: incomplete

  always_comb begin
    int lv;
    lv       = int'(level);
    tok_type = P_UNKNOWN;
    tok_len  = 0;
    if (lv > 0) begin
      if (win[0] == 8'h00) begin
        tok_type = P_ASYNC;
        for (int i = WIN - 1; i >= 1; i--) begin
          if (i < lv && win[i] != 8'h00) tok_len = (win[i] == 8'h80) ? i + 1 : i;
        end
        if (tok_len == 0 && lv >= int'(WIN)) tok_len = WIN - 1;
        if (tok_len != 0 && win[tok_len-1] != 8'h80) tok_type = P_UNKNOWN;
      end else if (win[0][0]) begin
        tok_type = P_BRANCH;
        tok_len  = branch_len(win, lv, 0);
      end else if (win[0][7]) begin
        tok_type = P_ATOM;
        tok_len  = 1;
      end else begin
        case (win[0])
          8'h08: begin tok_type = P_ISYNC;   tok_len = 6 + int'(CTXID_BYTES); end
          8'h72: begin
            tok_type = P_WAYPOINT;
            tok_len  = (lv > 1) ? branch_len(win, lv, 1) : 0;
            if (tok_len != 0) tok_len = tok_len + 1;
          end
          8'h0C: begin tok_type = P_TRIGGER; tok_len = 1; end
          8'h6E: begin tok_type = P_CTXID;   tok_len = 1 + int'(CTXID_BYTES); end
          8'h3C: begin tok_type = P_VMID;    tok_len = 2; end
          8'h42, 8'h46: begin
            int n;
            tok_type = P_TSTAMP;
            n = 1;
            while (n < 9 && n < lv && win[n][7]) n++;
            tok_len = n + 1;
          end
          8'h76: begin tok_type = P_EXCRET;  tok_len = 1; end
          8'h66: begin tok_type = P_IGNORE;  tok_len = 1; end
          default: begin tok_type = P_UNKNOWN; tok_len = 1; end
        endcase
      end
      if (tok_len > lv) tok_len = 0;
    end
  end

  assign consume = tok_len[$clog2(WIN+1)-1:0];

  // tokenizer output register
  logic                p_valid;
  ptype_e              p_type;
  logic [WIN-1:0][7:0] p_bytes;
  logic [TS_W-1:0]     p_ts;

  always_ff @(posedge clk) begin
    if (rst) begin
      p_valid   <= 1'b0;
      p_type    <= P_UNKNOWN;
      p_bytes   <= '0;
      p_ts      <= '0;
      n_isync   <= '0;
      n_branch  <= '0;
      n_atom    <= '0;
      n_dropped <= '0;
    end else begin
      p_valid <= (tok_len != 0);
      if (tok_len != 0) begin
        p_type  <= tok_type;
        p_bytes <= win;
        p_ts    <= win_ts[tok_len-1];
        case (tok_type)
          P_ISYNC:             n_isync   <= n_isync + 1'b1;
          P_BRANCH:            n_branch  <= n_branch + 1'b1;
          P_ATOM:              n_atom    <= n_atom + 1'b1;
          P_UNKNOWN:           n_dropped <= n_dropped + 1'b1;
          default: ;
        endcase
      end
    end
  end

  // ---------------- address parser and filter ----------------
  logic [31:0] last_addr;
  isa_e        isa;
  logic [31:0] last_ctxid;
  logic        ctxid_sent;

  // Decompress a branch-address sequence at offset o of the packet bytes.
  function automatic void decode_branch(input logic [WIN-1:0][7:0] w, input int o,
                                        input logic [31:0] last, input isa_e cur,
                                        output logic [31:0] addr, output isa_e nisa);
    logic [31:0] bits, mask;
    int          sh, pos, n;
    bit          cont;
    // a full (5-byte) address carries the instruction set it is read in;
    // shorter ones are read in the current instruction set
    nisa = cur;
    if (w[o][7] && w[o+1][7] && w[o+2][7] && w[o+3][7]) begin
      if (w[o+4][5:4] == 2'b00)      nisa = ISA_ARM;
      else if (w[o+4][5:4] == 2'b01) nisa = ISA_THUMB;
    end
    sh   = (nisa == ISA_ARM) ? 2 : 1;
    bits = '0;
    mask = '0;
    for (int k = 0; k < 6; k++) if (sh + k < 32) begin
      bits[sh+k] = w[o][1+k];
      mask[sh+k] = 1'b1;
    end
    pos  = sh + 6;
    cont = w[o][7];
    n    = 1;
    while (cont && n < 5) begin
      logic [7:0] b;
      b = w[o+n];
      if (n == 4) begin
        for (int k = 0; k < 7; k++) if (pos + k < 32) begin
          bits[pos+k] = b[k];
          mask[pos+k] = 1'b1;
        end
        cont = 1'b0;
      end else begin
        int nb;
        nb = b[7] ? 7 : 6;
        for (int k = 0; k < 7; k++) if (k < nb && pos + k < 32) begin
          bits[pos+k] = b[k];
          mask[pos+k] = 1'b1;
        end
        pos  = pos + 7;
        cont = b[7];
      end
      n++;
    end
    // In the new ISA the address is aligned accordingly
    addr = (last & ~mask) | (bits & mask);
    if (nisa == ISA_ARM) addr[1:0] = 2'b00;
    else                 addr[0]   = 1'b0;
  endfunction

  logic       ev_valid;
  raw_event_t ev;

  always_ff @(posedge clk) begin
    if (rst) begin
      last_addr  <= '0;
      isa        <= ISA_ARM;
      last_ctxid <= '0;
      ctxid_sent <= 1'b0;
      ev_valid   <= 1'b0;
      ev         <= '0;
    end else begin
      ev_valid <= 1'b0;
      if (p_valid) begin
        ev.ts <= p_ts;
        case (p_type)
          P_ISYNC: begin
            logic [31:0] a, c;
            a = {p_bytes[4], p_bytes[3], p_bytes[2], p_bytes[1][7:1], 1'b0};
            c = '0;
            for (int k = 0; k < int'(CTXID_BYTES); k++) c[8*k +: 8] = p_bytes[6+k];
            last_addr <= p_bytes[1][0] ? a : {a[31:2], 2'b00};
            isa       <= p_bytes[1][0] ? ISA_THUMB : ISA_ARM;
            if (FWD_CTXID && CTXID_BYTES != 0 && (!ctxid_sent || c != last_ctxid)) begin
              ev_valid   <= 1'b1;
              ev.mux     <= MUX_PTM_CTXID;
              ev.value   <= c;
              last_ctxid <= c;
              ctxid_sent <= 1'b1;
            end
          end
          P_CTXID: begin
            logic [31:0] c;
            c = '0;
            for (int k = 0; k < int'(CTXID_BYTES); k++) c[8*k +: 8] = p_bytes[1+k];
            if (FWD_CTXID && (!ctxid_sent || c != last_ctxid)) begin
              ev_valid   <= 1'b1;
              ev.mux     <= MUX_PTM_CTXID;
              ev.value   <= c;
              last_ctxid <= c;
              ctxid_sent <= 1'b1;
            end
          end
          P_BRANCH, P_WAYPOINT: begin
            logic [31:0] a;
            isa_e        ni;
            decode_branch(p_bytes, (p_type == P_BRANCH) ? 0 : 1, last_addr, isa, a, ni);
            last_addr <= a;
            isa       <= ni;
            if (FWD_ADDR) begin
              ev_valid <= 1'b1;
              ev.mux   <= MUX_PTM_ADDR;
              ev.value <= a;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // ---------------- formatter ----------------
  event_formatter u_fmt (
    .clk, .rst, .in_valid(ev_valid), .in_event(ev),
    .out_valid, .out_pair, .ext_saturated
  );

endmodule
