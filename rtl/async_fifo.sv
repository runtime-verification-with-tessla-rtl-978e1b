// async_fifo: dual-clock FIFO with first-word-fall-through read and an
// optional 2:1 write:read width ratio.
//
// The pipeline crosses three clock domains (trace port, parsers, TeSSLa
// network), each through one of these FIFOs. With RATIO = 2 a word of
// WR_W bits is written in one write-clock cycle and read as two words of
// WR_W/2 bits, least significant half first; this lets a parser hand a
// (timestamp, data) pair over in one cycle while the TeSSLa input adapter
// reads timestamp and data in two cycles, and lets the 64-bit TeSSLa output
// be read as 32-bit words.
//
// Interface: wr_en/wr_data/full on wr_clk; rd_en/rd_data/empty on rd_clk.
// First-word-fall-through: rd_data shows the oldest word whenever empty is
// low, and rd_en acknowledges (pops) it. Writes while full and reads while
// empty are ignored; wr_overflow records a dropped write.
// Pointers cross domains in Gray code through two-flop synchronisers, so
// full and empty are conservative by up to three cycles of the other clock.
// The FIFO behaviour follows the design description; depth, Gray-code
// crossing and the half order are choices of this implementation.
module async_fifo #(
  parameter int unsigned WR_W  = 124,
  parameter int unsigned RATIO = 2,      // 1 or 2
  parameter int unsigned DEPTH = 512,    // write words, power of two
  localparam int unsigned RD_W = WR_W / RATIO,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic            wr_clk,
  input  logic            wr_rst,
  input  logic            wr_en,
  input  logic [WR_W-1:0] wr_data,
  output logic            full,
  output logic            wr_overflow,

  input  logic            rd_clk,
  input  logic            rd_rst,
  input  logic            rd_en,
  output logic [RD_W-1:0] rd_data,
  output logic            empty
);

  logic [WR_W-1:0] mem [DEPTH];

  logic [AW:0] wptr_bin, wptr_gray, rptr_bin, rptr_gray;
  logic [AW:0] wq1, wq2;   // write pointer (gray) in read domain
  logic [AW:0] rq1, rq2;   // read pointer (gray) in write domain
  logic        half;       // which half of the head word is shown

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] rptr_w;
  assign rptr_w = gray2bin(rq2);
  assign full   = (wptr_bin[AW] != rptr_w[AW]) && (wptr_bin[AW-1:0] == rptr_w[AW-1:0]);

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wptr_bin    <= '0;
      wptr_gray   <= '0;
      rq1         <= '0;
      rq2         <= '0;
      wr_overflow <= 1'b0;
    end else begin
      rq1 <= rptr_gray;
      rq2 <= rq1;
      if (wr_en && !full) begin
        wptr_bin  <= wptr_bin + 1'b1;
        wptr_gray <= bin2gray(wptr_bin + 1'b1);
      end
      if (wr_en && full) wr_overflow <= 1'b1;
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wptr_bin[AW-1:0]] <= wr_data;
  end

  // ---------------- read side ----------------
  logic [AW:0] wptr_r;
  logic        last_part;
  assign wptr_r    = gray2bin(wq2);
  assign empty     = (wptr_r == rptr_bin);
  assign last_part = (RATIO == 1) || half;

  logic [WR_W-1:0] head;
  assign head = mem[rptr_bin[AW-1:0]];

  always_comb begin
    if (RATIO == 1) rd_data = head[RD_W-1:0];
    else            rd_data = half ? head[WR_W-1 -: RD_W] : head[RD_W-1:0];
  end

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rptr_bin  <= '0;
      rptr_gray <= '0;
      wq1       <= '0;
      wq2       <= '0;
      half      <= 1'b0;
    end else begin
      wq1 <= wptr_gray;
      wq2 <= wq1;
      if (rd_en && !empty) begin
        if (last_part) begin
          rptr_bin  <= rptr_bin + 1'b1;
          rptr_gray <= bin2gray(rptr_bin + 1'b1);
          half      <= 1'b0;
        end else begin
          half <= 1'b1;
        end
      end
    end
  end

endmodule
