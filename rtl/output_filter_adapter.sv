// output_filter_adapter: drops output timestamps that carry no data.
//
// The specification's output adapter emits a timestamp word for every time
// step it processes, followed by zero or more data words for that time.
// This small state machine holds back each timestamp word and forwards it
// only when a data word follows, then the data words themselves. A
// timestamp word followed directly by another timestamp word is dropped.
// This cuts the output bandwidth to what carries information.
//
// Interface: 62-bit words with valid/ready in and out (Table of encodings in
// rv_pkg). A held timestamp costs one extra cycle when its first data word
// arrives (timestamp out, then data). n_dropped counts dropped timestamps.
// The behaviour follows the design description; the one-word hold register
// is this design's.
module output_filter_adapter
  import rv_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [WORD_W-1:0] in_word,
  output logic              in_ready,
  output logic              out_valid,
  output logic [WORD_W-1:0] out_word,
  input  logic              out_ready,
  output logic [31:0]       n_dropped
);

  logic              pend_valid;
  logic [WORD_W-1:0] pend_word;

  always_comb begin
    out_valid = 1'b0;
    out_word  = in_word;
    in_ready  = 1'b0;
    if (in_valid) begin
      if (is_ts_word(in_word)) begin
        in_ready = 1'b1;                 // replaces any held timestamp
      end else if (pend_valid) begin
        out_valid = 1'b1;                // held timestamp goes first
        out_word  = pend_word;
      end else begin
        out_valid = 1'b1;
        in_ready  = out_ready;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_valid <= 1'b0;
      pend_word  <= '0;
      n_dropped  <= '0;
    end else begin
      if (in_valid && is_ts_word(in_word)) begin
        if (pend_valid) n_dropped <= n_dropped + 1'b1;
        pend_valid <= 1'b1;
        pend_word  <= in_word;
      end else if (in_valid && pend_valid && out_ready) begin
        pend_valid <= 1'b0;
      end
    end
  end

endmodule
