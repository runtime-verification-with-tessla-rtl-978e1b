// sync_fifo: single-clock first-word-fall-through FIFO with a valid/ready
// interface on both sides.
//
// Used between the frame parser and each packet parser, one per CoreSight
// source, so that a slow parser only stalls the frame parser when its own
// FIFO fills. in_ready is low when full; out_valid is high while a word is
// held, and out_ready pops it. Depth is this implementation's choice; the
// design description only names the FIFO.
module sync_fifo #(
  parameter int unsigned W     = 172,
  parameter int unsigned DEPTH = 8,      // power of two
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         in_ready,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  input  logic         out_ready
);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign in_ready  = (wp - rp) != (AW+1)'(DEPTH);
  assign out_valid = (wp != rp);
  assign out_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (in_valid && in_ready)   wp <= wp + 1'b1;
      if (out_valid && out_ready) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wp[AW-1:0]] <= in_data;
  end

endmodule
