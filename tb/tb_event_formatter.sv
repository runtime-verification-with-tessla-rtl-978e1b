// tb_event_formatter: self-checking test of event_formatter. Events with
// repeated frame timestamps must get time extensions 0,1,2,...; a new
// timestamp restarts at 0; the pair encoding is checked field by field
// against Table-style constants written out here; the output comes one
// cycle after the input.
module tb_event_formatter;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        iv, ov, sat;
  raw_event_t  ie;
  logic [123:0] op;
  event_formatter dut (.clk, .rst, .in_valid(iv), .in_event(ie), .out_valid(ov), .out_pair(op),
                       .ext_saturated(sat));

  task automatic send(input logic [47:0] ts, input logic [7:0] mux, input logic [31:0] v,
                      input logic [3:0] exp_ext);
    @(negedge clk);
    iv = 1; ie.ts = ts; ie.mux = mux; ie.value = v;
    @(negedge clk);
    iv = 0;
    checks++;
    if (!ov) begin failures++; $display("FAIL no output"); end
    checks++;
    // timestamp word: bit 61 set, time = {0, ts, ext}
    if (op[61:0] != {1'b1, 8'h00, 1'b0, ts, exp_ext}) begin
      failures++; $display("FAIL ts word %h exp ts %h ext %0d", op[61:0], ts, exp_ext);
    end
    checks++;
    if (op[123:62] != {1'b0, mux, 21'd0, v}) begin
      failures++; $display("FAIL data word %h", op[123:62]);
    end
  endtask

  initial begin
    iv = 0; ie = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    send(48'd100, 8'h00, 32'h0001_0514, 4'd0);
    send(48'd100, 8'h01, 32'h00AB_CD01, 4'd1);
    send(48'd100, 8'h00, 32'h0001_0520, 4'd2);
    send(48'd104, 8'h00, 32'hDEAD_BEEF, 4'd0);
    send(48'd104, 8'h1F, 32'h0000_0042, 4'd1);
    send(48'hFFFF_FFFF_FFF0, 8'h05, 32'h1234_5678, 4'd0);
    checks++;
    if (sat) begin failures++; $display("FAIL saturation flagged"); end
    @(negedge clk);
    checks++;
    if (ov) begin failures++; $display("FAIL spurious output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
