// tb_timestamp_driver: self-checking test of timestamp_driver (4 inputs,
// FINAL_WAIT shortened to 20 cycles). Checks: no write when no parser
// writes; one writer -> broom wagons (time - 16384, mux 0xFF, value
// 0x00C0FFEE) on the other three outputs; a small time gives broom time 1;
// the priority order picks the lowest-numbered writer; all writers pass
// unchanged; after 20 idle cycles exactly one final push (last time + 16)
// is written to all outputs; the counters agree.
module tb_timestamp_driver;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0]         iw, ow;
  logic [3:0][123:0]  id, od;
  logic [31:0]        nb, nf;
  timestamp_driver #(.N(4), .FINAL_WAIT(20)) dut (.clk, .rst, .in_wr_en(iw), .in_din(id),
    .out_wr_en(ow), .out_dout(od), .n_broom(nb), .n_final(nf));

  function automatic logic [123:0] ev(input logic [52:0] t, input logic [31:0] v);
    return {1'b0, 8'h00, 21'd0, v, 1'b1, 8'h00, t};
  endfunction
  function automatic logic [123:0] broom(input logic [52:0] t);
    return {1'b0, 8'hFF, 21'd0, 32'h00C0FFEE, 1'b1, 8'h00, t};
  endfunction

  task automatic check_out(input logic [3:0] we, input logic [3:0][123:0] d, input string what);
    checks++;
    if (ow != we) begin failures++; $display("FAIL %s: wr_en %b exp %b", what, ow, we); end
    for (int i = 0; i < 4; i++) if (we[i]) begin
      checks++;
      if (od[i] != d[i]) begin failures++; $display("FAIL %s: out %0d %h exp %h", what, i, od[i], d[i]); end
    end
  endtask

  int n_final_seen = 0;
  initial begin
    logic [3:0][123:0] e;
    iw = 0; id = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check_out(4'b0000, e, "idle");
    // one writer
    iw = 4'b0010; id[1] = ev(53'd20000, 32'h1234);
    #1;
    e[0] = broom(53'd3616); e[1] = id[1]; e[2] = broom(53'd3616); e[3] = broom(53'd3616);
    check_out(4'b1111, e, "one writer");
    @(negedge clk);
    // two writers, small time, priority to input 0
    iw = 4'b0101; id[0] = ev(53'd5000, 32'h1); id[2] = ev(53'd90000, 32'h2);
    #1;
    e[0] = id[0]; e[1] = broom(53'd1); e[2] = id[2]; e[3] = broom(53'd1);
    check_out(4'b1111, e, "two writers");
    @(negedge clk);
    // writers 2 and 3: priority to input 2
    iw = 4'b1100; id[2] = ev(53'd100000, 32'h3); id[3] = ev(53'd99990, 32'h4);
    #1;
    e[0] = broom(53'd83616); e[1] = broom(53'd83616); e[2] = id[2]; e[3] = id[3];
    check_out(4'b1111, e, "priority");
    @(negedge clk);
    // all writers
    iw = 4'b1111;
    for (int i = 0; i < 4; i++) id[i] = ev(53'(200000 + i), 32'(i));
    #1;
    check_out(4'b1111, id, "all writers");
    @(negedge clk);
    iw = 0;
    checks++;
    if (nb != 3) begin failures++; $display("FAIL broom count %0d", nb); end
    // wait for the final push: exactly one cycle, time 200000 + 16
    for (int c = 0; c < 40; c++) begin
      #1;
      if (ow != 0) begin
        n_final_seen++;
        for (int i = 0; i < 4; i++) e[i] = broom(53'd200016);
        check_out(4'b1111, e, "final push");
        checks++;
        if (c < 19 || c > 22) begin failures++; $display("FAIL final push after %0d cycles", c); end
      end
      @(negedge clk);
    end
    checks++;
    if (n_final_seen != 1 || nf != 1) begin failures++; $display("FAIL final pushes %0d/%0d", n_final_seen, nf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
