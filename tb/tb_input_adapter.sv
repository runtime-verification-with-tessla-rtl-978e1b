// tb_input_adapter: self-checking test of input_adapter, fed from a
// first-word-fall-through FIFO model. A sequence of (timestamp, data) pairs
// mixes real events, broom wagons (mux 0xFF) and broom wagons whose time is
// not above an earlier one. Expected items: real events with their data,
// broom wagons as time steps only, stale times removed. Also checks the
// rate: with the FIFO always full and the output always ready, one item
// every two cycles.
module tb_input_adapter;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;

  logic [61:0] dout;
  logic        empty, rd_en, ov, oe, ordy;
  logic [52:0] ot, oval;
  logic [7:0]  om;
  logic [31:0] nfilt, nproto;
  input_adapter dut (.clk, .rst, .fifo_dout(dout), .fifo_empty(empty), .fifo_rd_en(rd_en),
    .out_valid(ov), .out_time(ot), .out_is_event(oe), .out_mux(om), .out_value(oval),
    .out_ready(ordy), .n_filtered(nfilt), .n_protocol(nproto));

  logic [61:0] fifo[$];
  typedef struct { logic [52:0] t; bit e; logic [7:0] m; logic [52:0] v; } item_t;
  item_t exp_q[$];

  assign empty = (fifo.size() == 0);
  assign dout  = empty ? '0 : fifo[0];
  always @(posedge clk) if (!rst && rd_en && !empty) void'(fifo.pop_front());

  task automatic push(input logic [52:0] t, input logic [7:0] m, input logic [52:0] v,
                      input bit expected);
    item_t it;
    fifo.push_back({1'b1, 8'h00, t});
    fifo.push_back({1'b0, m, v});
    if (expected) begin
      it.t = t; it.e = (m != 8'hFF); it.m = m; it.v = v;
      exp_q.push_back(it);
    end
  endtask

  int n_out = 0, first_cyc = -1, last_cyc = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && ov && ordy) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL extra item"); end
      else begin
        item_t x;
        x = exp_q.pop_front();
        if (ot != x.t || oe != x.e || (x.e && (om != x.m || oval != x.v))) begin
          failures++; $display("FAIL item %0d: t %0d e %0d m %h v %h", n_out, ot, oe, om, oval);
        end
      end
      if (first_cyc < 0) first_cyc = cyc;
      last_cyc = cyc;
      n_out++;
    end
  end

  initial begin
    ordy = 1;
    push(53'd100, 8'h00, 53'h10514, 1);
    push(53'd50,  8'hFF, 53'hC0FFEE, 0);     // stale broom wagon
    push(53'd100, 8'hFF, 53'hC0FFEE, 0);     // equal time: stale too
    push(53'd120, 8'hFF, 53'hC0FFEE, 1);     // broom wagon: time step
    push(53'd121, 8'h01, 53'hABCD01, 1);
    push(53'd121, 8'h00, 53'h1, 0);          // equal time dropped
    for (int k = 0; k < 40; k++) push(53'(200 + 16 * k), 8'(k % 3), 53'(k), 1);
    repeat (3) @(posedge clk);
    rst = 0;
    wait (fifo.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != 43) begin failures++; $display("FAIL %0d items", n_out); end
    checks++;
    if (nfilt != 3) begin failures++; $display("FAIL filtered %0d", nfilt); end
    // 43 items, back to back at one item per two cycles
    checks++;
    if (last_cyc - first_cyc != 2 * (43 - 1) + 2 * 3) begin
      failures++; $display("FAIL rate: %0d cycles for 43 items", last_cyc - first_cyc);
    end
    // back-pressure: items wait while out_ready is low
    push(53'd5000, 8'h07, 53'h77, 1);
    push(53'd5001, 8'h07, 53'h78, 1);
    ordy = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (fifo.size() != 1) begin failures++; $display("FAIL back-pressure: fifo %0d", fifo.size()); end
    ordy = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (n_out != 45 || nproto != 0) begin failures++; $display("FAIL after back-pressure %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
