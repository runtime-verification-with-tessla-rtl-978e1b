// tb_output_filter_adapter: self-checking test of output_filter_adapter.
// A word stream of timestamps with and without following data words is
// sent with random input gaps and random output back-pressure. Expected
// output: every data word, each preceded by its timestamp word exactly once;
// timestamp words without data are dropped and counted.
module tb_output_filter_adapter;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;

  logic        iv, ir, ov, ordy;
  logic [61:0] iw, ow;
  logic [31:0] nd;
  output_filter_adapter dut (.clk, .rst, .in_valid(iv), .in_word(iw), .in_ready(ir),
    .out_valid(ov), .out_word(ow), .out_ready(ordy), .n_dropped(nd));

  logic [61:0] src[$], exp_q[$];
  int n_dropped_e = 0, n_out = 0;

  always @(posedge clk) if (!rst) begin
    if (iv && ir) void'(src.pop_front());
    if (ov && ordy) begin
      checks++;
      if (exp_q.size() == 0 || ow != exp_q[0]) begin failures++; $display("FAIL word %h", ow); end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      n_out++;
    end
  end
  always @(negedge clk) begin
    iv   = !rst && src.size() != 0 && $urandom_range(0, 3) != 0;
    iw   = (src.size() != 0) ? src[0] : '0;
    ordy = $urandom_range(0, 2) != 0;
  end

  initial begin
    for (int t = 1; t <= 200; t++) begin
      int nd_t;
      nd_t = (t % 3 == 0) ? (t % 4) : 0;
      src.push_back(ts_word(53'(t)));
      if (nd_t != 0) exp_q.push_back(ts_word(53'(t)));
      else if (t != 200) n_dropped_e++;
      for (int k = 0; k < nd_t; k++) begin
        src.push_back(data_word(8'(k), 53'(t * 10 + k)));
        exp_q.push_back(data_word(8'(k), 53'(t * 10 + k)));
      end
    end
    repeat (3) @(posedge clk);
    rst = 0;
    wait (src.size() == 0);
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words missing", exp_q.size()); end
    checks++;
    if (nd != 32'(n_dropped_e)) begin failures++; $display("FAIL dropped %0d exp %0d", nd, n_dropped_e); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
