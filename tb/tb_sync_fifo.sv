// tb_sync_fifo: self-checking test of sync_fifo with random valid/ready on
// both sides; every output word is compared with a queue model, and the
// FIFO must refuse input exactly when it holds DEPTH words.
module tb_sync_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        iv, ir, ov, ordy;
  logic [15:0] id, od;
  sync_fifo #(.W(16), .DEPTH(4)) dut (.clk, .rst, .in_valid(iv), .in_data(id), .in_ready(ir),
    .out_valid(ov), .out_data(od), .out_ready(ordy));

  logic [15:0] q[$];
  int n_in = 0, n_out = 0;

  always @(posedge clk) if (!rst) begin
    checks++;
    if (ir != (q.size() < 4)) begin failures++; $display("FAIL in_ready %0d size %0d", ir, q.size()); end
    if (ov && ordy) begin
      checks++;
      if (q.size() == 0 || od != q[0]) begin failures++; $display("FAIL data %h", od); end
      if (q.size() != 0) void'(q.pop_front());
      n_out++;
    end
    if (iv && ir) begin q.push_back(id); n_in++; end
  end

  always @(negedge clk) begin
    iv   = (n_in < 500) && $urandom_range(0, 1);
    id   = 16'($urandom);
    ordy = (n_in < 250) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (n_out == 500);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
