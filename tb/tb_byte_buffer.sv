// tb_byte_buffer: self-checking test of byte_buffer. Random chunks (0..15
// bytes, each with its own timestamp) are appended while random byte counts
// are consumed; the window, per-byte timestamps and level are compared with
// a queue model every cycle, and in_ready must be high exactly when 15
// bytes are free.
module tb_byte_buffer;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  logic        iv, ir;
  chunk_t      ic;
  logic [15:0][7:0]  win;
  logic [15:0][47:0] wts;
  logic [5:0]  level;
  logic [4:0]  consume;
  byte_buffer #(.BUF(32), .WIN(16)) dut (.clk, .rst, .in_valid(iv), .in_chunk(ic), .in_ready(ir),
    .win, .win_ts(wts), .level, .consume);

  logic [7:0]  qb[$];
  logic [47:0] qt[$];
  int n_chunks = 0;

  always @(negedge clk) if (!rst) begin
    // compare with model
    checks++;
    if (int'(level) != qb.size()) begin failures++; $display("FAIL level %0d exp %0d", level, qb.size()); end
    checks++;
    if (ir != ((32 - qb.size()) >= 15)) begin failures++; $display("FAIL in_ready"); end
    for (int i = 0; i < 16 && i < qb.size(); i++) begin
      checks++;
      if (win[i] != qb[i] || wts[i] != qt[i]) begin failures++; $display("FAIL win[%0d]", i); end
    end
    // new stimulus
    consume = 5'($urandom_range(0, (qb.size() < 16) ? qb.size() : 16));
    iv = $urandom_range(0, 1);
    ic = '0;
    ic.count = 4'($urandom_range(0, 15));
    ic.ts = 48'(n_chunks * 4 + 7);
    for (int k = 0; k < 15; k++) ic.bytes[k] = 8'($urandom);
  end

  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < int'(consume); i++) begin void'(qb.pop_front()); void'(qt.pop_front()); end
    if (iv && ir) begin
      for (int k = 0; k < int'(ic.count); k++) begin qb.push_back(ic.bytes[k]); qt.push_back(ic.ts); end
      n_chunks++;
    end
  end

  initial begin
    iv = 0; ic = '0; consume = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    wait (n_chunks == 400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
