// tb_frame_parser: self-checking test of frame_parser with hand-built
// CoreSight formatter frames. Frame 1 mixes all four sources, an immediate
// and a delayed ID change, data bytes in even positions (low bit from the
// auxiliary byte) and an unknown ID; frame 2 continues with the ID left
// over from frame 1 (unknown, bytes dropped) and then the ITM. Expected
// bytes per source are written out by hand. Also checks that a frame is
// held while out_ready is low.
module tb_frame_parser;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  logic         iv, ir, ordy;
  logic [127:0] ifr;
  logic [47:0]  its;
  logic [3:0]   ov;
  chunk_t [3:0] oc;
  frame_parser dut (.clk, .rst, .in_valid(iv), .in_frame(ifr), .in_ts(its), .in_ready(ir),
                    .out_valid(ov), .out_chunk(oc), .out_ready(ordy));

  function automatic logic [127:0] pack(input logic [7:0] b [16]);
    logic [127:0] r;
    for (int i = 0; i < 16; i++) r[i*8 +: 8] = b[i];
    return r;
  endfunction

  task automatic expect_chunk(input int s, input logic [7:0] e[$], input logic [47:0] ts);
    checks++;
    if (e.size() == 0) begin
      if (ov[s]) begin failures++; $display("FAIL stream %0d unexpected chunk", s); end
      return;
    end
    if (!ov[s] || oc[s].count != 4'(e.size()) || oc[s].ts != ts) begin
      failures++; $display("FAIL stream %0d valid %0d count %0d", s, ov[s], oc[s].count);
      return;
    end
    for (int i = 0; i < e.size(); i++) begin
      checks++;
      if (oc[s].bytes[i] != e[i]) begin failures++; $display("FAIL stream %0d byte %0d %h exp %h", s, i, oc[s].bytes[i], e[i]); end
    end
  endtask

  logic [7:0] f1 [16] = '{8'h21, 8'hA1, 8'h54, 8'h11, 8'hDF, 8'h22, 8'h32, 8'h44,
                          8'hE1, 8'h66, 8'h23, 8'h77, 8'h88, 8'h99, 8'h03, 8'h0E};
  logic [7:0] f2 [16] = '{8'h12, 8'h55, 8'hDF, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05,
                          8'h06, 8'h07, 8'h08, 8'h09, 8'h0A, 8'h0B, 8'h0C, 8'h01};

  initial begin
    iv = 0; ifr = '0; its = '0; ordy = 1;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    iv = 1; ifr = pack(f1); its = 48'd1000;
    @(negedge clk);
    iv = 0;
    expect_chunk(0, '{8'hA1, 8'h55, 8'h11, 8'h22}, 48'd1000);
    expect_chunk(1, '{8'h77, 8'h88, 8'h99}, 48'd1000);
    expect_chunk(2, '{8'h66}, 48'd1000);
    expect_chunk(3, '{8'h33, 8'h44}, 48'd1000);
    // frame 2 with back-pressure: output must not change while out_ready low
    ordy = 0; iv = 1; ifr = pack(f2); its = 48'd1004;
    @(negedge clk);
    checks++;
    if (ir) begin failures++; $display("FAIL in_ready while out_ready low"); end
    checks++;
    if (oc[0].count != 4 || !ov[0]) begin failures++; $display("FAIL output changed under back-pressure"); end
    ordy = 1;
    @(negedge clk);
    iv = 0;
    expect_chunk(0, '{}, 48'd1004);
    expect_chunk(1, '{}, 48'd1004);
    expect_chunk(2, '{}, 48'd1004);
    expect_chunk(3, '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08, 8'h09,
                      8'h0A, 8'h0B, 8'h0C}, 48'd1004);
    @(negedge clk);
    checks++;
    if (ov != 0) begin failures++; $display("FAIL output without input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
