// tb_frame_sync: self-checking test of frame_sync. Sends words with random
// gaps, sync words between frames and one inside a frame (which must drop
// the partial frame), and random output back-pressure. Every frame must
// equal the four words sent, in byte order, and carry the cycle count
// (cycles since reset) of the cycle its last word was accepted.
module tb_frame_sync;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  logic         iv, ir, ov, ordy;
  logic [31:0]  id, nsync;
  logic [127:0] of;
  logic [47:0]  ots;
  frame_sync dut (.clk, .rst, .in_valid(iv), .in_data(id), .in_ready(ir), .out_valid(ov),
                  .out_frame(of), .out_ts(ots), .out_ready(ordy), .sync_count(nsync));

  logic [47:0]  cyc;
  logic [31:0]  words[$];      // stimulus
  logic [127:0] exp_frame[$];
  logic [47:0]  exp_ts[$];
  int           wpos = 0, n_frames = 0, n_sent_sync = 0;
  logic [95:0]  part;

  always @(posedge clk) begin
    if (rst) cyc <= 0; else cyc <= cyc + 1;
  end

  // reference: track accepted words
  always @(posedge clk) if (!rst) begin
    if (ov && ordy) begin
      checks += 2;
      if (exp_frame.size() == 0 || of != exp_frame[0]) begin failures++; $display("FAIL frame %h", of); end
      if (exp_ts.size() == 0 || ots != exp_ts[0]) begin failures++; $display("FAIL ts %0d exp %0d", ots, exp_ts[0]); end
      if (exp_frame.size() != 0) begin void'(exp_frame.pop_front()); void'(exp_ts.pop_front()); end
      n_frames++;
    end
    if (iv && ir) begin
      void'(words.pop_front());
      if (id == 32'hFFFF_FFFF) wpos = 0;
      else if (wpos == 3) begin
        exp_frame.push_back({id, part});
        exp_ts.push_back(cyc);
        wpos = 0;
      end else begin
        part[wpos*32 +: 32] = id;
        wpos++;
      end
    end
  end

  always @(negedge clk) begin
    iv   = (words.size() != 0) && $urandom_range(0, 2) != 0;
    id   = (words.size() != 0) ? words[0] : 0;
    ordy = $urandom_range(0, 3) != 0;
  end

  initial begin
    for (int f = 0; f < 40; f++) begin
      if (f % 5 == 0) begin words.push_back(32'hFFFF_FFFF); n_sent_sync++; end
      if (f == 17) begin  // partial frame interrupted by a sync word
        words.push_back(32'h1111_1111); words.push_back(32'h2222_2222);
        words.push_back(32'hFFFF_FFFF); n_sent_sync++;
      end
      for (int w = 0; w < 4; w++) words.push_back({8'(f), 8'(w), 16'($urandom)});
    end
    repeat (3) @(posedge clk);
    rst = 0;
    wait (n_frames == 40);
    repeat (3) @(posedge clk);
    checks++;
    if (nsync != n_sent_sync) begin failures++; $display("FAIL sync count %0d", nsync); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
