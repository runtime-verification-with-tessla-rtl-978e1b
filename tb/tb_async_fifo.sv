// tb_async_fifo: self-checking test of async_fifo.
// Two instances with unrelated clocks (7 ns write, 19 ns read and the
// reverse): a 124-bit to 62-bit 2:1 FIFO and a 32-bit 1:1 FIFO. Random
// write and read enables; every read half-word is compared with a queue
// model (lower half first). Also checks that full is reached when the reader
// stops, that the overflow flag stays clear while the writer respects full,
// and that empty is seen.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wclk2 = 0, rclk2 = 0;
  logic wrst = 1, rrst = 1;
  always #3.5 wclk = ~wclk;
  always #9.5 rclk = ~rclk;
  always #9.5 wclk2 = ~wclk2;
  always #3.5 rclk2 = ~rclk2;

  int checks = 0, failures = 0;

  // 2:1 instance
  logic         wen, full, ovf, ren, empty;
  logic [123:0] wdata;
  logic [61:0]  rdata;
  async_fifo #(.WR_W(124), .RATIO(2), .DEPTH(16)) dut (
    .wr_clk(wclk), .wr_rst(wrst), .wr_en(wen), .wr_data(wdata), .full(full), .wr_overflow(ovf),
    .rd_clk(rclk), .rd_rst(rrst), .rd_en(ren), .rd_data(rdata), .empty(empty));

  // 1:1 instance, fast reader
  logic         wen2, full2, ovf2, ren2, empty2;
  logic [31:0]  wdata2, rdata2;
  async_fifo #(.WR_W(32), .RATIO(1), .DEPTH(8)) dut2 (
    .wr_clk(wclk2), .wr_rst(wrst), .wr_en(wen2), .wr_data(wdata2), .full(full2), .wr_overflow(ovf2),
    .rd_clk(rclk2), .rd_rst(rrst), .rd_en(ren2), .rd_data(rdata2), .empty(empty2));

  logic [61:0] q[$];
  logic [31:0] q2[$];
  int n_written = 0, n_read = 0, n_written2 = 0, n_read2 = 0;
  bit  saw_full = 0, saw_empty = 0, reader_on = 1;

  // writer, 2:1
  always @(posedge wclk) begin
    if (!wrst) begin
      if (wen && !full) begin
        q.push_back(wdata[61:0]);
        q.push_back(wdata[123:62]);
        n_written++;
      end
      if (full) saw_full = 1;
    end
  end
  always @(negedge wclk) begin
    wen   = !wrst && (n_written < 300) && ($urandom_range(0, 3) != 0) && !full;
    wdata = {$urandom, $urandom, $urandom, $urandom};
  end

  // reader, 2:1
  always @(posedge rclk) begin
    if (!rrst) begin
      if (ren && !empty) begin
        checks++;
        if (q.size() == 0 || rdata != q[0]) begin
          failures++;
          $display("FAIL 2:1 read %0d got %h", n_read, rdata);
        end
        if (q.size() != 0) void'(q.pop_front());
        n_read++;
      end
      if (empty) saw_empty = 1;
    end
  end
  always @(negedge rclk) ren = reader_on && ($urandom_range(0, 2) != 0);

  // writer/reader, 1:1
  always @(posedge wclk2) begin
    if (!wrst && wen2 && !full2) begin q2.push_back(wdata2); n_written2++; end
  end
  always @(negedge wclk2) begin
    wen2   = !wrst && (n_written2 < 200) && $urandom_range(0, 1) == 1 && !full2;
    wdata2 = $urandom;
  end
  always @(posedge rclk2) begin
    if (!rrst && ren2 && !empty2) begin
      checks++;
      if (q2.size() == 0 || rdata2 != q2[0]) begin
        failures++;
        $display("FAIL 1:1 read got %h", rdata2);
      end
      if (q2.size() != 0) void'(q2.pop_front());
      n_read2++;
    end
  end
  always @(negedge rclk2) ren2 = ($urandom_range(0, 3) != 0);

  initial begin
    #100 wrst = 0; rrst = 0;
    // stop the reader for a while so the FIFO fills
    #2000 reader_on = 0;
    #3000 reader_on = 1;
    wait (n_read == 600 && n_read2 == 200);
    #200;
    checks++; if (!saw_full)  begin failures++; $display("FAIL never full"); end
    checks++; if (!saw_empty) begin failures++; $display("FAIL never empty"); end
    checks++; if (ovf || ovf2) begin failures++; $display("FAIL overflow flagged"); end
    checks++; if (!empty || !empty2) begin failures++; $display("FAIL not empty at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
