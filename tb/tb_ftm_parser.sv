// tb_ftm_parser: self-checking test of ftm_parser.
// An FTM byte stream with Synchronization, Trace packets, Trigger, Cycle
// count, Overflow and First packets (in the byte layout assumed by the
// parser) is cut into random chunks with increasing frame timestamps. Each
// Trace packet must come out as an event with mux address 0x00 and its
// 32-bit word, with the frame timestamp of its last byte and the time
// extension; nothing else may.
module tb_ftm_parser;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  logic        iv, ir, ov, sat;
  chunk_t      ic;
  logic [123:0] op;
  logic [15:0] n_trace, n_trig;
  ftm_parser dut (.clk, .rst, .in_valid(iv), .in_chunk(ic), .in_ready(ir), .out_valid(ov),
    .out_pair(op), .n_trace, .n_trigger(n_trig), .ext_saturated(sat));

  logic [7:0]  stream[$];
  typedef struct { int last_byte; logic [7:0] mux; logic [31:0] value; } exp_t;
  exp_t exps[$];
  int   n_trace_e = 0, n_trig_e = 0;

  task automatic pkt(input logic [7:0] b[$]);
    foreach (b[i]) stream.push_back(b[i]);
  endtask
  task automatic ev(input logic [31:0] v);
    exp_t e;
    e.last_byte = stream.size() - 1; e.mux = 8'h00; e.value = v;
    exps.push_back(e);
    n_trace_e++;
  endtask

  initial begin
    pkt('{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h80});
    pkt('{8'h14});                                         // first
    pkt('{8'h03, 8'hEF, 8'hBE, 8'hAD, 8'hDE}); ev(32'hDEAD_BEEF);
    pkt('{8'h04}); n_trig_e++;
    pkt('{8'h0C, 8'h85, 8'h81, 8'h01});                    // cycle count
    pkt('{8'h70});                                         // overflow
    for (int k = 0; k < 30; k++) begin
      pkt('{8'h03, 8'(k), 8'(3 * k), 8'h00, 8'h80}); ev({8'h80, 8'h00, 8'(3 * k), 8'(k)});
      if (k % 7 == 0) begin pkt('{8'h04}); n_trig_e++; end
    end
  end

  // byte index -> frame timestamp, recorded as chunks are sent
  logic [47:0] byte_ts[int];
  int          byte_cyc[int];
  int          cyc = 0;
  always @(posedge clk) cyc++;
  int          sent = 0, n_chunks = 0;
  bit          done_sending = 0;

  initial begin
    iv = 0; ic = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    while (sent < stream.size()) begin
      int n;
      @(negedge clk);
      n = $urandom_range(0, 15);
      if (n > stream.size() - sent) n = stream.size() - sent;
      ic = '0;
      ic.count = 4'(n);
      ic.ts = 48'(1000 + 4 * n_chunks);
      for (int k = 0; k < n; k++) ic.bytes[k] = stream[sent + k];
      iv = 1;
      @(posedge clk);
      while (!ir) @(posedge clk);
      for (int k = 0; k < n; k++) begin byte_ts[sent + k] = ic.ts; byte_cyc[sent + k] = cyc; end
      sent += n;
      n_chunks++;
      @(negedge clk);
      iv = 0;
      repeat (2) @(negedge clk);   // one frame every 4 cycles
    end
    done_sending = 1;
  end

  int n_out = 0;
  logic [47:0] last_fts = '1;
  logic [3:0]  ext = 0;
  always @(posedge clk) if (!rst && ov) begin
    if (n_out >= exps.size()) begin
      failures++; $display("FAIL extra event %h", op);
    end else begin
      exp_t e;
      logic [47:0] fts;
      e   = exps[n_out];
      fts = byte_ts[e.last_byte];
      ext = (fts == last_fts) ? ext + 1 : 0;
      last_fts = fts;
      // latency: buffer append, tokenizer, decode, formatter, plus
      // one cycle per earlier packet still queued from the same chunk
      checks++;
      if (cyc - byte_cyc[e.last_byte] > 4 + 15) begin
        failures++; $display("FAIL latency %0d cycles", cyc - byte_cyc[e.last_byte]);
      end
      checks++;
      if (op != make_pair({1'b0, fts, ext}, e.mux, 53'(e.value))) begin
        failures++;
        $display("FAIL event %0d: got mux %h val %h time %h; exp mux %h val %h ts %0d ext %0d",
          n_out, op[122:115], op[93:62], op[52:0], e.mux, e.value, fts, ext);
      end
    end
    n_out++;
  end

  initial begin
    wait (done_sending);
    repeat (40) @(posedge clk);
    checks++; if (n_out != exps.size()) begin failures++; $display("FAIL %0d events, exp %0d", n_out, exps.size()); end
    checks++; if (n_trace != 16'(n_trace_e)) begin failures++; $display("FAIL trace count %0d", n_trace); end
    checks++; if (n_trig != 16'(n_trig_e)) begin failures++; $display("FAIL trigger count %0d", n_trig); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #500000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
