// tb_ptm_parser: self-checking test of ptm_parser.
// A PTM byte stream is assembled from packets encoded here from the packet
// layouts (A-sync, I-sync, Atom, Branch address in 1, 2 and 5-byte forms with
// ARM and Thumb state and an exception byte, Waypoint update, Context ID
// repeated and changed, Timestamp, VMID, Trigger, Exception return, Ignore),
// cut into random chunks of 0..15 bytes with increasing frame timestamps and
// fed as frames would arrive. Each expected event (full address or Context
// ID, the frame timestamp of the packet's last byte and the time extension)
// is compared with the output; packet counters and the latency from chunk to
// event (a few cycles) are checked too.
module tb_ptm_parser;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  logic        iv, ir, ov, sat;
  chunk_t      ic;
  logic [123:0] op;
  logic [15:0] n_isync, n_branch, n_atom, n_drop;
  ptm_parser dut (.clk, .rst, .in_valid(iv), .in_chunk(ic), .in_ready(ir), .out_valid(ov),
    .out_pair(op), .n_isync, .n_branch, .n_atom, .n_dropped(n_drop), .ext_saturated(sat));

  logic [7:0]  stream[$];
  typedef struct { int last_byte; logic [7:0] mux; logic [31:0] value; } exp_t;
  exp_t exps[$];
  int   n_isync_e = 0, n_branch_e = 0, n_atom_e = 0;

  task automatic pkt(input logic [7:0] b[$]);
    foreach (b[i]) stream.push_back(b[i]);
  endtask
  task automatic ev(input logic [7:0] mux, input logic [31:0] v);
    exp_t e;
    e.last_byte = stream.size() - 1; e.mux = mux; e.value = v;
    exps.push_back(e);
  endtask

  // full 5-byte branch to address a, read in ARM state (isa5 = 0)
  task automatic br5_arm(input logic [31:0] a, input logic [1:0] isa5);
    pkt('{{1'b1, a[7:2], 1'b1}, {1'b1, a[14:8]}, {1'b1, a[21:15]}, {1'b1, a[28:22]},
          {1'b0, 1'b0, isa5, 1'b0, a[31:29]}});
    n_branch_e++;
  endtask

  // full 5-byte branch to address a, read in Thumb state (new ISA Thumb)
  task automatic br5_thumb(input logic [31:0] a);
    pkt('{{1'b1, a[6:1], 1'b1}, {1'b1, a[13:7]}, {1'b1, a[20:14]}, {1'b1, a[27:21]},
          {1'b0, 1'b0, 2'b01, a[31:28]}});
    n_branch_e++;
  endtask

  initial begin
    // A-sync
    pkt('{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h80});
    // I-sync, ARM, address 0x00010500, Context ID 0x00ABCD01
    pkt('{8'h08, 8'h00, 8'h05, 8'h01, 8'h00, 8'h00, 8'h01, 8'hCD, 8'hAB, 8'h00});
    n_isync_e++; ev(8'h01, 32'h00AB_CD01);
    // Atom
    pkt('{8'h84}); n_atom_e++;
    // full branch to 0x00010514
    br5_arm(32'h0001_0514, 2'b00); ev(8'h00, 32'h0001_0514);
    // 1-byte branch: only bits 7:2 change -> 0x00010520
    pkt('{{1'b0, 6'b001000, 1'b1}}); n_branch_e++; ev(8'h00, 32'h0001_0520);
    // 2-byte branch: bits 13:8 change -> 0x00012344
    pkt('{{1'b1, 6'b010001, 1'b1}, {2'b00, 6'b100011}}); n_branch_e++; ev(8'h00, 32'h0001_2344);
    // Context ID unchanged: no event
    pkt('{8'h6E, 8'h01, 8'hCD, 8'hAB, 8'h00});
    // Context ID changed
    pkt('{8'h6E, 8'h02, 8'hCE, 8'hAB, 8'h00}); ev(8'h01, 32'h00AB_CE02);
    // Timestamp with 3 bytes, Atom, Ignore, Trigger, VMID, Exception return
    pkt('{8'h42, 8'h81, 8'h82, 8'h03});
    pkt('{8'hA0}); n_atom_e++;
    pkt('{8'h66}); pkt('{8'h0C}); pkt('{8'h3C, 8'h05}); pkt('{8'h76});
    // Waypoint update, 1 address byte -> 0x00012388
    pkt('{8'h72, {1'b0, 6'b100010, 1'b1}}); ev(8'h00, 32'h0001_2388);
    // full branch into Thumb state at 0x20001234 (address in Thumb layout)
    br5_thumb(32'h2000_1234); ev(8'h00, 32'h2000_1234);
    // Thumb 1-byte branch: bits 6:1 -> 0x20001256
    pkt('{{1'b0, 6'b101011, 1'b1}}); n_branch_e++; ev(8'h00, 32'h2000_1256);
    // Thumb 2-byte branch with exception byte -> 0x20001A10
    pkt('{{1'b1, 6'b001000, 1'b1}, {1'b0, 1'b1, 6'b110100}, 8'h05}); n_branch_e++;
    ev(8'h00, 32'h2000_1A10);
    // I-sync in Thumb (T bit) to 0x00010600 with same Context ID: no event
    pkt('{8'h08, 8'h01, 8'h06, 8'h01, 8'h00, 8'h00, 8'h02, 8'hCE, 8'hAB, 8'h00}); n_isync_e++;
    // back in Thumb at 0x00010600: 1-byte branch bits 6:1 -> 0x0001060A
    pkt('{{1'b0, 6'b000101, 1'b1}}); n_branch_e++; ev(8'h00, 32'h0001_060A);
    // a long run of ARM I-sync + branches (many events per frame)
    pkt('{8'h08, 8'h00, 8'h10, 8'h02, 8'h00, 8'h00, 8'h02, 8'hCE, 8'hAB, 8'h00}); n_isync_e++;
    for (int k = 1; k <= 20; k++) begin
      pkt('{{1'b0, 6'(k), 1'b1}}); n_branch_e++; ev(8'h00, 32'h0002_1000 | (32'(k) << 2));
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
      // latency: buffer append, tokenizer, address parser, formatter, plus
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
    checks++; if (n_isync != 16'(n_isync_e)) begin failures++; $display("FAIL isync count %0d", n_isync); end
    checks++; if (n_branch != 16'(n_branch_e)) begin failures++; $display("FAIL branch count %0d", n_branch); end
    checks++; if (n_atom != 16'(n_atom_e)) begin failures++; $display("FAIL atom count %0d", n_atom); end
    checks++; if (n_drop != 0) begin failures++; $display("FAIL dropped bytes %0d", n_drop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #500000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
