// tb_malloc_spec: self-checking test of malloc_spec, the allocation-set
// specification.
//
// The four input FIFOs (first-word-fall-through models) are filled step by
// step. Input 3 (ITM) carries malloc (mux 0) and free (mux 1) events with
// keys from a small range, so the set fills up, overflows, sees the same
// address allocated twice and is emptied again; it also carries events on
// other ports, which the specification ignores. The other inputs carry
// random events or broom-wagon events 100 units back (steps are 64 apart),
// which often must be filtered. A final push ends the run.
// The expected output comes from a reference model written independently
// of the module: the set is an associative array of at most 8 keys; a
// malloc of a present key or into a full set leaves the size unchanged
// (double_malloc), the full-set case is also an overflow.
//   * time 0: a timestamp word, n_allocations = 0, never_overflow = 1,
//     all_allocations_freed = 1, never_double_malloc = 1;
//   * double_malloc and never_double_malloc appear from the first malloc on;
//   * each key step: its timestamp word, then the data words in output order.
// Output back-pressure is random.
module tb_malloc_spec;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0][61:0] dout;
  logic [3:0]       empty, rd_en;
  logic             ov, ordy;
  logic [61:0]      ow;
  logic [31:0]      nsteps, nev, nfilt, ntsd, nproto;
  malloc_spec #(.N(4)) dut (.clk, .rst, .fifo_dout(dout), .fifo_empty(empty), .fifo_rd_en(rd_en),
    .out_valid(ov), .out_word(ow), .out_ready(ordy), .n_steps(nsteps), .n_events(nev),
    .n_filtered(nfilt), .n_ts_dropped(ntsd), .n_protocol(nproto));

  logic [61:0] fifo0[$], fifo1[$], fifo2[$], fifo3[$];
  logic [61:0] exp_q[$];
  int          n_out = 0, n_real = 0, n_ovf = 0, n_dbl = 0, n_empty = 0;

  always_comb begin
    empty[0] = fifo0.size() == 0; dout[0] = empty[0] ? '0 : fifo0[0];
    empty[1] = fifo1.size() == 0; dout[1] = empty[1] ? '0 : fifo1[0];
    empty[2] = fifo2.size() == 0; dout[2] = empty[2] ? '0 : fifo2[0];
    empty[3] = fifo3.size() == 0; dout[3] = empty[3] ? '0 : fifo3[0];
  end
  always @(posedge clk) if (!rst) begin
    if (rd_en[0] && !empty[0]) void'(fifo0.pop_front());
    if (rd_en[1] && !empty[1]) void'(fifo1.pop_front());
    if (rd_en[2] && !empty[2]) void'(fifo2.pop_front());
    if (rd_en[3] && !empty[3]) void'(fifo3.pop_front());
    if (ov && ordy) begin
      checks++;
      if (exp_q.size() == 0 || ow != exp_q[0]) begin
        failures++; $display("FAIL out %0d: %h exp %h", n_out, ow, exp_q.size() ? exp_q[0] : '0);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      n_out++;
    end
  end
  always @(negedge clk) ordy = $urandom_range(0, 3) != 0;

  task automatic put(input int i, input logic [52:0] t, input logic [7:0] m, input logic [52:0] v);
    case (i)
      0: begin fifo0.push_back(ts_word(t)); fifo0.push_back(data_word(m, v)); end
      1: begin fifo1.push_back(ts_word(t)); fifo1.push_back(data_word(m, v)); end
      2: begin fifo2.push_back(ts_word(t)); fifo2.push_back(data_word(m, v)); end
      default: begin fifo3.push_back(ts_word(t)); fifo3.push_back(data_word(m, v)); end
    endcase
  endtask

  // ---------------- reference model ----------------
  bit set[logic [52:0]];
  bit never_ovf = 1, never_dbl = 1, seen_malloc = 0;

  initial begin
    logic [52:0] maxt;
    maxt = 0;
    exp_q.push_back(ts_word('0));
    exp_q.push_back(data_word(8'd0, 53'd0));
    exp_q.push_back(data_word(8'd2, 53'd1));
    exp_q.push_back(data_word(8'd3, 53'd1));
    exp_q.push_back(data_word(8'd5, 53'd1));
    for (int s = 0; s < 400; s++) begin
      logic [52:0] t;
      logic [3:0]  w;
      int          m;
      logic [52:0] key;
      t = 53'(1000 + 64 * s);
      w = 4'($urandom);
      // phases: mostly malloc, then mostly free
      m = ($urandom_range(0, 99) < ((s / 50) % 2 == 0 ? 70 : 8)) ? 0 : 1;
      if ($urandom_range(0, 9) == 0) m = 7;                 // another ITM port
      key = 53'(32'h2000_0000 + 16 * $urandom_range(0, 9));
      for (int i = 0; i < 3; i++) begin
        if (w[i]) begin put(i, t, 8'($urandom_range(0, 3)), 53'($urandom)); n_real++; end
        else put(i, t - 53'd100, 8'hFF, 53'h00C0FFEE);
      end
      if (w[3]) begin
        put(3, t, 8'(m), key); n_real++;
        if (m <= 1) begin
          bit ovf, dbl;
          int n;
          ovf = 0; dbl = 0;
          if (m == 0) begin
            if (set.exists(key)) dbl = 1;
            else if (set.size() >= 8) begin ovf = 1; dbl = 1; end
            else set[key] = 1;
          end else if (set.exists(key)) set.delete(key);
          n = set.size();
          if (ovf) never_ovf = 0;
          exp_q.push_back(ts_word(t));
          exp_q.push_back(data_word(8'd0, 53'(n)));
          if (ovf) begin
            exp_q.push_back(data_word(8'd1, 53'd1));
            exp_q.push_back(data_word(8'd2, 53'(never_ovf)));
            n_ovf++;
          end
          exp_q.push_back(data_word(8'd3, 53'(n == 0 && never_ovf)));
          if (n == 0) n_empty++;
          if (m == 0) seen_malloc = 1;
          if (seen_malloc) begin
            if (dbl) begin never_dbl = 0; n_dbl++; end
            exp_q.push_back(data_word(8'd4, 53'(dbl)));
            exp_q.push_back(data_word(8'd5, 53'(never_dbl)));
          end
        end
      end else put(3, t - 53'd100, 8'hFF, 53'h00C0FFEE);
      maxt = t;
    end
    for (int i = 0; i < 4; i++) put(i, maxt + 53'd16, 8'hFF, 53'h00C0FFEE);
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (20000) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words missing", exp_q.size()); end
    checks++;
    if (nev != 32'(n_real)) begin failures++; $display("FAIL event count %0d exp %0d", nev, n_real); end
    checks++;
    if (nfilt == 0 || nproto != 0) begin failures++; $display("FAIL filtered %0d protocol %0d", nfilt, nproto); end
    checks++;
    if (n_ovf == 0 || n_dbl == 0 || n_empty == 0) begin failures++; $display("FAIL stimulus too weak"); end
    $display("words out %0d, events %0d, overflows %0d, double mallocs %0d, empty set %0d times, filtered %0d",
             n_out, n_real, n_ovf, n_dbl, n_empty, nfilt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
