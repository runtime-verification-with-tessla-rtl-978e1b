// tb_rv_top: end-to-end test of rv_top at its default parameters.
//
// A trace like that of a small program calling malloc/free in a recursion
// is built here: PTM core 1 with A-sync, I-sync (Context ID) and branch
// packets including 13 branches to a function at 0x10514, PTM core 0 with a
// short trace, ITM SWIT packets on ports 0 (malloc) and 1 (free), and FTM
// trace words. The byte streams are packed into CoreSight formatter frames
// (ID changes, immediate and delayed, data bytes with the auxiliary bit),
// sent as 32-bit words with sync words in between, one word per two cycles
// of the 200 MHz trace clock. After the trace the pipeline sits idle until
// the timestamp driver's final push (100 ms of parser clock), then the
// output buffer is read over the 32-bit port.
//
// Checks, against the default specification network (the 52-output
// reference specification): the output starts with time 0; timestamps
// strictly increase; every count() output runs 0, 1, 2, ... and ends at the
// number of its events (addresses and Context IDs per core, malloc and free
// writes); every output has exactly the expected number of events (FTM
// words, addresses, one Context ID per core, time differences from the
// second address on); the Context ID fields (thread ID, ASID) are right;
// core 1's address output shows all 13 calls to 0x10514; parser packet
// counters match.
// Mechanisms that must occur at least once (counted, a failure if never):
// sync words, delayed ID change, broom-wagon events, stale broom wagons
// filtered, time extension > 0 in an output time, final push, and output
// timestamps dropped by the output filter (steps > timestamps written).
module tb_rv_top;
  import rv_pkg::*;
  logic clk_tpiu = 0, clk_cs = 0, clk_tessla = 0;
  logic rst_tpiu = 1, rst_cs = 1, rst_tessla = 1;
  always #2.5 clk_tpiu = ~clk_tpiu;
  always #4   clk_cs = ~clk_cs;
  always #10  clk_tessla = ~clk_tessla;

  int checks = 0, failures = 0;

  logic        tpiu_valid, tpiu_overflow, axi_rd_en, axi_empty;
  logic [31:0] tpiu_data, axi_rd_data;
  logic [15:0] ptm0_isync, ptm0_branch, ptm0_atom, ptm1_isync, ptm1_branch, ptm1_atom;
  logic [15:0] itm_swit, ftm_trace;
  logic [31:0] sync_words, broom_events, final_pushes, spec_steps, spec_events, spec_filtered;
  logic [3:0]  event_fifo_overflow;
  logic        out_fifo_overflow;

  rv_top dut (.*);

  // ---------------- trace construction ----------------
  typedef struct { logic [6:0] id; logic [7:0] data[$]; } seg_t;
  seg_t segs[$];
  int   exp_events[4];     // per TeSSLa input: PTM0, PTM1, FTM, ITM
  int   exp_isync[2], exp_branch[2];

  task automatic seg(input logic [6:0] id, input logic [7:0] d[$]);
    seg_t s;
    s.id = id; s.data = d;
    segs.push_back(s);
  endtask

  // formatter slots: is_id, value, delayed
  typedef struct { bit is_id; logic [7:0] v; bit delayed; } slot_t;
  slot_t slots[$];
  int    n_delayed = 0;

  task automatic add_id(input logic [6:0] id);
    slot_t s;
    s.is_id = 1; s.v = {id, 1'b1}; s.delayed = 0;
    if ((slots.size() % 15) % 2 == 1) begin
      // odd position: move the ID before the last data byte, delayed
      slot_t last;
      last = slots.pop_back();
      s.delayed = 1;
      slots.push_back(s);
      slots.push_back(last);
      n_delayed++;
    end else begin
      slots.push_back(s);
    end
  endtask

  task automatic build_words(output logic [31:0] words[$]);
    slot_t s;
    logic [6:0] cur;
    cur = 7'h7F;
    foreach (segs[k]) begin
      if (segs[k].id != cur) begin add_id(segs[k].id); cur = segs[k].id; end
      foreach (segs[k].data[j]) begin
        s.is_id = 0; s.v = segs[k].data[j]; s.delayed = 0;
        slots.push_back(s);
      end
    end
    // pad the last frame with the null ID and zero data
    add_id(7'h00);
    while (slots.size() % 15 != 0) begin s.is_id = 0; s.v = 8'h00; s.delayed = 0; slots.push_back(s); end
    for (int f = 0; f < slots.size() / 15; f++) begin
      logic [7:0] b[16];
      b[15] = 0;
      for (int p = 0; p < 15; p++) begin
        slot_t x;
        x = slots[f * 15 + p];
        if (p % 2 == 1) b[p] = x.v;
        else if (x.is_id) begin b[p] = x.v; b[15][p/2] = x.delayed; end
        else begin b[p] = {x.v[7:1], 1'b0}; b[15][p/2] = x.v[0]; end
      end
      if (f % 8 == 0) words.push_back(32'hFFFF_FFFF);
      for (int w = 0; w < 4; w++) words.push_back({b[4*w+3], b[4*w+2], b[4*w+1], b[4*w]});
    end
  endtask

  function automatic void ptm_branch_full(ref logic [7:0] d[$], input logic [31:0] a);
    d.push_back({1'b1, a[7:2], 1'b1}); d.push_back({1'b1, a[14:8]});
    d.push_back({1'b1, a[21:15]}); d.push_back({1'b1, a[28:22]});
    d.push_back({5'b00000, a[31:29]});
  endfunction

  logic [31:0] words[$];

  function automatic bit is_count(input int o);
    return o == 1 || o == 2 || o == 6 || o == 7 || (o >= 42 && o <= 47);
  endfunction

  initial begin
    logic [7:0] d[$];
    for (int i = 0; i < 4; i++) exp_events[i] = 0;
    exp_isync = '{0, 0}; exp_branch = '{0, 0};
    // PTM core 0: A-sync, I-sync, two branches
    d = '{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h80,
          8'h08, 8'h00, 8'h20, 8'h01, 8'h00, 8'h00, 8'h01, 8'h00, 8'h11, 8'h00};
    exp_isync[0]++; exp_events[0]++;
    ptm_branch_full(d, 32'h0001_2000); exp_branch[0]++; exp_events[0]++;
    seg(ID_PTM0, d);
    // PTM core 1: A-sync, I-sync with process ID
    d = '{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h80,
          8'h08, 8'h00, 8'h04, 8'h01, 8'h00, 8'h00, 8'h01, 8'h56, 8'h34, 8'h12};
    exp_isync[1]++; exp_events[1]++;
    seg(ID_PTM1, d);
    seg(ID_ITM, '{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h80});
    seg(ID_FTM, '{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h80, 8'h03, 8'h01, 8'h00, 8'h00, 8'h00});
    exp_events[2]++;
    // 13 recursive calls: branch to allocate() at 0x10514, malloc + free
    for (int c = 0; c < 13; c++) begin
      d = '{};
      ptm_branch_full(d, 32'h0001_0514); exp_branch[1]++; exp_events[1]++;
      d.push_back(8'h84);                                   // atom
      d.push_back({1'b0, 6'b000110 + 6'(c % 4), 1'b1});     // short branch
      exp_branch[1]++; exp_events[1]++;
      seg(ID_PTM1, d);
      // malloc result and free on ITM ports 0 and 1, back to back
      seg(ID_ITM, '{8'h03, 8'h00, 8'(16 * c), 8'h02, 8'h00,
                    8'h0B, 8'h00, 8'(16 * c), 8'h02, 8'h00});
      exp_events[3] += 2;
      if (c % 4 == 1) begin
        seg(ID_FTM, '{8'h03, 8'(c), 8'h00, 8'h00, 8'h00}); exp_events[2]++;
      end
      if (c % 5 == 2) begin
        d = '{};
        d.push_back({1'b0, 6'(c), 1'b1}); exp_branch[0]++; exp_events[0]++;
        seg(ID_PTM0, d);
      end
    end
    build_words(words);
  end

  // ---------------- drive the trace port ----------------
  int cyc_tpiu = 0;
  always @(posedge clk_tpiu) cyc_tpiu++;
  bit trace_sent = 0;
  initial begin
    tpiu_valid = 0; tpiu_data = 0; axi_rd_en = 0;
    repeat (4) @(posedge clk_tessla);
    rst_tpiu = 0; rst_cs = 0; rst_tessla = 0;
    repeat (10) @(posedge clk_tpiu);
    foreach (words[i]) begin
      @(negedge clk_tpiu);
      tpiu_valid = 1; tpiu_data = words[i];
      @(negedge clk_tpiu);
      tpiu_valid = 0;                     // 4 bytes every 2 cycles
    end
    trace_sent = 1;
  end

  // ---------------- read the output buffer ----------------
  logic [31:0] rd_words[$];
  always @(posedge clk_tpiu) if (axi_rd_en && !axi_empty) rd_words.push_back(axi_rd_data);

  initial begin
    logic [61:0] w[$];
    int          occ[52], exp_occ[52];
    int          n_alloc;
    logic [52:0] last_t;
    bit          have_t;
    int          n_ts, n_data, n_ext;
    wait (trace_sent);
    wait (final_pushes == 1);
    #20000;
    @(negedge clk_tpiu);
    axi_rd_en = 1;
    while (!axi_empty) @(negedge clk_tpiu);
    axi_rd_en = 0;
    // reassemble 64-bit output words, lower half first
    checks++;
    if (rd_words.size() % 2 != 0) begin failures++; $display("FAIL odd number of halves"); end
    for (int i = 0; i + 1 < rd_words.size(); i += 2) w.push_back({rd_words[i+1][29:0], rd_words[i]});
    have_t = 0; n_ts = 0; n_data = 0; n_ext = 0; last_t = 0; n_alloc = 0;
    foreach (occ[o]) occ[o] = 0;
    foreach (w[k]) begin
      if (is_ts_word(w[k])) begin
        logic [52:0] t;
        t = w[k][52:0];
        checks++;
        if (k == 0 && t != 0) begin failures++; $display("FAIL first time %0d", t); end
        if (have_t && t <= last_t) begin failures++; $display("FAIL time not increasing %0d", t); end
        if (t[3:0] != 0) n_ext++;
        last_t = t; have_t = 1; n_ts++;
      end else begin
        int          o;
        logic [52:0] v;
        o = int'(w[k][60:53]);
        v = w[k][52:0];
        checks++;
        if (o > 51) begin failures++; $display("FAIL output number %0d", o); end
        else begin
          // count() outputs: 0 at time 0, then 1, 2, 3, ...
          if (is_count(o) && v != 53'(occ[o])) begin
            failures++; $display("FAIL count output %0d value %0d exp %0d", o, v, occ[o]);
          end
          if ((o == 10 || o == 11) && v == 0) begin
            failures++; $display("FAIL time difference %0d on output %0d", v, o);
          end
          if (o == 5 && v == 53'h1_0514) n_alloc++;
          if (o == 3 && v != 53'h00_1100) begin failures++; $display("FAIL core 0 thread ID %h", v); end
          if (o == 4 && v != 53'h01)      begin failures++; $display("FAIL core 0 ASID %h", v); end
          if (o == 8 && v != 53'h12_3456) begin failures++; $display("FAIL core 1 thread ID %h", v); end
          if (o == 9 && v != 53'h01)      begin failures++; $display("FAIL core 1 ASID %h", v); end
          occ[o]++;
        end
        n_data++;
      end
    end
    // expected number of data words of every output
    for (int o = 0; o < 52; o++) exp_occ[o] = is_count(o) ? 1 : 0;
    exp_occ[0]  = exp_branch[0];     exp_occ[1]  += exp_branch[0];  exp_occ[10] = exp_branch[0] - 1;
    exp_occ[5]  = exp_branch[1];     exp_occ[6]  += exp_branch[1];  exp_occ[11] = exp_branch[1] - 1;
    exp_occ[2]  += 1; exp_occ[3] = 1; exp_occ[4] = 1;               // one Context ID per core
    exp_occ[7]  += 1; exp_occ[8] = 1; exp_occ[9] = 1;
    exp_occ[20] = exp_events[2];                                    // FTM words
    exp_occ[21] = exp_events[3] / 2; exp_occ[42] += exp_events[3] / 2;   // malloc
    exp_occ[22] = exp_events[3] / 2; exp_occ[43] += exp_events[3] / 2;   // free
    for (int o = 0; o < 52; o++) begin
      checks++;
      if (occ[o] != exp_occ[o]) begin failures++; $display("FAIL output %0d: %0d events, exp %0d", o, occ[o], exp_occ[o]); end
    end
    checks++;
    if (n_alloc != 13) begin failures++; $display("FAIL %0d calls to 0x10514 seen", n_alloc); end
    checks += 4;
    if (ptm0_isync != 16'(exp_isync[0]) || ptm1_isync != 16'(exp_isync[1])) begin failures++; $display("FAIL isync counts"); end
    if (ptm0_branch != 16'(exp_branch[0]) || ptm1_branch != 16'(exp_branch[1])) begin failures++; $display("FAIL branch counts %0d %0d", ptm0_branch, ptm1_branch); end
    if (itm_swit != 16'(exp_events[3]) || ftm_trace != 16'(exp_events[2])) begin failures++; $display("FAIL itm/ftm counts"); end
    if (tpiu_overflow || event_fifo_overflow != 0 || out_fifo_overflow) begin failures++; $display("FAIL FIFO overflow"); end
    // mechanisms
    $display("mechanisms: sync words %0d, delayed ID changes %0d, broom wagons %0d, stale filtered %0d, extended times %0d, final pushes %0d, steps %0d vs timestamps out %0d, 13 calls to 0x10514",
             sync_words, n_delayed, broom_events, spec_filtered, n_ext, final_pushes, spec_steps, n_ts);
    checks += 7;
    if (sync_words == 0)          begin failures++; $display("FAIL no sync word"); end
    if (n_delayed == 0)           begin failures++; $display("FAIL no delayed ID change"); end
    if (broom_events == 0)        begin failures++; $display("FAIL no broom wagon"); end
    if (spec_filtered == 0)       begin failures++; $display("FAIL no stale broom wagon filtered"); end
    if (n_ext == 0)               begin failures++; $display("FAIL no time extension"); end
    if (final_pushes != 1)        begin failures++; $display("FAIL final pushes %0d", final_pushes); end
    if (spec_steps + 1 <= 32'(n_ts)) begin failures++; $display("FAIL output filter dropped nothing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #150ms;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
