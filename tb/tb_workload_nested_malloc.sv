// tb_workload_nested_malloc: the nested-malloc program trace through rv_top.
//
// The trace stands in for the recursive allocation test program whose raw
// trace on core 1 holds 55 I-sync, 183 Branch address and 15 Atom packets
// after the initial A-sync, with 13 calls to the recursive allocate()
// function at 0x10514. The packet counts are those of that program; the
// order of the packets and all addresses other than 0x10514 are made up
// here: the I-syncs are spread evenly over the branches and switch between
// ARM and Thumb state, as the calls into library code do; every I-sync
// carries the same Context ID (a single-threaded program), 13 of the
// branches are full 5-byte branches to 0x10514, the rest 1-byte branches.
// The bytes go out as PTM core 1 (trace ID 0x11) in formatter frames over
// the 32-bit trace port, one word per two 200 MHz cycles, with a sync word
// every eight frames. rv_top runs at its default parameters, so the test
// waits for the final push after 100 ms of idle parser clock.
//
// Checks: the parser's I-sync, branch and atom counters are 55, 183, 15.
// The reference specification's outputs for core 1 show 183 addresses,
// 13 of them 0x10514, an address count running 0..183, one Context ID (it
// never changes, so it is sent once) with its thread ID and ASID, and 182
// time differences. Every other count() output stays at its initial 0 and
// no other output fires. Output times strictly increase, no FIFO overflows,
// one final push.
module tb_workload_nested_malloc;
  import rv_pkg::*;
  logic clk_tpiu = 0, clk_cs = 0, clk_tessla = 0;
  logic rst_tpiu = 1, rst_cs = 1, rst_tessla = 1;
  always #2.5 clk_tpiu = ~clk_tpiu;
  always #4   clk_cs = ~clk_cs;
  always #10  clk_tessla = ~clk_tessla;

  localparam int N_ISYNC  = 55;
  localparam int N_BRANCH = 183;
  localparam int N_ATOM   = 15;
  localparam int N_CALLS  = 13;

  int checks = 0, failures = 0;

  logic        tpiu_valid, tpiu_overflow, axi_rd_en, axi_empty;
  logic [31:0] tpiu_data, axi_rd_data;
  logic [15:0] ptm0_isync, ptm0_branch, ptm0_atom, ptm1_isync, ptm1_branch, ptm1_atom;
  logic [15:0] itm_swit, ftm_trace;
  logic [31:0] sync_words, broom_events, final_pushes, spec_steps, spec_events, spec_filtered;
  logic [3:0]  event_fifo_overflow;
  logic        out_fifo_overflow;

  rv_top dut (.*);

  // ---------------- trace of core 1 ----------------
  logic [7:0]  trace[$];
  logic [31:0] words[$];
  int          n_calls = 0, n_isync_made = 0, n_atom_made = 0;

  function automatic void isync(ref logic [7:0] d[$], input logic [31:0] a, input bit thumb);
    d.push_back(8'h08);
    d.push_back({a[7:1], thumb}); d.push_back(a[15:8]);
    d.push_back(a[23:16]);        d.push_back(a[31:24]);
    d.push_back(8'h00);                                  // info byte
    d.push_back(8'h01); d.push_back(8'h56); d.push_back(8'h34); d.push_back(8'h12);
  endfunction

  function automatic void branch_full(ref logic [7:0] d[$], input logic [31:0] a);
    d.push_back({1'b1, a[7:2], 1'b1}); d.push_back({1'b1, a[14:8]});
    d.push_back({1'b1, a[21:15]});     d.push_back({1'b1, a[28:22]});
    d.push_back({5'b00000, a[31:29]});                   // ISA ARM
  endfunction

  function automatic bit is_count(input int o);
    return o == 1 || o == 2 || o == 6 || o == 7 || (o >= 42 && o <= 47);
  endfunction

  // Frame the byte stream: one ID byte for core 1, then data; the auxiliary
  // byte 15 holds bit 0 of each data byte at an even position.
  task automatic build_words();
    logic [7:0] slots[$];
    bit         is_id[$];
    slots.push_back({7'(ID_PTM1), 1'b1}); is_id.push_back(1);
    foreach (trace[i]) begin slots.push_back(trace[i]); is_id.push_back(0); end
    slots.push_back({7'h00, 1'b1}); is_id.push_back(1);  // null ID pads the tail
    while (slots.size() % 15 != 0) begin slots.push_back(8'h00); is_id.push_back(0); end
    for (int f = 0; f < slots.size() / 15; f++) begin
      logic [7:0] b[16];
      b[15] = 0;
      for (int p = 0; p < 15; p++) begin
        logic [7:0] v;
        v = slots[f * 15 + p];
        if (p % 2 == 1 || is_id[f * 15 + p]) b[p] = v;
        else begin b[p] = {v[7:1], 1'b0}; b[15][p/2] = v[0]; end
      end
      if (f % 8 == 0) words.push_back(32'hFFFF_FFFF);
      for (int w = 0; w < 4; w++) words.push_back({b[4*w+3], b[4*w+2], b[4*w+1], b[4*w]});
    end
  endtask

  initial begin
    trace = '{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h80};   // A-sync
    isync(trace, 32'h0001_0400, 1'b0); n_isync_made++;
    for (int k = 0; k < N_BRANCH; k++) begin
      if ((k * (N_ISYNC - 1)) / N_BRANCH != ((k + 1) * (N_ISYNC - 1)) / N_BRANCH) begin
        isync(trace, 32'h0001_0400 + 32'(k * 8), n_isync_made % 2 == 1);
        n_isync_made++;
      end
      if (k % 14 == 0 && n_calls < N_CALLS) begin
        branch_full(trace, 32'h0001_0514); n_calls++;
      end else begin
        trace.push_back({1'b0, 6'(k % 32), 1'b1});
      end
      if ((k * N_ATOM) / N_BRANCH != ((k + 1) * N_ATOM) / N_BRANCH) begin
        trace.push_back(8'h84); n_atom_made++;
      end
    end
    build_words();
  end

  // ---------------- drive the trace port ----------------
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
      tpiu_valid = 0;
    end
    trace_sent = 1;
  end

  // ---------------- read and check the output ----------------
  logic [31:0] rd_words[$];
  always @(posedge clk_tpiu) if (axi_rd_en && !axi_empty) rd_words.push_back(axi_rd_data);

  initial begin
    logic [61:0] w[$];
    int          occ[52], exp_occ[52];
    int          n_alloc;
    logic [52:0] last_t;
    bit          have_t;
    wait (trace_sent);
    wait (final_pushes == 1);
    #20000;
    @(negedge clk_tpiu);
    axi_rd_en = 1;
    while (!axi_empty) @(negedge clk_tpiu);
    axi_rd_en = 0;
    checks++;
    if (n_isync_made != N_ISYNC || n_atom_made != N_ATOM || n_calls != N_CALLS) begin
      failures++; $display("FAIL trace construction %0d %0d %0d", n_isync_made, n_atom_made, n_calls);
    end
    for (int i = 0; i + 1 < rd_words.size(); i += 2) w.push_back({rd_words[i+1][29:0], rd_words[i]});
    foreach (occ[o]) occ[o] = 0;
    have_t = 0; last_t = 0; n_alloc = 0;
    foreach (w[k]) begin
      checks++;
      if (is_ts_word(w[k])) begin
        if (have_t && w[k][52:0] <= last_t) begin failures++; $display("FAIL time not increasing"); end
        last_t = w[k][52:0]; have_t = 1;
      end else begin
        int          o;
        logic [52:0] v;
        o = int'(w[k][60:53]);
        v = w[k][52:0];
        if (o > 51) begin failures++; $display("FAIL output number %0d", o); end
        else begin
          if (is_count(o) && v != 53'(occ[o])) begin
            failures++; $display("FAIL count output %0d value %0d exp %0d", o, v, occ[o]);
          end
          if (o == 5 && v == 53'h1_0514) n_alloc++;
          occ[o]++;
        end
      end
    end
    // core 1: addresses, their count, one Context ID, time differences
    for (int o = 0; o < 52; o++) exp_occ[o] = is_count(o) ? 1 : 0;
    exp_occ[5] = N_BRANCH; exp_occ[6] += N_BRANCH; exp_occ[11] = N_BRANCH - 1;
    exp_occ[7] += 1; exp_occ[8] = 1; exp_occ[9] = 1;
    for (int o = 0; o < 52; o++) begin
      checks++;
      if (occ[o] != exp_occ[o]) begin failures++; $display("FAIL output %0d: %0d events, exp %0d", o, occ[o], exp_occ[o]); end
    end
    checks += 2;
    if (n_alloc != N_CALLS) begin failures++; $display("FAIL %0d calls to 0x10514 in the output", n_alloc); end
    if (ptm1_isync != 16'(N_ISYNC) || ptm1_branch != 16'(N_BRANCH) || ptm1_atom != 16'(N_ATOM)) begin
      failures++; $display("FAIL packet counters %0d %0d %0d", ptm1_isync, ptm1_branch, ptm1_atom);
    end
    if (tpiu_overflow || event_fifo_overflow != 0 || out_fifo_overflow || final_pushes != 1) begin
      failures++; $display("FAIL overflow or final push");
    end
    $display("core 1: %0d I-sync, %0d branch, %0d atom packets; %0d calls to 0x10514; output count %0d; %0d trace words",
             ptm1_isync, ptm1_branch, ptm1_atom, n_calls, occ[6] - 1, words.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #150ms;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
