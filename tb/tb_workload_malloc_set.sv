// tb_workload_malloc_set: the memory-allocation property run end to end
// through rv_top with the allocation-set network (SPEC = 2), for the four
// program configurations of the allocation test:
//   0 default:        8 allocations, then 8 frees in reverse order
//   1 missing free:   8 allocations, 7 frees
//   2 extra alloc:    8 allocations, 8 frees, then one more allocation
//   3 overflow:       12 allocations (set capacity 8), then 12 frees
// The instrumentation library's signals are ITM stimulus packets: malloc
// results on port 0 and free arguments on port 1, 4-byte payloads, sent in
// formatter frames (trace ID 0x6F) over the 32-bit trace port with a sync
// word every eight frames. The addresses are 16-byte aligned heap addresses
// made up here. Between configurations the whole design is reset.
// FINAL_WAIT is shortened to 4000 parser cycles so the final push comes
// soon after the trace; everything else is at its default.
// Checks per configuration, from the expected verdicts rather than from a
// model of the network: the last n_allocations, the last
// all_allocations_freed (1 only for the default run), the number of
// overflow events (4 for the overflow run, else 0), the last never_overflow
// and never_double_malloc (0 only for the overflow run, where a malloc into
// the full set leaves the count unchanged), one n_allocations event per key
// plus the one at time 0, increasing output times and no FIFO overflow.
module tb_workload_malloc_set;
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

  rv_top #(.SPEC(2), .FINAL_WAIT(4000)) dut (.*);

  logic [31:0] rd_words[$];
  always @(posedge clk_tpiu) if (axi_rd_en && !axi_empty) rd_words.push_back(axi_rd_data);

  function automatic void swit(ref logic [7:0] d[$], input int port, input logic [31:0] v);
    d.push_back({5'(port), 3'b011});
    d.push_back(v[7:0]); d.push_back(v[15:8]); d.push_back(v[23:16]); d.push_back(v[31:24]);
  endfunction

  // frames: ITM ID once, then data, then the null ID; byte 15 holds bit 0 of
  // the even-position data bytes
  task automatic frame_words(input logic [7:0] trace[$], output logic [31:0] words[$]);
    logic [7:0] slots[$];
    bit         is_id[$];
    words = '{};
    slots.push_back({7'(ID_ITM), 1'b1}); is_id.push_back(1);
    foreach (trace[i]) begin slots.push_back(trace[i]); is_id.push_back(0); end
    // an ID byte must sit at an even frame position: pad with a zero byte,
    // which the ITM parser takes as part of a sync sequence
    if ((slots.size() % 15) % 2 == 1) begin slots.push_back(8'h00); is_id.push_back(0); end
    slots.push_back({7'h00, 1'b1}); is_id.push_back(1);
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

  task automatic run_config(input int cfg);
    logic [7:0]  trace[$];
    logic [31:0] words[$];
    logic [61:0] w[$];
    int          n_alloc, n_free, n_keys, occ[6];
    logic [52:0] last_v[6], last_t;
    bit          have_t;
    int          exp_n, exp_freed, exp_ovf, exp_nov, exp_ndb;
    string       name;
    n_alloc = (cfg == 3) ? 12 : 8;
    n_free  = (cfg == 1) ? 7 : n_alloc;
    trace = '{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h80};      // A-sync
    for (int k = 0; k < n_alloc; k++) swit(trace, 0, 32'h0002_1000 + 32'(k * 16'h20));
    for (int k = n_alloc - 1; k >= n_alloc - n_free; k--) swit(trace, 1, 32'h0002_1000 + 32'(k * 16'h20));
    if (cfg == 2) swit(trace, 0, 32'h0002_1000);
    n_keys = n_alloc + n_free + (cfg == 2 ? 1 : 0);
    frame_words(trace, words);

    rst_tpiu = 1; rst_cs = 1; rst_tessla = 1;
    tpiu_valid = 0; tpiu_data = 0; axi_rd_en = 0;
    rd_words = '{};
    repeat (4) @(posedge clk_tessla);
    rst_tpiu = 0; rst_cs = 0; rst_tessla = 0;
    repeat (10) @(posedge clk_tpiu);
    foreach (words[i]) begin
      @(negedge clk_tpiu); tpiu_valid = 1; tpiu_data = words[i];
      @(negedge clk_tpiu); tpiu_valid = 0;
    end
    wait (final_pushes == 1);
    #20000;
    @(negedge clk_tpiu);
    axi_rd_en = 1;
    while (!axi_empty) @(negedge clk_tpiu);
    axi_rd_en = 0;

    for (int i = 0; i + 1 < rd_words.size(); i += 2) w.push_back({rd_words[i+1][29:0], rd_words[i]});
    foreach (occ[o]) begin occ[o] = 0; last_v[o] = '1; end
    have_t = 0; last_t = 0;
    foreach (w[k]) begin
      if (is_ts_word(w[k])) begin
        checks++;
        if (have_t && w[k][52:0] <= last_t) begin failures++; $display("FAIL cfg %0d time not increasing", cfg); end
        last_t = w[k][52:0]; have_t = 1;
      end else begin
        int o;
        o = int'(w[k][60:53]);
        checks++;
        if (o > 5) begin failures++; $display("FAIL cfg %0d output number %0d", cfg, o); end
        else begin occ[o]++; last_v[o] = w[k][52:0]; end
      end
    end
    case (cfg)
      0: begin name = "default";      exp_n = 0; exp_freed = 1; exp_ovf = 0; exp_nov = 1; exp_ndb = 1; end
      1: begin name = "missing free"; exp_n = 1; exp_freed = 0; exp_ovf = 0; exp_nov = 1; exp_ndb = 1; end
      2: begin name = "extra alloc";  exp_n = 1; exp_freed = 0; exp_ovf = 0; exp_nov = 1; exp_ndb = 1; end
      default: begin name = "overflow"; exp_n = 0; exp_freed = 0; exp_ovf = 4; exp_nov = 0; exp_ndb = 0; end
    endcase
    checks += 7;
    if (last_v[0] != 53'(exp_n))     begin failures++; $display("FAIL %s: n_allocations %0d exp %0d", name, last_v[0], exp_n); end
    if (last_v[3] != 53'(exp_freed)) begin failures++; $display("FAIL %s: all_allocations_freed %0d", name, last_v[3]); end
    if (occ[1] != exp_ovf)           begin failures++; $display("FAIL %s: %0d overflows exp %0d", name, occ[1], exp_ovf); end
    if (last_v[2] != 53'(exp_nov))   begin failures++; $display("FAIL %s: never_overflow %0d", name, last_v[2]); end
    if (last_v[5] != 53'(exp_ndb))   begin failures++; $display("FAIL %s: never_double_malloc %0d", name, last_v[5]); end
    if (occ[0] != n_keys + 1 || occ[3] != n_keys + 1) begin
      failures++; $display("FAIL %s: %0d/%0d set-size events for %0d keys", name, occ[0], occ[3], n_keys);
    end
    if (tpiu_overflow || event_fifo_overflow != 0 || out_fifo_overflow || itm_swit != 16'(n_keys)) begin
      failures++; $display("FAIL %s: overflow flags or %0d SWIT packets", name, itm_swit);
    end
    $display("%-12s keys %0d: n_allocations %0d, all freed %0d, overflows %0d, never_overflow %0d, never_double_malloc %0d",
             name, n_keys, last_v[0], last_v[3], occ[1], last_v[2], last_v[5]);
  endtask

  initial begin
    for (int cfg = 0; cfg < 4; cfg++) run_config(cfg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
