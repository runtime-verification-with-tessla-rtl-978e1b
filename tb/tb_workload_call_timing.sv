// tb_workload_call_timing: the simple event-handler property run end to end
// through rv_top with the call-timing network (SPEC = 3).
//
// Ten requests of one type are handled one after the other. Each is a
// branch to the request function (0x10EB0), then after its queueing time a
// branch to the start of processing (0x10C3C), 0.5 ms later a branch to its
// end (0x10C54), and 1 ms later the next request. Two configurations are
// run, with a reset in between: queueing times from 1.1 to 3.4 ms (the
// bound of 5 ms holds) and from 8.9 to 12.0 ms (it fails). The branches go
// out as full 5-byte PTM branch packets on core 1 (trace ID 0x11) after an
// A-sync and I-sync, one short burst of formatter frames per branch over
// the 32-bit trace port, with the trace port idle in between. FINAL_WAIT
// is shortened to 2,000,000 parser cycles (16 ms, longer than any gap the
// test leaves); everything else is at its default.
// Checks: every queueing time and response time matches the gap the test
// made, within 10 us (the frame latency); p and the property are correct
// at each start; ten of each output appear; no FIFO overflows.
module tb_workload_call_timing;
  import rv_pkg::*;
  logic clk_tpiu = 0, clk_cs = 0, clk_tessla = 0;
  logic rst_tpiu = 1, rst_cs = 1, rst_tessla = 1;
  always #2.5 clk_tpiu = ~clk_tpiu;
  always #4   clk_cs = ~clk_cs;
  always #10  clk_tessla = ~clk_tessla;

  localparam longint UNITS_PER_MS = 2_000_000;   // 125,000 cycles x 16
  localparam longint TOL          = 20_000;      // 10 us

  int checks = 0, failures = 0;

  logic        tpiu_valid, tpiu_overflow, axi_rd_en, axi_empty;
  logic [31:0] tpiu_data, axi_rd_data;
  logic [15:0] ptm0_isync, ptm0_branch, ptm0_atom, ptm1_isync, ptm1_branch, ptm1_atom;
  logic [15:0] itm_swit, ftm_trace;
  logic [31:0] sync_words, broom_events, final_pushes, spec_steps, spec_events, spec_filtered;
  logic [3:0]  event_fifo_overflow;
  logic        out_fifo_overflow;

  rv_top #(.SPEC(3), .FINAL_WAIT(2_000_000)) dut (.*);

  logic [31:0] rd_words[$];
  always @(posedge clk_tpiu) if (axi_rd_en && !axi_empty) rd_words.push_back(axi_rd_data);

  function automatic void branch_full(ref logic [7:0] d[$], input logic [31:0] a);
    d.push_back({1'b1, a[7:2], 1'b1}); d.push_back({1'b1, a[14:8]});
    d.push_back({1'b1, a[21:15]});     d.push_back({1'b1, a[28:22]});
    d.push_back({5'b00000, a[31:29]});                   // ISA ARM
  endfunction

  // one burst: sync word, then frames with the PTM1 ID, the data and the
  // null ID (on an even position); byte 15 holds bit 0 of even data bytes
  task automatic send(input logic [7:0] trace[$]);
    logic [7:0] slots[$];
    bit         is_id[$];
    slots.push_back({7'(ID_PTM1), 1'b1}); is_id.push_back(1);
    foreach (trace[i]) begin slots.push_back(trace[i]); is_id.push_back(0); end
    if ((slots.size() % 15) % 2 == 1) begin slots.push_back(8'h00); is_id.push_back(0); end
    slots.push_back({7'h00, 1'b1}); is_id.push_back(1);
    while (slots.size() % 15 != 0) begin slots.push_back(8'h00); is_id.push_back(0); end
    @(negedge clk_tpiu); tpiu_valid = 1; tpiu_data = 32'hFFFF_FFFF;
    @(negedge clk_tpiu); tpiu_valid = 0;
    for (int f = 0; f < slots.size() / 15; f++) begin
      logic [7:0] b[16];
      b[15] = 0;
      for (int p = 0; p < 15; p++) begin
        logic [7:0] v;
        v = slots[f * 15 + p];
        if (p % 2 == 1 || is_id[f * 15 + p]) b[p] = v;
        else begin b[p] = {v[7:1], 1'b0}; b[15][p/2] = v[0]; end
      end
      for (int w = 0; w < 4; w++) begin
        @(negedge clk_tpiu); tpiu_valid = 1; tpiu_data = {b[4*w+3], b[4*w+2], b[4*w+1], b[4*w]};
        @(negedge clk_tpiu); tpiu_valid = 0;
      end
    end
  endtask

  task automatic call(input logic [31:0] a);
    logic [7:0] d[$];
    d = '{};
    branch_full(d, a);
    send(d);
  endtask

  task automatic run_config(input int cfg);
    logic [61:0] w[$];
    longint      q_ms_x10[10];
    int          occ[4], n_q, n_r, n_p;
    bit          prop;
    for (int k = 0; k < 10; k++)
      q_ms_x10[k] = (cfg == 0) ? 11 + (k * 23) / 9 : 89 + (k * 31) / 9;   // 1.1..3.4 / 8.9..12.0 ms
    rst_tpiu = 1; rst_cs = 1; rst_tessla = 1;
    tpiu_valid = 0; tpiu_data = 0; axi_rd_en = 0;
    rd_words = '{};
    repeat (4) @(posedge clk_tessla);
    rst_tpiu = 0; rst_cs = 0; rst_tessla = 0;
    repeat (10) @(posedge clk_tpiu);
    send('{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h80,
           8'h08, 8'h00, 8'h04, 8'h01, 8'h00, 8'h00, 8'h01, 8'h56, 8'h34, 8'h12});
    #100us;
    for (int k = 0; k < 10; k++) begin
      call(32'h0001_0EB0);
      #(q_ms_x10[k] * 100us);
      call(32'h0001_0C3C);
      #500us;
      call(32'h0001_0C54);
      #1ms;
    end
    wait (final_pushes >= 1);
    #20000;
    @(negedge clk_tpiu);
    axi_rd_en = 1;
    while (!axi_empty) @(negedge clk_tpiu);
    axi_rd_en = 0;

    for (int i = 0; i + 1 < rd_words.size(); i += 2) w.push_back({rd_words[i+1][29:0], rd_words[i]});
    foreach (occ[o]) occ[o] = 0;
    n_q = 0; n_r = 0; n_p = 0; prop = 1;
    foreach (w[k]) begin
      if (!is_ts_word(w[k])) begin
        int          o;
        longint      v, expv;
        o = int'(w[k][60:53]);
        v = longint'(w[k][52:0]);
        checks++;
        case (o)
          0: begin
            expv = q_ms_x10[n_q] * UNITS_PER_MS / 10;
            if (v < expv - TOL || v > expv + TOL) begin failures++; $display("FAIL cfg %0d queueing time %0d exp %0d", cfg, v, expv); end
            n_q++;
          end
          1: begin
            expv = (q_ms_x10[n_r] * UNITS_PER_MS + 5 * UNITS_PER_MS) / 10;
            if (v < expv - TOL || v > expv + TOL) begin failures++; $display("FAIL cfg %0d response time %0d exp %0d", cfg, v, expv); end
            n_r++;
          end
          2: begin
            if (v != longint'(q_ms_x10[n_p] <= 50)) begin failures++; $display("FAIL cfg %0d p %0d", cfg, v); end
            prop = prop && (q_ms_x10[n_p] <= 50);
          end
          3: begin
            if (v != longint'(prop)) begin failures++; $display("FAIL cfg %0d property %0d", cfg, v); end
            n_p++;
          end
          default: begin failures++; $display("FAIL cfg %0d output %0d", cfg, o); end
        endcase
        if (o >= 0 && o < 4) occ[o]++;
        if (n_q > 9) n_q = 9;
        if (n_r > 9) n_r = 9;
        if (n_p > 9) n_p = 9;
      end
    end
    checks += 2;
    if (occ[0] != 10 || occ[1] != 10 || occ[2] != 10 || occ[3] != 10) begin
      failures++; $display("FAIL cfg %0d output counts %0d %0d %0d %0d", cfg, occ[0], occ[1], occ[2], occ[3]);
    end
    if (tpiu_overflow || event_fifo_overflow != 0 || out_fifo_overflow || ptm1_branch != 16'd30) begin
      failures++; $display("FAIL cfg %0d overflow flags or %0d branches", cfg, ptm1_branch);
    end
    $display("configuration %0d: queueing %0d.%0d to %0d.%0d ms, property %0d", cfg,
             q_ms_x10[0] / 10, q_ms_x10[0] % 10, q_ms_x10[9] / 10, q_ms_x10[9] % 10, prop);
  endtask

  initial begin
    run_config(0);
    run_config(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400ms;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
