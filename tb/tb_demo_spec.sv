// tb_demo_spec: self-checking test of demo_spec, the 52-output reference
// specification network.
//
// The four input FIFOs (first-word-fall-through models) are filled step by
// step. In each step a random subset of inputs carries a real event, all
// at the same time, so one step yields several outputs. The event's mux
// address is drawn from the streams the input defines plus some addresses
// no output uses. The other inputs carry a broom-wagon event 100 units
// earlier (steps are 64 apart), which is often below their previous time and must be filtered.
// A final push at the end lets the network finish.
// The expected output comes from a reference model of the specification,
// written here independently of the module as an associative array of
// output number -> value per step:
//   * time 0: a timestamp word, then 0 for the ten count() outputs;
//   * each step with at least one output: its timestamp word, then the
//     data words in output-number order.
// Output back-pressure is random. The time differences, counts, field
// extractions and the ITM port mapping are all exercised.
module tb_demo_spec;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0][61:0] dout;
  logic [3:0]       empty, rd_en;
  logic             ov, ordy;
  logic [61:0]      ow;
  logic [31:0]      nsteps, nev, nfilt, ntsd, nproto;
  demo_spec #(.N(4)) dut (.clk, .rst, .fifo_dout(dout), .fifo_empty(empty), .fifo_rd_en(rd_en),
    .out_valid(ov), .out_word(ow), .out_ready(ordy), .n_steps(nsteps), .n_events(nev),
    .n_filtered(nfilt), .n_ts_dropped(ntsd), .n_protocol(nproto));

  logic [61:0] fifo0[$], fifo1[$], fifo2[$], fifo3[$];
  logic [61:0] exp_q[$];
  int          n_out = 0, n_real = 0, n_multi = 0, n_delta = 0;

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
  int          cnt[int];          // count() state, keyed by output number
  logic [52:0] last_time[int];    // time-difference state, keyed by output number

  function automatic void count_ev(ref logic [52:0] o[int], input int out_no);
    if (!cnt.exists(out_no)) cnt[out_no] = 0;
    cnt[out_no]++;
    o[out_no] = 53'(cnt[out_no]);
  endfunction

  function automatic void delta_ev(ref logic [52:0] o[int], input int out_no, input logic [52:0] t);
    if (last_time.exists(out_no)) begin o[out_no] = t - last_time[out_no]; n_delta++; end
    last_time[out_no] = t;
  endfunction

  function automatic void model(ref logic [52:0] o[int], input int i, input int m,
                                input logic [52:0] v, input logic [52:0] t);
    case (i)
      0, 1: begin
        int b;
        b = (i == 0) ? 0 : 5;
        if (m == 0) begin
          o[b] = v; count_ev(o, b + 1); delta_ev(o, 10 + i, t);
        end else if (m == 1) begin
          count_ev(o, b + 2);
          o[b + 3] = (v >> 8) & 53'hFF_FFFF;
          o[b + 4] = v & 53'hFF;
          delta_ev(o, 12 + i, t);
        end else if (m == 3) o[48 + i] = v;
      end
      2: begin
        if (m == 0) o[20] = v;
        else if (m == 3) o[50] = v;
      end
      default: begin
        if (m <= 12) o[21 + m] = v;
        if (m >= 20 && m <= 25) o[14 + m - 20] = v;
        if (m == 30) o[40] = v;
        if (m == 31) o[41] = v;
        if (m == 32) o[51] = v;
        if (m == 0)  count_ev(o, 42);
        if (m == 1)  count_ev(o, 43);
        if (m == 12) count_ev(o, 44);
        if (m == 2) begin count_ev(o, 45); o[34] = (v >> 24) & 53'hFF; o[35] = v & 53'hFF_FFFF; end
        if (m == 3) begin count_ev(o, 46); o[36] = (v >> 24) & 53'hFF; o[37] = v & 53'hFF_FFFF; end
        if (m == 5) begin count_ev(o, 47); o[38] = (v >> 24) & 53'hFF; o[39] = v & 53'hFF_FFFF; end
      end
    endcase
  endfunction

  initial begin
    logic [52:0] maxt;
    int          ptm_mux[3] = '{0, 1, 3};
    int          ftm_mux[3] = '{0, 3, 1};
    maxt = 0;
    exp_q.push_back(ts_word('0));
    // counts start at 0, in output-number order
    exp_q.push_back(data_word(8'd1, '0));  exp_q.push_back(data_word(8'd2, '0));
    exp_q.push_back(data_word(8'd6, '0));  exp_q.push_back(data_word(8'd7, '0));
    for (int k = 42; k <= 47; k++) exp_q.push_back(data_word(8'(k), '0));
    for (int s = 0; s < 300; s++) begin
      logic [3:0]  w;
      logic [52:0] t;
      logic [52:0] o[int];
      o.delete();
      w = 4'($urandom);
      if (w == 0) continue;
      t = 53'(1000 + 64 * s);
      if ($countones(w) > 1) n_multi++;
      for (int i = 0; i < 4; i++) begin
        if (w[i]) begin
          int          m;
          logic [52:0] v;
          case (i)
            0, 1:    m = ptm_mux[$urandom_range(0, 2)];
            2:       m = ftm_mux[$urandom_range(0, 2)];
            default: m = $urandom_range(0, 33);
          endcase
          v = 53'($urandom);
          model(o, i, m, v, t);
          put(i, t, 8'(m), v);
          n_real++;
        end else begin
          put(i, t - 53'd100, 8'hFF, 53'h00C0FFEE);
        end
      end
      if (o.size() != 0) begin
        exp_q.push_back(ts_word(t));
        foreach (o[k]) exp_q.push_back(data_word(8'(k), o[k]));
      end
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
    if (n_multi == 0 || n_delta == 0) begin failures++; $display("FAIL stimulus too weak"); end
    $display("words out %0d, events %0d, steps with several events %0d, time differences %0d, filtered %0d, empty timestamps dropped %0d",
             n_out, n_real, n_multi, n_delta, nfilt, ntsd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
