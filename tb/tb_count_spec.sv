// tb_count_spec: self-checking test of count_spec with four inputs.
// Each input FIFO (first-word-fall-through model) is filled as the parser
// side would fill it: at every step some inputs carry real events; the
// others carry a broom-wagon event whose time lies below every later real
// time but often below earlier times of that input (these must be filtered);
// a final push ends all inputs. The expected output is computed from the
// real events only: timestamp 0 with count 0 for all four outputs, then for
// each event time in order its timestamp word and, per input with an event
// at that time, a data word (mux = input number, value = running count).
// Output back-pressure is random. Also checks that without the final push
// the network holds back exactly the events later than the time every
// input has reached.
module tb_count_spec;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0][61:0] dout;
  logic [3:0]       empty, rd_en;
  logic             ov, ordy;
  logic [61:0]      ow;
  logic [31:0]      nsteps, nev, nfilt, ntsd, nproto;
  count_spec #(.N(4)) dut (.clk, .rst, .fifo_dout(dout), .fifo_empty(empty), .fifo_rd_en(rd_en),
    .out_valid(ov), .out_word(ow), .out_ready(ordy), .n_steps(nsteps), .n_events(nev),
    .n_filtered(nfilt), .n_ts_dropped(ntsd), .n_protocol(nproto));

  logic [61:0] fifo0[$], fifo1[$], fifo2[$], fifo3[$];
  logic [61:0] exp_q[$];
  int          n_out = 0, n_real = 0;

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

  initial begin
    int cnt[4];
    logic [52:0] maxt, lastt[4], lmin;
    logic [52:0] evt[$];
    int          held;
    maxt = 0;
    for (int i = 0; i < 4; i++) lastt[i] = 0;
    exp_q.push_back(ts_word('0));
    for (int i = 0; i < 4; i++) begin exp_q.push_back(data_word(8'(i), '0)); cnt[i] = 0; end
    for (int s = 0; s < 80; s++) begin
      logic [3:0]  w;
      logic [52:0] t[4];
      int          first;
      bit          any;
      w = 4'($urandom);
      if (s == 79) w = 4'b0001;
      first = -1;
      for (int i = 3; i >= 0; i--) begin
        t[i] = 53'(1000 + 16 * s + 4 * i);    // input-specific pipeline offset
        if (w[i]) first = i;
      end
      if (w == 0) continue;
      // expected output for this step: times differ per input, so each
      // real event is its own time step, in time order (input order here)
      for (int i = 0; i < 4; i++) if (w[i]) begin
        cnt[i]++;
        n_real++;
        exp_q.push_back(ts_word(t[i]));
        exp_q.push_back(data_word(8'(i), 53'(cnt[i])));
        evt.push_back(t[i]);
        if (t[i] > maxt) maxt = t[i];
      end
      for (int i = 0; i < 4; i++) begin
        if (w[i]) put(i, t[i], 8'h00, 53'(s));
        else      put(i, t[first] - 53'd40, 8'hFF, 53'h00C0FFEE);
        if (w[i] && t[i] > lastt[i]) lastt[i] = t[i];
        if (!w[i] && t[first] - 53'd40 > lastt[i]) lastt[i] = t[first] - 53'd40;
      end
    end
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (2000) @(posedge clk);
    // without the final push, events after the time every input has
    // reached cannot be sent yet
    lmin = lastt[0];
    for (int i = 1; i < 4; i++) if (lastt[i] < lmin) lmin = lastt[i];
    held = 0;
    foreach (evt[k]) if (evt[k] > lmin) held++;
    checks++;
    if (held == 0 || exp_q.size() != 2 * held) begin
      failures++; $display("FAIL before final push %0d words left, exp %0d", exp_q.size(), 2 * held);
    end
    for (int i = 0; i < 4; i++) put(i, maxt + 53'd16, 8'hFF, 53'h00C0FFEE);
    repeat (200) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d words missing", exp_q.size()); end
    checks++;
    if (nev != 32'(n_real)) begin failures++; $display("FAIL event count %0d exp %0d", nev, n_real); end
    checks++;
    if (nfilt == 0) begin failures++; $display("FAIL no stale broom wagon filtered"); end
    checks++;
    if (ntsd == 0 || nproto != 0) begin failures++; $display("FAIL ts dropped %0d protocol %0d", ntsd, nproto); end
    $display("filtered %0d, steps %0d, empty timestamps dropped %0d", nfilt, nsteps, ntsd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
