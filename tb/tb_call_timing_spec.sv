// tb_call_timing_spec: self-checking test of call_timing_spec, the
// queueing/response-time property over function calls.
//
// The four input FIFOs (first-word-fall-through models) are filled step by
// step, 64 time units apart. Inputs 0 and 1 (the two PTM cores) carry
// branch addresses drawn from the request, start and finish entry points,
// other addresses, and Context ID events (mux 1) at the watched addresses,
// which must not count. Inputs 2 and 3 carry random events. An input
// without an event in a step gets a broom-wagon event 100 units back.
// LIMIT is lowered to 300 units so both outcomes of the bound occur.
// The expected output comes from a reference model written here: the last
// request time before each call, the two differences, the bound and the
// running conjunction; per step a timestamp word and the data words in
// output order. Output back-pressure is random.
module tb_call_timing_spec;
  import rv_pkg::*;
  localparam logic [52:0] REQ = 53'h1_0EB0, START = 53'h1_0C3C, FIN = 53'h1_0C54;
  localparam logic [52:0] LIM = 53'd300;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0][61:0] dout;
  logic [3:0]       empty, rd_en;
  logic             ov, ordy;
  logic [61:0]      ow;
  logic [31:0]      nsteps, nev, nfilt, ntsd, nproto;
  call_timing_spec #(.N(4), .LIMIT(LIM)) dut (.clk, .rst, .fifo_dout(dout), .fifo_empty(empty),
    .fifo_rd_en(rd_en), .out_valid(ov), .out_word(ow), .out_ready(ordy), .n_steps(nsteps),
    .n_events(nev), .n_filtered(nfilt), .n_ts_dropped(ntsd), .n_protocol(nproto));

  logic [61:0] fifo0[$], fifo1[$], fifo2[$], fifo3[$];
  logic [61:0] exp_q[$];
  int          n_out = 0, n_real = 0, n_pass = 0, n_fail = 0, n_resp = 0;

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
    logic [52:0] maxt, last_req;
    bit          have_req, prop;
    maxt = 0; have_req = 0; prop = 1; last_req = 0;
    for (int s = 0; s < 400; s++) begin
      logic [52:0] t;
      bit          req, st, fin;
      t = 53'(1000 + 64 * s);
      req = 0; st = 0; fin = 0;
      for (int i = 0; i < 4; i++) begin
        if ($urandom_range(0, 2) != 0) begin
          logic [7:0]  m;
          logic [52:0] v;
          if (i < 2) begin
            case ($urandom_range(0, 9))
              0, 1:    v = REQ;
              2, 3:    v = START;
              4, 5:    v = FIN;
              default: v = 53'h1_0000 + 53'(4 * $urandom_range(0, 255));
            endcase
            m = ($urandom_range(0, 7) == 0) ? 8'd1 : 8'd0;
            if (m == 0) begin
              if (v == REQ) req = 1;
              if (v == START) st = 1;
              if (v == FIN) fin = 1;
            end
          end else begin
            m = 8'($urandom_range(0, 3)); v = 53'($urandom);
          end
          put(i, t, m, v); n_real++;
        end else put(i, t - 53'd100, 8'hFF, 53'h00C0FFEE);
      end
      if (have_req && (st || fin)) begin
        exp_q.push_back(ts_word(t));
        if (st) exp_q.push_back(data_word(8'd0, t - last_req));
        if (fin) begin exp_q.push_back(data_word(8'd1, t - last_req)); n_resp++; end
        if (st) begin
          bit p;
          p = (t - last_req) <= LIM;
          if (p) n_pass++; else n_fail++;
          prop = prop && p;
          exp_q.push_back(data_word(8'd2, 53'(p)));
          exp_q.push_back(data_word(8'd3, 53'(prop)));
        end
      end
      if (req) begin last_req = t; have_req = 1; end
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
    if (nfilt == 0 || nproto != 0 || ntsd == 0) begin failures++; $display("FAIL filtered %0d protocol %0d dropped %0d", nfilt, nproto, ntsd); end
    checks++;
    if (n_pass == 0 || n_fail == 0 || n_resp == 0) begin failures++; $display("FAIL stimulus too weak"); end
    $display("words out %0d, events %0d, bound met %0d, missed %0d, response times %0d",
             n_out, n_real, n_pass, n_fail, n_resp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
