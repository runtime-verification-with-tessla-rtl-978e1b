// call_timing_spec: queueing and response time of one request type, from
// function calls seen in the branch-address streams of both cores, checked
// against a bound with all().
//
// A function call is a branch address equal to the function's entry point
// on PTM core 0 or core 1 (TeSSLa inputs 0 and 1, mux address 0). Three
// functions are watched: the request (REQ_ADDR), the start of processing
// (START_ADDR) and its end (FIN_ADDR). Outputs (mux address):
//   0 queueing_time   at a start call: its time minus the time of the last
//                     request call before it
//   1 response_time   at a finish call: its time minus the time of the last
//                     request call before it
//   2 p               at a start call: queueing_time <= LIMIT
//   3 property        at a start call: all p so far were true
// Both differences need an earlier request and exist only after one. Times
// are in the units of the input timestamps, 1/16 of a 125 MHz cycle, so the
// default LIMIT of 10,000,000 is 5 ms. Calls in the same step count as
// simultaneous: a request and a start at one time pair the start with the
// previous request.
//
// How it works: the same multi-input front end as demo_spec (input adapters,
// time steps at the smallest offered time, at most one event per input per
// step), two registers for the last request time and the property, and the
// same output adapter and output filter. Interface and timing are those of
// demo_spec; a step writes at most four data words. Inputs 2 and 3 only
// carry time forward.
// The function-call test on both cores, the two time differences, the
// comparison with the bound and all() follow the design description's
// simple event-handler specification, as do the default addresses and the
// bound. The output numbering is this design's choice.
module call_timing_spec
  import rv_pkg::*;
#(
  parameter int unsigned N          = N_STREAMS,
  parameter logic [52:0] REQ_ADDR   = 53'h1_0EB0,
  parameter logic [52:0] START_ADDR = 53'h1_0C3C,
  parameter logic [52:0] FIN_ADDR   = 53'h1_0C54,
  parameter logic [52:0] LIMIT      = 53'h98_9680
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [N-1:0][WORD_W-1:0] fifo_dout,
  input  logic [N-1:0]            fifo_empty,
  output logic [N-1:0]            fifo_rd_en,
  output logic                    out_valid,
  output logic [WORD_W-1:0]       out_word,
  input  logic                    out_ready,
  output logic [31:0]             n_steps,       // time steps processed
  output logic [31:0]             n_events,      // input events consumed
  output logic [31:0]             n_filtered,    // stale times removed
  output logic [31:0]             n_ts_dropped,  // empty output timestamps
  output logic [31:0]             n_protocol     // malformed input words
);

  localparam int unsigned N_OUT = 4;
  localparam int unsigned OW    = $clog2(N_OUT);

  logic [N-1:0]              it_valid, it_ready, it_ev;
  logic [N-1:0][TIME_W-1:0]  it_time;
  logic [N-1:0][MUX_W-1:0]   it_mux;
  logic [N-1:0][VAL_W-1:0]   it_value;
  logic [N-1:0][31:0]        filt, proto;

  for (genvar g = 0; g < int'(N); g++) begin : g_in
    input_adapter u_ia (
      .clk, .rst,
      .fifo_dout(fifo_dout[g]), .fifo_empty(fifo_empty[g]), .fifo_rd_en(fifo_rd_en[g]),
      .out_valid(it_valid[g]), .out_time(it_time[g]), .out_is_event(it_ev[g]),
      .out_mux(it_mux[g]), .out_value(it_value[g]), .out_ready(it_ready[g]),
      .n_filtered(filt[g]), .n_protocol(proto[g])
    );
  end

  always_comb begin
    n_filtered = '0;
    n_protocol = '0;
    for (int i = 0; i < int'(N); i++) begin
      n_filtered = n_filtered + filt[i];
      n_protocol = n_protocol + proto[i];
    end
  end

  // ---------------- step selection ----------------
  logic              all_valid;
  logic [TIME_W-1:0] tmin;
  logic [N-1:0]      hit, evs;

  always_comb begin
    all_valid = &it_valid;
    tmin      = it_time[0];
    for (int i = 1; i < int'(N); i++) if (it_time[i] < tmin) tmin = it_time[i];
    for (int i = 0; i < int'(N); i++) hit[i] = (it_time[i] == tmin);
    evs = hit & it_ev;
  end

  // ---------------- network state ----------------
  logic [TIME_W-1:0] last_req;       // time of the last request call
  logic              have_req;       // a request call was seen
  logic              prop;           // all(p) so far

  // ---------------- one step of the network ----------------
  logic                        req_hit, start_hit, fin_hit, p_ok, n_prop;
  logic [TIME_W-1:0]           dt;             // time since the last request
  logic [N_OUT-1:0]            step_pend;
  logic [N_OUT-1:0][VAL_W-1:0] step_val;

  function automatic logic call_to(input logic [N-1:0] e, input logic [N-1:0][MUX_W-1:0] m,
                                   input logic [N-1:0][VAL_W-1:0] v, input logic [52:0] addr);
    return (e[0] && m[0] == 8'd0 && v[0] == addr) || (e[1] && m[1] == 8'd0 && v[1] == addr);
  endfunction

  always_comb begin
    req_hit   = call_to(evs, it_mux, it_value, REQ_ADDR);
    start_hit = call_to(evs, it_mux, it_value, START_ADDR);
    fin_hit   = call_to(evs, it_mux, it_value, FIN_ADDR);
    dt        = tmin - last_req;
    p_ok      = dt <= LIMIT;
    n_prop    = prop && p_ok;
    step_pend = '0;
    step_val  = '0;
    if (have_req && start_hit) begin
      step_pend[0] = 1'b1; step_val[0] = dt;
      step_pend[2] = 1'b1; step_val[2] = VAL_W'(p_ok);
      step_pend[3] = 1'b1; step_val[3] = VAL_W'(n_prop);
    end
    if (have_req && fin_hit) begin
      step_pend[1] = 1'b1; step_val[1] = dt;
    end
  end

  // ---------------- output adapter ----------------
  typedef enum logic [1:0] { S_INIT_TS, S_MERGE, S_DATA } state_e;

  state_e                      state;
  logic [N_OUT-1:0]            pending;
  logic [N_OUT-1:0][VAL_W-1:0] oval;
  logic [OW-1:0]               first_pending;

  always_comb begin
    first_pending = '0;
    for (int i = int'(N_OUT) - 1; i >= 0; i--) if (pending[i]) first_pending = OW'(i);
  end

  logic              ow_valid, ow_ready;
  logic [WORD_W-1:0] ow_word;

  always_comb begin
    ow_valid = 1'b0;
    ow_word  = ts_word('0);
    it_ready = '0;
    case (state)
      S_INIT_TS: ow_valid = 1'b1;
      S_DATA: begin
        ow_valid = 1'b1;
        ow_word  = data_word(MUX_W'(first_pending), oval[first_pending]);
      end
      S_MERGE: begin
        if (all_valid) begin
          ow_valid = 1'b1;
          ow_word  = ts_word(tmin);
          if (ow_ready) it_ready = hit;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_INIT_TS;
      pending   <= '0;
      oval      <= '0;
      last_req  <= '0;
      have_req  <= 1'b0;
      prop      <= 1'b1;
      n_steps   <= '0;
      n_events  <= '0;
    end else if (ow_ready) begin
      case (state)
        S_INIT_TS: begin
          // no output exists before the first start or finish call
          pending <= '0;
          state   <= S_MERGE;
        end
        S_DATA: begin
          logic [N_OUT-1:0] rest;
          rest = pending;
          rest[first_pending] = 1'b0;
          pending <= rest;
          if (rest == '0) state <= S_MERGE;
        end
        S_MERGE: begin
          if (all_valid) begin
            n_steps  <= n_steps + 1'b1;
            n_events <= n_events + 32'($countones(evs));
            if (have_req && start_hit) prop <= n_prop;
            if (req_hit) begin
              last_req <= tmin;
              have_req <= 1'b1;
            end
            pending <= step_pend;
            oval    <= step_val;
            if (step_pend != '0) state <= S_DATA;
          end
        end
        default: state <= S_MERGE;
      endcase
    end
  end

  output_filter_adapter u_filter (
    .clk, .rst,
    .in_valid(ow_valid), .in_word(ow_word), .in_ready(ow_ready),
    .out_valid, .out_word, .out_ready,
    .n_dropped(n_ts_dropped)
  );

endmodule
