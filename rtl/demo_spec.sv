// demo_spec: the reference test specification of the pipeline as a
// hand-built TeSSLa network: 52 outputs derived from the PTM, FTM and ITM
// input streams.
//
// Input streams (TeSSLa input i, mux address m):
//   0 PTM core 0: m 0 etm0_addr, 1 etm0_value1_contextid, 3 etm0_value3_error
//   1 PTM core 1: m 0 etm1_addr, 1 etm1_value1_contextid, 3 etm1_value3_error
//   2 FTM:        m 0 ftm_value0, 3 ftm_value3_error
//   3 ITM:        m 0..31 itm_value00..31, 32 itm_value32_error
// Outputs (output number = mux address of the output data word):
//   000/005 address of core 0/1              001/006 count of addresses
//   002/007 count of Context IDs             003/008 thread ID = (ctx >> 8) & 0xFFFFFF
//   004/009 ASID = ctx & 0xFF                010/011 time since last address, core 0/1
//   012/013 time since last Context ID       014..019 itm_value20..25
//   020 ftm_value0                           021..033 itm ports 0..12 (malloc, free,
//   lock request/acquired/not acquired, unlock, read and write lock request/
//   acquired/not acquired, barrier wait)     034/035 lock request tid (v >> 24) & 0xFF
//   and address v & 0xFFFFFF                 036/037 the same for lock acquired
//   038/039 the same for unlock              040/041 itm ports 30/31 (info, error)
//   042..047 counts of malloc, free, barrier wait, lock request, lock acquired,
//   unlock                                   048..051 error streams of PTM 0/1, FTM, ITM
// count(x) is 0 at time 0 and the number of x events so far at each x event;
// a time difference is (time of the event) - (time of the previous event on
// the same stream) and has no event at the first one; every other output is
// the input value or a field of it, at the time of the input event.
//
// How it works: the input side is that of count_spec. One input_adapter per
// stream filters stale broom-wagon times and turns broom wagons into pure
// time steps. The network advances to the smallest time t_min offered once
// every input offers an item, and consumes the items at t_min. Because each
// input has strictly increasing times, a step holds at most one event per
// input. The step's output values are computed in one cycle into a register
// file of 52 values with a pending mask. The output adapter then writes the
// timestamp word of t_min, followed by one data word per pending output in
// output-number order. output_filter_adapter removes timestamp words that no
// data word follows, such as steps made only of broom wagons.
//
// Timing: a step costs one cycle for the timestamp word plus one cycle per
// output event, with 13 data words at most (an address and a Context ID on
// both cores, an FTM word and an ITM lock event). Each input adapter gives
// one item per two cycles. Interface: the same as count_spec, a
// first-word-fall-through FIFO read port per input and a 62-bit output word
// stream with valid/ready.
// The stream names, the mux addresses, the output numbering and the output
// definitions follow the design's reference specification; that
// specification is compiled to a network by an external tool. This module
// is a hand-written equivalent of that network, not the generated one, and
// its scheduling (one output word per cycle, in output-number order) is this
// design's choice.
module demo_spec
  import rv_pkg::*;
#(
  parameter int unsigned N = N_STREAMS
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

  localparam int unsigned N_OUT = 52;
  localparam int unsigned OW    = $clog2(N_OUT);
  // count() instances: etm0 addr, etm0 ctx, etm1 addr, etm1 ctx, malloc,
  // free, barrier, lock request, lock acquired, unlock
  localparam int unsigned N_CNT = 10;
  // output number of each count()
  localparam logic [N_CNT-1:0][OW-1:0] CNT_OUT = {
    6'd47, 6'd46, 6'd45, 6'd44, 6'd43, 6'd42, 6'd7, 6'd6, 6'd2, 6'd1
  };

  // streams: input index and mux address
  localparam int unsigned S_PTM0 = 0, S_PTM1 = 1, S_FTM = 2, S_ITM = 3;

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

  // event of stream (input s, mux address m) in this step
  function automatic logic ev_on(input logic [N-1:0] e, input logic [N-1:0][MUX_W-1:0] mx,
                                 input int unsigned s, input int unsigned m);
    return e[s] && mx[s] == MUX_W'(m);
  endfunction

  // ---------------- network state ----------------
  logic [N_CNT-1:0][VAL_W-1:0] cnt;
  logic [3:0][TIME_W-1:0]      last_t;      // etm0 addr, etm1 addr, etm0 ctx, etm1 ctx
  logic [3:0]                  last_ok;

  // ---------------- one step of the network ----------------
  logic [N_CNT-1:0]            cnt_inc;
  logic [3:0]                  dt_ev;
  logic [N_OUT-1:0]            step_pend;
  logic [N_OUT-1:0][VAL_W-1:0] step_val;

  always_comb begin
    logic [VAL_W-1:0] v0, v1, v2, v3;
    logic             a0, c0, a1, c1;
    v0 = it_value[S_PTM0];
    v1 = it_value[S_PTM1];
    v2 = it_value[S_FTM];
    v3 = it_value[S_ITM];
    a0 = ev_on(evs, it_mux, S_PTM0, int'(MUX_PTM_ADDR));
    c0 = ev_on(evs, it_mux, S_PTM0, int'(MUX_PTM_CTXID));
    a1 = ev_on(evs, it_mux, S_PTM1, int'(MUX_PTM_ADDR));
    c1 = ev_on(evs, it_mux, S_PTM1, int'(MUX_PTM_CTXID));

    cnt_inc = {ev_on(evs, it_mux, S_ITM, 5),  ev_on(evs, it_mux, S_ITM, 3),
               ev_on(evs, it_mux, S_ITM, 2),  ev_on(evs, it_mux, S_ITM, 12),
               ev_on(evs, it_mux, S_ITM, 1),  ev_on(evs, it_mux, S_ITM, 0),
               c1, a1, c0, a0};
    dt_ev   = {c1 && last_ok[3], c0 && last_ok[2], a1 && last_ok[1], a0 && last_ok[0]};

    step_pend = '0;
    step_val  = '0;
    // counts: the value after this event
    for (int k = 0; k < int'(N_CNT); k++) begin
      step_pend[CNT_OUT[k]] = cnt_inc[k];
      step_val[CNT_OUT[k]]  = cnt[k] + 1'b1;
    end
    // core 0 and core 1
    step_pend[0]  = a0;  step_val[0]  = v0;
    step_pend[3]  = c0;  step_val[3]  = VAL_W'((v0 >> 8) & 53'h0FF_FFFF);
    step_pend[4]  = c0;  step_val[4]  = VAL_W'(v0 & 53'hFF);
    step_pend[5]  = a1;  step_val[5]  = v1;
    step_pend[8]  = c1;  step_val[8]  = VAL_W'((v1 >> 8) & 53'h0FF_FFFF);
    step_pend[9]  = c1;  step_val[9]  = VAL_W'(v1 & 53'hFF);
    // time differences
    step_pend[10] = dt_ev[0];  step_val[10] = tmin - last_t[0];
    step_pend[11] = dt_ev[1];  step_val[11] = tmin - last_t[1];
    step_pend[12] = dt_ev[2];  step_val[12] = tmin - last_t[2];
    step_pend[13] = dt_ev[3];  step_val[13] = tmin - last_t[3];
    // ITM ports 20..25 shown
    for (int p = 0; p < 6; p++) begin
      step_pend[14 + p] = ev_on(evs, it_mux, S_ITM, 20 + p);
      step_val[14 + p]  = v3;
    end
    // FTM
    step_pend[20] = ev_on(evs, it_mux, S_FTM, int'(MUX_FTM_DATA));
    step_val[20]  = v2;
    // instrumentation ports 0..12
    for (int p = 0; p < 13; p++) begin
      step_pend[21 + p] = ev_on(evs, it_mux, S_ITM, p);
      step_val[21 + p]  = v3;
    end
    // thread ID and lock address of lock request (2), acquired (3), unlock (5)
    step_pend[34] = ev_on(evs, it_mux, S_ITM, 2);  step_val[34] = VAL_W'((v3 >> 24) & 53'hFF);
    step_pend[35] = ev_on(evs, it_mux, S_ITM, 2);  step_val[35] = VAL_W'(v3 & 53'hFF_FFFF);
    step_pend[36] = ev_on(evs, it_mux, S_ITM, 3);  step_val[36] = VAL_W'((v3 >> 24) & 53'hFF);
    step_pend[37] = ev_on(evs, it_mux, S_ITM, 3);  step_val[37] = VAL_W'(v3 & 53'hFF_FFFF);
    step_pend[38] = ev_on(evs, it_mux, S_ITM, 5);  step_val[38] = VAL_W'((v3 >> 24) & 53'hFF);
    step_pend[39] = ev_on(evs, it_mux, S_ITM, 5);  step_val[39] = VAL_W'(v3 & 53'hFF_FFFF);
    // info and error ports
    step_pend[40] = ev_on(evs, it_mux, S_ITM, 30); step_val[40] = v3;
    step_pend[41] = ev_on(evs, it_mux, S_ITM, 31); step_val[41] = v3;
    // error streams
    step_pend[48] = ev_on(evs, it_mux, S_PTM0, 3); step_val[48] = v0;
    step_pend[49] = ev_on(evs, it_mux, S_PTM1, 3); step_val[49] = v1;
    step_pend[50] = ev_on(evs, it_mux, S_FTM, 3);  step_val[50] = v2;
    step_pend[51] = ev_on(evs, it_mux, S_ITM, 32); step_val[51] = v3;
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
      state    <= S_INIT_TS;
      pending  <= '0;
      oval     <= '0;
      cnt      <= '0;
      last_t   <= '0;
      last_ok  <= '0;
      n_steps  <= '0;
      n_events <= '0;
    end else if (ow_ready) begin
      case (state)
        S_INIT_TS: begin
          // merge(..., 0): every count() starts with 0 at time 0
          logic [N_OUT-1:0] p;
          p = '0;
          for (int k = 0; k < int'(N_CNT); k++) p[CNT_OUT[k]] = 1'b1;
          pending <= p;
          oval    <= '0;
          state   <= S_DATA;
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
            for (int k = 0; k < int'(N_CNT); k++) if (cnt_inc[k]) cnt[k] <= cnt[k] + 1'b1;
            // last time of each delta stream, updated at its events
            if (cnt_inc[0]) begin last_t[0] <= tmin; last_ok[0] <= 1'b1; end
            if (cnt_inc[2]) begin last_t[1] <= tmin; last_ok[1] <= 1'b1; end
            if (cnt_inc[1]) begin last_t[2] <= tmin; last_ok[2] <= 1'b1; end
            if (cnt_inc[3]) begin last_t[3] <= tmin; last_ok[3] <= 1'b1; end
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
