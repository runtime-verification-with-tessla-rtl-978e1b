// malloc_spec: memory-allocation property as a TeSSLa network: every
// allocated block is freed again, checked with a fixed-capacity set.
//
// The instrumentation library reports malloc() results on ITM port 0 and
// free() arguments on ITM port 1 (TeSSLa input 3, mux addresses 0 and 1).
// Each such event is a key for a set of CAPACITY slots, each slot either
// empty or holding one address. For a key the slots are visited in order
// 0, 1, ... with a flag f, which is 1 for malloc and 0 for free:
//   * an empty slot while f = 1 takes the key (add);
//   * a slot holding the key is found; with f = 0 it is emptied (remove);
//   * after an add or a find, f is 0 for the later slots.
// If f is still 1 after the last slot, the malloc found no room: overflow.
// Outputs (mux address of the output data word):
//   0 n_allocations          number of occupied slots, 0 at time 0 and
//                            then at every key
//   1 overflow               1 at a malloc that found no room
//   2 never_overflow         1 at time 0, then at every overflow the value
//                            (previous value and not overflow), i.e. 0
//   3 all_allocations_freed  (n_allocations == 0) and never_overflow, 1 at
//                            time 0 and then at every key
//   4 double_malloc          malloc and n_allocations unchanged from its
//                            previous value, i.e. the address was already in
//                            the set (or the set was full); at every key from
//                            the first malloc on
//   5 never_double_malloc    1 at time 0, then at every double_malloc event
//                            the previous value and not double_malloc
// The other inputs only carry time forward.
//
// How it works: the same multi-input front end as demo_spec (input adapters,
// time steps at the smallest offered time, at most one event per input per
// step), the set walk done in one cycle over all slots, and the same output
// adapter and output filter. Interface and timing are those of demo_spec;
// a step writes at most six data words.
// The property, the set algorithm (slot order, add, find, remove, overflow)
// and the capacity of 8 follow the design description's specification. The
// slot contents use an occupied bit in place of the value -1 for an empty
// slot (so the key value -1 is an ordinary address here), which is this
// design's choice.
module malloc_spec
  import rv_pkg::*;
#(
  parameter int unsigned N        = N_STREAMS,
  parameter int unsigned CAPACITY = 8
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

  localparam int unsigned N_OUT = 6;
  localparam int unsigned OW    = $clog2(N_OUT);
  localparam int unsigned S_ITM = 3;
  localparam int unsigned CW    = $clog2(CAPACITY + 1);

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
  logic [CAPACITY-1:0]            occ;
  logic [CAPACITY-1:0][VAL_W-1:0] slot;
  logic [CW-1:0]                  prev_n;
  logic                           seen_malloc;   // a malloc key was seen
  logic                           never_ovf, never_dbl;

  // ---------------- one step of the network ----------------
  logic                           key_ev, is_malloc, ovf, dbl, nov, ndb;
  logic [CAPACITY-1:0]            n_occ;
  logic [CAPACITY-1:0][VAL_W-1:0] n_slot;
  logic [CW-1:0]                  n_alloc;
  logic [N_OUT-1:0]               step_pend;
  logic [N_OUT-1:0][VAL_W-1:0]    step_val;

  always_comb begin
    logic             f;
    logic [VAL_W-1:0] key;
    key_ev    = evs[S_ITM] && (it_mux[S_ITM] == 8'd0 || it_mux[S_ITM] == 8'd1);
    is_malloc = it_mux[S_ITM] == 8'd0;
    key       = it_value[S_ITM];
    f         = is_malloc;
    n_occ     = occ;
    n_slot    = slot;
    for (int i = 0; i < int'(CAPACITY); i++) begin
      logic add, found;
      add   = f && !occ[i];
      found = occ[i] && slot[i] == key;
      if (add) begin
        n_occ[i]  = 1'b1;
        n_slot[i] = key;
      end else if (!f && found) begin
        n_occ[i] = 1'b0;
      end
      f = f && !(add || found);
    end
    ovf     = f;
    n_alloc = CW'($countones(n_occ));
    dbl     = is_malloc && n_alloc == prev_n;
    nov     = never_ovf && !ovf;
    ndb     = never_dbl && !dbl;

    step_pend = '0;
    step_val  = '0;
    if (key_ev) begin
      step_pend[0] = 1'b1;       step_val[0] = VAL_W'(n_alloc);
      step_pend[1] = ovf;        step_val[1] = VAL_W'(1);
      step_pend[2] = ovf;        step_val[2] = VAL_W'(nov);
      step_pend[3] = 1'b1;       step_val[3] = VAL_W'(n_alloc == '0 && nov);
      step_pend[4] = seen_malloc || is_malloc;  step_val[4] = VAL_W'(dbl);
      step_pend[5] = seen_malloc || is_malloc;  step_val[5] = VAL_W'(ndb);
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
      occ       <= '0;
      slot      <= '0;
      prev_n    <= '0;
      seen_malloc <= 1'b0;
      never_ovf <= 1'b1;
      never_dbl <= 1'b1;
      n_steps   <= '0;
      n_events  <= '0;
    end else if (ow_ready) begin
      case (state)
        S_INIT_TS: begin
          // time 0: n_allocations = 0, none() outputs true, so the set is
          // empty and never overflowed
          pending    <= N_OUT'(6'b101101);
          oval       <= '0;
          oval[2]    <= VAL_W'(1);
          oval[3]    <= VAL_W'(1);
          oval[5]    <= VAL_W'(1);
          state      <= S_DATA;
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
            if (key_ev) begin
              occ       <= n_occ;
              slot      <= n_slot;
              prev_n    <= n_alloc;
              never_ovf <= nov;
              if (is_malloc) seen_malloc <= 1'b1;
              if (seen_malloc || is_malloc) never_dbl <= ndb;
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
