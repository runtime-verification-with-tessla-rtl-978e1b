// count_spec: a TeSSLa specification network with multiple inputs: the
// stdlib count() macro applied to the events of every parser stream.
//
// For each input stream i the specification is
//     c_i = merge(last(c_i, e_i) + 1, 0)      out c_i
// i.e. a counter output that is 0 at time 0 and, at the time of every event
// on input i, the number of events so far. The module contains the pieces
// of the multi-input TeSSLa interface:
//   * one input_adapter per stream (MultiInputAdapter): reads its own FIFO,
//     filters stale broom-wagon times, marks broom wagons as time steps;
//   * the computation: the network may only advance to time t when every
//     input has reached t. So it waits until every input offers an item,
//     takes the smallest time t_min, consumes the items at t_min from all
//     inputs, and increments the counters of the inputs whose item is a real
//     event (the Last/+1/Merge/Const(0) nodes of count());
//   * the output adapter: merges all output streams into one word stream,
//     the timestamp word of t_min followed by one data word per output that
//     has an event at t_min (mux address = stream number, value = count);
//   * output_filter_adapter: drops timestamp words without data words.
// Without broom-wagon time steps on idle inputs the network would stall at
// the first event; the timestamp driver provides them.
//
// Timing: a time step without output costs one cycle, plus one cycle per
// output data word; each input adapter delivers one item per two cycles.
// Interface: per input a first-word-fall-through FIFO read port; one 62-bit
// output word stream with valid/ready.
// The adapter structure and the count() network follow the design
// description; the description's specification is compiled from a TeSSLa
// source by an external tool and is larger. This network is a hand-written
// instance of its count() example, extended to all inputs. The mux address
// and value of input events are not used by count(), which only counts them.
module count_spec
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
  output logic [31:0]             n_events,      // events counted
  output logic [31:0]             n_filtered,    // stale times removed
  output logic [31:0]             n_ts_dropped,  // empty output timestamps
  output logic [31:0]             n_protocol     // malformed input words
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

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

  // ---------------- computation and output adapter ----------------
  typedef enum logic [1:0] { S_INIT_TS, S_INIT_DATA, S_MERGE, S_DATA } state_e;

  state_e                  state;
  logic [N-1:0]            pending;       // outputs still to emit at this time
  logic [N-1:0][VAL_W-1:0] count;

  logic              all_valid;
  logic [TIME_W-1:0] tmin;
  logic [N-1:0]      hit;
  logic [IW-1:0]     first_pending;

  always_comb begin
    all_valid = &it_valid;
    tmin      = it_time[0];
    for (int i = 1; i < int'(N); i++) if (it_time[i] < tmin) tmin = it_time[i];
    for (int i = 0; i < int'(N); i++) hit[i] = (it_time[i] == tmin);
    first_pending = '0;
    for (int i = int'(N) - 1; i >= 0; i--) if (pending[i]) first_pending = IW'(i);
  end

  logic              ow_valid, ow_ready;
  logic [WORD_W-1:0] ow_word;

  always_comb begin
    ow_valid = 1'b0;
    ow_word  = ts_word('0);
    it_ready = '0;
    case (state)
      S_INIT_TS: ow_valid = 1'b1;
      S_INIT_DATA, S_DATA: begin
        ow_valid = 1'b1;
        ow_word  = data_word(MUX_W'(first_pending), count[first_pending]);
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
      count    <= '0;
      n_steps  <= '0;
      n_events <= '0;
    end else if (ow_ready) begin
      case (state)
        S_INIT_TS: begin
          pending <= '1;
          state   <= S_INIT_DATA;
        end
        S_INIT_DATA, S_DATA: begin
          logic [N-1:0] rest;
          rest = pending;
          rest[first_pending] = 1'b0;
          pending <= rest;
          if (rest == '0) state <= S_MERGE;
        end
        S_MERGE: begin
          if (all_valid) begin
            logic [N-1:0] evs;
            evs     = hit & it_ev;
            n_steps <= n_steps + 1'b1;
            for (int i = 0; i < int'(N); i++) if (evs[i]) count[i] <= count[i] + 1'b1;
            n_events <= n_events + 32'($countones(evs));
            pending  <= evs;
            if (evs != '0) state <= S_DATA;
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
