// rv_top: FPGA runtime-verification pipeline from the CoreSight trace port
// to a TeSSLa specification and its output buffer.
//
// Data flow (three clock domains joined by asynchronous FIFOs):
//   clk_tpiu (200 MHz): 32-bit trace-port words in ----------------+
//   clk_cs   (125 MHz): frame_sync -> frame_parser -> 4 sync FIFOs |
//                       -> ptm_parser (core 0), ptm_parser (core 1),
//                          ftm_parser, itm_parser -> timestamp_driver
//   clk_tessla (50 MHz): 4 x 2:1 FIFOs -> demo_spec, count_spec,
//                        malloc_spec or call_timing_spec (input adapters,
//                        specification network, output adapter and filter)
//   clk_tpiu (200 MHz): 2:1 output FIFO (512 KiB) -> 32-bit read port
// The trace-port capture and the AXI register interface of the surrounding
// controller are outside this module: trace words arrive on tpiu_valid/
// tpiu_data (at most one word every two cycles at 200 MHz, 400 MB/s) and the
// specification output is read with axi_rd_en/axi_rd_data/axi_empty, 32 bits
// at a time, lower half (bits 31:0 of the 64-bit output word) first.
// The 64-bit output word is {2'b00, 62-bit TeSSLa word}.
//
// Stream order at the TeSSLa inputs: 0 = PTM core 0, 1 = PTM core 1,
// 2 = FTM, 3 = ITM. Status outputs count packets, broom-wagon events and
// dropped words, and flag FIFO overflows (sticky).
// Clock frequencies, FIFO ratios, the output buffer size and the module
// structure follow the design description; FIFO depths other than the output
// buffer are this design's choice. The default specification network is
// the reference test specification (demo_spec); SPEC = 1 selects the
// smaller count() network (count_spec), SPEC = 2 the allocation-set
// property (malloc_spec) and SPEC = 3 the queueing-time property over
// function calls (call_timing_spec) in its place.
module rv_top
  import rv_pkg::*;
#(
  parameter int unsigned IN_FIFO_DEPTH     = 512,      // trace-port words
  parameter int unsigned TESSLA_FIFO_DEPTH = 512,      // event pairs per input
  parameter int unsigned OUT_FIFO_DEPTH    = 65536,    // 64-bit words = 512 KiB
  parameter int unsigned CHUNK_FIFO_DEPTH  = 8,        // frames per parser
  parameter int unsigned FINAL_WAIT        = 12_500_000,
  // specification network: 0 = reference test specification (demo_spec),
  // 1 = count() of every input (count_spec), 2 = allocation set (malloc_spec),
  // 3 = queueing/response time of function calls (call_timing_spec)
  parameter int unsigned SPEC              = 0
) (
  input  logic        clk_tpiu,
  input  logic        rst_tpiu,
  input  logic        clk_cs,
  input  logic        rst_cs,
  input  logic        clk_tessla,
  input  logic        rst_tessla,

  // trace port (clk_tpiu)
  input  logic        tpiu_valid,
  input  logic [31:0] tpiu_data,
  output logic        tpiu_overflow,

  // output buffer read port (clk_tpiu)
  input  logic        axi_rd_en,
  output logic [31:0] axi_rd_data,
  output logic        axi_empty,

  // status (clk_cs)
  output logic [15:0] ptm0_isync, ptm0_branch, ptm0_atom,
  output logic [15:0] ptm1_isync, ptm1_branch, ptm1_atom,
  output logic [15:0] itm_swit,
  output logic [15:0] ftm_trace,
  output logic [31:0] sync_words,
  output logic [31:0] broom_events,
  output logic [31:0] final_pushes,
  output logic [N_STREAMS-1:0] event_fifo_overflow,
  // status (clk_tessla)
  output logic [31:0] spec_steps,
  output logic [31:0] spec_events,
  output logic [31:0] spec_filtered,
  output logic        out_fifo_overflow
);

  // ---------------- trace port to parser clock ----------------
  logic        tw_empty, tw_rd_en;
  logic [31:0] tw_data;
  logic        tw_full;

  async_fifo #(.WR_W(32), .RATIO(1), .DEPTH(IN_FIFO_DEPTH)) u_tpiu_fifo (
    .wr_clk(clk_tpiu), .wr_rst(rst_tpiu), .wr_en(tpiu_valid), .wr_data(tpiu_data),
    .full(tw_full), .wr_overflow(tpiu_overflow),
    .rd_clk(clk_cs), .rd_rst(rst_cs), .rd_en(tw_rd_en), .rd_data(tw_data), .empty(tw_empty)
  );

  // ---------------- frame synchroniser and parser ----------------
  logic                     fs_ready, fs_valid, fp_ready;
  logic [FRAME_BYTES*8-1:0] fs_frame;
  logic [TS_W-1:0]          fs_ts;

  frame_sync u_frame_sync (
    .clk(clk_cs), .rst(rst_cs),
    .in_valid(!tw_empty), .in_data(tw_data), .in_ready(fs_ready),
    .out_valid(fs_valid), .out_frame(fs_frame), .out_ts(fs_ts), .out_ready(fp_ready),
    .sync_count(sync_words)
  );
  assign tw_rd_en = fs_ready && !tw_empty;

  logic [N_STREAMS-1:0]   fp_valid, cf_in_ready, cf_out_valid, cf_out_ready;
  chunk_t [N_STREAMS-1:0] fp_chunk, cf_chunk;
  logic                   fp_out_ready;

  frame_parser u_frame_parser (
    .clk(clk_cs), .rst(rst_cs),
    .in_valid(fs_valid), .in_frame(fs_frame), .in_ts(fs_ts), .in_ready(fp_ready),
    .out_valid(fp_valid), .out_chunk(fp_chunk), .out_ready(fp_out_ready)
  );
  assign fp_out_ready = &cf_in_ready;

  for (genvar s = 0; s < int'(N_STREAMS); s++) begin : g_chunk_fifo
    sync_fifo #(.W($bits(chunk_t)), .DEPTH(CHUNK_FIFO_DEPTH)) u_fifo (
      .clk(clk_cs), .rst(rst_cs),
      .in_valid(fp_valid[s] && fp_out_ready), .in_data(fp_chunk[s]), .in_ready(cf_in_ready[s]),
      .out_valid(cf_out_valid[s]), .out_data(cf_chunk[s]), .out_ready(cf_out_ready[s])
    );
  end

  // ---------------- packet parsers ----------------
  logic [N_STREAMS-1:0]             p_valid;
  logic [N_STREAMS-1:0][PAIR_W-1:0] p_pair;
  logic [N_STREAMS-1:0]             p_extsat;
  logic [15:0]                      ptm0_drop, ptm1_drop, itm_ovf, ftm_trig;

  ptm_parser u_ptm0 (
    .clk(clk_cs), .rst(rst_cs),
    .in_valid(cf_out_valid[0]), .in_chunk(cf_chunk[0]), .in_ready(cf_out_ready[0]),
    .out_valid(p_valid[0]), .out_pair(p_pair[0]),
    .n_isync(ptm0_isync), .n_branch(ptm0_branch), .n_atom(ptm0_atom),
    .n_dropped(ptm0_drop), .ext_saturated(p_extsat[0])
  );

  ptm_parser u_ptm1 (
    .clk(clk_cs), .rst(rst_cs),
    .in_valid(cf_out_valid[1]), .in_chunk(cf_chunk[1]), .in_ready(cf_out_ready[1]),
    .out_valid(p_valid[1]), .out_pair(p_pair[1]),
    .n_isync(ptm1_isync), .n_branch(ptm1_branch), .n_atom(ptm1_atom),
    .n_dropped(ptm1_drop), .ext_saturated(p_extsat[1])
  );

  ftm_parser u_ftm (
    .clk(clk_cs), .rst(rst_cs),
    .in_valid(cf_out_valid[2]), .in_chunk(cf_chunk[2]), .in_ready(cf_out_ready[2]),
    .out_valid(p_valid[2]), .out_pair(p_pair[2]),
    .n_trace(ftm_trace), .n_trigger(ftm_trig), .ext_saturated(p_extsat[2])
  );

  itm_parser u_itm (
    .clk(clk_cs), .rst(rst_cs),
    .in_valid(cf_out_valid[3]), .in_chunk(cf_chunk[3]), .in_ready(cf_out_ready[3]),
    .out_valid(p_valid[3]), .out_pair(p_pair[3]),
    .n_swit(itm_swit), .n_overflow(itm_ovf), .ext_saturated(p_extsat[3])
  );

  // ---------------- timestamp driver ----------------
  logic [N_STREAMS-1:0]             td_wr_en;
  logic [N_STREAMS-1:0][PAIR_W-1:0] td_dout;

  timestamp_driver #(.N(N_STREAMS), .FINAL_WAIT(FINAL_WAIT)) u_ts_driver (
    .clk(clk_cs), .rst(rst_cs),
    .in_wr_en(p_valid), .in_din(p_pair),
    .out_wr_en(td_wr_en), .out_dout(td_dout),
    .n_broom(broom_events), .n_final(final_pushes)
  );

  // ---------------- FIFOs into the TeSSLa clock domain ----------------
  logic [N_STREAMS-1:0]             ev_empty, ev_rd_en, ev_full;
  logic [N_STREAMS-1:0][WORD_W-1:0] ev_dout;

  for (genvar s = 0; s < int'(N_STREAMS); s++) begin : g_event_fifo
    async_fifo #(.WR_W(PAIR_W), .RATIO(2), .DEPTH(TESSLA_FIFO_DEPTH)) u_fifo (
      .wr_clk(clk_cs), .wr_rst(rst_cs), .wr_en(td_wr_en[s]), .wr_data(td_dout[s]),
      .full(ev_full[s]), .wr_overflow(event_fifo_overflow[s]),
      .rd_clk(clk_tessla), .rd_rst(rst_tessla), .rd_en(ev_rd_en[s]),
      .rd_data(ev_dout[s]), .empty(ev_empty[s])
    );
  end

  // ---------------- TeSSLa specification ----------------
  logic              so_valid, so_ready;
  logic [WORD_W-1:0] so_word;
  logic [31:0]       so_ts_dropped, so_protocol;

  if (SPEC == 0) begin : g_demo
    demo_spec #(.N(N_STREAMS)) u_spec (
      .clk(clk_tessla), .rst(rst_tessla),
      .fifo_dout(ev_dout), .fifo_empty(ev_empty), .fifo_rd_en(ev_rd_en),
      .out_valid(so_valid), .out_word(so_word), .out_ready(so_ready),
      .n_steps(spec_steps), .n_events(spec_events), .n_filtered(spec_filtered),
      .n_ts_dropped(so_ts_dropped), .n_protocol(so_protocol)
    );
  end else if (SPEC == 3) begin : g_call
    call_timing_spec #(.N(N_STREAMS)) u_spec (
      .clk(clk_tessla), .rst(rst_tessla),
      .fifo_dout(ev_dout), .fifo_empty(ev_empty), .fifo_rd_en(ev_rd_en),
      .out_valid(so_valid), .out_word(so_word), .out_ready(so_ready),
      .n_steps(spec_steps), .n_events(spec_events), .n_filtered(spec_filtered),
      .n_ts_dropped(so_ts_dropped), .n_protocol(so_protocol)
    );
  end else if (SPEC == 2) begin : g_malloc
    malloc_spec #(.N(N_STREAMS)) u_spec (
      .clk(clk_tessla), .rst(rst_tessla),
      .fifo_dout(ev_dout), .fifo_empty(ev_empty), .fifo_rd_en(ev_rd_en),
      .out_valid(so_valid), .out_word(so_word), .out_ready(so_ready),
      .n_steps(spec_steps), .n_events(spec_events), .n_filtered(spec_filtered),
      .n_ts_dropped(so_ts_dropped), .n_protocol(so_protocol)
    );
  end else begin : g_count
    count_spec #(.N(N_STREAMS)) u_spec (
      .clk(clk_tessla), .rst(rst_tessla),
      .fifo_dout(ev_dout), .fifo_empty(ev_empty), .fifo_rd_en(ev_rd_en),
      .out_valid(so_valid), .out_word(so_word), .out_ready(so_ready),
      .n_steps(spec_steps), .n_events(spec_events), .n_filtered(spec_filtered),
      .n_ts_dropped(so_ts_dropped), .n_protocol(so_protocol)
    );
  end

  // ---------------- output buffer towards AXI ----------------
  logic out_full;
  assign so_ready = !out_full;

  async_fifo #(.WR_W(64), .RATIO(2), .DEPTH(OUT_FIFO_DEPTH)) u_out_fifo (
    .wr_clk(clk_tessla), .wr_rst(rst_tessla), .wr_en(so_valid && !out_full),
    .wr_data({2'b00, so_word}), .full(out_full), .wr_overflow(out_fifo_overflow),
    .rd_clk(clk_tpiu), .rd_rst(rst_tpiu), .rd_en(axi_rd_en), .rd_data(axi_rd_data),
    .empty(axi_empty)
  );

endmodule
