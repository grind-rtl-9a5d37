// grind_core: the guard wrapper, collecting every guard of the instrumented
// circuit behind one memory channel.
//
// For each of the NG guarded nodes it holds a reader buffer (golden values),
// a guard_unit (guard function, patch) and, inside trace_writer, a writer FIFO.
// Guard g reads its golden values from golden_base + g*golden_stride; all
// guards write their packets to one trace region. The NG reader buffers and
// the trace writer share the memory channel through a round-robin
// mem_arbiter. start (one cycle) rewinds the reader buffers and trace
// pointer and clears the guards' counters. Guards whose mode is OFF read no
// golden values and leave their node untouched. IDS/OPCODES give each
// guard's node ID (8 bits each) and opcode (16 bits each), guard 0 in the
// low bits. idle reports that every packet produced so far is in memory.
// The one-wrapper-for-all-guards structure and the shared memory channel
// follow the published design; the region layout and the per-run enabling of
// guards by mode are this design's choices.
module grind_core
  import grind_pkg::*;
#(
  parameter int NG         = RELU_NG,
  parameter int BUFFER_LEN = 8,
  parameter int FIFO_DEPTH = 4,
  parameter logic [NG*8-1:0]  IDS     = RELU_IDS,
  parameter logic [NG*16-1:0] OPCODES = RELU_OPCODES
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [31:0]            cycle,
  input  guard_cfg_t [NG-1:0]    cfg,
  input  logic [MEM_AW-1:0]      golden_base,
  input  logic [MEM_AW-1:0]      golden_stride,
  input  logic [MEM_AW-1:0]      trace_base,
  input  logic [MEM_AW-1:0]      trace_size,
  // instrumented circuit
  input  guard_tap_t [NG-1:0]    taps_i,
  output guard_ctl_t [NG-1:0]    ctls_o,
  // memory channel
  output logic                   req_valid,
  input  logic                   req_ready,
  output mem_req_t               req,
  input  logic                   rsp_valid,
  input  mem_rsp_t               rsp,
  // status
  output logic [NG-1:0]          buggy,
  output logic [NG-1:0][15:0]    mismatches,
  output logic [15:0]            dropped,
  output logic [15:0]            written,
  output logic [15:0]            overflow,
  output logic [MEM_AW-1:0]      trace_ptr,
  output logic                   idle
);
  logic [NG:0]          a_req_valid, a_req_ready, a_rsp_valid;
  mem_req_t [NG:0]      a_req;
  mem_rsp_t             a_rsp;
  logic [NG-1:0]        pkt_valid, pkt_full;
  dbg_packet_t [NG-1:0] pkt;
  logic [NG-1:0][15:0]  drops;

  for (genvar g = 0; g < NG; g++) begin : g_guard
    logic            gold_valid, gold_pop, rd_en;
    logic [XLEN-1:0] gold;

    assign rd_en = (cfg[g].mode == GM_VERIFY) || (cfg[g].mode == GM_CHECK);

    reader_buffer #(.BUFFER_LEN(BUFFER_LEN)) u_rd (
      .clk, .rst_n, .load(start), .enable(rd_en),
      .base_addr(golden_base + MEM_AW'(g) * golden_stride),
      .head_valid(gold_valid), .head(gold), .pop(gold_pop),
      .req_valid(a_req_valid[g]), .req_ready(a_req_ready[g]), .req(a_req[g]),
      .rsp_valid(a_rsp_valid[g]), .rsp(a_rsp));

    guard_unit #(.ID(IDS[g*8 +: 8]), .OPCODE(OPCODES[g*16 +: 16])) u_guard (
      .clk, .rst_n, .clear(start), .cfg(cfg[g]), .cycle,
      .tap_i(taps_i[g]), .ctl_o(ctls_o[g]),
      .gold_valid, .gold, .gold_pop,
      .pkt_valid(pkt_valid[g]), .pkt(pkt[g]), .pkt_full(pkt_full[g]),
      .buggy(buggy[g]), .mismatches(mismatches[g]), .dropped(drops[g]));
  end

  always_comb begin
    dropped = '0;
    for (int g = 0; g < NG; g++) dropped = dropped + drops[g];
  end

  trace_writer #(.NG(NG), .FIFO_DEPTH(FIFO_DEPTH)) u_writer (
    .clk, .rst_n, .load(start), .trace_base, .trace_size,
    .pkt_valid, .pkt, .pkt_full,
    .req_valid(a_req_valid[NG]), .req_ready(a_req_ready[NG]), .req(a_req[NG]),
    .rsp_valid(a_rsp_valid[NG]), .rsp(a_rsp),
    .ptr(trace_ptr), .written, .overflow, .idle);

  mem_arbiter #(.N(NG + 1)) u_arb (
    .clk, .rst_n,
    .in_req_valid(a_req_valid), .in_req_ready(a_req_ready), .in_req(a_req),
    .in_rsp_valid(a_rsp_valid), .in_rsp(a_rsp),
    .out_req_valid(req_valid), .out_req_ready(req_ready), .out_req(req),
    .out_rsp_valid(rsp_valid), .out_rsp(rsp));
endmodule
