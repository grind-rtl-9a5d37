// grind_top: guard-instrumented Relu accelerator system.
//
// The accelerator (relu_accel: compute task with its dataflow nodes) is
// started and watched by the host through accel_ctrl. Each of its eleven
// guarded nodes is wired to a guard in grind_core, which streams golden values
// in, patches or breaks node outputs and streams debug packets out (the
// debug memory engine). A profiler guard watches the output of one guarded
// node, chosen by the host at run time (PROF_SEL, gep7's address after reset),
// and keeps a hashed histogram and an activity count on chip; a handshake
// guard checks that every request on the accelerator's cache port gets its
// response, flagging a response nobody asked for and a request left
// unanswered for HS_TIMEOUT cycles. The cache the
// accelerator's loads and stores go through is outside this module: its
// accelerator-side port (acc_*) and its memory-side port (cache_m_*) are
// brought out. A round-robin arbiter shares the main-memory channel (m_*)
// between the cache and the guard core. All memory channels use the
// grind_pkg request/response channel; the host bus is described in
// accel_ctrl. Single clock, synchronous active-low reset.
// The block structure follows the published system (host, controller,
// accelerator with guards, cache, debug memory engine, arbiter, main memory);
// AXI is replaced by the simple channel; the profiler being switchable between
// nodes follows the document's dynamically enabled profiling, while the
// single-profiler-plus-selector arrangement is this design's choice. accel_busy and the iteration count are kept for
// observation and are not used inside this module (lint lists them unused).
module grind_top
  import grind_pkg::*;
#(
  parameter int BUFFER_LEN = 8,
  parameter int FIFO_DEPTH = 4,
  parameter int NBINS      = 8,
  parameter int HS_TIMEOUT = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  // host
  input  logic            host_we,
  input  logic [7:0]      host_addr,
  input  logic [XLEN-1:0] host_wdata,
  output logic [XLEN-1:0] host_rdata,
  output logic            irq,
  // accelerator <-> cache
  output logic            acc_req_valid,
  input  logic            acc_req_ready,
  output mem_req_t        acc_req,
  input  logic            acc_rsp_valid,
  input  mem_rsp_t        acc_rsp,
  // cache <-> main-memory arbiter
  input  logic            cache_m_req_valid,
  output logic            cache_m_req_ready,
  input  mem_req_t        cache_m_req,
  output logic            cache_m_rsp_valid,
  output mem_rsp_t        cache_m_rsp,
  // main memory
  output logic            m_req_valid,
  input  logic            m_req_ready,
  output mem_req_t        m_req,
  input  logic            m_rsp_valid,
  input  mem_rsp_t        m_rsp
);
  localparam int NG = RELU_NG;

  logic                  start, accel_done, accel_busy, core_idle, prof_en;
  logic [XLEN-1:0]       n, base;
  logic [3:0]            prof_sel;
  logic [31:0]           cycle, prof_lo, prof_hi, prof_active, prof_total, iterations;
  guard_cfg_t [NG-1:0]   cfg;
  logic [MEM_AW-1:0]     golden_base, golden_stride, trace_base, trace_size, trace_ptr;
  guard_tap_t [NG-1:0]   taps;
  guard_ctl_t [NG-1:0]   ctls;
  logic [NG-1:0]         buggy;
  logic [NG-1:0][15:0]   mismatches;
  logic [15:0]           written, overflow, dropped;
  logic [NBINS-1:0][31:0] prof_hist;
  logic [31:0]           hs_reqs, hs_rsps;
  logic [7:0]            hs_outstanding;
  logic                  hs_orphan, hs_timeout;
  logic                  d_req_valid, d_req_ready, d_rsp_valid;
  mem_req_t              d_req;
  logic [1:0]            a_req_valid, a_req_ready, a_rsp_valid;
  mem_req_t [1:0]        a_req;
  mem_rsp_t              a_rsp;

  accel_ctrl #(.NG(NG), .NBINS(NBINS)) u_ctrl (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rdata, .irq,
    .start, .n, .base, .accel_done,
    .cycle, .cfg, .golden_base, .golden_stride, .trace_base, .trace_size,
    .core_idle, .buggy, .mismatches, .written, .overflow, .dropped, .trace_ptr,
    .prof_en, .prof_sel, .prof_lo, .prof_hi, .prof_hist, .prof_active, .prof_total,
    .hs_reqs, .hs_rsps, .hs_outstanding, .hs_orphan, .hs_timeout);

  relu_accel u_accel (
    .clk, .rst_n, .start, .n, .base,
    .busy(accel_busy), .done(accel_done), .iterations,
    .c_req_valid(acc_req_valid), .c_req_ready(acc_req_ready), .c_req(acc_req),
    .c_rsp_valid(acc_rsp_valid), .c_rsp(acc_rsp),
    .taps_o(taps), .ctls_i(ctls));

  grind_core #(.NG(NG), .BUFFER_LEN(BUFFER_LEN), .FIFO_DEPTH(FIFO_DEPTH)) u_core (
    .clk, .rst_n, .start, .cycle, .cfg,
    .golden_base, .golden_stride, .trace_base, .trace_size,
    .taps_i(taps), .ctls_o(ctls),
    .req_valid(d_req_valid), .req_ready(d_req_ready), .req(d_req),
    .rsp_valid(d_rsp_valid), .rsp(a_rsp),
    .buggy, .mismatches, .dropped, .written, .overflow, .trace_ptr,
    .idle(core_idle));

  profiler_guard #(.NBINS(NBINS)) u_prof (
    .clk, .rst_n, .clear(start), .en(prof_en), .tap_i(taps[prof_sel]),
    .cycle, .win_lo(prof_lo), .win_hi(prof_hi),
    .hist(prof_hist), .active(prof_active), .total(prof_total));

  // request/response pairing checker on the accelerator's cache port
  handshake_guard #(.TIMEOUT(HS_TIMEOUT)) u_hs (
    .clk, .rst_n, .clear(start),
    .req_valid(acc_req_valid), .req_ready(acc_req_ready),
    .rsp_valid(acc_rsp_valid), .rsp(acc_rsp),
    .reqs(hs_reqs), .rsps(hs_rsps), .outstanding(hs_outstanding),
    .orphan(hs_orphan), .timeout(hs_timeout));

  // main-memory arbiter: 0 = cache, 1 = guard core
  assign a_req_valid       = {d_req_valid, cache_m_req_valid};
  assign a_req             = {d_req, cache_m_req};
  assign cache_m_req_ready = a_req_ready[0];
  assign d_req_ready       = a_req_ready[1];
  assign cache_m_rsp_valid = a_rsp_valid[0];
  assign d_rsp_valid       = a_rsp_valid[1];
  assign cache_m_rsp       = a_rsp;

  mem_arbiter #(.N(2)) u_marb (
    .clk, .rst_n,
    .in_req_valid(a_req_valid), .in_req_ready(a_req_ready), .in_req(a_req),
    .in_rsp_valid(a_rsp_valid), .in_rsp(a_rsp),
    .out_req_valid(m_req_valid), .out_req_ready(m_req_ready), .out_req(m_req),
    .out_rsp_valid(m_rsp_valid), .out_rsp(m_rsp));
endmodule
