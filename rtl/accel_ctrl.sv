// accel_ctrl: accelerator controller, the host's view of the instrumented
// accelerator.
//
// A register file written and read by the host over a simple synchronous bus
// (host_we/host_addr/host_wdata; host_rdata is combinational on host_addr).
// Writing 1 to CTRL bit 0 while idle starts a run: one start pulse goes to the
// accelerator and to the guard core, the controller waits for the
// accelerator's done (RUN), then for the guard core to have written every
// packet (DRAIN), then reports done in STATUS until the next start. A free
// running cycle counter gives the guards their time stamps; CYCLES holds the
// length of the last run. Register map (word addresses):
//   0x00 CTRL  W: bit0 start      0x01 STATUS R: {done, busy}
//   0x02 N     0x03 BASE          0x04 GOLDEN_BASE   0x05 GOLDEN_STRIDE
//   0x06 TRACE_BASE  0x07 TRACE_SIZE  0x08 PROF_LO  0x09 PROF_HI  0x0A PROF_EN
//   0x0B CYCLES R   0x0C BUGGY R (bit per guard)   0x0D PROF_ACTIVE R
//   0x0E PROF_TOTAL R   0x0F TRACE_PTR R
//   0x10+g GUARD_CFG g: {fault_kind[4:3], log_all[2], mode[1:0]}
//   0x20+g FAULT_MASK g   0x30+g MISMATCHES g R   0x40+k PROF_HIST k R
//   0x50 WRITTEN R   0x51 OVERFLOW R   0x52 DROPPED R
//   0x53 HS_REQS R   0x54 HS_RSPS R
//   0x55 HS_STATUS R: {outstanding[9:2], timeout[1], orphan[0]}
//   0x56 PROF_SEL: guard slot whose node the profiler watches (writes of a
//        slot >= NG are ignored; reset value PROF_SEL0)
// The published system only names this controller; the map is this design's.
module accel_ctrl
  import grind_pkg::*;
#(
  parameter int NG    = RELU_NG,
  parameter int NBINS = 8,
  parameter int PROF_SEL0 = GS_GEP7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host bus
  input  logic                     host_we,
  input  logic [7:0]               host_addr,
  input  logic [XLEN-1:0]          host_wdata,
  output logic [XLEN-1:0]          host_rdata,
  output logic                     irq,          // high while done
  // accelerator
  output logic                     start,
  output logic [XLEN-1:0]          n,
  output logic [XLEN-1:0]          base,
  input  logic                     accel_done,
  // guard core
  output logic [31:0]              cycle,
  output guard_cfg_t [NG-1:0]      cfg,
  output logic [MEM_AW-1:0]        golden_base,
  output logic [MEM_AW-1:0]        golden_stride,
  output logic [MEM_AW-1:0]        trace_base,
  output logic [MEM_AW-1:0]        trace_size,
  input  logic                     core_idle,
  input  logic [NG-1:0]            buggy,
  input  logic [NG-1:0][15:0]      mismatches,
  input  logic [15:0]              written,
  input  logic [15:0]              overflow,
  input  logic [15:0]              dropped,
  input  logic [MEM_AW-1:0]        trace_ptr,
  // profiler
  output logic                     prof_en,
  output logic [3:0]               prof_sel,
  output logic [31:0]              prof_lo,
  output logic [31:0]              prof_hi,
  input  logic [NBINS-1:0][31:0]   prof_hist,
  input  logic [31:0]              prof_active,
  input  logic [31:0]              prof_total,
  // cache handshake checker
  input  logic [31:0]              hs_reqs,
  input  logic [31:0]              hs_rsps,
  input  logic [7:0]               hs_outstanding,
  input  logic                     hs_orphan,
  input  logic                     hs_timeout
);
  typedef enum logic [1:0] {C_IDLE, C_RUN, C_DRAIN, C_DONE} cstate_e;
  cstate_e     st;
  logic [31:0] run_cycles;

  assign irq = (st == C_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st            <= C_IDLE;
      start         <= 1'b0;
      cycle         <= '0;
      run_cycles    <= '0;
      n             <= '0;
      base          <= '0;
      golden_base   <= '0;
      golden_stride <= '0;
      trace_base    <= '0;
      trace_size    <= '0;
      prof_en       <= 1'b0;
      prof_sel      <= 4'(PROF_SEL0);
      prof_lo       <= '0;
      prof_hi       <= '0;
      cfg           <= '0;
    end else begin
      cycle <= cycle + 1'b1;
      start <= 1'b0;
      if (host_we) begin
        unique casez (host_addr)
          8'h00: if (host_wdata[0] && st != C_RUN && st != C_DRAIN) begin
            start      <= 1'b1;
            run_cycles <= '0;
            st         <= C_RUN;
          end
          8'h02: n             <= host_wdata;
          8'h03: base          <= host_wdata;
          8'h04: golden_base   <= host_wdata[MEM_AW-1:0];
          8'h05: golden_stride <= host_wdata[MEM_AW-1:0];
          8'h06: trace_base    <= host_wdata[MEM_AW-1:0];
          8'h07: trace_size    <= host_wdata[MEM_AW-1:0];
          8'h08: prof_lo       <= host_wdata[31:0];
          8'h09: prof_hi       <= host_wdata[31:0];
          8'h0A: prof_en       <= host_wdata[0];
          8'h56: if (host_wdata < XLEN'(NG)) prof_sel <= host_wdata[3:0];
          8'h1?: if (int'(host_addr[3:0]) < NG) begin
            cfg[host_addr[3:0]].mode       <= guard_mode_e'(host_wdata[1:0]);
            cfg[host_addr[3:0]].log_all    <= host_wdata[2];
            cfg[host_addr[3:0]].fault_kind <= fault_kind_e'(host_wdata[4:3]);
          end
          8'h2?: if (int'(host_addr[3:0]) < NG)
            cfg[host_addr[3:0]].fault_mask <= host_wdata;
          default: ;
        endcase
      end
      unique case (st)
        C_RUN: begin
          run_cycles <= run_cycles + 1'b1;
          if (accel_done && !start) st <= C_DRAIN;
        end
        C_DRAIN: begin
          run_cycles <= run_cycles + 1'b1;
          if (core_idle) st <= C_DONE;
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    host_rdata = '0;
    unique casez (host_addr)
      8'h01: host_rdata = XLEN'({st == C_DONE, st == C_RUN || st == C_DRAIN});
      8'h02: host_rdata = n;
      8'h03: host_rdata = base;
      8'h04: host_rdata = XLEN'(golden_base);
      8'h05: host_rdata = XLEN'(golden_stride);
      8'h06: host_rdata = XLEN'(trace_base);
      8'h07: host_rdata = XLEN'(trace_size);
      8'h08: host_rdata = XLEN'(prof_lo);
      8'h09: host_rdata = XLEN'(prof_hi);
      8'h0A: host_rdata = XLEN'(prof_en);
      8'h0B: host_rdata = XLEN'(run_cycles);
      8'h0C: host_rdata = XLEN'(buggy);
      8'h0D: host_rdata = XLEN'(prof_active);
      8'h0E: host_rdata = XLEN'(prof_total);
      8'h0F: host_rdata = XLEN'(trace_ptr);
      8'h1?: if (int'(host_addr[3:0]) < NG)
        host_rdata = XLEN'({cfg[host_addr[3:0]].fault_kind, cfg[host_addr[3:0]].log_all,
                            cfg[host_addr[3:0]].mode});
      8'h2?: if (int'(host_addr[3:0]) < NG) host_rdata = cfg[host_addr[3:0]].fault_mask;
      8'h3?: if (int'(host_addr[3:0]) < NG) host_rdata = XLEN'(mismatches[host_addr[3:0]]);
      8'h4?: if (int'(host_addr[3:0]) < NBINS) host_rdata = XLEN'(prof_hist[host_addr[3:0]]);
      8'h50: host_rdata = XLEN'(written);
      8'h51: host_rdata = XLEN'(overflow);
      8'h52: host_rdata = XLEN'(dropped);
      8'h53: host_rdata = XLEN'(hs_reqs);
      8'h54: host_rdata = XLEN'(hs_rsps);
      8'h55: host_rdata = XLEN'({hs_outstanding, hs_timeout, hs_orphan});
      8'h56: host_rdata = XLEN'(prof_sel);
      default: host_rdata = '0;
    endcase
  end
endmodule
