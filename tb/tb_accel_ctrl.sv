// tb_accel_ctrl: self-checking test of the accelerator controller. Writes
// and reads back the argument, guard configuration and profiler select
// registers (a slot beyond NG is refused), reads the
// status inputs through the map, and walks a run through RUN and DRAIN to
// DONE: one start pulse, done only after the accelerator is done and the
// guard core is idle, the run's cycle count, and no restart while running.
// The expected values come from the register map and run protocol, which
// are this design's own; the published design only names the controller.
module tb_accel_ctrl;
  import grind_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NG = 4, NB = 4;

  logic                 host_we = 0, irq, start, accel_done = 0, core_idle = 1;
  logic [7:0]           host_addr = 0;
  logic [XLEN-1:0]      host_wdata = 0, host_rdata, n, base;
  logic [31:0]          cycle, prof_lo, prof_hi;
  guard_cfg_t [NG-1:0]  cfg;
  logic [MEM_AW-1:0]    golden_base, golden_stride, trace_base, trace_size;
  logic [NG-1:0]        buggy = 4'b1010;
  logic [NG-1:0][15:0]  mismatches = {16'd4, 16'd3, 16'd2, 16'd1};
  logic [15:0]          written = 16'd11, overflow = 16'd12, dropped = 16'd13;
  logic [MEM_AW-1:0]    trace_ptr = 32'h99;
  logic                 prof_en;
  logic [3:0]           prof_sel;
  logic [NB-1:0][31:0]  prof_hist = {32'd40, 32'd30, 32'd20, 32'd10};
  logic [31:0]          prof_active = 32'd7, prof_total = 32'd8;
  logic [31:0]          hs_reqs = 32'd21, hs_rsps = 32'd20;
  logic [7:0]           hs_outstanding = 8'd1;
  logic                 hs_orphan = 1'b0, hs_timeout = 1'b1;

  accel_ctrl #(.NG(NG), .NBINS(NB)) dut (.*);

  int starts = 0;
  always @(posedge clk) if (rst_n && start) starts++;

  task automatic wr(input logic [7:0] a, input logic [XLEN-1:0] d);
    host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask
  task automatic rd_check(input logic [7:0] a, input logic [XLEN-1:0] e, input string what);
    host_addr = a; #1;
    checks++;
    if (host_rdata != e) begin failures++; $display("%s: got %h exp %h", what, host_rdata, e); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    wr(8'h02, 64'd6);  wr(8'h03, 64'h800); wr(8'h04, 64'h4000); wr(8'h05, 64'h100);
    wr(8'h06, 64'h8000); wr(8'h07, 64'h1000); wr(8'h08, 64'd5); wr(8'h09, 64'd50);
    wr(8'h0A, 64'd1);
    wr(8'h12, 64'b10_1_01); wr(8'h22, 64'hF0F0);
    checks++;
    if (n != 6 || base != 64'h800 || golden_base != 32'h4000 || golden_stride != 32'h100 ||
        trace_base != 32'h8000 || trace_size != 32'h1000 || prof_lo != 5 || prof_hi != 50 ||
        !prof_en) begin failures++; $display("argument registers wrong"); end
    checks++;
    if (cfg[2].mode != GM_VERIFY || !cfg[2].log_all || cfg[2].fault_kind != FT_OFFSET ||
        cfg[2].fault_mask != 64'hF0F0 || cfg[1].mode != GM_OFF) begin
      failures++; $display("guard config wrong");
    end
    rd_check(8'h02, 64'd6, "N");
    rd_check(8'h12, 64'b10_1_01, "GUARD_CFG");
    rd_check(8'h22, 64'hF0F0, "FAULT_MASK");
    rd_check(8'h0C, 64'b1010, "BUGGY");
    rd_check(8'h33, 64'd4, "MISMATCHES3");
    rd_check(8'h41, 64'd20, "HIST1");
    rd_check(8'h0D, 64'd7, "PROF_ACTIVE");
    rd_check(8'h0F, 64'h99, "TRACE_PTR");
    rd_check(8'h52, 64'd13, "DROPPED");
    rd_check(8'h53, 64'd21, "HS_REQS"); rd_check(8'h54, 64'd20, "HS_RSPS");
    rd_check(8'h55, 64'b1_10, "HS_STATUS");
    rd_check(8'h56, 64'(GS_GEP7), "PROF_SEL reset");
    wr(8'h56, 64'd3);
    wr(8'h56, 64'(NG));            // no such slot: ignored
    rd_check(8'h56, 64'd3, "PROF_SEL");
    rd_check(8'h01, 64'd0, "STATUS idle");
    // run
    core_idle = 0;
    wr(8'h00, 64'd1);
    rd_check(8'h01, 64'd1, "STATUS busy");
    repeat (10) @(negedge clk);
    wr(8'h00, 64'd1);              // ignored while running
    accel_done = 1;
    repeat (5) @(negedge clk);
    rd_check(8'h01, 64'd1, "STATUS draining");
    core_idle = 1;
    @(negedge clk); @(negedge clk);
    rd_check(8'h01, 64'd2, "STATUS done");
    checks++;
    if (!irq || starts != 1) begin failures++; $display("irq %b starts %0d", irq, starts); end
    rd_check(8'h0B, 64'd17, "CYCLES");   // 17 clock edges spent in RUN and DRAIN
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
