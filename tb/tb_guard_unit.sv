// tb_guard_unit: self-checking directed test of the guard function in each
// mode. The testbench plays the node (tap) and the reader buffer (golden
// head) and checks, cycle by cycle, the hold, the patch, the golden pop, the
// packet fields (ID, flag, opcode, iteration, extended bits, data, cycle),
// the buggy flag, the mismatch counter and packet dropping on a full FIFO.
// The expected patch, flag and packet rules follow the published guard
// modes; the hold while a golden value is missing is this design's.
module tb_guard_unit;
  import grind_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            clear = 0;
  guard_cfg_t      cfg = '0;
  logic [31:0]     cycle = 0;
  guard_tap_t      tap = '0;
  guard_ctl_t      ctl;
  logic            gold_valid = 0, gold_pop, pkt_valid, pkt_full = 0, buggy;
  logic [XLEN-1:0] gold = 0;
  dbg_packet_t     pkt;
  logic [15:0]     mismatches, dropped;

  guard_unit #(.ID(8'h0A), .OPCODE(16'h0004)) dut (.*, .tap_i(tap), .ctl_o(ctl));

  always @(posedge clk) cycle <= cycle + 1;

  task automatic expect_(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // present a token (valid + fire in the same cycle) and check the outputs
  task automatic token(input logic [XLEN-1:0] v, input logic gv, input logic [XLEN-1:0] g);
    tap.valid = 1; tap.fire = 1; tap.value = v; tap.ext = 16'h0010;
    gold_valid = gv; gold = g;
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // OFF: nothing happens
    cfg.mode = GM_OFF;
    token(64'd5, 1, 64'd6);
    expect_("off: no patch", !ctl.patch_en && !ctl.hold && !gold_pop && !pkt_valid);
    @(negedge clk);

    // VERIFY, correct value, log_all: packet with flag 0, no patch
    cfg.mode = GM_VERIFY; cfg.log_all = 1;
    clear = 1; @(negedge clk); clear = 0;
    token(64'h400000, 1, 64'h400000);
    expect_("verify ok: no patch", !ctl.patch_en && !ctl.hold);
    expect_("verify ok: pop", gold_pop);
    expect_("verify ok: packet", pkt_valid && !pkt.flag && pkt.id == 8'h0A &&
            pkt.opcode == 16'h0004 && pkt.iter == 0 && pkt.data == 48'h400000 &&
            pkt.reserved == 16'h0010 && pkt.cycle == cycle);
    @(negedge clk);

    // VERIFY, wrong value: patched with golden, flagged, counted
    cfg.log_all = 0;
    token(64'h1004101024, 1, 64'h0004101024);
    expect_("verify bad: patch", ctl.patch_en && ctl.patch == 64'h0004101024);
    expect_("verify bad: packet", pkt_valid && pkt.flag && pkt.iter == 1 &&
            pkt.data == 48'h1004101024);
    @(negedge clk);
    expect_("buggy flag", buggy && mismatches == 1);

    // VERIFY, correct value, log_all off: no packet
    token(64'd9, 1, 64'd9);
    expect_("verify ok quiet", !pkt_valid && gold_pop && !ctl.patch_en);
    @(negedge clk);

    // VERIFY without golden value: hold, no completion allowed
    tap.valid = 1; tap.fire = 0; tap.value = 64'd3; gold_valid = 0; #1;
    expect_("hold without golden", ctl.hold && !gold_pop && !pkt_valid);
    @(negedge clk);

    // CHECK, wrong value: flagged, not patched
    cfg.mode = GM_CHECK;
    token(64'd1, 1, 64'd2);
    expect_("check bad: no patch", !ctl.patch_en && pkt_valid && pkt.flag && gold_pop);
    @(negedge clk);
    expect_("check counted", mismatches == 2);

    // full writer FIFO: packet dropped, guard still patches
    cfg.mode = GM_VERIFY; pkt_full = 1;
    token(64'd1, 1, 64'd2);
    expect_("drop: still patches", ctl.patch_en && !pkt_valid);
    @(negedge clk);
    expect_("drop counted", dropped == 1);
    pkt_full = 0;

    // FAULT kinds
    cfg.mode = GM_FAULT; cfg.fault_mask = 64'hF0;
    cfg.fault_kind = FT_STUCK0; token(64'h1234, 0, 0);
    expect_("stuck0", ctl.patch_en && ctl.patch == 0 && !ctl.hold && pkt_valid && pkt.flag);
    cfg.fault_kind = FT_FLIP; #1;
    expect_("flip", ctl.patch == 64'h12C4);
    cfg.fault_kind = FT_OFFSET; #1;
    expect_("offset", ctl.patch == 64'h1324);
    cfg.fault_kind = FT_STUCK1; #1;
    expect_("stuck1", ctl.patch == '1);
    expect_("fault: no golden use", !gold_pop);
    @(negedge clk);

    // iteration counts every completed token since the clear (6 so far)
    cfg.mode = GM_VERIFY; cfg.log_all = 1;
    token(64'd0, 1, 64'd0);
    expect_("iteration", pkt.iter == 16'd6);
    @(negedge clk);
    tap = '0;
    // clear resets counters
    clear = 1; @(negedge clk); clear = 0; #1;
    expect_("clear", !buggy && mismatches == 0 && dropped == 0);

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
