// tb_grind_core: self-checking test of the guard wrapper with three guards
// (IDs 21, 22, 23) against a stalling behavioural memory. Guard 0 verifies,
// guard 1 checks, guard 2 injects a bit-flip fault. Each guard's golden
// values are placed in memory; the testbench then offers 40 tokens per guard,
// about one in four differing from its golden value, with random gaps and
// random downstream back-pressure. At every accepted token it checks the
// guard's patch against the mode (golden value / none / flipped value) and
// that a guard waiting for its golden values holds its node. At the end it
// checks the mismatch counters and buggy flags, and decodes every trace
// packet in memory (ID, flag, iteration, data) against the tokens offered.
// Modes and packet contents follow the published verifier, checker and
// faulty guards; the memory layout of golden values and trace is this
// design's.
module tb_grind_core;
  import grind_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NG = 3, NTOK = 40;
  localparam logic [31:0] GOLD = 32'h1000, STRIDE = 32'h400, TRACE = 32'h4000;
  localparam logic [63:0] MASK = 64'h0000_00F0_0000_0001;

  logic                 start = 0;
  logic [31:0]          cycle = 0;
  guard_cfg_t [NG-1:0]  cfg;
  guard_tap_t [NG-1:0]  taps;
  guard_ctl_t [NG-1:0]  ctls;
  logic                 req_valid, req_ready, rsp_valid;
  mem_req_t             req;
  mem_rsp_t             rsp;
  logic [NG-1:0]        buggy;
  logic [NG-1:0][15:0]  mismatches;
  logic [15:0]          dropped, written, overflow;
  logic [31:0]          trace_ptr;
  logic                 idle;

  grind_core #(.NG(NG), .BUFFER_LEN(8), .FIFO_DEPTH(4),
               .IDS({8'd23, 8'd22, 8'd21}),
               .OPCODES({16'd5, 16'd12, 16'd10})) dut (
    .clk, .rst_n, .start, .cycle, .cfg, .golden_base(GOLD),
    .golden_stride(STRIDE), .trace_base(TRACE), .trace_size(32'h2000),
    .taps_i(taps), .ctls_o(ctls), .req_valid, .req_ready, .req, .rsp_valid,
    .rsp, .buggy, .mismatches, .dropped, .written, .overflow, .trace_ptr,
    .idle);

  tb_mem_model #(.WORDS(2048)) u_mem (.clk, .rst_n, .req_valid, .req_ready,
    .req, .rsp_valid, .rsp);

  always @(posedge clk) cycle <= cycle + 1;

  logic [63:0] gold [NG][NTOK];
  logic [63:0] val  [NG][NTOK];
  int          idx  [NG];
  logic        rdy  [NG];
  int          nmis [NG];
  int          n_hold = 0;

  task automatic expect_(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // offer tokens at negedge; fire when the downstream is ready and no hold
  always @(negedge clk) if (rst_n && !start) begin
    for (int g = 0; g < NG; g++) begin
      rdy[g] = ($urandom % 4) != 0;
      if (!taps[g].valid && idx[g] < NTOK && ($urandom % 3) != 0) begin
        taps[g].valid = 1'b1;
        taps[g].value = val[g][idx[g]];
        taps[g].ext   = 16'(idx[g]);
      end
    end
    #1;
    for (int g = 0; g < NG; g++) taps[g].fire = taps[g].valid && rdy[g] && !ctls[g].hold;
  end

  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < NG; g++) begin
      if (taps[g].valid && ctls[g].hold) n_hold++;
      if (taps[g].fire) begin
        logic [63:0] v, gd;
        v  = val[g][idx[g]];
        gd = gold[g][idx[g]];
        unique case (g)
          0: expect_("verify patch", ctls[g].patch_en == (v != gd) &&
                     (v == gd || ctls[g].patch == gd));
          1: expect_("check no patch", !ctls[g].patch_en);
          default: expect_("fault flip", ctls[g].patch_en && ctls[g].patch == (v ^ MASK));
        endcase
        idx[g]++;
        taps[g].valid <= 1'b0;
        taps[g].fire  <= 1'b0;
      end
    end
  end

  initial begin
    taps = '0;
    for (int g = 0; g < NG; g++) begin
      idx[g] = 0; nmis[g] = 0;
      for (int k = 0; k < NTOK; k++) begin
        gold[g][k] = {$urandom, $urandom};
        val[g][k]  = (($urandom % 4) == 0) ? gold[g][k] ^ 64'(1 << ($urandom % 48)) : gold[g][k];
        if (val[g][k] != gold[g][k]) nmis[g]++;
      end
    end
    cfg = '0;
    cfg[0].mode = GM_VERIFY;
    cfg[1].mode = GM_CHECK;
    cfg[2].mode = GM_FAULT; cfg[2].fault_kind = FT_FLIP; cfg[2].fault_mask = MASK;
    repeat (3) @(posedge clk);
    for (int g = 0; g < 2; g++)
      for (int k = 0; k < NTOK; k++)
        u_mem.mem[int'((GOLD + STRIDE * g) >> 3) + k] = gold[g][k];
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (idx[0] == NTOK && idx[1] == NTOK && idx[2] == NTOK);
    repeat (5) @(posedge clk);
    wait (idle);
    expect_("mismatch count 0", mismatches[0] == 16'(nmis[0]));
    expect_("mismatch count 1", mismatches[1] == 16'(nmis[1]));
    expect_("buggy flags", buggy[0] == (nmis[0] > 0) && buggy[1] == (nmis[1] > 0) && !buggy[2]);
    expect_("packets accounted",
            int'(written) + int'(dropped) == nmis[0] + nmis[1] + NTOK);
    expect_("no overflow", overflow == 0);
    expect_("trace pointer", trace_ptr == 32'(24 * int'(written)));
    expect_("hold stall seen", n_hold > 0);
    for (int p = 0; p < int'(written); p++) begin
      logic [63:0] w0, w1;
      int g, it;
      w0 = u_mem.mem[int'(TRACE >> 3) + 3 * p];
      w1 = u_mem.mem[int'(TRACE >> 3) + 3 * p + 1];
      g  = int'(w0[63:56]) - 21;
      it = int'(w0[31:16]);
      if (g < 0 || g >= NG || it >= NTOK) begin
        expect_("packet header", 1'b0);
      end else begin
        expect_("packet flag", w0[55] == 1'b1);
        expect_("packet data", w1[47:0] == val[g][it][47:0]);
        if (g != 2) expect_("packet is a mismatch", val[g][it] != gold[g][it]);
      end
    end
    $display("written=%0d dropped=%0d hold=%0d", written, dropped, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
