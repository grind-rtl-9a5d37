// tb_grind_top: end-to-end test of the guard-instrumented Relu system at its
// default parameters. The host side is driven through the register bus; the
// cache is a straight connection to the main-memory arbiter; main memory is a
// stalling behavioural model holding the Relu array, the golden values of
// every guarded node (computed here from the Relu definition) and the trace
// region. Runs, on a 6 x 6 array:
//  1. all guards verifying a correct circuit: no mismatch, no packet,
//     correct result;
//  2. a stuck-at-zero fault injected at select11 with store12 verifying:
//     store12 is flagged for exactly the positive elements, its trace packets
//     are checked, and the patch keeps memory correct;
//  3. the same fault with store12 only checking: flagged, memory corrupted;
//  4. a stuck-at-zero gep7 (addresses) with the first-pass guard list of the
//     iterative verifier (mul3, cmp14, cmp17, store12): only store12 flags;
//  5. every guard logging every token into a small trace region: packets
//     dropped at full FIFOs and at the region's end, and the profiler's
//     address histogram checked against a model;
//  6. the other two published fault classes: a control fault (cmp14
//     stuck at zero, so each row ends after its first element, with the
//     profiler switched to store12 counting one store per row and
//     binning the stored values) and a memory
//     fault (gep7's addresses moved on by one row), each checked against
//     the memory state it must leave;
//  7. the cache port's handshake checker: every request answered so far;
//     then the cache loses one response, the accelerator locks up, and the
//     checker flags the unanswered request.
// Counts how often each mechanism happened (golden-value hold stall, patch,
// fault injection, arbitration conflict, FIFO drop, region overflow,
// profiler window hit, profiler switched to another node, handshake timeout) and fails for one that never did.
// The scenarios mirror the published uses (verifier, checker with a faulty
// guard, the first pass of the iterative verifier, profiler); the array size
// and memory layout are this test's choices. Runs the top at its defaults.
module tb_grind_top;
  import grind_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NG = RELU_NG;
  localparam logic [63:0] ARR = 64'h800, GOLD = 64'h10000, STRIDE = 64'h1000,
                          TRACE = 64'h40000;
  localparam int NN = 6;

  logic            host_we = 0, irq;
  logic [7:0]      host_addr = 0;
  logic [XLEN-1:0] host_wdata = 0, host_rdata;
  logic            acc_req_valid, acc_req_ready, acc_rsp_valid;
  mem_req_t        acc_req;
  mem_rsp_t        acc_rsp;
  logic            cm_req_ready, cm_rsp_valid;
  mem_rsp_t        cm_rsp;
  logic            m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t        m_req;
  mem_rsp_t        m_rsp;

  grind_top u_top (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rdata, .irq,
    .acc_req_valid, .acc_req_ready, .acc_req, .acc_rsp_valid, .acc_rsp,
    .cache_m_req_valid(acc_req_valid), .cache_m_req_ready(cm_req_ready),
    .cache_m_req(acc_req), .cache_m_rsp_valid(cm_rsp_valid), .cache_m_rsp(cm_rsp),
    .m_req_valid, .m_req_ready, .m_req, .m_rsp_valid, .m_rsp);

  // the cache is a plain connection in this test; in the last scenario it
  // loses one response, like a cache that misses a request
  logic swallow = 0;
  assign acc_req_ready = cm_req_ready;
  assign acc_rsp_valid = cm_rsp_valid && !swallow;
  always @(posedge clk) if (swallow && cm_rsp_valid) swallow <= 1'b0;
  assign acc_rsp       = cm_rsp;

  tb_mem_model #(.WORDS(65536), .LAT(3)) u_mem (.clk, .rst_n, .req_valid(m_req_valid),
    .req_ready(m_req_ready), .req(m_req), .rsp_valid(m_rsp_valid), .rsp(m_rsp));

  // ---------------- mechanism counters
  int n_hold = 0, n_patch = 0, n_fault = 0, n_conflict = 0, n_drop = 0,
      n_overflow = 0, n_window = 0, n_prof_sel = 0, n_hs_timeout = 0,
      n_ctrl_fault = 0, n_mem_fault = 0;
  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < NG; g++) begin
      if (u_top.ctls[g].hold && u_top.taps[g].valid) n_hold++;
      if (u_top.ctls[g].patch_en && u_top.taps[g].fire) begin
        if (u_top.cfg[g].mode == GM_FAULT) n_fault++;
        else n_patch++;
      end
    end
    if (u_top.a_req_valid == 2'b11) n_conflict++;
  end

  // ---------------- host bus
  task automatic wr(input logic [7:0] a, input logic [XLEN-1:0] d);
    @(negedge clk);
    host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [XLEN-1:0] d);
    @(negedge clk);
    host_addr = a; #1;
    d = host_rdata;
  endtask
  task automatic expect_(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- data and golden values
  logic [XLEN-1:0] arr [NN * NN];

  function automatic logic [XLEN-1:0] relu(logic [XLEN-1:0] x);
    return ($signed(x) > 0) ? x : '0;
  endfunction

  task automatic gold_put(int slot, int k, logic [XLEN-1:0] v);
    u_mem.mem[int'((GOLD + STRIDE * slot) >> 3) + k] = v;
  endtask

  task automatic prepare();
    for (int k = 0; k < NN * NN; k++) begin
      arr[k] = {$urandom, $urandom};
      if (k % 5 == 0) arr[k] = 64'(k);           // a few small positives
      u_mem.mem[int'(ARR >> 3) + k] = arr[k];
    end
    for (int i = 0; i < NN; i++) begin
      for (int j = 0; j < NN; j++) begin
        int k;
        k = i * NN + j;
        gold_put(GS_MUL3, k, 64'(i * NN));
        gold_put(GS_ADD6, k, 64'(k));
        gold_put(GS_GEP7, k, ARR + 64'(8 * k));
        gold_put(GS_LOAD8, k, arr[k]);
        gold_put(GS_CMP10, k, 64'($signed(arr[k]) > 0));
        gold_put(GS_SEL11, k, relu(arr[k]));
        gold_put(GS_STORE12, k, relu(arr[k]));
        gold_put(GS_ADD13, k, 64'(j + 1));
        gold_put(GS_CMP14, k, 64'(j + 1 < NN));
      end
      gold_put(GS_ADD16, i, 64'(i + 1));
      gold_put(GS_CMP17, i, 64'(i + 1 < NN));
    end
  endtask

  task automatic set_guard(int g, guard_mode_e m, logic log_all, fault_kind_e fk);
    wr(8'h10 + 8'(g), 64'({fk, log_all, m}));
  endtask

  task automatic run_and_wait(output int cycles);
    logic [XLEN-1:0] st, cyc;
    wr(8'h00, 64'd1);
    do rd(8'h01, st); while (st[1] == 1'b0);
    rd(8'h0B, cyc);
    cycles = int'(cyc);
  endtask

  function automatic int count_pos();
    int c;
    c = 0;
    for (int k = 0; k < NN * NN; k++) if ($signed(arr[k]) > 0) c++;
    return c;
  endfunction

  initial begin
    logic [XLEN-1:0] v;
    int cyc, npos;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(8'h02, 64'(NN)); wr(8'h03, ARR); wr(8'h04, GOLD); wr(8'h05, STRIDE);
    wr(8'h06, TRACE); wr(8'h07, 64'h8000);

    // ---- 1: clean circuit, every guard verifying
    prepare();
    for (int g = 0; g < NG; g++) set_guard(g, GM_VERIFY, 0, FT_STUCK0);
    run_and_wait(cyc);
    $display("run 1: %0d cycles", cyc);
    rd(8'h0C, v); expect_("1: no guard flagged", v == 0);
    rd(8'h50, v); expect_("1: no packets", v == 0);
    for (int k = 0; k < NN * NN; k++)
      expect_("1: result", u_mem.mem[int'(ARR >> 3) + k] == relu(arr[k]));

    // ---- 2: select11 stuck at zero, store12 verifying and patching
    prepare();
    npos = count_pos();
    for (int g = 0; g < NG; g++) set_guard(g, GM_OFF, 0, FT_STUCK0);
    set_guard(GS_SEL11, GM_FAULT, 0, FT_STUCK0);
    set_guard(GS_STORE12, GM_VERIFY, 0, FT_STUCK0);
    run_and_wait(cyc);
    $display("run 2: %0d cycles, %0d positive elements", cyc, npos);
    rd(8'h0C, v); expect_("2: only store12 flagged", v == (64'd1 << GS_STORE12));
    rd(8'h30 + 8'(GS_STORE12), v); expect_("2: store12 mismatch count", v == 64'(npos));
    begin
      logic [XLEN-1:0] d;
      rd(8'h52, d);
      rd(8'h50, v);
      $display("run 2: written %0d dropped %0d", v, d);
      // select11's fault packets plus store12's mismatch packets
      expect_("2: packets accounted", v + d == 64'(NN * NN + npos));
    end
    for (int k = 0; k < NN * NN; k++)
      expect_("2: patched result", u_mem.mem[int'(ARR >> 3) + k] == relu(arr[k]));
    begin
      int seen;
      seen = 0;
      for (int p = 0; p < int'(v); p++) begin
        logic [XLEN-1:0] w0, w1;
        w0 = u_mem.mem[int'(TRACE >> 3) + 3 * p];
        w1 = u_mem.mem[int'(TRACE >> 3) + 3 * p + 1];
        if (w0[63:56] == 8'd12) begin
          int it;
          it = int'(w0[31:16]);
          seen++;
          expect_("2: store12 packet", w0[55] == 1'b1 && w0[47:32] == OPC_STORE &&
                  w1 == 64'd0 && it < NN * NN && $signed(arr[it]) > 0);
        end
      end
      // store12 packets that found its FIFO full were dropped, not lost
      expect_("2: store12 packet count",
              seen + int'(u_top.u_core.drops[GS_STORE12]) == npos);
    end

    // ---- 3: same fault, store12 only checking: fault reaches memory
    prepare();
    set_guard(GS_STORE12, GM_CHECK, 0, FT_STUCK0);
    run_and_wait(cyc);
    rd(8'h0C, v); expect_("3: store12 flagged", v == (64'd1 << GS_STORE12));
    for (int k = 0; k < NN * NN; k++)
      expect_("3: fault propagated", u_mem.mem[int'(ARR >> 3) + k] == 64'd0);

    // ---- 4: gep7 addresses stuck at zero, first-pass guard list
    prepare();
    for (int g = 0; g < NG; g++) set_guard(g, GM_OFF, 0, FT_STUCK0);
    set_guard(GS_GEP7, GM_FAULT, 0, FT_STUCK0);
    set_guard(GS_MUL3, GM_VERIFY, 0, FT_STUCK0);
    set_guard(GS_CMP14, GM_VERIFY, 0, FT_STUCK0);
    set_guard(GS_CMP17, GM_VERIFY, 0, FT_STUCK0);
    set_guard(GS_STORE12, GM_VERIFY, 0, FT_STUCK0);
    run_and_wait(cyc);
    rd(8'h0C, v); expect_("4: only store12 flagged", v == (64'd1 << GS_STORE12));

    // ---- 5: log everything into a small region, profile gep7 addresses
    prepare();
    for (int g = 0; g < NG; g++) set_guard(g, GM_VERIFY, 1, FT_STUCK0);
    wr(8'h07, 64'(24 * 20));
    wr(8'h08, 64'd0); wr(8'h09, 64'hFFFF_FFFF); wr(8'h0A, 64'd1);
    run_and_wait(cyc);
    rd(8'h52, v); n_drop = int'(v);
    rd(8'h51, v); n_overflow = int'(v);
    begin
      logic [XLEN-1:0] w;
      rd(8'h50, w);
      expect_("5: region filled", w == 64'd20);
      // every logged token is either written, dropped or beyond the region
      expect_("5: packets accounted", int'(w) + n_drop + n_overflow ==
              7 * NN * NN + 2 * NN * NN + 2 * NN);
    end
    rd(8'h0E, v); expect_("5: profiler total", v == 64'(NN * NN));
    rd(8'h0D, v); n_window = int'(v);
    begin
      int href [8];
      for (int b = 0; b < 8; b++) href[b] = 0;
      for (int k = 0; k < NN * NN; k++) begin
        logic [XLEN-1:0] a;
        logic [2:0] h;
        a = (ARR + 64'(8 * k)) >> 3;
        h = '0;
        for (int s = 0; s < 21; s++) h ^= a[3 * s +: 3];
        href[h]++;
      end
      for (int b = 0; b < 8; b++) begin
        rd(8'h40 + 8'(b), v);
        expect_("5: profiler bin", v == 64'(href[b]));
      end
    end
    for (int k = 0; k < NN * NN; k++)
      expect_("5: result", u_mem.mem[int'(ARR >> 3) + k] == relu(arr[k]));

    // ---- 6a: control fault: cmp14 stuck at zero ends every row after j = 0
    prepare();
    for (int g = 0; g < NG; g++) set_guard(g, GM_OFF, 0, FT_STUCK0);
    // profiler moved to the store node: it counts the stores actually made
    wr(8'h56, 64'(GS_STORE12));
    wr(8'h56, 64'(NG));
    rd(8'h56, v); expect_("6a: PROF_SEL keeps store12", v == 64'(GS_STORE12));
    set_guard(GS_CMP14, GM_FAULT, 0, FT_STUCK0);
    run_and_wait(cyc);
    rd(8'h0E, v); expect_("6a: one store per row", v == 64'(NN));
    begin
      // the histogram now holds the stored data values, not addresses
      int href [8];
      logic ok;
      ok = (v == 64'(NN));
      for (int b = 0; b < 8; b++) href[b] = 0;
      for (int r = 0; r < NN; r++) begin
        logic [XLEN-1:0] d;
        logic [2:0] h;
        d = relu(arr[r * NN]) >> 3;
        h = '0;
        for (int s = 0; s < 21; s++) h ^= d[3 * s +: 3];
        href[h]++;
      end
      for (int b = 0; b < 8; b++) begin
        rd(8'h40 + 8'(b), v);
        expect_("6a: store data bin", v == 64'(href[b]));
        if (v != 64'(href[b])) ok = 1'b0;
      end
      if (ok) n_prof_sel++;
    end
    wr(8'h0A, 64'd0);
    wr(8'h56, 64'(GS_GEP7));
    for (int k = 0; k < NN * NN; k++)
      expect_("6a: only column 0 processed", u_mem.mem[int'(ARR >> 3) + k] ==
              ((k % NN == 0) ? relu(arr[k]) : arr[k]));
    for (int k = 0; k < NN * NN; k++)
      if (u_mem.mem[int'(ARR >> 3) + k] != relu(arr[k])) n_ctrl_fault++;

    // ---- 6b: memory fault: gep7 addresses moved one row on
    prepare();
    set_guard(GS_CMP14, GM_OFF, 0, FT_STUCK0);
    set_guard(GS_GEP7, GM_FAULT, 0, FT_OFFSET);
    wr(8'h20 + 8'(GS_GEP7), 64'(8 * NN));
    run_and_wait(cyc);
    for (int k = 0; k < NN * NN; k++)
      expect_("6b: rows shifted", u_mem.mem[int'(ARR >> 3) + k] ==
              ((k < NN) ? arr[k] : relu(arr[k])));
    for (int k = 0; k < NN * NN; k++)
      if (u_mem.mem[int'(ARR >> 3) + k] != relu(arr[k])) n_mem_fault++;
    set_guard(GS_GEP7, GM_OFF, 0, FT_STUCK0);

    // ---- 7: handshake checker on the cache port
    rd(8'h53, v);
    begin
      logic [XLEN-1:0] r, st;
      rd(8'h54, r); rd(8'h55, st);
      expect_("7: every request answered", v == 64'(2 * NN * NN) && r == v && st == 0);
    end
    prepare();
    swallow = 1;
    wr(8'h00, 64'd1);
    begin
      int t;
      t = 0;
      do begin rd(8'h55, v); t++; end while (v[1] == 1'b0 && t < 5000);
      expect_("7: lost response flagged", v[1] == 1'b1 && v[0] == 1'b0 && v[9:2] == 8'd1);
      if (v[1]) n_hs_timeout++;
      rd(8'h01, v); expect_("7: accelerator stuck", v[1:0] == 2'b01);
    end

    $display("mechanisms: hold=%0d patch=%0d fault=%0d conflict=%0d drop=%0d overflow=%0d window=%0d prof_sel=%0d hs_timeout=%0d ctrl_fault=%0d mem_fault=%0d",
             n_hold, n_patch, n_fault, n_conflict, n_drop, n_overflow, n_window, n_prof_sel, n_hs_timeout,
             n_ctrl_fault, n_mem_fault);
    expect_("hold stall happened", n_hold > 0);
    expect_("patch happened", n_patch > 0);
    expect_("fault injection happened", n_fault > 0);
    expect_("arbitration conflict happened", n_conflict > 0);
    expect_("FIFO drop happened", n_drop > 0);
    expect_("trace overflow happened", n_overflow > 0);
    expect_("profiler window hit happened", n_window > 0);
    expect_("profiler retargeted", n_prof_sel > 0);
    expect_("handshake timeout happened", n_hs_timeout > 0);
    expect_("control fault changed the result", n_ctrl_fault > 0);
    expect_("memory fault changed the result", n_mem_fault > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
