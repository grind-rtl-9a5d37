// tb_relu_workload: the Relu workload at a larger size, run on the complete
// system at its default parameters. A 32 x 32 array of random signed 64-bit
// values is processed twice:
//  1. with all eleven guards verifying (the first run of the iterative
//     verifier with every guard on): the result must be correct and no guard
//     may flag; the run's cycle count and the bytes of golden data the guards
//     streamed in are reported;
//  2. with the guards off, as the uninstrumented baseline: same result, and
//     the cycle count is reported so the cost of verifying can be compared.
// The golden words streamed in run 1 must lie between the total token count
// of the guarded nodes and that count rounded up to whole bursts per guard,
// plus at most two bursts per guard fetched ahead (once when the guard is
// enabled before the start, once when its queue runs empty at the end).
// The workload is the published Relu benchmark; its input size here is this
// test's choice.
module tb_relu_workload;
  import grind_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NG = RELU_NG;
  localparam int NN = 32;
  localparam logic [63:0] ARR = 64'h800, GOLD = 64'h10000, STRIDE = 64'h2000,
                          TRACE = 64'h40000;

  logic            host_we = 0, irq;
  logic [7:0]      host_addr = 0;
  logic [XLEN-1:0] host_wdata = 0, host_rdata;
  logic            acc_req_valid, acc_req_ready, acc_rsp_valid;
  mem_req_t        acc_req;
  mem_rsp_t        acc_rsp;
  logic            m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t        m_req;
  mem_rsp_t        m_rsp;

  grind_top u_top (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rdata, .irq,
    .acc_req_valid, .acc_req_ready, .acc_req, .acc_rsp_valid, .acc_rsp,
    .cache_m_req_valid(acc_req_valid), .cache_m_req_ready(acc_req_ready),
    .cache_m_req(acc_req), .cache_m_rsp_valid(acc_rsp_valid), .cache_m_rsp(acc_rsp),
    .m_req_valid, .m_req_ready, .m_req, .m_rsp_valid, .m_rsp);

  tb_mem_model #(.WORDS(65536), .LAT(3)) u_mem (.clk, .rst_n, .req_valid(m_req_valid),
    .req_ready(m_req_ready), .req(m_req), .rsp_valid(m_rsp_valid), .rsp(m_rsp));

  // golden-data beats delivered to the guard core
  int gold_beats = 0;
  always @(posedge clk)
    if (rst_n && (|u_top.u_core.a_rsp_valid[NG-1:0])) gold_beats++;

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

  task automatic run_and_wait(output int cycles);
    logic [XLEN-1:0] st, cyc;
    wr(8'h00, 64'd1);
    do rd(8'h01, st); while (st[1] == 1'b0);
    rd(8'h0B, cyc);
    cycles = int'(cyc);
  endtask

  initial begin
    logic [XLEN-1:0] v;
    int cyc_on, cyc_off, beats_exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(8'h02, 64'(NN)); wr(8'h03, ARR); wr(8'h04, GOLD); wr(8'h05, STRIDE);
    wr(8'h06, TRACE); wr(8'h07, 64'h8000);

    // ---- 1: every guard verifying
    prepare();
    for (int g = 0; g < NG; g++) wr(8'h10 + 8'(g), 64'(GM_VERIFY));
    gold_beats = 0;
    run_and_wait(cyc_on);
    rd(8'h0C, v); expect_("1: no guard flagged", v == 0);
    rd(8'h50, v); expect_("1: no packets", v == 0);
    for (int k = 0; k < NN * NN; k++)
      expect_("1: result", u_mem.mem[int'(ARR >> 3) + k] == relu(arr[k]));
    // 9 guards see NN*NN tokens, 2 see NN; bursts of 8 words
    beats_exp = 9 * (((NN * NN + 7) / 8) * 8) + 2 * (((NN + 7) / 8) * 8);
    expect_("1: golden words streamed", gold_beats >= 9 * NN * NN + 2 * NN &&
            gold_beats <= beats_exp + 2 * NG * 8);

    // ---- 2: guards off (baseline)
    prepare();
    for (int g = 0; g < NG; g++) wr(8'h10 + 8'(g), 64'(GM_OFF));
    run_and_wait(cyc_off);
    for (int k = 0; k < NN * NN; k++)
      expect_("2: result", u_mem.mem[int'(ARR >> 3) + k] == relu(arr[k]));

    $display("Relu %0dx%0d: %0d cycles verifying (%0d golden bytes in), %0d cycles unguarded",
             NN, NN, cyc_on, gold_beats * 8, cyc_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
