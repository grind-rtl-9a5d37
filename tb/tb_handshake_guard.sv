// tb_handshake_guard: self-checking test of the cache handshake checker.
// Phase 1 drives a well-behaved channel: random requests (reads of 1-4 beats
// and writes), answered after a random delay in order by a small queue model,
// and checks the request/response counts, the outstanding count and that no
// error is flagged. Phase 2 swallows one request's response (a missed
// request) and checks that timeout rises exactly TIMEOUT cycles after the
// last response beat and not before. Phase 3 sends a response nobody asked
// for and checks orphan. The counting rules follow the pairing check of the
// handshake checker; the timeout length is a parameter chosen for the test.
module tb_handshake_guard;
  import grind_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int TO = 40;

  logic        clear = 0, req_valid = 0, req_ready = 0, rsp_valid = 0;
  mem_rsp_t    rsp = '0;
  logic [31:0] reqs, rsps;
  logic [7:0]  outstanding;
  logic        orphan, timeout;

  handshake_guard #(.TIMEOUT(TO), .CW(32)) dut (.clk, .rst_n, .clear, .req_valid,
    .req_ready, .rsp_valid, .rsp, .reqs, .rsps, .outstanding, .orphan, .timeout);

  task automatic expect_(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int beats_q [$];
  int nreq = 0, nrsp = 0, cur = 0, gap = 0;
  logic run = 0;

  // channel model driven at negedge
  always @(negedge clk) if (run) begin
    req_valid = ($urandom % 3) == 0;
    req_ready = ($urandom % 2) == 0;
    rsp_valid = 0;
    rsp.last  = 0;
    if (cur == 0 && beats_q.size() > 0 && gap == 0) begin
      cur = beats_q.pop_front();
    end
    if (gap > 0) gap--;
    else if (cur > 0) begin
      rsp_valid = 1;
      rsp.data  = {$urandom, $urandom};
      rsp.last  = (cur == 1);
      cur--;
      if (cur == 0) gap = $urandom % 4;
    end
  end

  always @(posedge clk) if (rst_n && run) begin
    if (req_valid && req_ready) begin nreq++; beats_q.push_back(1 + $urandom % 4); end
    if (rsp_valid && rsp.last) nrsp++;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1
    run = 1;
    repeat (600) @(posedge clk);
    @(negedge clk);
    expect_("counts track", reqs == 32'(nreq) && rsps == 32'(nrsp));
    expect_("outstanding", outstanding == 8'(nreq - nrsp));
    expect_("no error on a good channel", !orphan && !timeout);
    expect_("traffic happened", nreq > 50);
    // phase 2: drop the next response; stop new requests
    req_valid = 0;
    run = 0;
    rsp_valid = 0;
    @(negedge clk);
    beats_q.delete();
    cur = 0;
    clear = 1; @(negedge clk); clear = 0;
    req_valid = 1; req_ready = 1; @(negedge clk); req_valid = 0;
    t0 = 0;
    while (!timeout && t0 < 3 * TO) begin @(negedge clk); t0++; end
    expect_("timeout on a missed response", timeout && !orphan);
    expect_("timeout latency", t0 >= TO && t0 <= TO + 1);
    // phase 3: orphan response
    clear = 1; @(negedge clk); clear = 0;
    expect_("clear", !orphan && !timeout && reqs == 0 && outstanding == 0);
    rsp_valid = 1; rsp.last = 1; @(negedge clk); rsp_valid = 0;
    @(negedge clk);
    expect_("orphan response flagged", orphan && !timeout);
    $display("requests %0d responses %0d", nreq, nrsp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
