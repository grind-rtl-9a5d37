// tb_reader_buffer: self-checking test of a guard's reader buffer. A
// behavioural memory holds 40 golden values; the consumer pops at random.
// Checks every value comes out once and in order across several refills,
// that refills are bursts of BUFFER_LEN words at consecutive addresses
// requested only when the queue is empty, that no burst is requested while
// disabled, and that load rewinds to a new base address. The buffer refills
// as soon as the 40 values are consumed, so the rewind may meet a burst
// already requested: that burst must still complete and its data must not
// reach the guard (the values after the rewind are checked).
// The refill-when-empty burst rule follows the published reader buffer.
module tb_reader_buffer;
  import grind_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int BL = 8, NV = 40;

  logic              load = 0, enable = 0, pop = 0;
  logic [MEM_AW-1:0] base_addr = 32'h100;
  logic              head_valid, req_valid, req_ready, rsp_valid;
  logic [XLEN-1:0]   head;
  mem_req_t          req;
  mem_rsp_t          rsp;

  reader_buffer #(.BUFFER_LEN(BL)) dut (.*);
  tb_mem_model #(.WORDS(512), .LAT(2)) u_mem (.clk, .rst_n, .req_valid, .req_ready,
    .req, .rsp_valid, .rsp);

  int npop = 0, nreq = 0;
  logic [MEM_AW-1:0] exp_addr = 32'h100;
  logic random_pop = 0, skip_one = 0;
  int   n_at_load, stale_bursts = 0;

  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready && skip_one) begin
      // the burst requested before the rewind: completed, data discarded
      skip_one <= 1'b0;
      stale_bursts++;
      nreq++;
    end else if (req_valid && req_ready) begin
      checks++;
      if (req.addr != exp_addr || req.len != LEN_W'(BL - 1) || req.write || head_valid) begin
        failures++; $display("bad burst request addr %h len %0d", req.addr, req.len);
      end
      if (!enable) begin failures++; $display("burst while disabled"); end
      exp_addr <= exp_addr + BL * 8;
      nreq++;
    end
    if (pop && head_valid) begin
      checks++;
      if (head != XLEN'(64'h6000 + npop)) begin
        failures++; $display("value %0d: got %h", npop, head);
      end
      npop++;
    end
  end

  always @(negedge clk) if (random_pop) pop <= 1'($urandom);

  initial begin
    for (int k = 0; k < 128; k++) u_mem.mem[32 + k] = XLEN'(64'h6000 + k);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (nreq != 0 || head_valid) begin failures++; $display("fetched while disabled"); end
    enable = 1;
    random_pop = 1;
    wait (npop == NV);
    random_pop = 0;
    @(negedge clk); pop = 0;
    // rewind to value 2
    base_addr = 32'h100 + 2 * 8;
    exp_addr  = 32'h100 + 2 * 8;
    npop = 2;
    @(negedge clk); load = 1; skip_one = req_valid; n_at_load = nreq;
    @(negedge clk); load = 0;
    random_pop = 1;
    wait (npop == 2 + 2 * BL);
    checks++;
    if (nreq - n_at_load != 2 + stale_bursts || n_at_load < NV / BL || n_at_load > NV / BL + 1) begin
      failures++; $display("burst count %0d (%0d before the rewind)", nreq, n_at_load);
    end
    $display("bursts %0d, %0d of them stale", nreq, stale_bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
