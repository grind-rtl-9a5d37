// tb_relu_accel: self-checking test of the uninstrumented Relu dataflow
// accelerator (guard controls tied to zero) on a behavioural memory with
// random stalls. For several sizes n (including 0 and 1) it fills an n x n
// array with random signed values, runs the accelerator and checks every
// element against max(x, 0), the iteration count n*n, that each guarded node
// completed the expected number of tokens, and that memory outside the array
// is untouched.
// The expected memory contents are the Relu definition (negative elements
// become zero); the element width and in-place update are this design's.
module tb_relu_accel;
  import grind_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                     start = 0, busy, done;
  logic [XLEN-1:0]          n = 0, base = 64'h800;
  logic [31:0]              iterations;
  logic                     c_req_valid, c_req_ready, c_rsp_valid;
  mem_req_t                 c_req;
  mem_rsp_t                 c_rsp;
  guard_tap_t [RELU_NG-1:0] taps;

  relu_accel dut (.clk, .rst_n, .start, .n, .base, .busy, .done, .iterations,
    .c_req_valid, .c_req_ready, .c_req, .c_rsp_valid, .c_rsp,
    .taps_o(taps), .ctls_i('0));
  tb_mem_model #(.WORDS(1024), .LAT(2)) u_mem (.clk, .rst_n, .req_valid(c_req_valid),
    .req_ready(c_req_ready), .req(c_req), .rsp_valid(c_rsp_valid), .rsp(c_rsp));

  int fires [RELU_NG];
  always @(posedge clk) if (rst_n)
    for (int g = 0; g < RELU_NG; g++) if (taps[g].fire) fires[g]++;

  task automatic run(input int nn);
    logic [XLEN-1:0] orig [];
    int ne;
    ne = nn * nn;
    orig = new[ne + 2];
    for (int k = 0; k < ne + 2; k++) begin
      orig[k] = {$urandom, $urandom};
      u_mem.mem[(64'h800 >> 3) + k] = orig[k];
    end
    for (int g = 0; g < RELU_NG; g++) fires[g] = 0;
    n = XLEN'(nn);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    for (int k = 0; k < ne + 2; k++) begin
      logic [XLEN-1:0] e;
      e = (k >= ne) ? orig[k] : ($signed(orig[k]) > 0 ? orig[k] : '0);
      checks++;
      if (u_mem.mem[(64'h800 >> 3) + k] != e) begin
        failures++; $display("n=%0d element %0d: got %h exp %h", nn, k,
                             u_mem.mem[(64'h800 >> 3) + k], e);
      end
    end
    checks++;
    if (iterations != 32'(ne)) begin failures++; $display("iterations %0d", iterations); end
    // body nodes fire once per element; loop nodes per inner / outer step
    for (int g = 0; g <= GS_STORE12; g++) begin
      checks++;
      if (fires[g] != ne) begin failures++; $display("slot %0d fired %0d", g, fires[g]); end
    end
    checks++;
    if (fires[GS_ADD13] != ne || fires[GS_ADD16] != nn || fires[GS_CMP17] != nn) begin
      failures++; $display("loop node counts wrong");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(4);
    run(1);
    run(0);
    run(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
