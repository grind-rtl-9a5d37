// tb_mem_arbiter: self-checking test of the round-robin memory arbiter with
// three requesters mixing burst reads and writes on a stalling behavioural
// memory. Checks that each requester receives exactly its own response beats
// (burst length and data of its own region), that bursts are not interleaved,
// that writes land in memory, and that all requesters get served while all
// of them keep requesting (no starvation).
// Round-robin order and grant holding are this design's choices; the test
// checks them directly.
module tb_mem_arbiter;
  import grind_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N = 3, NOPS = 40;

  logic [N-1:0]     in_req_valid = '0, in_req_ready, in_rsp_valid;
  mem_req_t [N-1:0] in_req = '0;
  mem_rsp_t         in_rsp;
  logic             out_req_valid, out_req_ready, out_rsp_valid;
  mem_req_t         out_req;
  mem_rsp_t         out_rsp;

  mem_arbiter #(.N(N)) dut (.*);
  tb_mem_model #(.WORDS(2048), .LAT(2)) u_mem (.clk, .rst_n, .req_valid(out_req_valid),
    .req_ready(out_req_ready), .req(out_req), .rsp_valid(out_rsp_valid), .rsp(out_rsp));

  int   done_ops [N], beats_left [N], beat_idx [N];
  logic waiting [N];
  logic [XLEN-1:0] base_word [N];
  int   wr_count [N];

  always @(posedge clk) if (rst_n) begin
    int nactive;
    nactive = 0;
    for (int r = 0; r < N; r++) begin
      if (in_req_valid[r] && in_req_ready[r]) begin
        waiting[r]    <= 1'b1;
        beats_left[r] <= in_req[r].write ? 1 : int'(in_req[r].len) + 1;
        beat_idx[r]   <= 0;
        base_word[r]  <= XLEN'(in_req[r].addr >> 3);
      end
      if (in_rsp_valid[r]) begin
        nactive++;
        checks++;
        if (!waiting[r]) begin failures++; $display("beat to idle requester %0d", r); end
        else if (!(in_req[r].write) &&
                 in_rsp.data != XLEN'(64'hA000_0000 + base_word[r] + XLEN'(beat_idx[r]))) begin
          failures++; $display("req %0d wrong data %h", r, in_rsp.data);
        end
        if (in_rsp.last != (beats_left[r] == 1)) begin
          failures++; $display("req %0d last flag wrong", r);
        end
        beat_idx[r]   <= beat_idx[r] + 1;
        beats_left[r] <= beats_left[r] - 1;
        if (beats_left[r] == 1) begin
          waiting[r] <= 1'b0;
          done_ops[r]++;
        end
      end
    end
    if (nactive > 1) begin failures++; $display("beats to two requesters"); end
  end

  always @(negedge clk) if (rst_n)
    for (int r = 0; r < N; r++) begin
      if (in_req_valid[r] && waiting[r]) in_req_valid[r] <= 1'b0;
      else if (!in_req_valid[r] && !waiting[r] && done_ops[r] < NOPS) begin
        in_req_valid[r] <= 1'b1;
        if ($urandom % 3 == 0) begin
          in_req[r].write <= 1'b1;
          in_req[r].addr  <= MEM_AW'((1024 + r * 256 + wr_count[r]) * 8);
          in_req[r].wdata <= XLEN'(64'hB000 + r * 256 + wr_count[r]);
          in_req[r].len   <= '0;
          wr_count[r]++;
        end else begin
          in_req[r].write <= 1'b0;
          in_req[r].addr  <= MEM_AW'((r * 256 + $urandom % 200) * 8);
          in_req[r].len   <= LEN_W'($urandom % 4);
        end
      end
    end

  initial begin
    for (int r = 0; r < N; r++) begin
      done_ops[r] = 0; waiting[r] = 0; wr_count[r] = 0; beats_left[r] = 0; beat_idx[r] = 0;
    end
    for (int k = 0; k < 1024; k++) u_mem.mem[k] = XLEN'(64'hA000_0000 + k);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_ops[0] == NOPS && done_ops[1] == NOPS && done_ops[2] == NOPS);
    repeat (5) @(posedge clk);
    for (int r = 0; r < N; r++)
      for (int k = 0; k < wr_count[r]; k++) begin
        checks++;
        if (u_mem.mem[1024 + r * 256 + k] != XLEN'(64'hB000 + r * 256 + k)) begin
          failures++; $display("write %0d/%0d lost", r, k);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d %0d %0d", done_ops[0], done_ops[1], done_ops[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
