// tb_trace_writer: self-checking test of the writer buffers and writer
// wrapper. Three guards push random packets at random times into FIFOs of
// depth 4 in front of a stalling behavioural memory. Checks that every
// packet accepted by a FIFO appears in the trace region exactly once, in
// per-guard order and with the documented three-word layout, that packets
// meeting a full FIFO are refused, and that a small trace region counts the
// packets that do not fit as overflow.
// Dropping packets when buffers are full follows the published writer; the
// word layout and region allocation are this design's.
module tb_trace_writer;
  import grind_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NG = 3, NPKT = 60;

  logic                 load = 0;
  logic [MEM_AW-1:0]    trace_base = 32'h2000, trace_size = 32'h10000;
  logic [NG-1:0]        pkt_valid = '0, pkt_full;
  dbg_packet_t [NG-1:0] pkt = '0;
  logic                 req_valid, req_ready, rsp_valid, idle;
  mem_req_t             req;
  mem_rsp_t             rsp;
  logic [MEM_AW-1:0]    ptr;
  logic [15:0]          written, overflow;

  trace_writer #(.NG(NG), .FIFO_DEPTH(4)) dut (.*);
  tb_mem_model #(.WORDS(4096), .LAT(1)) u_mem (.clk, .rst_n, .req_valid, .req_ready,
    .req, .rsp_valid, .rsp);

  dbg_packet_t acc [NG][$];
  int pushes = 0, refused = 0;
  logic gen = 0;

  function automatic dbg_packet_t mk(int g, int k);
    dbg_packet_t p;
    p.id = 8'(g + 1); p.flag = 1'(k); p.opcode = 16'(g * 16 + 5); p.iter = 16'(k);
    p.reserved = 16'(k * 3); p.data = {16'(g), 32'($urandom)}; p.cycle = $urandom;
    return p;
  endfunction

  always @(posedge clk) if (rst_n)
    for (int g = 0; g < NG; g++) if (pkt_valid[g]) begin
      if (!pkt_full[g]) acc[g].push_back(pkt[g]);
      else refused++;
    end

  always @(negedge clk) begin
    if (gen && pushes < NPKT) begin
      for (int g = 0; g < NG; g++) begin
        pkt_valid[g] <= ($urandom % 3) == 0;
        pkt[g] <= mk(g, pushes + g);
      end
      pushes++;
    end else if (gen) pkt_valid <= '0;
  end

  initial begin
    int nacc, widx [NG];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    gen = 1;
    wait (pushes == NPKT);
    @(negedge clk);
    wait (idle);
    repeat (3) @(negedge clk);
    nacc = acc[0].size() + acc[1].size() + acc[2].size();
    checks++;
    if (written != 16'(nacc) || ptr != MEM_AW'(nacc * 24)) begin
      failures++; $display("written %0d ptr %0d expected %0d", written, ptr, nacc);
    end
    // walk the trace, matching each packet to the head of its guard's list
    for (int g = 0; g < NG; g++) widx[g] = 0;
    for (int k = 0; k < nacc; k++) begin
      logic [XLEN-1:0] w0, w1, w2;
      int g;
      dbg_packet_t e;
      w0 = u_mem.mem[(32'h2000 >> 3) + 3 * k];
      w1 = u_mem.mem[(32'h2000 >> 3) + 3 * k + 1];
      w2 = u_mem.mem[(32'h2000 >> 3) + 3 * k + 2];
      g = int'(w0[63:56]) - 1;
      checks++;
      if (g < 0 || g >= NG || widx[g] >= acc[g].size()) begin
        failures++; $display("packet %0d bad id %h", k, w0[63:56]);
      end else begin
        e = acc[g][widx[g]];
        widx[g]++;
        if (w0 != {e.id, e.flag, 7'd0, e.opcode, e.iter, e.reserved} ||
            w1 != {16'd0, e.data} || w2 != {32'd0, e.cycle}) begin
          failures++; $display("packet %0d content mismatch", k);
        end
      end
    end
    checks++;
    if (refused == 0) begin failures++; $display("FIFO never filled"); end

    // small region: only 5 packets fit
    gen = 0;
    trace_size = 5 * 24;
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    for (int k = 0; k < 8; k++) begin
      pkt_valid = 3'b001; pkt[0] = mk(0, k);
      @(negedge clk);
      pkt_valid = '0;
      wait (idle);
      @(negedge clk);
    end
    checks++;
    if (written != 5 || overflow != 3) begin
      failures++; $display("overflow: written %0d overflow %0d", written, overflow);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
