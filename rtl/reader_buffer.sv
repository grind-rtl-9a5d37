// reader_buffer: a guard's reader buffer (shadow RAM) of golden values.
//
// Holds up to BUFFER_LEN golden values of one guarded node, consumed in
// execution order by the guard (head/pop, first-word fall-through). The values
// are streamed from main memory during execution: whenever the queue has run
// empty the buffer asks for a burst of BUFFER_LEN words at its read pointer
// (state REQ), stores the returning beats (state BUSY), then advances the
// pointer by BUFFER_LEN words and goes back to IDLE. load (one cycle) sets the
// pointer to base_addr and empties the queue; enable gates new bursts. A
// burst already requested when load arrives is completed on the memory
// channel (a request is never withdrawn) and its data discarded; the rewind
// then takes effect. The
// refill-when-empty rule and burst size follow the published reader code;
// the memory channel is grind_pkg's request/response channel.
// BUFFER_LEN's value (8) is this design's choice.
module reader_buffer
  import grind_pkg::*;
#(
  parameter int BUFFER_LEN = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              enable,
  input  logic [MEM_AW-1:0] base_addr,
  // golden values to the guard
  output logic              head_valid,
  output logic [XLEN-1:0]   head,
  input  logic              pop,
  // memory channel
  output logic              req_valid,
  input  logic              req_ready,
  output mem_req_t          req,
  input  logic              rsp_valid,
  input  mem_rsp_t          rsp
);
  typedef enum logic [1:0] {R_IDLE, R_REQ, R_BUSY} rstate_e;
  rstate_e           st;
  logic [MEM_AW-1:0] addr_q;
  logic [MEM_AW-1:0] base_q;
  logic              empty, full, flush, stale_q, burst_end;
  logic [$clog2(BUFFER_LEN+1)-1:0] count;

  // flushing on load: the queue is reset through its own reset
  assign flush = load;

  sync_fifo #(.T(logic [XLEN-1:0]), .DEPTH(BUFFER_LEN)) u_q (
    .clk, .rst_n(rst_n && !flush),
    .push(st == R_BUSY && rsp_valid && !stale_q && !load), .din(rsp.data),
    .pop, .dout(head), .full, .empty, .count);

  assign burst_end  = (st == R_BUSY) && rsp_valid && rsp.last;
  assign head_valid = !empty;
  assign req_valid  = (st == R_REQ);
  always_comb begin
    req       = '0;
    req.write = 1'b0;
    req.addr  = addr_q;
    req.len   = LEN_W'(BUFFER_LEN - 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= R_IDLE;
      addr_q  <= '0;
      base_q  <= '0;
      stale_q <= 1'b0;
    end else begin
      unique case (st)
        R_IDLE: if (!load && enable && empty) st <= R_REQ;
        R_REQ:  if (req_ready) st <= R_BUSY;
        R_BUSY: if (rsp_valid && rsp.last) st <= R_IDLE;
        default: st <= R_IDLE;
      endcase
      // read pointer: a rewind takes effect at once when no burst is in
      // flight, otherwise when the (then stale) burst has finished
      if (load) begin
        base_q <= base_addr;
        if (st == R_IDLE || burst_end) begin
          addr_q  <= base_addr;
          stale_q <= 1'b0;
        end else begin
          stale_q <= 1'b1;
        end
      end else if (burst_end) begin
        addr_q  <= stale_q ? base_q : addr_q + MEM_AW'(BUFFER_LEN * (XLEN / 8));
        stale_q <= 1'b0;
      end
    end
  end

  // a request, once raised, is held with the same address until accepted
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && !req_ready) |=> req_valid && $stable(req.addr));

  // a burst only starts on an empty queue, so it can never overflow it
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (st == R_BUSY && rsp_valid) |-> !full);
endmodule
