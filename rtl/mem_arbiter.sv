// mem_arbiter: round-robin arbiter that shares one memory channel among N
// requesters (grind_pkg request/response channel).
//
// Among the requesters with a pending request, the first at or after the
// round-robin pointer is granted; its request is forwarded, and the grant is
// held until the response beat marked last has been routed back to it, so
// bursts are never interleaved. The next grant can be made in the cycle after
// that beat; the pointer moves past the requester just served. The published
// system only names the arbiter; fairness scheme and locking are this
// design's choices.
module mem_arbiter
  import grind_pkg::*;
#(
  parameter int N = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     in_req_valid,
  output logic [N-1:0]     in_req_ready,
  input  mem_req_t [N-1:0] in_req,
  output logic [N-1:0]     in_rsp_valid,
  output mem_rsp_t         in_rsp,
  output logic             out_req_valid,
  input  logic             out_req_ready,
  output mem_req_t         out_req,
  input  logic             out_rsp_valid,
  input  mem_rsp_t         out_rsp
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic          busy_q, sent_q;
  logic [IW-1:0] owner_q, ptr_q, pick;
  logic          found;

  always_comb begin
    pick  = '0;
    found = 1'b0;
    for (int k = 0; k < N; k++) begin
      automatic int idx;
      idx = (int'(ptr_q) + k) % N;
      if (!found && in_req_valid[idx]) begin
        pick  = IW'(idx);
        found = 1'b1;
      end
    end
  end

  assign out_req_valid = busy_q && !sent_q && in_req_valid[owner_q];
  assign out_req       = in_req[owner_q];
  assign in_rsp        = out_rsp;

  always_comb begin
    in_req_ready = '0;
    in_rsp_valid = '0;
    if (busy_q && !sent_q) in_req_ready[owner_q] = out_req_ready;
    if (busy_q && sent_q)  in_rsp_valid[owner_q] = out_rsp_valid;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      sent_q  <= 1'b0;
      owner_q <= '0;
      ptr_q   <= '0;
    end else if (!busy_q) begin
      if (found) begin
        busy_q  <= 1'b1;
        sent_q  <= 1'b0;
        owner_q <= pick;
        ptr_q   <= (int'(pick) == N-1) ? '0 : pick + 1'b1;
      end
    end else if (!sent_q) begin
      if (out_req_valid && out_req_ready) sent_q <= 1'b1;
    end else if (out_rsp_valid && out_rsp.last) begin
      busy_q <= 1'b0;
      sent_q <= 1'b0;
    end
  end

  // a forwarded request stays stable until the memory accepts it
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (out_req_valid && !out_req_ready) |=> out_req_valid && $stable(out_req));
endmodule
