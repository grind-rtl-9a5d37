// handshake_guard: a read-only guard on a memory channel (the accelerator's
// cache port) that checks that every request gets its response.
//
// It counts accepted requests (req_valid && req_ready) and completed
// responses (rsp_valid with last = 1), and keeps the number outstanding. Two
// errors are flagged and stay set until clear:
//   orphan  - a response completes while no request is outstanding;
//   timeout - a request has been outstanding for TIMEOUT cycles with no
//             response beat, the signature of a request the cache missed
//             (the accelerator would wait forever).
// Counters saturate. clear (one cycle) zeroes
// everything, as at the start of a run. Purely observing: it never drives
// the channel, so it does not change the circuit's timing.
// Checking request/response pairing on the cache lines follows the published
// handshake checker; the timeout detector, its length and the counter widths
// are this design's choices.
module handshake_guard
  import grind_pkg::*;
#(
  parameter int TIMEOUT = 1024,
  parameter int CW      = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  // observed channel
  input  logic          req_valid,
  input  logic          req_ready,
  input  logic          rsp_valid,
  input  mem_rsp_t      rsp,
  // results
  output logic [CW-1:0] reqs,        // requests accepted
  output logic [CW-1:0] rsps,        // responses completed
  output logic [7:0]    outstanding, // requests waiting for a response
  output logic          orphan,
  output logic          timeout
);
  localparam int TW = $clog2(TIMEOUT + 1);

  logic          req_fire, rsp_done;
  logic [TW-1:0] wait_q;

  assign req_fire = req_valid && req_ready;
  assign rsp_done = rsp_valid && rsp.last;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      reqs        <= '0;
      rsps        <= '0;
      outstanding <= '0;
      orphan      <= 1'b0;
      timeout     <= 1'b0;
      wait_q      <= '0;
    end else begin
      if (req_fire && reqs != '1) reqs <= reqs + 1'b1;
      if (rsp_done && rsps != '1) rsps <= rsps + 1'b1;
      if (rsp_done && outstanding == '0) orphan <= 1'b1;
      unique case ({req_fire, rsp_done && outstanding != '0})
        2'b10:   if (outstanding != '1) outstanding <= outstanding + 1'b1;
        2'b01:   outstanding <= outstanding - 1'b1;
        default: ;
      endcase
      // cycles since the last response beat while something is outstanding
      if (outstanding == '0 || rsp_valid) wait_q <= '0;
      else if (wait_q != TW'(TIMEOUT)) wait_q <= wait_q + 1'b1;
      if (outstanding != '0 && wait_q == TW'(TIMEOUT)) timeout <= 1'b1;
    end
  end

  // the counters never lose track: outstanding equals requests minus responses
  a_balance: assert property (@(posedge clk) disable iff (!rst_n || clear)
    (reqs != '1 && rsps != '1 && !orphan) |-> (CW'(outstanding) == reqs - rsps));
endmodule
