// tb_mem_model: behavioural main memory for the testbenches (not
// synthesizable design content). Serves the grind_pkg request/response
// channel: WORDS XLEN-bit words, byte addressed (addr >> 3). The request
// ready is randomly withheld about one cycle in STALL; after LAT cycles a read
// returns len+1 beats, a write returns one ack beat, the final beat marked
// last. One request is served at a time. Words start at zero; testbenches
// reach the array through hierarchical references.
// Latency and stall pattern are arbitrary test choices.
module tb_mem_model
  import grind_pkg::*;
#(
  parameter int WORDS = 4096,
  parameter int LAT   = 3,
  parameter int STALL = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  output mem_rsp_t rsp
);
  logic [XLEN-1:0] mem [WORDS];
  logic            busy, rdy_rand;
  int              wait_q, beats_q, idx_q;
  logic            wr_q;
  int              nreq;

  initial for (int k = 0; k < WORDS; k++) mem[k] = '0;

  assign req_ready = !busy && rdy_rand;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
      rdy_rand  <= 1'b0;
      nreq      <= 0;
    end else begin
      rdy_rand  <= (STALL == 0) ? 1'b1 : (($urandom % STALL) != 0);
      rsp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        busy    <= 1'b1;
        nreq    <= nreq + 1;
        wait_q  <= LAT;
        wr_q    <= req.write;
        idx_q   <= int'(req.addr >> 3) % WORDS;
        beats_q <= req.write ? 1 : int'(req.len) + 1;
        if (req.write) mem[int'(req.addr >> 3) % WORDS] <= req.wdata;
      end else if (busy) begin
        if (wait_q > 0) begin
          wait_q <= wait_q - 1;
        end else begin
          rsp_valid <= 1'b1;
          rsp.data  <= wr_q ? '0 : mem[idx_q];
          rsp.last  <= (beats_q == 1);
          idx_q     <= (idx_q + 1) % WORDS;
          beats_q   <= beats_q - 1;
          if (beats_q == 1) busy <= 1'b0;
        end
      end
    end
  end
endmodule
