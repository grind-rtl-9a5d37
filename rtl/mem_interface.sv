// mem_interface: memory interface of the dataflow accelerator.
//
// Gives NR read ports and NW write ports of the dataflow nodes one request
// port towards the cache. A read port sends an address and later receives
// the data with a one-cycle valid; a write port sends address and data and
// later receives a data-less completion (ack). Requests are granted
// round-robin (read ports first in the index order, then write ports), and one
// request is outstanding at a time: the next grant is made in the cycle after
// the response arrives. Single-outstanding operation and the round-robin
// order are this design's choices; the port kinds follow the dataflow library.
module mem_interface
  import grind_pkg::*;
#(
  parameter int NR = 2,
  parameter int NW = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // read ports
  input  logic [NR-1:0]                rd_valid,
  output logic [NR-1:0]                rd_ready,
  input  logic [NR-1:0][MEM_AW-1:0]    rd_addr,
  output logic [NR-1:0]                rd_rsp_valid,
  output logic [XLEN-1:0]              rd_rsp_data,
  // write ports
  input  logic [NW-1:0]                wr_valid,
  output logic [NW-1:0]                wr_ready,
  input  logic [NW-1:0][MEM_AW-1:0]    wr_addr,
  input  logic [NW-1:0][XLEN-1:0]      wr_data,
  output logic [NW-1:0]                wr_ack,
  // cache port
  output logic                         c_req_valid,
  input  logic                         c_req_ready,
  output mem_req_t                     c_req,
  input  logic                         c_rsp_valid,
  input  mem_rsp_t                     c_rsp
);
  localparam int N  = NR + NW;
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]  req_vec;
  logic          busy_q;        // a request is outstanding
  logic          issued_q;      // the granted request was accepted
  logic [IW-1:0] owner_q, ptr_q, pick;
  logic          found;

  assign req_vec = {wr_valid, rd_valid};

  // round-robin pick starting at ptr_q
  always_comb begin
    pick  = '0;
    found = 1'b0;
    for (int k = 0; k < N; k++) begin
      automatic int idx;
      idx = (int'(ptr_q) + k) % N;
      if (!found && req_vec[idx]) begin
        pick  = IW'(idx);
        found = 1'b1;
      end
    end
  end

  always_comb begin
    c_req       = '0;
    c_req_valid = busy_q && !issued_q;
    if (int'(owner_q) < NR) begin
      c_req.write = 1'b0;
      c_req.addr  = rd_addr[int'(owner_q) % NR];
    end else begin
      c_req.write = 1'b1;
      c_req.addr  = wr_addr[(int'(owner_q) - NR) % NW];
      c_req.wdata = wr_data[(int'(owner_q) - NR) % NW];
    end
    c_req.len = '0;
  end

  // the port's request is consumed when the cache accepts it
  always_comb begin
    rd_ready = '0;
    wr_ready = '0;
    if (c_req_valid && c_req_ready) begin
      if (int'(owner_q) < NR) rd_ready[int'(owner_q) % NR] = 1'b1;
      else                    wr_ready[(int'(owner_q) - NR) % NW] = 1'b1;
    end
  end

  always_comb begin
    rd_rsp_valid = '0;
    wr_ack       = '0;
    rd_rsp_data  = c_rsp.data;
    if (busy_q && issued_q && c_rsp_valid) begin
      if (int'(owner_q) < NR) rd_rsp_valid[int'(owner_q) % NR] = 1'b1;
      else                    wr_ack[(int'(owner_q) - NR) % NW] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q   <= 1'b0;
      issued_q <= 1'b0;
      owner_q  <= '0;
      ptr_q    <= '0;
    end else if (!busy_q) begin
      if (found) begin
        busy_q   <= 1'b1;
        issued_q <= 1'b0;
        owner_q  <= pick;
        ptr_q    <= (int'(pick) == N-1) ? '0 : pick + 1'b1;
      end
    end else begin
      if (c_req_valid && c_req_ready) issued_q <= 1'b1;
      if (issued_q && c_rsp_valid)    busy_q   <= 1'b0;
    end
  end
endmodule
