// trace_writer: writer buffers of NG guards and the writer wrapper that
// drains them into a trace region of main memory.
//
// Each guard pushes debug packets into its own FIFO of FIFO_DEPTH entries
// (pkt_full tells the guard to drop). The wrapper picks a non-empty FIFO
// round-robin, splits the packet into three memory words and writes them one
// by one, each waiting for the memory's ack, at trace_base + ptr. The memory
// allocator is a bump pointer: a packet that would not fit below trace_base +
// trace_size is discarded and counted in overflow. load (one cycle) resets the
// pointer and the counters. Word layout, little end first:
//   word 0: {id[7:0], flag, 7'b0, opcode[15:0], iter[15:0], reserved[15:0]}
//   word 1: {16'b0, data[47:0]}
//   word 2: {32'b0, cycle[31:0]}
// idle is high when every FIFO is empty and no packet is being written.
// Writing while the accelerator runs, the word layout and the allocator
// policy are this design's choices.
module trace_writer
  import grind_pkg::*;
#(
  parameter int NG         = 4,
  parameter int FIFO_DEPTH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [MEM_AW-1:0]      trace_base,
  input  logic [MEM_AW-1:0]      trace_size,   // bytes
  // guard side
  input  logic [NG-1:0]          pkt_valid,
  input  dbg_packet_t [NG-1:0]   pkt,
  output logic [NG-1:0]          pkt_full,
  // memory channel
  output logic                   req_valid,
  input  logic                   req_ready,
  output mem_req_t               req,
  input  logic                   rsp_valid,
  input  mem_rsp_t               rsp,
  // status
  output logic [MEM_AW-1:0]      ptr,          // bytes written
  output logic [15:0]            written,      // packets written
  output logic [15:0]            overflow,     // packets dropped: region full
  output logic                   idle
);
  localparam int IW = (NG > 1) ? $clog2(NG) : 1;
  localparam int PKT_BYTES = PKT_WORDS * (XLEN / 8);

  typedef enum logic [1:0] {W_IDLE, W_REQ, W_ACK} wstate_e;
  wstate_e       st;
  dbg_packet_t   cur_q;
  logic [1:0]    word_q;
  logic [IW-1:0] rr_q, pick;
  logic          found;
  logic [NG-1:0] f_empty, f_pop;
  dbg_packet_t   f_head [NG];
  logic          fits;

  for (genvar g = 0; g < NG; g++) begin : g_fifo
    logic [$clog2(FIFO_DEPTH+1)-1:0] unused_count;
    sync_fifo #(.T(dbg_packet_t), .DEPTH(FIFO_DEPTH)) u_f (
      .clk, .rst_n,
      .push(pkt_valid[g]), .din(pkt[g]),
      .pop(f_pop[g]), .dout(f_head[g]),
      .full(pkt_full[g]), .empty(f_empty[g]), .count(unused_count));
  end

  always_comb begin
    pick  = '0;
    found = 1'b0;
    for (int k = 0; k < NG; k++) begin
      automatic int idx;
      idx = (int'(rr_q) + k) % NG;
      if (!found && !f_empty[idx]) begin
        pick  = IW'(idx);
        found = 1'b1;
      end
    end
  end

  assign fits = (ptr + MEM_AW'(PKT_BYTES)) <= trace_size;

  always_comb begin
    f_pop = '0;
    if (st == W_IDLE && found) f_pop[pick] = 1'b1;
  end

  always_comb begin
    req       = '0;
    req.write = 1'b1;
    req.addr  = trace_base + ptr;
    req.len   = '0;
    unique case (word_q)
      2'd0:    req.wdata = {cur_q.id, cur_q.flag, 7'd0, cur_q.opcode, cur_q.iter, cur_q.reserved};
      2'd1:    req.wdata = {16'd0, cur_q.data};
      default: req.wdata = {32'd0, cur_q.cycle};
    endcase
  end
  assign req_valid = (st == W_REQ);
  assign idle      = (st == W_IDLE) && (&f_empty);

  always_ff @(posedge clk) begin
    if (!rst_n || load) begin
      st       <= W_IDLE;
      cur_q    <= '0;
      word_q   <= '0;
      rr_q     <= '0;
      ptr      <= '0;
      written  <= '0;
      overflow <= '0;
    end else begin
      unique case (st)
        W_IDLE: if (found) begin
          rr_q <= (int'(pick) == NG-1) ? '0 : pick + 1'b1;
          if (fits) begin
            cur_q  <= f_head[pick];
            word_q <= '0;
            st     <= W_REQ;
          end else begin
            overflow <= overflow + 1'b1;
          end
        end
        W_REQ: if (req_ready) st <= W_ACK;
        W_ACK: if (rsp_valid) begin
          ptr <= ptr + MEM_AW'(XLEN / 8);
          if (word_q == 2'(PKT_WORDS - 1)) begin
            written <= written + 1'b1;
            st      <= W_IDLE;
          end else begin
            word_q <= word_q + 1'b1;
            st     <= W_REQ;
          end
        end
        default: st <= W_IDLE;
      endcase
    end
  end
endmodule
