// relu_accel: guarded dataflow accelerator for an in-place Relu over an
// n x n array of XLEN-bit signed elements at byte address base:
//   for i < n: for j < n: A[i*n+j] = (A[i*n+j] > 0) ? A[i*n+j] : 0
//
// The graph follows the published Relu dataflow: loop control (loop_ctrl:
// add13, cmp14, add16, cmp17 and the two branches) feeds i and j tokens to
// mul3 (i*n), add6 (+j) and gep7 (base + 8*index); the address goes both to
// load8 and to store12; the loaded value goes to the compare cmp10 (> 0) and
// to select11, which picks it or the constant 0; store12 writes the result
// back. All nodes are dynamically scheduled (valid/ready tokens), so loop
// iterations overlap. Loads and stores share one cache port through a
// mem_interface.
//
// Every node listed in grind_pkg (RELU_IDS) has a guard hook, brought out as
// taps_o/ctls_i in guard-slot order (GS_*). With ctls_i all zero the circuit
// is the uninstrumented accelerator. start (one cycle, while idle) launches a
// run; done rises once the loop has ended and every store has completed, and
// stays high until the next start. Element size, the in-place layout and the
// node numbering of cmp10 are this design's choices.
module relu_accel
  import grind_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [XLEN-1:0]             n,
  input  logic [XLEN-1:0]             base,
  output logic                        busy,
  output logic                        done,
  output logic [31:0]                 iterations,
  // cache port
  output logic                        c_req_valid,
  input  logic                        c_req_ready,
  output mem_req_t                    c_req,
  input  logic                        c_rsp_valid,
  input  mem_rsp_t                    c_rsp,
  // guard hooks
  output guard_tap_t [RELU_NG-1:0]    taps_o,
  input  guard_ctl_t [RELU_NG-1:0]    ctls_i
);
  logic            i_v, i_r, j_v, j_r, loop_done;
  logic [XLEN-1:0] i_d, j_d;
  logic            m3_v, m3_r, a6_v, a6_r;
  logic [XLEN-1:0] m3_d, a6_d, g7_d;
  logic [1:0]      g7_v, g7_r;
  logic            ld_addr_r, st_addr_r;
  logic [1:0]      l8_v, l8_r;
  logic [XLEN-1:0] l8_d;
  logic            c10_v, c10_r, c10_a_r;
  logic [XLEN-1:0] c10_d;
  logic            s11_v, s11_r, s11_in1_r;
  logic [XLEN-1:0] s11_d;
  logic            st_done_v;
  logic [XLEN-1:0] st_done_d;
  logic            rd_valid, rd_ready, rd_rsp_valid, wr_valid, wr_ready, wr_ack;
  logic [MEM_AW-1:0] rd_addr, wr_addr;
  logic [XLEN-1:0] rd_rsp_data, wr_data;
  logic            nc_b3, nc_g7a, nc_c10b, nc_s11in0, nc_s11sel;
  logic [31:0]     stores_q;

  loop_ctrl u_loop (
    .clk, .rst_n, .start, .n,
    .i_valid(i_v), .i_ready(i_r), .i_out(i_d),
    .j_valid(j_v), .j_ready(j_r), .j_out(j_d),
    .done(loop_done),
    .taps_o(taps_o[GS_CMP17:GS_ADD13]), .ctls_i(ctls_i[GS_CMP17:GS_ADD13]));

  df_compute #(.OP(OP_MUL), .NOUT(1)) u_mul3 (
    .clk, .rst_n,
    .a_valid(i_v), .a_ready(i_r), .a(i_d),
    .b_valid(1'b1), .b_ready(nc_b3), .b(n),
    .out_valid(m3_v), .out_ready(m3_r), .out_data(m3_d),
    .tap_o(taps_o[GS_MUL3]), .ctl_i(ctls_i[GS_MUL3]));

  df_compute #(.OP(OP_ADD), .NOUT(1)) u_add6 (
    .clk, .rst_n,
    .a_valid(m3_v), .a_ready(m3_r), .a(m3_d),
    .b_valid(j_v), .b_ready(j_r), .b(j_d),
    .out_valid(a6_v), .out_ready(a6_r), .out_data(a6_d),
    .tap_o(taps_o[GS_ADD6]), .ctl_i(ctls_i[GS_ADD6]));

  df_compute #(.OP(OP_GEP), .NOUT(2), .SHIFT(3)) u_gep7 (
    .clk, .rst_n,
    .a_valid(1'b1), .a_ready(nc_g7a), .a(base),
    .b_valid(a6_v), .b_ready(a6_r), .b(a6_d),
    .out_valid(g7_v), .out_ready(g7_r), .out_data(g7_d),
    .tap_o(taps_o[GS_GEP7]), .ctl_i(ctls_i[GS_GEP7]));

  assign g7_r = {st_addr_r, ld_addr_r};

  df_load #(.NOUT(2)) u_load8 (
    .clk, .rst_n,
    .addr_valid(g7_v[0]), .addr_ready(ld_addr_r), .addr(g7_d),
    .rd_valid, .rd_ready, .rd_addr, .rd_rsp_valid, .rd_rsp_data,
    .out_valid(l8_v), .out_ready(l8_r), .out_data(l8_d),
    .tap_o(taps_o[GS_LOAD8]), .ctl_i(ctls_i[GS_LOAD8]));

  df_compute #(.OP(OP_GT), .NOUT(1)) u_cmp10 (
    .clk, .rst_n,
    .a_valid(l8_v[0]), .a_ready(c10_a_r), .a(l8_d),
    .b_valid(1'b1), .b_ready(nc_c10b), .b('0),
    .out_valid(c10_v), .out_ready(c10_r), .out_data(c10_d),
    .tap_o(taps_o[GS_CMP10]), .ctl_i(ctls_i[GS_CMP10]));

  assign l8_r = {s11_in1_r, c10_a_r};

  df_select #(.NOUT(1)) u_select11 (
    .clk, .rst_n,
    .sel_valid(c10_v), .sel_ready(nc_s11sel), .sel(c10_d[0]),
    .in0_valid(1'b1), .in0_ready(nc_s11in0), .in0('0),
    .in1_valid(l8_v[1]), .in1_ready(s11_in1_r), .in1(l8_d),
    .out_valid(s11_v), .out_ready(s11_r), .out_data(s11_d),
    .tap_o(taps_o[GS_SEL11]), .ctl_i(ctls_i[GS_SEL11]));

  assign c10_r = nc_s11sel;

  df_store u_store12 (
    .clk, .rst_n,
    .addr_valid(g7_v[1]), .addr_ready(st_addr_r), .addr(g7_d),
    .data_valid(s11_v), .data_ready(s11_r), .data(s11_d),
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_ack,
    .done_valid(st_done_v), .done_ready(1'b1), .done_data(st_done_d),
    .tap_o(taps_o[GS_STORE12]), .ctl_i(ctls_i[GS_STORE12]));

  mem_interface #(.NR(1), .NW(1)) u_memif (
    .clk, .rst_n,
    .rd_valid, .rd_ready, .rd_addr, .rd_rsp_valid, .rd_rsp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_ack,
    .c_req_valid, .c_req_ready, .c_req, .c_rsp_valid, .c_rsp);

  // completion: loop finished and every iteration's store acknowledged
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      iterations <= '0;
      stores_q   <= '0;
    end else if (start) begin
      busy       <= 1'b1;
      done       <= 1'b0;
      iterations <= '0;
      stores_q   <= '0;
    end else begin
      if (j_v && j_r)   iterations <= iterations + 1'b1;
      if (st_done_v)    stores_q   <= stores_q + 1'b1;
      if (busy && loop_done && (stores_q == iterations) && !(j_v && j_r) && !st_done_v) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
