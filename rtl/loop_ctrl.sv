// loop_ctrl: the two-level loop control of the Relu dataflow accelerator
// (for i < n, for j < n), built from dataflow nodes.
//
// A loop token register holds the current j (the loop-header merge); the
// outer index i sits in a register that only changes between inner loops,
// when no inner token is in flight. Each loop token is forked to the body
// (i and j outputs) and to the inner increment add13 (j+1). cmp14 (j+1 < n)
// steers j+1 through the inner branch: taken, it becomes the next loop token;
// not taken, it triggers the outer increment add16 (i+1) and cmp17 (i+1 < n),
// whose branch either restarts the inner loop with j = 0 or ends the loop
// (done). A loop iteration takes four cycles when the body keeps up.
// add13, cmp14, add16 and cmp17 carry guard hooks (taps_o/ctls_i in the
// order add13, cmp14, add16, cmp17). Node names follow the published Relu
// graph; merging the header selects into one token register is this
// design's choice. n = 0 ends at once with no iterations.
module loop_ctrl
  import grind_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [XLEN-1:0]       n,
  output logic                  i_valid,
  input  logic                  i_ready,
  output logic [XLEN-1:0]       i_out,
  output logic                  j_valid,
  input  logic                  j_ready,
  output logic [XLEN-1:0]       j_out,
  output logic                  done,
  output guard_tap_t [3:0]      taps_o,
  input  guard_ctl_t [3:0]      ctls_i
);
  logic            cur_v;
  logic [XLEN-1:0] cur_j, i_q;
  logic [2:0]      taken_q, offer, take;
  logic            cur_complete;

  // add13 / cmp14 / inner branch
  logic            a13_ready, unused_b13_ready;
  logic [1:0]      a13_v, a13_r;
  logic [XLEN-1:0] a13_d;
  logic            c14_a_ready, unused_b14_ready;
  logic            c14_v, c14_r;
  logic [XLEN-1:0] c14_d;
  logic            bi_in_ready, bi_cond_ready;
  logic            bi_t_v, bi_t_r, bi_f_v, bi_f_r;
  logic [XLEN-1:0] bi_d;
  // add16 / cmp17 / outer branch
  logic            unused_b16_ready;
  logic [1:0]      a16_v, a16_r;
  logic [XLEN-1:0] a16_d;
  logic            c17_a_ready, unused_b17_ready;
  logic            c17_v, c17_r;
  logic [XLEN-1:0] c17_d;
  logic            bo_in_ready, bo_cond_ready;
  logic            bo_t_v, bo_t_r, bo_f_v;
  logic [XLEN-1:0] bo_d;

  // loop token fork: 0 -> i output, 1 -> j output, 2 -> add13
  assign offer   = cur_v ? ~taken_q : 3'b000;
  assign i_valid = offer[0];
  assign j_valid = offer[1];
  assign i_out   = i_q;
  assign j_out   = cur_j;
  assign take    = offer & {a13_ready, j_ready, i_ready};
  assign cur_complete = cur_v && ((taken_q | take) == 3'b111);

  assign bi_t_r = !cur_v;
  assign bo_t_r = !cur_v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_v   <= 1'b0;
      cur_j   <= '0;
      i_q     <= '0;
      taken_q <= '0;
      done    <= 1'b0;
    end else if (start) begin
      cur_v   <= (n != '0);
      cur_j   <= '0;
      i_q     <= '0;
      taken_q <= '0;
      done    <= (n == '0);
    end else begin
      if (cur_complete) begin
        cur_v   <= 1'b0;
        taken_q <= '0;
      end else begin
        taken_q <= taken_q | take;
      end
      if (bi_t_v && bi_t_r) begin        // next inner iteration
        cur_v <= 1'b1;
        cur_j <= bi_d;
      end
      if (bo_t_v && bo_t_r) begin        // next outer iteration
        cur_v <= 1'b1;
        cur_j <= '0;
        i_q   <= bo_d;
      end
      if (bo_f_v) done <= 1'b1;
    end
  end

  df_compute #(.OP(OP_ADD), .NOUT(2)) u_add13 (
    .clk, .rst_n,
    .a_valid(offer[2]), .a_ready(a13_ready), .a(cur_j),
    .b_valid(1'b1), .b_ready(unused_b13_ready), .b(XLEN'(1)),
    .out_valid(a13_v), .out_ready(a13_r), .out_data(a13_d),
    .tap_o(taps_o[0]), .ctl_i(ctls_i[0]));

  df_compute #(.OP(OP_LT), .NOUT(1)) u_cmp14 (
    .clk, .rst_n,
    .a_valid(a13_v[0]), .a_ready(c14_a_ready), .a(a13_d),
    .b_valid(1'b1), .b_ready(unused_b14_ready), .b(n),
    .out_valid(c14_v), .out_ready(c14_r), .out_data(c14_d),
    .tap_o(taps_o[1]), .ctl_i(ctls_i[1]));

  assign a13_r = {bi_in_ready, c14_a_ready};
  assign c14_r = bi_cond_ready;

  df_branch u_br_inner (
    .clk, .rst_n,
    .in_valid(a13_v[1]), .in_ready(bi_in_ready), .in_data(a13_d),
    .cond_valid(c14_v), .cond_ready(bi_cond_ready), .cond(c14_d[0]),
    .t_valid(bi_t_v), .t_ready(bi_t_r), .f_valid(bi_f_v), .f_ready(bi_f_r),
    .out_data(bi_d));

  // inner loop exit triggers the outer increment of the held i
  df_compute #(.OP(OP_ADD), .NOUT(2)) u_add16 (
    .clk, .rst_n,
    .a_valid(bi_f_v), .a_ready(bi_f_r), .a(i_q),
    .b_valid(1'b1), .b_ready(unused_b16_ready), .b(XLEN'(1)),
    .out_valid(a16_v), .out_ready(a16_r), .out_data(a16_d),
    .tap_o(taps_o[2]), .ctl_i(ctls_i[2]));

  df_compute #(.OP(OP_LT), .NOUT(1)) u_cmp17 (
    .clk, .rst_n,
    .a_valid(a16_v[0]), .a_ready(c17_a_ready), .a(a16_d),
    .b_valid(1'b1), .b_ready(unused_b17_ready), .b(n),
    .out_valid(c17_v), .out_ready(c17_r), .out_data(c17_d),
    .tap_o(taps_o[3]), .ctl_i(ctls_i[3]));

  assign a16_r = {bo_in_ready, c17_a_ready};
  assign c17_r = bo_cond_ready;

  df_branch u_br18 (
    .clk, .rst_n,
    .in_valid(a16_v[1]), .in_ready(bo_in_ready), .in_data(a16_d),
    .cond_valid(c17_v), .cond_ready(bo_cond_ready), .cond(c17_d[0]),
    .t_valid(bo_t_v), .t_ready(bo_t_r), .f_valid(bo_f_v), .f_ready(1'b1),
    .out_data(bo_d));
endmodule
