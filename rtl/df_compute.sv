// df_compute: compute node of a dynamically scheduled dataflow circuit.
//
// Joins one token from each operand input, applies the operation OP and holds
// the result in an output register. The result token is offered to NOUT
// successors at once; each successor takes it in its own cycle, and no new
// operands are accepted until every successor has taken the current token
// (the compute-node rule of the dataflow library). A new result can be
// computed in the cycle the last successor takes the old one, so an
// uncontended node sustains one token per cycle with one cycle of latency.
//
// Guard hook: tap_o shows the raw result, whether a token is present and
// when it completes; ctl_i may hold the token back (hold) and may replace the
// value the successors see (patch_en/patch). With ctl_i tied to zero the node
// is the bare node. The operation set, the GEP shift and the signed compares
// are this design's choices.
module df_compute
  import grind_pkg::*;
#(
  parameter df_op_e OP    = OP_ADD,
  parameter int     NOUT  = 1,
  parameter int     SHIFT = 3      // OP_GEP: element size = 2**SHIFT bytes
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  a_valid,
  output logic                  a_ready,
  input  logic [XLEN-1:0]       a,
  input  logic                  b_valid,
  output logic                  b_ready,
  input  logic [XLEN-1:0]       b,
  output logic [NOUT-1:0]       out_valid,
  input  logic [NOUT-1:0]       out_ready,
  output logic [XLEN-1:0]       out_data,
  output guard_tap_t            tap_o,
  input  guard_ctl_t            ctl_i
);
  logic            full;
  logic [XLEN-1:0] res_q;
  logic [NOUT-1:0] taken_q;   // successors that already took the token
  logic [NOUT-1:0] take;
  logic            complete, load;
  logic [XLEN-1:0] res_d;

  always_comb begin
    unique case (OP)
      OP_ADD:  res_d = a + b;
      OP_SUB:  res_d = a - b;
      OP_MUL:  res_d = a * b;
      OP_GEP:  res_d = a + (b << SHIFT);
      OP_LT:   res_d = XLEN'($signed(a) < $signed(b));
      OP_GT:   res_d = XLEN'($signed(a) > $signed(b));
      OP_EQ:   res_d = XLEN'(a == b);
      default: res_d = '0;
    endcase
  end

  assign out_valid = (full && !ctl_i.hold) ? ~taken_q : '0;
  assign out_data  = ctl_i.patch_en ? ctl_i.patch : res_q;
  assign take      = out_valid & out_ready;
  assign complete  = full && ((taken_q | take) == '1);
  assign load      = a_valid && b_valid && (!full || complete);
  assign a_ready   = load;
  assign b_ready   = load;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full    <= 1'b0;
      taken_q <= '0;
      res_q   <= '0;
    end else begin
      if (load) begin
        full    <= 1'b1;
        res_q   <= res_d;
        taken_q <= '0;
      end else if (complete) begin
        full    <= 1'b0;
        taken_q <= '0;
      end else begin
        taken_q <= taken_q | take;
      end
    end
  end

  assign tap_o.valid = full;
  assign tap_o.fire  = complete;
  assign tap_o.ext   = '0;
  assign tap_o.value = res_q;

  // A token stays offered to a successor until that successor takes it.
  a_offer_held: assert property (@(posedge clk) disable iff (!rst_n)
    (full && !ctl_i.hold && !complete) |=> full);
endmodule
