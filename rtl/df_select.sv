// df_select: mux (select) node of a dynamically scheduled dataflow circuit.
//
// Takes a select token, then waits only for the token on the selected input
// (sel=1 picks in1, sel=0 picks in0) and produces the output. The token that
// belongs to the same firing on the other input is discarded: at once if it
// is already there, otherwise as soon as it arrives (a per-input count of
// pending discards keeps tokens of later firings apart). The result sits in
// an output register offered to NOUT successors with the same fork rule as
// the compute node. One cycle from the last needed token to the result.
//
// Guard hook as in df_compute; tap_o.ext carries the select-line mask (bit k
// set when input k was chosen) for the packet's extended data bits. The
// discard counters' width and the sel polarity are this design's choices.
module df_select
  import grind_pkg::*;
#(
  parameter int NOUT = 1,
  parameter int DW   = 4     // width of the pending-discard counters
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sel_valid,
  output logic             sel_ready,
  input  logic             sel,
  input  logic             in0_valid,
  output logic             in0_ready,
  input  logic [XLEN-1:0]  in0,
  input  logic             in1_valid,
  output logic             in1_ready,
  input  logic [XLEN-1:0]  in1,
  output logic [NOUT-1:0]  out_valid,
  input  logic [NOUT-1:0]  out_ready,
  output logic [XLEN-1:0]  out_data,
  output guard_tap_t       tap_o,
  input  guard_ctl_t       ctl_i
);
  logic            full;
  logic [XLEN-1:0] res_q;
  logic [1:0]      mask_q;
  logic [NOUT-1:0] taken_q, take;
  logic            complete, fire;
  logic [DW-1:0]   pend0, pend1;      // tokens still to be discarded
  logic            drop0, drop1;      // discard one token this cycle
  logic            sel_avail;

  assign out_valid = (full && !ctl_i.hold) ? ~taken_q : '0;
  assign out_data  = ctl_i.patch_en ? ctl_i.patch : res_q;
  assign take      = out_valid & out_ready;
  assign complete  = full && ((taken_q | take) == '1);

  // the chosen input must have no discards pending, else its head is stale
  assign sel_avail = sel ? (in1_valid && pend1 == '0) : (in0_valid && pend0 == '0);
  assign fire      = sel_valid && sel_avail && (!full || complete);

  always_comb begin
    drop0 = 1'b0;
    drop1 = 1'b0;
    if (pend0 != '0 && in0_valid) drop0 = 1'b1;
    if (pend1 != '0 && in1_valid) drop1 = 1'b1;
    // the other input's token for this firing, if it is already present
    if (fire && sel  && pend0 == '0 && in0_valid) drop0 = 1'b1;
    if (fire && !sel && pend1 == '0 && in1_valid) drop1 = 1'b1;
  end

  assign sel_ready = fire;
  assign in0_ready = (fire && !sel) || drop0;
  assign in1_ready = (fire && sel)  || drop1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full    <= 1'b0;
      taken_q <= '0;
      res_q   <= '0;
      mask_q  <= '0;
      pend0   <= '0;
      pend1   <= '0;
    end else begin
      if (fire) begin
        full    <= 1'b1;
        res_q   <= sel ? in1 : in0;
        mask_q  <= sel ? 2'b10 : 2'b01;
        taken_q <= '0;
      end else if (complete) begin
        full    <= 1'b0;
        taken_q <= '0;
      end else begin
        taken_q <= taken_q | take;
      end
      // one more discard owed when the other input had no token yet
      pend0 <= pend0 - DW'(pend0 != '0 && drop0)
                     + DW'(fire && sel && !(pend0 == '0 && in0_valid));
      pend1 <= pend1 - DW'(pend1 != '0 && drop1)
                     + DW'(fire && !sel && !(pend1 == '0 && in1_valid));
    end
  end

  assign tap_o.valid = full;
  assign tap_o.fire  = complete;
  assign tap_o.ext   = {14'd0, mask_q};
  assign tap_o.value = res_q;
endmodule
