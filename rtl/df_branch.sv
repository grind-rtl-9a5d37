// df_branch: control (branch) node of a dynamically scheduled dataflow circuit.
//
// Joins a data token with a condition token and dispatches the data to the T
// output when the condition is 1, to the F output otherwise. The steered token
// is held in an output register until its successor takes it; a new pair is
// accepted in the cycle the held token leaves, so the node has one cycle of
// latency and sustains one token per cycle. Registering the output is this
// design's choice; it also breaks combinational paths around loops.
module df_branch
  import grind_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [XLEN-1:0] in_data,
  input  logic            cond_valid,
  output logic            cond_ready,
  input  logic            cond,
  output logic            t_valid,
  input  logic            t_ready,
  output logic            f_valid,
  input  logic            f_ready,
  output logic [XLEN-1:0] out_data
);
  logic full, dir_q, leave, accept;

  assign t_valid  = full && dir_q;
  assign f_valid  = full && !dir_q;
  assign leave    = (t_valid && t_ready) || (f_valid && f_ready);
  assign accept   = in_valid && cond_valid && (!full || leave);
  assign in_ready   = accept;
  assign cond_ready = accept;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full     <= 1'b0;
      dir_q    <= 1'b0;
      out_data <= '0;
    end else if (accept) begin
      full     <= 1'b1;
      dir_q    <= cond;
      out_data <= in_data;
    end else if (leave) begin
      full     <= 1'b0;
    end
  end
endmodule
