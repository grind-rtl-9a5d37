// profiler_guard: read-only guard that keeps on-chip statistics of one node
// output instead of tracing it to memory.
//
// While en is high, every token the node completes (tap_i.fire) is counted
// in total, counted in active if the current cycle lies in [win_lo, win_hi],
// and added to one of NBINS histogram counters chosen by a hash of its value:
// value >> HASH_SHIFT, folded by XOR into log2(NBINS) bits. The guard never
// drives the node (no patch multiplexer). clear (one cycle) zeroes all
// counters. Counters saturate at all ones. One cycle from a token to the
// updated counters. The hash, the bin count and the interval test are this
// design's choices; the published design gives only the hash-indexed
// histogram counters, the enable and the activity-in-an-interval example.
module profiler_guard
  import grind_pkg::*;
#(
  parameter int NBINS      = 8,
  parameter int HASH_SHIFT = 3,    // drop the byte offset of word addresses
  parameter int CW         = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     en,
  input  guard_tap_t               tap_i,
  input  logic [31:0]              cycle,
  input  logic [31:0]              win_lo,
  input  logic [31:0]              win_hi,
  output logic [NBINS-1:0][CW-1:0] hist,
  output logic [CW-1:0]            active,
  output logic [CW-1:0]            total
);
  localparam int HB = (NBINS > 1) ? $clog2(NBINS) : 1;

  logic [XLEN-1:0] v;
  logic [HB-1:0]   h;
  logic            hit, in_win;

  assign v = tap_i.value >> HASH_SHIFT;
  always_comb begin
    h = '0;
    for (int k = 0; k < XLEN / HB; k++) h = h ^ v[k*HB +: HB];
  end

  assign hit    = en && tap_i.fire;
  assign in_win = (cycle >= win_lo) && (cycle <= win_hi);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      hist   <= '0;
      active <= '0;
      total  <= '0;
    end else if (hit) begin
      if (total != '1)                  total   <= total + 1'b1;
      if (in_win && active != '1)       active  <= active + 1'b1;
      if (hist[h] != '1)                hist[h] <= hist[h] + 1'b1;
    end
  end
endmodule
