// tb_profiler_guard: self-checking test of the profiler guard. Feeds random
// tokens (random values, random completion) and keeps a reference model of
// the hashed histogram, the total and the in-window activity count; checks
// all counters at the end (tokens are forced on the cycles just inside and
// just outside both window edges), that nothing is counted while disabled, and that
// clear zeroes them.
// The activity window follows the published interval profiler; the hash
// and bin count are this design's.
module tb_profiler_guard;
  import grind_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NB = 8;

  logic                  clear = 0, en = 0;
  guard_tap_t            tap = '0;
  logic [31:0]           cycle = 0, win_lo = 100, win_hi = 300;
  logic [NB-1:0][31:0]   hist;
  logic [31:0]           active, total;

  profiler_guard #(.NBINS(NB), .HASH_SHIFT(3)) dut (.clk, .rst_n, .clear, .en,
    .tap_i(tap), .cycle, .win_lo, .win_hi, .hist, .active, .total);

  int ref_hist [NB], ref_active = 0, ref_total = 0;

  function automatic int hash(logic [XLEN-1:0] x);
    logic [2:0] h;
    logic [XLEN-1:0] v;
    v = x >> 3;
    h = '0;
    for (int k = 0; k < XLEN / 3; k++) h ^= v[3 * k +: 3];
    return int'(h);
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && en && tap.fire) begin
      ref_total++;
      if (cycle >= win_lo && cycle <= win_hi) ref_active++;
      ref_hist[hash(tap.value)]++;
    end
  end

  always @(negedge clk) begin
    tap.valid <= 1'b1;
    // tokens always complete on the cycles at both edges of the window
    tap.fire  <= 1'($urandom) || cycle == win_lo - 1 || cycle == win_lo ||
                 cycle == win_hi || cycle == win_hi + 1;
    tap.value <= {$urandom, $urandom} & 64'hFFF8;
  end

  initial begin
    for (int b = 0; b < NB; b++) ref_hist[b] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (total != 0) begin failures++; $display("counted while disabled"); end
    en = 1;
    repeat (500) @(negedge clk);
    en = 0;
    @(negedge clk);
    checks++;
    if (total != 32'(ref_total) || active != 32'(ref_active)) begin
      failures++; $display("total %0d/%0d active %0d/%0d", total, ref_total, active, ref_active);
    end
    checks++;
    if (active == 0 || active == total) begin failures++; $display("window not exercised"); end
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (hist[b] != 32'(ref_hist[b])) begin
        failures++; $display("bin %0d: %0d exp %0d", b, hist[b], ref_hist[b]);
      end
    end
    clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (total != 0 || active != 0 || hist != '0) begin failures++; $display("clear failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
