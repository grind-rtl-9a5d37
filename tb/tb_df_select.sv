// tb_df_select: self-checking test of the mux (select) node. Three
// independent random producers supply, for each firing k, a select bit and
// one token on each data input (in0 = 1000+k, in1 = 2000+k), arriving in any
// order; the successor stalls at random. Checks that every output is the
// selected input's token of the same firing, that the select mask is reported,
// and that all non-selected tokens were discarded (every producer drained).
// The reference model is the mux node's published rule: the selected token
// passes, the other input's token is discarded whenever it arrives.
module tb_df_select;
  import grind_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NTOK = 400;

  logic            sel_valid = 0, sel_ready, sel = 0;
  logic            in0_valid = 0, in0_ready, in1_valid = 0, in1_ready;
  logic [XLEN-1:0] in0 = 0, in1 = 0, out_data;
  logic            out_valid, out_ready = 0;
  guard_tap_t      tap;

  df_select #(.NOUT(1)) dut (
    .clk, .rst_n, .sel_valid, .sel_ready, .sel,
    .in0_valid, .in0_ready, .in0, .in1_valid, .in1_ready, .in1,
    .out_valid, .out_ready, .out_data, .tap_o(tap), .ctl_i('0));

  logic selbits [NTOK];
  int   ns = 0, n0 = 0, n1 = 0, nout = 0;

  initial for (int k = 0; k < NTOK; k++) selbits[k] = 1'($urandom);

  always @(posedge clk) if (rst_n) begin
    if (sel_valid && sel_ready) ns++;
    if (in0_valid && in0_ready) n0++;
    if (in1_valid && in1_ready) n1++;
    if (tap.fire) begin
      checks++;
      if (tap.ext != (selbits[nout] ? 16'd2 : 16'd1)) begin
        failures++; $display("mask wrong at %0d", nout);
      end
    end
    if (out_valid && out_ready) begin
      logic [XLEN-1:0] e;
      e = selbits[nout] ? XLEN'(2000 + nout) : XLEN'(1000 + nout);
      checks++;
      if (out_data != e) begin
        failures++; $display("out %0d: got %0d exp %0d", nout, out_data, e);
      end
      nout++;
    end
  end

  always @(negedge clk) if (rst_n) begin
    out_ready <= ($urandom % 3) != 0;
    if (ns < NTOK) begin
      sel_valid <= ($urandom % 4) == 0 ? 1'b0 : 1'b1;
      sel       <= selbits[ns];
    end else sel_valid <= 1'b0;
    if (n0 < NTOK) begin
      in0_valid <= ($urandom % 3) == 0;
      in0       <= XLEN'(1000 + n0);
    end else in0_valid <= 1'b0;
    if (n1 < NTOK) begin
      in1_valid <= ($urandom % 2) == 0;
      in1       <= XLEN'(2000 + n1);
    end else in1_valid <= 1'b0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nout == NTOK);
    repeat (20) @(posedge clk);
    checks++;
    if (n0 != NTOK || n1 != NTOK || ns != NTOK) begin
      failures++; $display("not drained: %0d %0d %0d", ns, n0, n1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired: out=%0d sel=%0d in0=%0d in1=%0d", nout, ns, n0, n1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
