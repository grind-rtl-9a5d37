// tb_df_compute: self-checking test of the compute node. Drives random
// operand tokens into a two-successor adder and a one-successor GEP node with
// randomly stalling successors, checks each successor receives every result
// once and in order, checks the one-cycle latency of an idle node, and checks
// that a guard hold keeps the token back and a patch replaces its value.
// The reference model is the compute node's published fork rule (every
// successor gets every token, no new token until all have taken it); the
// operations and the guard hold/patch behaviour are this design's.
module tb_df_compute;
  import grind_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            a_valid = 0, b_valid = 0, a_ready, b_ready;
  logic [XLEN-1:0] a = 0, b = 0, out_data;
  logic [1:0]      out_valid, out_ready = 0;
  guard_tap_t      tap;
  guard_ctl_t      ctl = '0;

  // second instance: GEP, single successor, always ready
  logic            g_valid, g_ready_a, g_ready_b;
  logic [XLEN-1:0] g_data;
  guard_tap_t      g_tap;

  df_compute #(.OP(OP_ADD), .NOUT(2)) dut (
    .clk, .rst_n, .a_valid, .a_ready, .a, .b_valid, .b_ready, .b,
    .out_valid, .out_ready, .out_data, .tap_o(tap), .ctl_i(ctl));

  df_compute #(.OP(OP_GEP), .NOUT(1), .SHIFT(3)) dut_gep (
    .clk, .rst_n, .a_valid, .a_ready(g_ready_a), .a, .b_valid, .b_ready(g_ready_b), .b,
    .out_valid(g_valid), .out_ready(1'b1), .out_data(g_data),
    .tap_o(g_tap), .ctl_i('0));

  logic [XLEN-1:0] exp0 [$], exp1 [$], expg [$];
  int sent = 0, got0 = 0, got1 = 0;
  localparam int NTOK = 300;
  logic phase_random = 1;

  // join the two nodes' input handshakes: drive only when both can take
  always @(posedge clk) if (rst_n) begin
    if (a_valid && a_ready) begin
      exp0.push_back(a + b);
      exp1.push_back(a + b);
      sent++;
    end
    if (a_valid && g_ready_a) expg.push_back(a + (b << 3));
    for (int k = 0; k < 2; k++) if (out_valid[k] && out_ready[k]) begin
      logic [XLEN-1:0] e;
      e = (k == 0) ? exp0.pop_front() : exp1.pop_front();
      checks++;
      if (out_data != e) begin
        failures++;
        $display("mismatch out%0d: got %h exp %h", k, out_data, e);
      end
      if (k == 0) got0++; else got1++;
    end
    if (g_valid) begin
      checks++;
      if (g_data != expg.pop_front()) begin
        failures++;
        $display("gep mismatch %h", g_data);
      end
    end
  end

  always @(negedge clk) if (rst_n && phase_random) begin
    out_ready <= 2'($urandom);
    if (!a_valid || a_ready) begin
      if (sent + (a_valid && a_ready ? 1 : 0) < NTOK) begin
        a_valid <= ($urandom % 3) != 0;
        b_valid <= 1'b1;
        a <= {$urandom, $urandom};
        b <= {$urandom, $urandom};
      end else begin
        a_valid <= 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got0 == NTOK && got1 == NTOK);
    phase_random = 0;
    @(negedge clk);
    a_valid = 0; b_valid = 1; out_ready = 2'b11;
    // latency: operands accepted at one edge, result offered after it
    a = 64'd5; b = 64'd7; a_valid = 1;
    @(negedge clk);
    a_valid = 0;
    checks++;
    if (!(out_valid == 2'b11 && out_data == 64'd12)) begin
      failures++; $display("latency check failed %b %h", out_valid, out_data);
    end
    @(negedge clk);
    // hold and patch
    out_ready = 2'b00;
    ctl.hold = 1;
    a = 64'd1; b = 64'd2; a_valid = 1;
    @(negedge clk);
    a_valid = 0;
    checks++;
    if (out_valid != 2'b00 || !tap.valid || tap.value != 64'd3) begin
      failures++; $display("hold check failed");
    end
    ctl.hold = 0; ctl.patch_en = 1; ctl.patch = 64'hABCD;
    #1;
    checks++;
    if (out_valid != 2'b11 || out_data != 64'hABCD || tap.value != 64'd3) begin
      failures++; $display("patch check failed %h", out_data);
    end
    // the successors must now receive the patched value
    exp0.delete(); exp1.delete();
    exp0.push_back(64'hABCD); exp1.push_back(64'hABCD);
    out_ready = 2'b11;
    @(negedge clk);
    checks++;
    if (exp0.size() != 0 || exp1.size() != 0) begin
      failures++; $display("patched token not delivered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
