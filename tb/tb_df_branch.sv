// tb_df_branch: self-checking test of the control (branch) node. Random data
// and condition tokens arrive independently; the T and F successors stall at
// random. Checks that each token leaves on the output its condition names,
// once and in order, and that an idle node forwards a token one cycle after
// it is accepted.
// The reference model is the control node's published behaviour (a token
// goes to exactly one output, chosen by its condition).
module tb_df_branch;
  import grind_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NTOK = 400;

  logic            in_valid = 0, in_ready, cond_valid = 0, cond_ready, cond = 0;
  logic [XLEN-1:0] in_data = 0, out_data;
  logic            t_valid, t_ready = 0, f_valid, f_ready = 0;
  logic            random_phase = 1;

  df_branch dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .cond_valid, .cond_ready, .cond, .t_valid, .t_ready, .f_valid, .f_ready, .out_data);

  logic conds [NTOK];
  int   nin = 0, ncond = 0, nout = 0;
  initial for (int k = 0; k < NTOK; k++) conds[k] = 1'($urandom);

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) nin++;
    if (cond_valid && cond_ready) ncond++;
    if ((t_valid && t_ready) || (f_valid && f_ready)) begin
      checks++;
      if (random_phase && (out_data != XLEN'(7 * nout + 3) || t_valid != conds[nout])) begin
        failures++; $display("token %0d wrong: data %0d t=%b", nout, out_data, t_valid);
      end
      nout++;
    end
  end

  always @(negedge clk) if (rst_n && random_phase) begin
    t_ready <= 1'($urandom);
    f_ready <= 1'($urandom);
    if (nin < NTOK) begin
      in_valid <= ($urandom % 3) != 0;
      in_data  <= XLEN'(7 * nin + 3);
    end else in_valid <= 0;
    if (ncond < NTOK) begin
      cond_valid <= ($urandom % 3) != 0;
      cond       <= conds[ncond];
    end else cond_valid <= 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nout == NTOK);
    random_phase = 0;
    @(negedge clk);
    t_ready = 1; f_ready = 1;
    in_valid = 1; cond_valid = 1; cond = 0; in_data = 64'h55;
    @(negedge clk);
    in_valid = 0; cond_valid = 0;
    checks++;
    if (!(f_valid && !t_valid && out_data == 64'h55)) begin
      failures++; $display("latency check failed");
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
