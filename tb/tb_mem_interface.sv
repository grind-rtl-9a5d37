// tb_mem_interface: self-checking test of the memory interface with two read
// and two write ports in front of a behavioural memory with random stalls.
// Read ports fetch random words of a preset region and check the data; write
// ports store unique values into their own region, checked in memory at the
// end. Also checks that every port is served (round-robin) and that a port
// gets exactly one response per request.
// The port kinds (read port returning data, write port returning a
// completion) follow the published memory interface; the arbitration order is
// this design's.
module tb_mem_interface;
  import grind_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NR = 2, NW = 2, NOPS = 60;

  logic [NR-1:0]             rd_valid = 0, rd_ready, rd_rsp_valid;
  logic [NR-1:0][MEM_AW-1:0] rd_addr = '0;
  logic [XLEN-1:0]           rd_rsp_data;
  logic [NW-1:0]             wr_valid = 0, wr_ready, wr_ack;
  logic [NW-1:0][MEM_AW-1:0] wr_addr = '0;
  logic [NW-1:0][XLEN-1:0]   wr_data = '0;
  logic                      c_req_valid, c_req_ready, c_rsp_valid;
  mem_req_t                  c_req;
  mem_rsp_t                  c_rsp;

  mem_interface #(.NR(NR), .NW(NW)) dut (.*);
  tb_mem_model #(.WORDS(1024), .LAT(2)) u_mem (
    .clk, .rst_n, .req_valid(c_req_valid), .req_ready(c_req_ready), .req(c_req),
    .rsp_valid(c_rsp_valid), .rsp(c_rsp));

  int rd_done [NR], wr_done [NW];
  logic [NR-1:0] rd_wait = '0;   // request accepted, data pending
  logic [NW-1:0] wr_wait = '0;
  logic [MEM_AW-1:0] rd_q [NR];

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NR; p++) begin
      if (rd_valid[p] && rd_ready[p]) begin
        rd_wait[p] <= 1'b1;
        rd_q[p]    <= rd_addr[p];
      end
      if (rd_rsp_valid[p]) begin
        checks++;
        if (!rd_wait[p] || rd_rsp_data != XLEN'(rd_q[p] * 3 + 1)) begin
          failures++; $display("read port %0d bad data %h", p, rd_rsp_data);
        end
        rd_wait[p] <= 1'b0;
        rd_done[p]++;
      end
    end
    for (int p = 0; p < NW; p++) begin
      if (wr_valid[p] && wr_ready[p]) wr_wait[p] <= 1'b1;
      if (wr_ack[p]) begin
        checks++;
        if (!wr_wait[p]) begin failures++; $display("spurious ack %0d", p); end
        wr_wait[p] <= 1'b0;
        wr_done[p]++;
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < NR; p++)
      if (!rd_valid[p] && !rd_wait[p] && rd_done[p] < NOPS && ($urandom % 2)) begin
        rd_valid[p] <= 1'b1;
        rd_addr[p]  <= MEM_AW'(($urandom % 256) * 8);
      end else if (rd_valid[p] && rd_wait[p]) rd_valid[p] <= 1'b0;
    for (int p = 0; p < NW; p++)
      if (!wr_valid[p] && !wr_wait[p] && wr_done[p] < NOPS && ($urandom % 2)) begin
        wr_valid[p] <= 1'b1;
        wr_addr[p]  <= MEM_AW'((512 + p * 128 + wr_done[p]) * 8);
        wr_data[p]  <= XLEN'(64'hC0DE_0000 + p * 1000 + wr_done[p]);
      end else if (wr_valid[p] && wr_wait[p]) wr_valid[p] <= 1'b0;
  end

  initial begin
    repeat (3) @(posedge clk);
    for (int k = 0; k < 256; k++) u_mem.mem[k] = XLEN'(k * 8 * 3 + 1);
    rst_n = 1;
    wait (rd_done[0] == NOPS && rd_done[1] == NOPS && wr_done[0] == NOPS && wr_done[1] == NOPS);
    repeat (5) @(posedge clk);
    for (int p = 0; p < NW; p++)
      for (int k = 0; k < NOPS; k++) begin
        checks++;
        if (u_mem.mem[512 + p * 128 + k] != XLEN'(64'hC0DE_0000 + p * 1000 + k)) begin
          failures++; $display("write %0d/%0d missing", p, k);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
