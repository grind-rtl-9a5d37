// df_load: load node of the dataflow accelerator.
//
// Takes an address token, sends it on its memory-interface read port, waits
// for the data and offers the data token to NOUT successors (compute-node fork
// rule). One load is in flight at a time; the next address is taken in the
// cycle the data token completes. Latency is two cycles plus the memory's.
// Guard hook on the loaded data as in df_compute. Blocking single-access
// operation is this design's choice.
module df_load
  import grind_pkg::*;
#(
  parameter int NOUT = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              addr_valid,
  output logic              addr_ready,
  input  logic [XLEN-1:0]   addr,
  output logic              rd_valid,
  input  logic              rd_ready,
  output logic [MEM_AW-1:0] rd_addr,
  input  logic              rd_rsp_valid,
  input  logic [XLEN-1:0]   rd_rsp_data,
  output logic [NOUT-1:0]   out_valid,
  input  logic [NOUT-1:0]   out_ready,
  output logic [XLEN-1:0]   out_data,
  output guard_tap_t        tap_o,
  input  guard_ctl_t        ctl_i
);
  typedef enum logic [1:0] {L_IDLE, L_REQ, L_WAIT, L_OUT} lstate_e;
  lstate_e         st;
  logic [XLEN-1:0] data_q;
  logic [NOUT-1:0] taken_q, take;
  logic            complete;

  assign addr_ready = (st == L_IDLE) && addr_valid;
  assign rd_valid   = (st == L_REQ);
  assign out_valid  = (st == L_OUT && !ctl_i.hold) ? ~taken_q : '0;
  assign out_data   = ctl_i.patch_en ? ctl_i.patch : data_q;
  assign take       = out_valid & out_ready;
  assign complete   = (st == L_OUT) && ((taken_q | take) == '1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= L_IDLE;
      rd_addr <= '0;
      data_q  <= '0;
      taken_q <= '0;
    end else begin
      unique case (st)
        L_IDLE: if (addr_valid) begin
          rd_addr <= addr[MEM_AW-1:0];
          st      <= L_REQ;
        end
        L_REQ:  if (rd_ready) st <= L_WAIT;
        L_WAIT: if (rd_rsp_valid) begin
          data_q  <= rd_rsp_data;
          taken_q <= '0;
          st      <= L_OUT;
        end
        L_OUT: begin
          if (complete) begin
            taken_q <= '0;
            st      <= L_IDLE;
          end else begin
            taken_q <= taken_q | take;
          end
        end
        default: st <= L_IDLE;
      endcase
    end
  end

  assign tap_o.valid = (st == L_OUT);
  assign tap_o.fire  = complete;
  assign tap_o.ext   = '0;
  assign tap_o.value = data_q;
endmodule
