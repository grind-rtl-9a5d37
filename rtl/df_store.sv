// df_store: store node of the dataflow accelerator.
//
// Joins an address token and a data token, sends the write on its
// memory-interface write port, and after the memory's completion emits a
// done token carrying the stored value. The guard hook sits on the data being
// stored: tap_o shows it while the write waits to be sent and fires when the
// memory interface accepts the write; a patch replaces the data written. One
// store is in flight at a time. The done token and blocking operation are this
// design's choices.
module df_store
  import grind_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              addr_valid,
  output logic              addr_ready,
  input  logic [XLEN-1:0]   addr,
  input  logic              data_valid,
  output logic              data_ready,
  input  logic [XLEN-1:0]   data,
  output logic              wr_valid,
  input  logic              wr_ready,
  output logic [MEM_AW-1:0] wr_addr,
  output logic [XLEN-1:0]   wr_data,
  input  logic              wr_ack,
  output logic              done_valid,
  input  logic              done_ready,
  output logic [XLEN-1:0]   done_data,
  output guard_tap_t        tap_o,
  input  guard_ctl_t        ctl_i
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_DONE} sstate_e;
  sstate_e         st;
  logic [XLEN-1:0] data_q;
  logic            join_ok;

  assign join_ok    = (st == S_IDLE) && addr_valid && data_valid;
  assign addr_ready = join_ok;
  assign data_ready = join_ok;
  assign wr_valid   = (st == S_REQ) && !ctl_i.hold;
  assign wr_data    = ctl_i.patch_en ? ctl_i.patch : data_q;
  assign done_valid = (st == S_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      wr_addr   <= '0;
      data_q    <= '0;
      done_data <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (join_ok) begin
          wr_addr <= addr[MEM_AW-1:0];
          data_q  <= data;
          st      <= S_REQ;
        end
        S_REQ: if (wr_valid && wr_ready) begin
          done_data <= wr_data;
          st        <= S_WAIT;
        end
        S_WAIT: if (wr_ack) st <= S_DONE;
        S_DONE: if (done_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign tap_o.valid = (st == S_REQ);
  assign tap_o.fire  = wr_valid && wr_ready;
  assign tap_o.ext   = '0;
  assign tap_o.value = data_q;
endmodule
