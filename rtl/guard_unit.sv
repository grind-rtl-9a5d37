// guard_unit: the guard function attached to one dataflow node.
//
// Watches the node's output token (tap_i) and, by its run-time mode:
//  - VERIFY: compares the value with the golden value at the head of the
//    reader buffer; on a mismatch the successors are given the golden value
//    (patch) and the buggy flag is set, so the fault cannot spread.
//  - CHECK:  the same comparison, reported but never patched.
//  - FAULT:  replaces the value with a faulty one (stuck-at-0/1, bit flips
//    by fault_mask, or +fault_mask for address perturbation).
//  - OFF:    does nothing.
// In VERIFY and CHECK the token is held back while no golden value is
// buffered yet, and the golden value is popped when the token completes.
// The comparison and patch are combinational, inside the node's output cycle.
// When a token completes, a debug packet {ID, flag, opcode, iteration,
// extended bits, data, cycle} is offered to the writer FIFO: for mismatches
// (and injected faults) always, for all tokens when log_all is set. A packet
// meeting a full FIFO is dropped and counted; the guard keeps working.
// Packet fields follow the published packet format; the hold rule, the fault
// kinds' encoding and the counters are this design's choices.
module guard_unit
  import grind_pkg::*;
#(
  parameter logic [7:0]  ID     = 8'd0,
  parameter logic [15:0] OPCODE = OPC_COMPUTE
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,       // start of a run: clear counters
  input  guard_cfg_t      cfg,
  input  logic [31:0]     cycle,
  // node side
  input  guard_tap_t      tap_i,
  output guard_ctl_t      ctl_o,
  // reader buffer
  input  logic            gold_valid,
  input  logic [XLEN-1:0] gold,
  output logic            gold_pop,
  // writer FIFO
  output logic            pkt_valid,
  output dbg_packet_t     pkt,
  input  logic            pkt_full,
  // status
  output logic            buggy,
  output logic [15:0]     mismatches,
  output logic [15:0]     dropped
);
  logic            compare, mismatch, inject;
  logic [XLEN-1:0] faulty;
  logic [15:0]     iter_q;

  assign compare  = (cfg.mode == GM_VERIFY) || (cfg.mode == GM_CHECK);
  assign inject   = (cfg.mode == GM_FAULT);
  assign mismatch = compare && gold_valid && (tap_i.value != gold);

  always_comb begin
    unique case (cfg.fault_kind)
      FT_STUCK0: faulty = '0;
      FT_FLIP:   faulty = tap_i.value ^ cfg.fault_mask;
      FT_OFFSET: faulty = tap_i.value + cfg.fault_mask;
      FT_STUCK1: faulty = '1;
      default:   faulty = tap_i.value;
    endcase
  end

  always_comb begin
    ctl_o          = '0;
    ctl_o.hold     = compare && tap_i.valid && !gold_valid;
    if (cfg.mode == GM_VERIFY && mismatch) begin
      ctl_o.patch_en = 1'b1;
      ctl_o.patch    = gold;
    end else if (inject) begin
      ctl_o.patch_en = 1'b1;
      ctl_o.patch    = faulty;
    end
  end

  assign gold_pop = compare && tap_i.fire && gold_valid;

  always_comb begin
    pkt          = '0;
    pkt.id       = ID;
    pkt.flag     = mismatch || inject;
    pkt.opcode   = OPCODE;
    pkt.iter     = iter_q;
    pkt.reserved = tap_i.ext;
    pkt.data     = tap_i.value[47:0];
    pkt.cycle    = cycle;
  end
  assign pkt_valid = tap_i.fire && (cfg.mode != GM_OFF) &&
                     (mismatch || inject || cfg.log_all) && !pkt_full;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      iter_q     <= '0;
      buggy      <= 1'b0;
      mismatches <= '0;
      dropped    <= '0;
    end else if (tap_i.fire) begin
      iter_q <= iter_q + 1'b1;
      if (mismatch) begin
        buggy      <= 1'b1;
        mismatches <= mismatches + 1'b1;
      end
      if ((cfg.mode != GM_OFF) && (mismatch || inject || cfg.log_all) && pkt_full)
        dropped <= dropped + 1'b1;
    end
  end

  // a comparing guard never lets a token complete without a golden value
  a_gold_present: assert property (@(posedge clk) disable iff (!rst_n)
    (compare && tap_i.fire) |-> gold_valid);
endmodule
