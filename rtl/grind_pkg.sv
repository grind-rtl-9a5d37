// grind_pkg: types and constants shared by the guarded dataflow accelerator.
//
// A guard observes one node output through a guard_tap_t and answers with a
// guard_ctl_t: it may hold the node's output token back (while its golden value
// is still being streamed in) and may replace the value the successors see
// (patch). Debug packets follow the field order ID, Flag, OpCode, Iteration,
// Reserved, Data of the published packet format, with its widths (8, 1, 16,
// 16, 16 and 48 bits); the 32-bit cycle stamp is this design's choice. Memory requests are a simple
// valid/ready request channel with a valid-only response channel (responders
// always accept): a read returns len+1 beats, a write returns one ack beat; the
// final beat carries last=1.
package grind_pkg;

  parameter int XLEN   = 64;   // node data and memory word width
  parameter int MEM_AW = 32;   // byte address width of main memory
  parameter int LEN_W  = 8;    // burst length field (beats - 1)

  // Guard function selected per guard at run time.
  typedef enum logic [1:0] {
    GM_OFF    = 2'd0,  // guard idle, node runs untouched
    GM_VERIFY = 2'd1,  // compare with golden, flag and patch on mismatch
    GM_CHECK  = 2'd2,  // compare with golden, flag only (no patch)
    GM_FAULT  = 2'd3   // inject a fault into the node output
  } guard_mode_e;

  typedef enum logic [1:0] {
    FT_STUCK0 = 2'd0,  // output forced to zero
    FT_FLIP   = 2'd1,  // output XOR fault mask (bit flips)
    FT_OFFSET = 2'd2,  // output + fault mask (address perturbation)
    FT_STUCK1 = 2'd3   // output forced to all ones
  } fault_kind_e;

  typedef struct packed {
    guard_mode_e mode;
    logic        log_all;    // also record packets for correct values
    fault_kind_e fault_kind;
    logic [XLEN-1:0] fault_mask;
  } guard_cfg_t;

  // Node -> guard: the node's own (unpatched) output token.
  typedef struct packed {
    logic            valid;  // output token present
    logic            fire;   // token completes this cycle (all successors took it)
    logic [15:0]     ext;    // extended data bits (e.g. select-line mask)
    logic [XLEN-1:0] value;
  } guard_tap_t;

  // Guard -> node.
  typedef struct packed {
    logic            hold;      // keep the output token from the successors
    logic            patch_en;  // successors see patch instead of the value
    logic [XLEN-1:0] patch;
  } guard_ctl_t;

  typedef struct packed {
    logic [7:0]  id;
    logic        flag;      // 1: value differed from the golden value
    logic [15:0] opcode;
    logic [15:0] iter;      // logical timestamp: token number at this node
    logic [15:0] reserved;  // extended data bits
    logic [47:0] data;      // value observed from the node
    logic [31:0] cycle;     // cycle time of the trigger
  } dbg_packet_t;

  localparam int PKT_WORDS = 3;  // memory words per packet in the trace

  typedef struct packed {
    logic              write;
    logic [MEM_AW-1:0] addr;
    logic [XLEN-1:0]   wdata;
    logic [LEN_W-1:0]  len;
  } mem_req_t;

  typedef struct packed {
    logic [XLEN-1:0] data;
    logic            last;
  } mem_rsp_t;

  // Operations of a compute node.
  typedef enum logic [2:0] {
    OP_ADD = 3'd0,
    OP_SUB = 3'd1,
    OP_MUL = 3'd2,
    OP_GEP = 3'd3,   // a + (b << shift): address computation
    OP_LT  = 3'd4,   // signed a < b
    OP_GT  = 3'd5,   // signed a > b
    OP_EQ  = 3'd6
  } df_op_e;

  // Node opcodes carried in debug packets.
  localparam logic [15:0] OPC_SELECT  = 16'h0004;
  localparam logic [15:0] OPC_COMPUTE = 16'h0005;
  localparam logic [15:0] OPC_LOAD    = 16'h0008;
  localparam logic [15:0] OPC_STORE   = 16'h0009;
  localparam logic [15:0] OPC_MUL     = 16'h000A;
  localparam logic [15:0] OPC_CMP     = 16'h000C;

  // Guarded nodes of the Relu accelerator, in guard-slot order.
  localparam int RELU_NG = 11;
  localparam int GS_MUL3 = 0, GS_ADD6 = 1, GS_GEP7 = 2, GS_LOAD8 = 3,
                 GS_CMP10 = 4, GS_SEL11 = 5, GS_STORE12 = 6, GS_ADD13 = 7,
                 GS_CMP14 = 8, GS_ADD16 = 9, GS_CMP17 = 10;
  localparam logic [RELU_NG*8-1:0] RELU_IDS = {
    8'd17, 8'd16, 8'd14, 8'd13, 8'd12, 8'd11, 8'd10, 8'd8, 8'd7, 8'd6, 8'd3};
  localparam logic [RELU_NG*16-1:0] RELU_OPCODES = {
    OPC_CMP, OPC_COMPUTE, OPC_CMP, OPC_COMPUTE, OPC_STORE, OPC_SELECT,
    OPC_CMP, OPC_LOAD, OPC_COMPUTE, OPC_COMPUTE, OPC_MUL};

endpackage
