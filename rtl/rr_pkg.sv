// rr_pkg: shared sizes and types of the adaptive-resizing out-of-order backend.
//
// The backend keeps every window resource (reorder buffer, issue queue and
// rename register file) in two parts: a base part that is always powered and
// an extension part that is switched in only while a cache-miss period lasts.
// The sizes below are the main configuration: a 48-entry ROB split 32 + 16, a
// 24-entry IQ split 12 + 12 and a 64-entry rename register file split into two
// 32-entry segments, on a 2-wide machine. The data width (32 bits) and the
// number of architectural registers (32) are this design's choice for a
// PowerPC-class embedded core.
package rr_pkg;

  localparam int unsigned WIDTH    = 2;   // dispatch / issue / commit width
  localparam int unsigned XLEN     = 32;  // data width
  localparam int unsigned NUM_AREG = 32;  // architectural registers

  localparam int unsigned ROB_SIZE = 48;  // full ROB
  localparam int unsigned ROB_BASE = 32;  // always-on ROB partition
  localparam int unsigned IQ_SIZE  = 24;  // full issue queue
  localparam int unsigned IQ_BASE  = 12;  // always-on IQ partition
  localparam int unsigned RF_SIZE  = 64;  // rename register file, both segments
  localparam int unsigned RF_BASE  = 32;  // lower (always connected) segment

  localparam int unsigned AREG_W = $clog2(NUM_AREG);
  localparam int unsigned PREG_W = $clog2(RF_SIZE);
  localparam int unsigned ROB_W  = $clog2(ROB_SIZE);

  typedef logic [XLEN-1:0]   data_t;
  typedef logic [AREG_W-1:0] areg_t;
  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [ROB_W-1:0]  robidx_t;

  // Resizing policy: upsize on a pending L2 miss only, or also on two or
  // more pending L1 data-cache misses.
  typedef enum logic {
    POLICY_L2RS    = 1'b0,
    POLICY_L2ML1RS = 1'b1
  } policy_e;

  // Operation carried through the backend. The backend never interprets it;
  // execution units outside the backend do.
  typedef enum logic [1:0] {
    OP_ADD  = 2'd0,
    OP_SUB  = 2'd1,
    OP_XOR  = 2'd2,
    OP_LOAD = 2'd3
  } op_e;

  // Instruction as it enters dispatch (architectural names).
  typedef struct packed {
    op_e     op;
    logic    has_dst;
    areg_t   dst;
    areg_t   src1;
    areg_t   src2;
    data_t   imm;
  } inst_t;

  // Renamed source operand: either a rename register still in flight or the
  // committed architectural register.
  typedef struct packed {
    logic  rdy;     // value has been produced
    logic  in_arf;  // value lives in the architectural register file
    preg_t preg;
    areg_t areg;
  } src_t;

  // Issue-queue entry payload.
  typedef struct packed {
    op_e     op;
    data_t   imm;
    robidx_t rob;
    logic    has_dst;
    preg_t   dst;
    src_t    s1;
    src_t    s2;
  } iq_entry_t;

  // Reorder-buffer entry payload.
  typedef struct packed {
    logic  has_dst;
    areg_t areg;
    preg_t preg;
  } rob_entry_t;

  // Operation leaving the register-read stage towards the execution units.
  typedef struct packed {
    op_e     op;
    data_t   imm;
    robidx_t rob;
    logic    has_dst;
    preg_t   dst;
    data_t   a;
    data_t   b;
  } issued_t;

endpackage
