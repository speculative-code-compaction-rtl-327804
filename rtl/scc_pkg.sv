// scc_pkg: shared sizes and types of the speculative code compaction (SCC) front end.
//
// The micro-op cache holds the micro-ops of 32-byte code regions, six fused micro-ops per line
// and at most three lines per region (18 micro-ops). A micro-op is named by its region address
// (virtual address bits above the 5 offset bits) and its slot 0..17 within the region.
// The micro-op encoding below is this design's own: a RISC-like form with one destination, two
// register sources, one immediate that can stand in for either source, and a direct branch
// target given as region and slot. Register index NREGS names the condition-code (flags) entry
// of the register context table. Compacted micro-ops add the prediction-source marking and up to
// LO_SLOTS inlined live-out (register, value) pairs for the rename stage.
package scc_pkg;

  localparam int unsigned VADDR_W      = 48;            // virtual address width (assumed)
  localparam int unsigned REGION_W     = VADDR_W - 5;   // 32-byte code region address
  localparam int unsigned LINE_UOPS    = 6;             // fused micro-ops per cache line
  localparam int unsigned REGION_LINES = 3;             // ways a region may span
  localparam int unsigned REGION_UOPS  = LINE_UOPS * REGION_LINES; // 18
  localparam int unsigned SLOT_W       = 5;
  localparam int unsigned DATA_W       = 64;            // integer register width
  localparam int unsigned NREGS        = 32;            // 16 x86 GPRs + 16 microcode temporaries (assumed)
  localparam int unsigned REG_W        = 5;
  localparam int unsigned CTX_N        = NREGS + 1;     // + condition codes
  localparam int unsigned CTX_W        = 6;
  localparam int unsigned FLAGS_IDX    = NREGS;
  localparam int unsigned LO_SLOTS     = 4;             // live-outs carried by one micro-op (assumed)
  localparam int unsigned MAX_DINV     = 4;             // data invariants per region
  localparam int unsigned MAX_CINV     = 2;             // control invariants per region
  localparam int unsigned NINV         = MAX_DINV + MAX_CINV;
  localparam int unsigned CONF_W       = 4;             // saturating confidence counters
  localparam int unsigned HOT_W        = 4;             // hotness counters (assumed)

  typedef logic [REGION_W-1:0] region_t;
  typedef logic [SLOT_W-1:0]   slot_t;
  typedef logic [REG_W-1:0]    reg_t;
  typedef logic [DATA_W-1:0]   data_t;
  typedef logic [CTX_W-1:0]    ctx_t;
  typedef logic [CONF_W-1:0]   conf_t;
  typedef logic [HOT_W-1:0]    hot_t;

  typedef struct packed {
    region_t region;
    slot_t   slot;
  } upc_t;

  typedef enum logic [4:0] {
    OP_NOP, OP_MOV, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_SAR,
    OP_CMP,                       // flags <- compare(src1, src2)
    OP_BR,                        // branch if cond(src1, src2)
    OP_JCC,                       // branch if cond(flags)
    OP_JMP,                       // unconditional direct branch
    OP_LOAD, OP_STORE, OP_MUL, OP_DIV, OP_FP,
    OP_LIVEOUT                    // carrier of live-outs at the end of a compacted stream
  } op_e;

  typedef enum logic [2:0] {
    CC_EQ, CC_NE, CC_LT, CC_GE, CC_LTU, CC_GEU
  } cond_e;

  // Flags kept in the context table: {N, Z, C, V} in bits 3..0.
  typedef struct packed {
    op_e     op;
    cond_e   cond;
    reg_t    dst;
    reg_t    src1;
    reg_t    src2;
    logic    s1_imm;   // src1 replaced by imm
    logic    s2_imm;   // src2 replaced by imm
    data_t   imm;      // immediate / memory displacement
    upc_t    tgt;      // direct branch target
    logic    som;      // first micro-op of its macro-instruction
    logic    eor;      // last micro-op of its 32-byte region
  } uop_t;

  typedef struct packed {
    ctx_t  idx;
    data_t val;
  } liveout_t;

  typedef struct packed {
    uop_t                         u;
    upc_t                         pc;        // position in the unoptimized stream
    logic                         pred_src;  // prediction source: validates an invariant
    logic [2:0]                   inv_idx;   // its confidence counter (0..3 data, 4..5 control)
    logic                         pred_taken; // control invariant: predicted direction
    data_t                        pv;         // data invariant: predicted value
    logic [2:0]                   lo_cnt;
    liveout_t [LO_SLOTS-1:0]      lo;
  } cuop_t;

  // One-cycle event pulses of the compaction unit (for statistics and tests).
  typedef struct packed {
    logic fold;       // micro-op evaluated and eliminated (constant folding)
    logic prop;       // known operand encoded as an immediate (constant propagation)
    logic dinv;       // data invariant taken from the value predictor
    logic cinv;       // control invariant taken from the branch predictor
    logic brfold;     // branch evaluated and eliminated
    logic pivot;      // processing continued at a branch target
    logic liveout;    // live-outs inlined on a micro-op
    logic aborted;    // pass aborted (self-loop, self-modifying store, live-out overflow)
    logic commit;     // compacted stream written to the optimized partition
    logic discard;    // pass ended below the compaction threshold
  } scc_events_t;

  function automatic logic is_branch(op_e op);
    return op inside {OP_BR, OP_JCC, OP_JMP};
  endfunction

  function automatic logic is_simple_alu(op_e op);
    return op inside {OP_MOV, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_SAR, OP_CMP};
  endfunction

endpackage
