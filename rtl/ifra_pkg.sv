// ifra_pkg: types and constants shared by the instruction-footprint recording
// (IFRA) hardware. The numbers follow the 4-way Alpha 21264-like reference
// configuration: 4-wide fetch, n = 64 instructions in flight, 8-bit IDs
// (log2(4n)), 1,024-entry recorders and the per-stage auxiliary-information
// widths of the recorder table (PC 32, decode 4, dispatch 6, issue 6,
// ALU/MUL 3, branch 0, LSU 35, commit 4). The trigger-cause encoding and the
// stage ordering used for stopping are this design's own choices.
package ifra_pkg;

  localparam int unsigned FETCH_WIDTH   = 4;    // instructions leaving fetch per cycle
  localparam int unsigned MAX_INFLIGHT  = 64;   // n = ROB entries
  localparam int unsigned ID_W          = $clog2(4 * MAX_INFLIGHT);  // 8
  localparam int unsigned REC_DEPTH     = 1024; // entries per recorder

  // Auxiliary-information widths per pipeline stage
  localparam int unsigned AUX_FETCH_W    = 32; // program counter
  localparam int unsigned AUX_DECODE_W   = 4;  // FU (2) + uses dest (1) + uses 2nd operand (1)
  localparam int unsigned AUX_DISPATCH_W = 6;  // three 2-bit residues of register names
  localparam int unsigned AUX_ISSUE_W    = 6;  // two 3-bit residues of operands
  localparam int unsigned AUX_EXEC_W     = 3;  // 3-bit residue of result (ALU, MUL)
  localparam int unsigned AUX_BRANCH_W   = 0;  // nothing beyond the ID
  localparam int unsigned AUX_LSU_W      = 35; // 3-bit residue of result + 32-bit address
  localparam int unsigned AUX_COMMIT_W   = 4;  // fatal-exception code

  localparam int unsigned DATA_W   = 64;  // Alpha operand / result width
  localparam int unsigned PREG_W   = 7;   // physical register name width
  localparam int unsigned ADDR_W   = 64;  // virtual address width at the LSU
  localparam int unsigned REC_ADDR_W = 32; // recorded address / PC bits

  // Pipeline stages in the order in which a post-trigger reaches them:
  // later stages stop no later than earlier ones.
  typedef enum logic [2:0] {
    ST_COMMIT   = 3'd0,
    ST_EXECUTE  = 3'd1,
    ST_ISSUE    = 3'd2,
    ST_DISPATCH = 3'd3,
    ST_DECODE   = 3'd4,
    ST_FETCH    = 3'd5
  } stage_e;
  localparam int unsigned NUM_STAGES = 6;

  // Clock domains of the recorders: one per in-order stage and one per
  // functional-unit type in the execute stage.
  typedef enum logic [3:0] {
    D_FETCH    = 4'd0,
    D_DECODE   = 4'd1,
    D_DISPATCH = 4'd2,
    D_ISSUE    = 4'd3,
    D_ALU      = 4'd4,
    D_MUL      = 4'd5,
    D_BRANCH   = 4'd6,
    D_LSU      = 4'd7,
    D_COMMIT   = 4'd8
  } domain_e;
  localparam int unsigned NUM_DOMAINS = 9;

  // Recording control delivered to one stage's recorders
  typedef struct packed {
    logic pause;  // soft post-trigger: hold recording, may resume
    logic stop;   // hard post-trigger: recording ends for good
  } rec_ctl_t;

  // Which post-trigger fired first (held after a hard trigger)
  typedef enum logic [3:0] {
    TRIG_NONE      = 4'd0,
    TRIG_PARITY    = 4'd1,  // hard: array parity error
    TRIG_RESIDUE   = 4'd2,  // hard: arithmetic residue-check error
    TRIG_FATAL     = 4'd3,  // hard: in-built fatal exception
    TRIG_DEADLOCK  = 4'd4,  // hard: long retirement gap
    TRIG_SEGFAULT  = 4'd5,  // hard: segfault reported by the OS
    TRIG_NULLADDR  = 4'd6,  // hard: load/store address equals zero
    TRIG_SOFT_GAP  = 4'd8,  // soft: short retirement gap
    TRIG_SOFT_TLB  = 4'd9,  // soft: I/D-TLB miss
    TRIG_SOFT_INTR = 4'd10  // soft: external interrupt handler
  } trig_cause_e;

endpackage
