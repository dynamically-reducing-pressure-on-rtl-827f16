// rs_pkg: types and constants shared by the register-sharing rename backend.
//
// A physical register "tag" is a storage index (PREG_W bits) extended by
// VER_W version bits in its most significant positions. Several tags that
// differ only in their version bits name the same storage entry; this is how
// a chain of single-use self-overwriting (SUSO) instructions shares one
// register while every instruction still has its own wakeup tag. Storage
// indices 0 and 1 are the dedicated, hardwired registers P0 and P1 that hold
// the common values zero and one; they are not in the free pool.
//
// Following the document: 2 version bits (up to three SUSO instructions
// after the assignment share one register), storage 0/1 reserved for the
// values 0/1, 160 pooled physical registers. Own choices: 32 logical
// registers with r0 fixed to zero (MIPS-like), 64-bit data, the operation
// set of the document's trivial-computation table plus a branch.
package rs_pkg;

  parameter int unsigned XLEN   = 64;
  parameter int unsigned NLREG  = 32;
  parameter int unsigned LREG_W = 5;
  parameter int unsigned VER_W  = 2;
  // Field widths. They bound the sizes the modules accept: at most 254
  // pooled physical registers, 256 reorder-buffer entries, 4 checkpoints.
  parameter int unsigned PREG_W = 8;
  parameter int unsigned TAG_W  = PREG_W + VER_W;
  parameter int unsigned ROB_W  = 8;
  parameter int unsigned CK_W   = 2;

  typedef logic [PREG_W-1:0] preg_t;   // storage index
  typedef logic [TAG_W-1:0]  tag_t;    // {version, storage index}
  typedef logic [ROB_W-1:0]  robi_t;   // reorder-buffer index
  typedef logic [CK_W-1:0]   cki_t;    // checkpoint index

  typedef enum logic [3:0] {
    OP_ADD = 4'd0,
    OP_SUB = 4'd1,
    OP_MUL = 4'd2,
    OP_AND = 4'd3,
    OP_OR  = 4'd4,
    OP_XOR = 4'd5,
    OP_SLL = 4'd6,
    OP_SRL = 4'd7,
    OP_SRA = 4'd8,
    OP_BR  = 4'd9
  } op_e;

  // Instruction as delivered by the front end to the rename stage.
  typedef struct packed {
    logic [31:0]       seq;      // program-order identifier, reported on redirects
    op_e               op;
    logic              has_dst;
    logic [LREG_W-1:0] dst;
    logic [LREG_W-1:0] src1;
    logic [LREG_W-1:0] src2;
    logic              use_imm;  // second operand is imm instead of src2
    logic [15:0]       imm;      // sign-extended to XLEN
    logic              mispred;  // branch: front end predicted it wrongly
    logic              excpt;    // instruction raises an exception at commit
  } insn_t;

  // Issue-queue entry.
  typedef struct packed {
    op_e         op;
    logic [15:0] imm;
    logic        use_imm;
    tag_t        s1;
    tag_t        s2;
    logic        r1, r2;     // operand ready
    logic        c1, c2;     // operand is a common value (0 or 1)
    logic        v1, v2;     // ... and which one
    logic        has_dst;
    tag_t        dst;
    robi_t       rob;
    logic        mispred;
    cki_t        ck;
  } iq_entry_t;

  // Reorder-buffer entry.
  typedef struct packed {
    logic [31:0]       seq;
    op_e               op;
    logic              wr;        // writes a logical register
    logic [LREG_W-1:0] ldst;
    tag_t              tag;       // its physical tag (P0 for trivial 0)
    tag_t              prev;      // mapping it replaced
    logic              rel;       // release prev's storage at commit
    logic              suso;      // shares its source's register
    logic              dst_is_x;  // SUSO: overwrote the first operand
    tag_t              rem;       // SUSO: the other operand's tag
    logic              use_imm;
    logic [15:0]       imm;
    logic              excpt;
    logic              done;
    logic              cv;        // result is 0 or 1
    logic              cvv;       // which one
  } rob_entry_t;

  // Event counters of the core.
  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] committed;     // instructions committed
    logic [31:0] reg_stall;     // cycles rename waited for a free register
    logic [31:0] triv0;         // destinations mapped to P0 at rename
    logic [31:0] suso;          // destinations sharing their source's register
    logic [31:0] er_cand;       // common-value candidates at commit
    logic [31:0] er_release;    // candidates released early (RAT hit)
    logic [31:0] er_miss;       // candidates no longer mapped
    logic [31:0] er_full;       // cycles commit waited for the release queue
    logic [31:0] cv_operand;    // issued operands taken as common values
    logic [31:0] mispredict;    // branch recoveries
    logic [31:0] exception;     // exception recoveries
    logic [31:0] suso_undo;     // SUSO results reversed while unwinding
  } perf_t;

  // Distance of a reorder-buffer index from the head, for age comparisons.
  function automatic int unsigned rob_age(robi_t idx, robi_t head, int unsigned n);
    return (int'(idx) + n - int'(head)) % n;
  endfunction

  // Reversible SUSO operations: the overwritten operand can be recomputed
  // from the result and the other operand.
  function automatic logic is_reversible(op_e op);
    return (op == OP_ADD) || (op == OP_SUB) || (op == OP_XOR);
  endfunction

  function automatic logic [XLEN-1:0] sext_imm(logic [15:0] imm);
    return {{(XLEN-16){imm[15]}}, imm};
  endfunction

endpackage
