// p6_pkg: shared constants and types of the P6-style out-of-order core.
//
// The core follows the classic P6 organisation: a re-order buffer (ROB) whose
// entry number is the tag of an in-flight result, reservation stations (RS)
// that wait for tags, a Map Table holding a tag plus a "ready-in-ROB" bit per
// architectural register, and one common data bus (CDB) carrying <tag,value>.
// Tag 0 is reserved and means "the value is in the register file", so ROB
// entries are numbered 1..ROB_ENTRIES.  The ROB size (7) and the five
// reservation stations (ALU, LD, ST, FP1, FP2) are the ones of the worked
// example; the instruction encoding, data width and register count are this
// design's own choices, since the example only names ldf, mulf, stf and addi.
//
// Instruction word (32 bits):  [31:28] opcode  [27:24] rd  [23:20] rs1
//                              [19:16] rs2     [15:0]  signed immediate
// Addresses are byte addresses; instructions and data words are 4 bytes.
package p6_pkg;

  localparam int unsigned XLEN        = 32;
  localparam int unsigned ROB_ENTRIES = 7;                        // ROB#1..ROB#7
  localparam int unsigned TAG_W       = $clog2(ROB_ENTRIES + 1);  // 0 = no tag
  localparam int unsigned NUM_REGS    = 16;
  localparam int unsigned REG_W       = $clog2(NUM_REGS);

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [REG_W-1:0] reg_t;

  // Opcodes (field [31:28]).
  typedef enum logic [3:0] {
    OP_NOP  = 4'h0,
    OP_ADD  = 4'h1,   // rd = rs1 + rs2
    OP_ADDI = 4'h2,   // rd = rs1 + imm
    OP_SUB  = 4'h3,   // rd = rs1 - rs2
    OP_MULF = 4'h4,   // rd = rs1 * rs2      (FP1/FP2 multiply unit)
    OP_LDF  = 4'h5,   // rd = mem[rs1 + imm]
    OP_STF  = 4'h6,   // mem[rs1 + imm] = rs2 (written at retire)
    OP_BEQ  = 4'h7,   // if (rs1 == rs2) pc = pc + imm
    OP_BNE  = 4'h8,   // if (rs1 != rs2) pc = pc + imm
    OP_TRAP = 4'h9,   // system call: handled after the instruction
    OP_IRET = 4'hA,   // return from handler to the saved PC
    OP_PMAP = 4'hB,   // mark the page of the last page fault present (at retire)
    OP_HALT = 4'hF    // stop fetching once retired
  } opcode_e;

  // Functional-unit class, one reservation station kind each.
  typedef enum logic [2:0] {
    FU_NONE = 3'd0,   // no execution needed, complete at dispatch
    FU_ALU  = 3'd1,
    FU_LD   = 3'd2,
    FU_ST   = 3'd3,
    FU_FP   = 3'd4
  } fu_e;

  // Exceptional events recorded in a ROB entry and acted on at retire.
  typedef enum logic [2:0] {
    EXC_NONE       = 3'd0,
    EXC_PAGE_FAULT = 3'd1,   // before the instruction: it does not retire
    EXC_TRAP       = 3'd2,   // after the instruction
    EXC_IRET       = 3'd3,   // after: redirect to the saved PC
    EXC_MISPREDICT = 3'd4,   // after: branch taken, younger insns wrong-path
    EXC_HALT       = 3'd5,   // after: stop
    EXC_REPLAY     = 3'd6    // before: a load read memory ahead of an older
                             // store to the same word; re-execute it
  } exc_e;

  // Decoded instruction.
  typedef struct packed {
    logic    valid;
    opcode_e op;
    fu_e     fu;
    logic    has_dest;
    reg_t    rd;
    logic    use1;      // operand 1 is a register
    reg_t    src1;
    logic    use2;      // operand 2 is a register
    reg_t    src2;
    word_t   imm;
  } decoded_t;

  // Common data bus: one <tag, value> broadcast per cycle.
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    word_t value;
    exc_e  exc;
    word_t target;      // branch target when exc == EXC_MISPREDICT
    word_t addr;        // effective address of a load (kept for the record)
  } cdb_t;

  // Store completion: address and data go into the store's ROB entry.
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    word_t addr;
    word_t data;
    exc_e  exc;
  } st_cmpl_t;

  // Issue bundle from a reservation station to its functional unit.
  typedef struct packed {
    logic    valid;
    opcode_e op;
    tag_t    tag;
    word_t   v1;
    word_t   v2;
    word_t   imm;
    word_t   pc;
  } issue_t;

  // One ROB entry.  R (rd) and V (value) are the fields named in the slides;
  // done is the "complete" mark, addr/target carry store addresses and branch
  // targets to retire.
  typedef struct packed {
    logic    valid;
    logic    done;
    word_t   pc;
    opcode_e op;
    logic    has_dest;
    reg_t    rd;
    word_t   value;
    word_t   addr;
    exc_e    exc;
    word_t   target;
  } rob_entry_t;

  // ROB entry tag <-> index helpers (tags count 1..ROB_ENTRIES).
  function automatic tag_t tag_next(tag_t t);
    return (t == tag_t'(ROB_ENTRIES)) ? tag_t'(1) : tag_t'(t + 1'b1);
  endfunction

  // Age order inside the ROB: is tag a younger (dispatched later) than tag b,
  // given the current head?
  function automatic logic tag_younger(tag_t a, tag_t b, tag_t head);
    int unsigned age_a, age_b;
    age_a = (a >= head) ? int'(a) - int'(head) : int'(a) + ROB_ENTRIES - int'(head);
    age_b = (b >= head) ? int'(b) - int'(head) : int'(b) + ROB_ENTRIES - int'(head);
    return age_a > age_b;
  endfunction

endpackage
