// serr_pkg -- types and constants shared by the soft-error tracking blocks.
//
// The instruction record below is what flows from the decoder through the
// instruction queue to the retire unit. Its fields are this design's own
// simplified format (the processor's real encoding is not specified): an
// opcode class, up to one destination and two source registers, a 16-bit
// immediate and the instruction address. Two extra bits travel with it:
//   pi      -- "possibly incorrect": set where an error was detected instead
//              of raising a machine check at once.
//   anti_pi -- set by the decoder for instruction types whose non-opcode bits
//              cannot change the program's outcome (no-op, prefetch, branch
//              hint).
// The tracking mode selects where a set pi bit is finally turned into a
// machine check; the default is the store-commit point.
package serr_pkg;

  localparam int unsigned REG_W  = 7;   // 128 architectural registers
  localparam int unsigned PC_W   = 32;
  localparam int unsigned IMM_W  = 16;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 64;

  typedef enum logic [3:0] {
    OP_ALU      = 4'd0,
    OP_LOAD     = 4'd1,
    OP_STORE    = 4'd2,
    OP_BRANCH   = 4'd3,
    OP_NOP      = 4'd4,
    OP_PREFETCH = 4'd5,
    OP_BRHINT   = 4'd6,
    OP_IO_LOAD  = 4'd7,
    OP_IO_STORE = 4'd8
  } opclass_e;

  // Everything except the opcode is "non-opcode" payload for parity purposes.
  typedef struct packed {
    logic [REG_W-1:0] dst;
    logic             dst_v;
    logic [REG_W-1:0] src1;
    logic             src1_v;
    logic [REG_W-1:0] src2;
    logic             src2_v;
    logic [IMM_W-1:0] imm;
    logic [PC_W-1:0]  pc;
  } payload_t;

  typedef struct packed {
    opclass_e op;
    payload_t pl;
  } insn_t;

  localparam int unsigned INSN_W    = $bits(insn_t);
  localparam int unsigned PAYLOAD_W = $bits(payload_t);

  // Instruction as it sits in the pipeline, with its error-tracking bits.
  typedef struct packed {
    insn_t insn;
    logic  pi;
    logic  anti_pi;
  } tracked_insn_t;

  // Instruction as it returns from execution to the retire unit: the
  // execution core resolves the path and the predicate and supplies the
  // effective address of memory operations.
  typedef struct packed {
    tracked_insn_t      ti;
    logic               wrong_path;
    logic               pred_false;
    logic [ADDR_W-1:0]  addr;
    logic [DATA_W-1:0]  data;
  } done_insn_t;

  // Where a set pi bit is turned into a machine check.
  typedef enum logic [2:0] {
    PI_TILL_COMMIT  = 3'd0, // at commit of a correct-path instruction
    PI_PET          = 3'd1, // when leaving the post-commit error tracking buffer
    PI_REGFILE      = 3'd2, // when a register with pi set is read
    PI_STORE_COMMIT = 3'd3  // when a store drains, or a load forwards from it
  } pi_mode_e;

  // Reason attached to a machine check.
  typedef enum logic [2:0] {
    ERR_NONE        = 3'd0,
    ERR_COMMIT      = 3'd1, // pi set on a committing instruction
    ERR_REG_READ    = 3'd2, // source register with pi set was read
    ERR_OUT_OF_SCOPE= 3'd3, // pi would be lost (branch, I/O, no destination)
    ERR_PET         = 3'd4, // PET buffer could not prove the instruction dead
    ERR_STORE       = 3'd5, // store with pi set drained to the cache
    ERR_LOAD_FWD    = 3'd6  // load took data from a store with pi set
  } err_cause_e;

  function automatic logic is_neutral(opclass_e op);
    return op inside {OP_NOP, OP_PREFETCH, OP_BRHINT};
  endfunction

  function automatic logic is_store(opclass_e op);
    return op == OP_STORE;
  endfunction

  function automatic logic is_load(opclass_e op);
    return op == OP_LOAD;
  endfunction

  function automatic logic is_io(opclass_e op);
    return op inside {OP_IO_LOAD, OP_IO_STORE};
  endfunction

endpackage
