// instruction_queue -- in-order instruction queue with parity, pi/anti-pi
// handling and squash-on-miss.
//
// A circular buffer of DEPTH entries. Each entry stores the instruction, two
// even-parity bits (one over the opcode, one over the rest of the
// instruction), the pi bit and the anti-pi bit. Parity is generated on write
// and checked on issue. A parity error does not raise a machine check: the
// issuing instruction's pi bit is set instead, except when the error is in
// the non-opcode bits of an instruction whose anti-pi bit marks it as neutral
// (no-op, prefetch, branch hint), where it is ignored. This behaviour and the
// 64-entry, 6-wide sizes follow the document.
//
// Exposure reduction: when the selected cache-miss trigger fires (SQUASH_ON,
// an L1 load miss by default), every instruction in the queue is squashed so
// that no valid instruction sits in the queue during the miss. The queue
// reports the address of the oldest squashed instruction for refetch and
// refuses new instructions until the miss is reported done, so instructions
// return when the pipeline resumes. Holding the queue empty until the miss
// returns, and squashing everything (no youngest-than-load selection), are
// this design's reading of the document for an in-order machine.
//
// strike_i flips one stored bit; it models a particle strike for
// verification and is tied off when unused.
//
// Interface: enqueue a chunk (up to ENQ_W instructions, any slots of the
// mask) when in_ready_o; issue up to issue_max_i oldest instructions per
// cycle, presented combinationally on issue_* and removed at the clock edge.
// A squash takes effect on the edge after the trigger and suppresses issue
// and enqueue in the trigger cycle.
module instruction_queue
  import serr_pkg::*;
#(
  parameter int unsigned DEPTH     = 64,
  parameter int unsigned ENQ_W     = 6,
  parameter int unsigned ISSUE_W   = 6,
  parameter int unsigned SQUASH_ON = 1   // 0: never, 1: L1 miss, 2: L0 miss
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // enqueue from the decoder
  input  logic                        in_valid_i,
  output logic                        in_ready_o,
  input  tracked_insn_t [ENQ_W-1:0]   in_insn_i,
  input  logic [ENQ_W-1:0]            in_mask_i,
  // issue to the execution core
  input  logic [$clog2(ISSUE_W+1)-1:0] issue_max_i,
  output logic [ISSUE_W-1:0]          issue_valid_o,
  output tracked_insn_t [ISSUE_W-1:0] issue_insn_o,
  output logic [ISSUE_W-1:0]          issue_perr_o,  // parity error seen on that lane
  // squash trigger from the memory system
  input  logic                        l0_miss_i,
  input  logic                        l1_miss_i,
  input  logic                        miss_done_i,
  output logic                        squash_o,      // squash happening this cycle
  output logic                        refetch_valid_o,
  output logic [PC_W-1:0]             refetch_pc_o,
  output logic                        hold_o,        // waiting for the miss
  // particle strike model
  input  logic                        strike_i,
  input  logic [$clog2(DEPTH)-1:0]    strike_entry_i,
  input  logic [$clog2(INSN_W+4)-1:0] strike_bit_i,
  // occupancy, for vulnerability accounting
  output logic [$clog2(DEPTH+1)-1:0]  count_o
);

  localparam int unsigned PW      = $clog2(DEPTH);
  localparam int unsigned CW      = $clog2(DEPTH+1);
  localparam int unsigned ENTRY_W = INSN_W + 4;
  // entry layout: {insn, p_op, p_pl, pi, anti_pi}
  localparam int unsigned B_ANTI = 0;
  localparam int unsigned B_PI   = 1;
  localparam int unsigned B_PPL  = 2;
  localparam int unsigned B_POP  = 3;

  logic [ENTRY_W-1:0] mem [DEPTH];
  logic [PW-1:0]      head, tail;
  logic [CW-1:0]      count;
  logic               hold;

  logic               trigger;
  logic [CW-1:0]      n_enq, n_iss;
  logic               do_enq;
  logic [PW-1:0]      wr_idx [ENQ_W];

  always_comb begin
    unique case (SQUASH_ON)
      1:       trigger = l1_miss_i;
      2:       trigger = l0_miss_i;
      default: trigger = 1'b0;
    endcase
  end

  assign squash_o        = trigger;
  assign refetch_valid_o = trigger && (count != '0);
  insn_t head_insn;
  assign head_insn       = insn_t'(mem[head][ENTRY_W-1 -: INSN_W]);
  assign refetch_pc_o    = head_insn.pl.pc;
  assign hold_o          = hold;
  assign count_o         = count;

  // room for a full chunk, not squashing and not waiting for a miss
  assign in_ready_o = !hold && !trigger && (CW'(DEPTH) - count >= CW'(ENQ_W));
  assign do_enq     = in_valid_i && in_ready_o;

  // enqueue compaction: slot i goes to tail + (number of earlier mask bits)
  always_comb begin
    logic [CW-1:0] off;
    off = '0;
    for (int i = 0; i < ENQ_W; i++) begin
      wr_idx[i] = PW'((CW'(tail) + off) % CW'(DEPTH));
      off = off + CW'(in_mask_i[i]);
    end
    n_enq = do_enq ? off : '0;
  end

  // issue: read, check parity, update pi
  always_comb begin
    logic [CW-1:0] lim;
    lim = (CW'(issue_max_i) < count) ? CW'(issue_max_i) : count;
    if (trigger) lim = '0;
    n_iss = lim;
    for (int i = 0; i < ISSUE_W; i++) begin
      logic [ENTRY_W-1:0] e;
      logic               err_op, err_pl;
      e      = mem[PW'((CW'(head) + CW'(i)) % CW'(DEPTH))];
      err_op = (^e[ENTRY_W-1 -: 4]) != e[B_POP];           // opcode is the top 4 bits
      err_pl = (^e[ENTRY_W-5 -: PAYLOAD_W]) != e[B_PPL];
      issue_valid_o[i]        = CW'(i) < lim;
      issue_insn_o[i].insn    = insn_t'(e[ENTRY_W-1 -: INSN_W]);
      issue_insn_o[i].anti_pi = e[B_ANTI];
      issue_insn_o[i].pi      = e[B_PI] | err_op | (err_pl & !e[B_ANTI]);
      issue_perr_o[i]         = issue_valid_o[i] && (err_op || err_pl);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      hold  <= 1'b0;
    end else if (trigger) begin
      head  <= tail;
      count <= '0;
      hold  <= !miss_done_i;
    end else begin
      if (miss_done_i) hold <= 1'b0;
      head  <= PW'((CW'(head) + n_iss) % CW'(DEPTH));
      tail  <= PW'((CW'(tail) + n_enq) % CW'(DEPTH));
      count <= count + n_enq - n_iss;
    end
  end

  // storage: single-bit flips from the strike model, then writes on enqueue
  // (a write in the same cycle replaces the upset value)
  always_ff @(posedge clk) begin
    if (strike_i && (32'(strike_bit_i) < ENTRY_W)) begin
      mem[strike_entry_i][strike_bit_i] <= ~mem[strike_entry_i][strike_bit_i];
    end
    if (do_enq) begin
      for (int i = 0; i < ENQ_W; i++) begin
        if (in_mask_i[i]) begin
          mem[wr_idx[i]] <= {in_insn_i[i].insn,
                             ^in_insn_i[i].insn.op,
                             ^in_insn_i[i].insn.pl,
                             in_insn_i[i].pi,
                             in_insn_i[i].anti_pi};
        end
      end
    end
  end

  // the opcode-parity slice above assumes a 4-bit opcode class
  initial assert ($bits(opclass_e) == 4);

endmodule
