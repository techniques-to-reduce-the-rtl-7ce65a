// serr_core -- soft-error reduction around an in-order instruction queue.
//
// The pipeline pieces that hold or decide the fate of instructions, wired
// as follows:
//
//   fetch chunk -> chunk_decoder -> instruction_queue -> (execution core)
//        -> retire_unit -> pi_regfile / pi_store_buffer / pet_buffer
//
// Two techniques are combined. Exposure reduction: an L1 load miss reported
// by the memory system squashes the whole instruction queue, the oldest
// squashed address is handed back to fetch, and the queue stays empty until
// the miss is reported done. False-error tracking: parity errors in the
// fetch chunk or the queue set the instruction's pi ("possibly incorrect")
// bit rather than raising a machine check; the anti-pi bit suppresses errors
// in the non-opcode bits of neutral instructions; the retire unit drops the
// pi bit of instructions that never commit; and the mode PI_MODE decides how
// far the bit travels before it becomes a machine check. The default mode,
// carrying pi through the register file until a store commits, and squashing
// on L1 misses, are the document's combined configuration. The PET buffer is
// present only in PI_PET mode.
//
// The execution core, branch resolution and the caches are outside this
// block: issued instructions leave on issue_*, and come back, resolved
// (wrong path, predicate) and with memory addresses, on done_*. Cache-miss
// and miss-done pulses come in from the memory system, and committed stores
// leave on drain_*. strike_* flips one bit of an instruction-queue entry, to
// model a particle strike.
//
// mc_o is a one-cycle machine-check pulse with its cause and the address of
// the instruction it is attributed to (the store or load in store-commit
// mode, the exact instruction in PET and commit modes).
module serr_core
  import serr_pkg::*;
#(
  parameter pi_mode_e    PI_MODE   = PI_STORE_COMMIT,
  parameter int unsigned W         = 6,    // fetch, issue and retire width
  parameter int unsigned IQ_DEPTH  = 64,
  parameter int unsigned SQUASH_ON = 1,    // 0 none, 1 L1 miss, 2 L0 miss
  parameter int unsigned NUM_REGS  = 128,
  parameter int unsigned SB_DEPTH  = 16,
  parameter int unsigned PET_DEPTH = 512
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // fetch
  input  logic                         fetch_valid_i,
  output logic                         fetch_ready_o,
  input  insn_t [W-1:0]                fetch_insn_i,
  input  logic  [W-1:0]                fetch_mask_i,
  input  logic                         fetch_parity_i,
  input  logic                         fetch_pi_i,
  output logic                         refetch_valid_o,
  output logic [PC_W-1:0]              refetch_pc_o,
  // memory system events
  input  logic                         l0_miss_i,
  input  logic                         l1_miss_i,
  input  logic                         miss_done_i,
  output logic                         squash_o,
  output logic                         iq_hold_o,
  // issue to the execution core
  input  logic [$clog2(W+1)-1:0]       issue_max_i,
  output logic [W-1:0]                 issue_valid_o,
  output tracked_insn_t [W-1:0]        issue_insn_o,
  // completion from the execution core
  input  logic [W-1:0]                 done_valid_i,
  output logic                         done_ready_o,
  input  done_insn_t [W-1:0]           done_insn_i,
  // data cache write port
  output logic                         drain_valid_o,
  input  logic                         dcache_ready_i,
  output logic [ADDR_W-1:0]            drain_addr_o,
  output logic [DATA_W-1:0]            drain_data_o,
  // particle strike model
  input  logic                         strike_i,
  input  logic [$clog2(IQ_DEPTH)-1:0]  strike_entry_i,
  input  logic [$clog2(INSN_W+4)-1:0]  strike_bit_i,
  // machine check
  output logic                         mc_o,
  output err_cause_e                   mc_cause_o,
  output logic [PC_W-1:0]              mc_pc_o,
  // observation
  output logic [$clog2(IQ_DEPTH+1)-1:0] iq_count_o,
  output logic [$clog2(W+1)-1:0]       n_commit_o,
  output logic [$clog2(W+1)-1:0]       n_pi_ignored_o,
  output logic [W-1:0]                 iq_parity_err_o,
  output logic                         chunk_parity_err_o,
  output logic                         pet_false_err_o,
  output logic [NUM_REGS-1:0]          reg_pi_o
);

  // ---------------- decode and instruction queue ----------------
  logic                      dec_valid, dec_ready, squash;
  tracked_insn_t [W-1:0]     dec_insn;
  logic [W-1:0]              dec_mask;
  logic                      iq_refetch_valid;
  logic [PC_W-1:0]           iq_refetch_pc;

  chunk_decoder #(.CHUNK_W(W)) u_dec (
    .clk, .rst_n,
    .flush_i      (squash),
    .in_valid_i   (fetch_valid_i),
    .in_ready_o   (fetch_ready_o),
    .in_insn_i    (fetch_insn_i),
    .in_mask_i    (fetch_mask_i),
    .in_parity_i  (fetch_parity_i),
    .in_pi_i      (fetch_pi_i),
    .out_valid_o  (dec_valid),
    .out_ready_i  (dec_ready),
    .out_insn_o   (dec_insn),
    .out_mask_o   (dec_mask),
    .parity_err_o (chunk_parity_err_o)
  );

  instruction_queue #(
    .DEPTH(IQ_DEPTH), .ENQ_W(W), .ISSUE_W(W), .SQUASH_ON(SQUASH_ON)
  ) u_iq (
    .clk, .rst_n,
    .in_valid_i      (dec_valid),
    .in_ready_o      (dec_ready),
    .in_insn_i       (dec_insn),
    .in_mask_i       (dec_mask),
    .issue_max_i     (issue_max_i),
    .issue_valid_o   (issue_valid_o),
    .issue_insn_o    (issue_insn_o),
    .issue_perr_o    (iq_parity_err_o),
    .l0_miss_i       (l0_miss_i),
    .l1_miss_i       (l1_miss_i),
    .miss_done_i     (miss_done_i),
    .squash_o        (squash),
    .refetch_valid_o (iq_refetch_valid),
    .refetch_pc_o    (iq_refetch_pc),
    .hold_o          (iq_hold_o),
    .strike_i        (strike_i),
    .strike_entry_i  (strike_entry_i),
    .strike_bit_i    (strike_bit_i),
    .count_o         (iq_count_o)
  );

  assign squash_o = squash;

  // the oldest squashed instruction is the queue head, or, with an empty
  // queue, the first instruction of the chunk waiting in decode
  always_comb begin
    refetch_valid_o = 1'b0;
    refetch_pc_o    = iq_refetch_pc;
    if (iq_refetch_valid) begin
      refetch_valid_o = 1'b1;
    end else if (squash && dec_valid) begin
      for (int i = W-1; i >= 0; i--) begin
        if (dec_mask[i]) begin
          refetch_valid_o = 1'b1;
          refetch_pc_o    = dec_insn[i].insn.pl.pc;
        end
      end
    end
  end

  // ---------------- retire and pi tracking ----------------
  logic                 rf_propagate;
  logic [W-1:0]         rf_valid, rf_src1_v, rf_src2_v, rf_dst_v, rf_pi, rf_src_pi, rf_wr_pi;
  logic [REG_W-1:0]     rf_src1 [W];
  logic [REG_W-1:0]     rf_src2 [W];
  logic [REG_W-1:0]     rf_dst  [W];
  logic [W-1:0]         sb_push, sb_pi, sb_ld_valid, sb_ld_hit, sb_ld_pi;
  logic                 sb_ready, sb_err;
  logic [ADDR_W-1:0]    sb_addr [W];
  logic [ADDR_W-1:0]    sb_ld_addr [W];
  logic [DATA_W-1:0]    sb_data [W];
  logic [PC_W-1:0]      sb_pc [W];
  logic [PC_W-1:0]      sb_err_pc;
  logic [W-1:0]         pet_push, pet_pi;
  logic                 pet_ready, pet_err;
  logic [PC_W-1:0]      pet_err_pc;
  logic                 rt_err;
  err_cause_e           rt_cause;
  logic [PC_W-1:0]      rt_pc;

  retire_unit #(.MODE(PI_MODE), .W(W)) u_retire (
    .clk, .rst_n,
    .in_valid_i     (done_valid_i),
    .in_ready_o     (done_ready_o),
    .in_insn_i      (done_insn_i),
    .rf_propagate_o (rf_propagate),
    .rf_valid_o     (rf_valid),
    .rf_src1_v_o    (rf_src1_v),
    .rf_src1_o      (rf_src1),
    .rf_src2_v_o    (rf_src2_v),
    .rf_src2_o      (rf_src2),
    .rf_dst_v_o     (rf_dst_v),
    .rf_dst_o       (rf_dst),
    .rf_pi_o        (rf_pi),
    .rf_src_pi_i    (rf_src_pi),
    .rf_wr_pi_i     (rf_wr_pi),
    .sb_push_o      (sb_push),
    .sb_ready_i     (sb_ready),
    .sb_addr_o      (sb_addr),
    .sb_data_o      (sb_data),
    .sb_pc_o        (sb_pc),
    .sb_pi_o        (sb_pi),
    .sb_ld_valid_o  (sb_ld_valid),
    .sb_ld_addr_o   (sb_ld_addr),
    .sb_ld_hit_i    (sb_ld_hit),
    .sb_ld_pi_i     (sb_ld_pi),
    .pet_push_o     (pet_push),
    .pet_ready_i    (pet_ready),
    .pet_pi_o       (pet_pi),
    .err_o          (rt_err),
    .err_cause_o    (rt_cause),
    .err_pc_o       (rt_pc),
    .n_commit_o     (n_commit_o),
    .n_pi_ignored_o (n_pi_ignored_o)
  );

  pi_regfile #(.NUM_REGS(NUM_REGS), .W(W)) u_rf (
    .clk, .rst_n,
    .propagate_i (rf_propagate),
    .valid_i     (rf_valid),
    .src1_v_i    (rf_src1_v),
    .src1_i      (rf_src1),
    .src2_v_i    (rf_src2_v),
    .src2_i      (rf_src2),
    .dst_v_i     (rf_dst_v),
    .dst_i       (rf_dst),
    .pi_i        (rf_pi),
    .src_pi_o    (rf_src_pi),
    .wr_pi_o     (rf_wr_pi),
    .pi_q_o      (reg_pi_o)
  );

  pi_store_buffer #(.DEPTH(SB_DEPTH), .W(W)) u_sb (
    .clk, .rst_n,
    .push_i         (sb_push),
    .push_ready_o   (sb_ready),
    .push_addr_i    (sb_addr),
    .push_data_i    (sb_data),
    .push_pc_i      (sb_pc),
    .push_pi_i      (sb_pi),
    .ld_valid_i     (sb_ld_valid),
    .ld_addr_i      (sb_ld_addr),
    .ld_hit_o       (sb_ld_hit),
    .ld_pi_o        (sb_ld_pi),
    .drain_valid_o  (drain_valid_o),
    .dcache_ready_i (dcache_ready_i),
    .drain_addr_o   (drain_addr_o),
    .drain_data_o   (drain_data_o),
    .err_o          (sb_err),
    .err_pc_o       (sb_err_pc),
    .count_o        ()
  );

  generate
    if (PI_MODE == PI_PET) begin : g_pet
      logic [PC_W-1:0] pet_pc [W];
      logic [W-1:0]    pet_dst_v, pet_src1_v, pet_src2_v;
      logic [REG_W-1:0] pet_dst [W];
      logic [REG_W-1:0] pet_src1 [W];
      logic [REG_W-1:0] pet_src2 [W];
      for (genvar i = 0; i < W; i++) begin : g_lane
        assign pet_pc[i]     = done_insn_i[i].ti.insn.pl.pc;
        assign pet_dst_v[i]  = done_insn_i[i].ti.insn.pl.dst_v;
        assign pet_dst[i]    = done_insn_i[i].ti.insn.pl.dst;
        assign pet_src1_v[i] = done_insn_i[i].ti.insn.pl.src1_v;
        assign pet_src1[i]   = done_insn_i[i].ti.insn.pl.src1;
        assign pet_src2_v[i] = done_insn_i[i].ti.insn.pl.src2_v;
        assign pet_src2[i]   = done_insn_i[i].ti.insn.pl.src2;
      end
      pet_buffer #(.DEPTH(PET_DEPTH), .W(W)) u_pet (
        .clk, .rst_n,
        .push_i       (pet_push),
        .push_ready_o (pet_ready),
        .pc_i         (pet_pc),
        .dst_v_i      (pet_dst_v),
        .dst_i        (pet_dst),
        .src1_v_i     (pet_src1_v),
        .src1_i       (pet_src1),
        .src2_v_i     (pet_src2_v),
        .src2_i       (pet_src2),
        .pi_i         (pet_pi),
        .err_o        (pet_err),
        .err_pc_o     (pet_err_pc),
        .false_err_o  (pet_false_err_o),
        .scanning_o   (),
        .count_o      ()
      );
    end else begin : g_no_pet
      assign pet_ready       = 1'b1;
      assign pet_err         = 1'b0;
      assign pet_err_pc      = '0;
      assign pet_false_err_o = 1'b0;
    end
  endgenerate

  // ---------------- machine check ----------------
  // all sources raise it; the oldest instruction's report is kept
  always_comb begin
    mc_o       = pet_err || sb_err || rt_err;
    mc_cause_o = ERR_NONE;
    mc_pc_o    = '0;
    if (pet_err) begin
      mc_cause_o = ERR_PET;
      mc_pc_o    = pet_err_pc;
    end else if (sb_err) begin
      mc_cause_o = ERR_STORE;
      mc_pc_o    = sb_err_pc;
    end else if (rt_err) begin
      mc_cause_o = rt_cause;
      mc_pc_o    = rt_pc;
    end
  end

endmodule
