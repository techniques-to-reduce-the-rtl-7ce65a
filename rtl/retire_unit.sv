// retire_unit -- in-order commit with pi-bit checking.
//
// Takes a group of up to W executed instructions in program order (valid
// lanes packed from lane 0). Instructions on a wrong path or whose predicate
// was false never commit, so their pi bits are ignored: that alone removes
// the false errors they would otherwise cause. For correct-path instructions
// the tracking mode MODE decides what a set pi bit does:
//
//   PI_TILL_COMMIT   machine check at commit.
//   PI_PET           no check here; every committed instruction is logged in
//                    the PET buffer, which decides on eviction.
//   PI_REGFILE       the pi bit moves to the destination register; reading a
//                    register whose pi bit is set is the error. An
//                    instruction with pi set and no destination register
//                    (store, branch, I/O) signals at once, since its pi bit
//                    would otherwise be lost.
//   PI_STORE_COMMIT  (default) source-register pi bits are ORed into the
//                    instruction's pi bit and follow the dependence chain.
//                    A store carries its pi bit into the store buffer, which
//                    signals when it drains; a load that takes its data from
//                    a pi-marked store, an I/O access, or another
//                    instruction without a register destination whose pi is
//                    set signals here.
//
// The modes and their rules are the document's; the error priority (the
// oldest lane is reported), the group-level stall and treating branches as
// the point where pi would go out of scope are this design's choices.
// The pi register file, the store buffer and the PET buffer are separate
// blocks wired to this one; the pi register file is updated in commit order,
// which for an in-order machine gives the same result as carrying the bit
// with the data.
//
// Interface: in_ready_o accepts the whole group on the clock edge. Errors
// (err_o) and the counters' increments are combinational for that group.
module retire_unit
  import serr_pkg::*;
#(
  parameter pi_mode_e    MODE = PI_STORE_COMMIT,
  parameter int unsigned W    = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [W-1:0]         in_valid_i,
  output logic                 in_ready_o,
  input  done_insn_t [W-1:0]   in_insn_i,
  // pi register file
  output logic                 rf_propagate_o,
  output logic [W-1:0]         rf_valid_o,
  output logic [W-1:0]         rf_src1_v_o,
  output logic [REG_W-1:0]     rf_src1_o [W],
  output logic [W-1:0]         rf_src2_v_o,
  output logic [REG_W-1:0]     rf_src2_o [W],
  output logic [W-1:0]         rf_dst_v_o,
  output logic [REG_W-1:0]     rf_dst_o  [W],
  output logic [W-1:0]         rf_pi_o,
  input  logic [W-1:0]         rf_src_pi_i,
  input  logic [W-1:0]         rf_wr_pi_i,
  // store buffer
  output logic [W-1:0]         sb_push_o,
  input  logic                 sb_ready_i,
  output logic [ADDR_W-1:0]    sb_addr_o [W],
  output logic [DATA_W-1:0]    sb_data_o [W],
  output logic [PC_W-1:0]      sb_pc_o   [W],
  output logic [W-1:0]         sb_pi_o,
  output logic [W-1:0]         sb_ld_valid_o,
  output logic [ADDR_W-1:0]    sb_ld_addr_o [W],
  input  logic [W-1:0]         sb_ld_hit_i,
  input  logic [W-1:0]         sb_ld_pi_i,
  // PET buffer
  output logic [W-1:0]         pet_push_o,
  input  logic                 pet_ready_i,
  output logic [W-1:0]         pet_pi_o,
  // results
  output logic                 err_o,
  output err_cause_e           err_cause_o,
  output logic [PC_W-1:0]      err_pc_o,
  output logic [$clog2(W+1)-1:0] n_commit_o,     // instructions committed
  output logic [$clog2(W+1)-1:0] n_pi_ignored_o  // pi set but never committed
);

  localparam int unsigned NW = $clog2(W+1);

  logic [W-1:0] c;            // lane commits on the correct path
  logic [W-1:0] lane_err;
  err_cause_e   lane_cause [W];
  logic         accept;

  assign in_ready_o = sb_ready_i && (MODE != PI_PET || pet_ready_i);
  assign accept     = in_ready_o && (in_valid_i != '0);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      insn_t ins;
      ins  = in_insn_i[i].ti.insn;
      c[i] = accept && in_valid_i[i] && !in_insn_i[i].wrong_path && !in_insn_i[i].pred_false;

      rf_valid_o[i]  = c[i] && (MODE == PI_REGFILE || MODE == PI_STORE_COMMIT);
      rf_src1_v_o[i] = ins.pl.src1_v;
      rf_src1_o[i]   = ins.pl.src1;
      rf_src2_v_o[i] = ins.pl.src2_v;
      rf_src2_o[i]   = ins.pl.src2;
      rf_dst_v_o[i]  = ins.pl.dst_v;
      rf_dst_o[i]    = ins.pl.dst;
      rf_pi_o[i]     = in_insn_i[i].ti.pi;

      sb_push_o[i]     = c[i] && MODE == PI_STORE_COMMIT && is_store(ins.op);
      sb_addr_o[i]     = in_insn_i[i].addr;
      sb_data_o[i]     = in_insn_i[i].data;
      sb_pc_o[i]       = ins.pl.pc;
      sb_pi_o[i]       = rf_wr_pi_i[i];
      sb_ld_valid_o[i] = c[i] && MODE == PI_STORE_COMMIT && is_load(ins.op);
      sb_ld_addr_o[i]  = in_insn_i[i].addr;

      pet_push_o[i] = c[i] && MODE == PI_PET;
      pet_pi_o[i]   = in_insn_i[i].ti.pi;
    end
  end
  assign rf_propagate_o = (MODE == PI_STORE_COMMIT);

  // per-lane error rules
  always_comb begin
    for (int i = 0; i < W; i++) begin
      insn_t ins;
      logic  fwd_hit, fwd_pi, eff_pi;
      ins        = in_insn_i[i].ti.insn;
      lane_err[i]   = 1'b0;
      lane_cause[i] = ERR_NONE;
      // a store older in this group shadows the store buffer
      fwd_hit = sb_ld_hit_i[i];
      fwd_pi  = sb_ld_pi_i[i];
      for (int j = 0; j < i; j++) begin
        if (sb_push_o[j] &&
            in_insn_i[j].addr[ADDR_W-1:3] == in_insn_i[i].addr[ADDR_W-1:3]) begin
          fwd_hit = 1'b1;
          fwd_pi  = sb_pi_o[j];
        end
      end
      eff_pi = rf_wr_pi_i[i];
      if (c[i]) begin
        unique case (MODE)
          PI_TILL_COMMIT: if (in_insn_i[i].ti.pi) begin
            lane_err[i] = 1'b1; lane_cause[i] = ERR_COMMIT;
          end
          PI_REGFILE: begin
            if (rf_src_pi_i[i]) begin
              lane_err[i] = 1'b1; lane_cause[i] = ERR_REG_READ;
            end else if (in_insn_i[i].ti.pi && !ins.pl.dst_v) begin
              lane_err[i] = 1'b1; lane_cause[i] = ERR_OUT_OF_SCOPE;
            end
          end
          PI_STORE_COMMIT: begin
            if (is_load(ins.op) && fwd_hit && fwd_pi) begin
              lane_err[i] = 1'b1; lane_cause[i] = ERR_LOAD_FWD;
            end else if (!is_store(ins.op) && eff_pi && (is_io(ins.op) || !ins.pl.dst_v)) begin
              lane_err[i] = 1'b1; lane_cause[i] = ERR_OUT_OF_SCOPE;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // report the oldest erroring lane; count commits and ignored pi bits
  always_comb begin
    err_o          = 1'b0;
    err_cause_o    = ERR_NONE;
    err_pc_o       = '0;
    n_commit_o     = '0;
    n_pi_ignored_o = '0;
    for (int i = W-1; i >= 0; i--) begin
      if (lane_err[i]) begin
        err_o       = 1'b1;
        err_cause_o = lane_cause[i];
        err_pc_o    = in_insn_i[i].ti.insn.pl.pc;
      end
      n_commit_o = n_commit_o + NW'(c[i]);
      n_pi_ignored_o = n_pi_ignored_o +
        NW'(accept && in_valid_i[i] && !c[i] && in_insn_i[i].ti.pi);
    end
  end

  // valid lanes are packed from lane 0
  assert property (@(posedge clk) disable iff (!rst_n)
                   ((in_valid_i + 1'b1) & in_valid_i) == '0);

endmodule
