// serr_core_env -- test environment for the core in one tracking mode.
//
// Same environment as the default-configuration end-to-end test (front end
// with refetch, fixed-latency execution, L1 misses with a 25-cycle service
// time that squash the queue, L0 misses that must not, single-bit strikes on
// queue entries), with the core built in tracking mode MODE. The reference
// for the machine-check stream depends on the mode:
//   PI_TILL_COMMIT  a correct-path instruction with pi set errs at commit;
//   PI_REGFILE      reading a register whose pi bit is set errs; so does an
//                   instruction with pi set and no destination register;
//   PI_PET          each PET decision is recomputed from the log of
//                   committed instructions: error unless the subject's
//                   destination is overwritten before it is read.
// Reports its counts on the ports and raises done when the whole program has
// committed.
module serr_core_env
  import serr_pkg::*;
#(
  parameter pi_mode_e MODE = PI_TILL_COMMIT
) (
  output bit done,
  output int checks,
  output int failures
);
  localparam int unsigned W     = 6;
  localparam int unsigned N     = 3000;   // program length
  localparam int unsigned LAT   = 3;      // execution latency
  localparam int unsigned MISS_LAT = 25;  // L1 miss service time
  localparam int unsigned NREG  = 16;     // registers used by the program
  localparam int unsigned EW    = INSN_W + 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- DUT ----------------
  logic fetch_valid, fetch_ready, fetch_parity, fetch_pi, refetch_valid;
  insn_t [W-1:0] fetch_insn;
  logic [W-1:0] fetch_mask;
  logic [PC_W-1:0] refetch_pc;
  logic l0_miss, l1_miss, miss_done, squash, iq_hold;
  logic [$clog2(W+1)-1:0] issue_max, n_commit, n_pi_ignored;
  logic [W-1:0] issue_valid, done_valid, iq_perr;
  tracked_insn_t [W-1:0] issue_insn;
  logic done_ready;
  done_insn_t [W-1:0] done_insn;
  logic drain_valid, dcache_ready;
  logic [ADDR_W-1:0] drain_addr;
  logic [DATA_W-1:0] drain_data;
  logic strike;
  logic [5:0] strike_entry;
  logic [$clog2(EW)-1:0] strike_bit;
  logic mc;
  err_cause_e mc_cause;
  logic [PC_W-1:0] mc_pc;
  logic [6:0] iq_count;
  logic chunk_perr, pet_false;
  logic [127:0] reg_pi;

  serr_core #(.PI_MODE(MODE)) dut (
    .clk, .rst_n,
    .fetch_valid_i(fetch_valid), .fetch_ready_o(fetch_ready), .fetch_insn_i(fetch_insn),
    .fetch_mask_i(fetch_mask), .fetch_parity_i(fetch_parity), .fetch_pi_i(fetch_pi),
    .refetch_valid_o(refetch_valid), .refetch_pc_o(refetch_pc),
    .l0_miss_i(l0_miss), .l1_miss_i(l1_miss), .miss_done_i(miss_done),
    .squash_o(squash), .iq_hold_o(iq_hold),
    .issue_max_i(issue_max), .issue_valid_o(issue_valid), .issue_insn_o(issue_insn),
    .done_valid_i(done_valid), .done_ready_o(done_ready), .done_insn_i(done_insn),
    .drain_valid_o(drain_valid), .dcache_ready_i(dcache_ready), .drain_addr_o(drain_addr),
    .drain_data_o(drain_data),
    .strike_i(strike), .strike_entry_i(strike_entry), .strike_bit_i(strike_bit),
    .mc_o(mc), .mc_cause_o(mc_cause), .mc_pc_o(mc_pc),
    .iq_count_o(iq_count), .n_commit_o(n_commit), .n_pi_ignored_o(n_pi_ignored),
    .iq_parity_err_o(iq_perr), .chunk_parity_err_o(chunk_perr), .pet_false_err_o(pet_false),
    .reg_pi_o(reg_pi));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- program ----------------
  typedef struct packed {
    insn_t insn; logic wp; logic pf; logic [ADDR_W-1:0] addr; logic miss;
  } pinsn_t;
  pinsn_t prog [N];

  function automatic opclass_e pick_op();
    int r;
    r = $urandom_range(0, 99);
    if (r < 45) return OP_ALU;
    if (r < 60) return OP_LOAD;
    if (r < 72) return OP_STORE;
    if (r < 80) return OP_BRANCH;
    if (r < 88) return OP_NOP;
    if (r < 92) return OP_PREFETCH;
    if (r < 95) return OP_BRHINT;
    if (r < 98) return OP_IO_STORE;
    return OP_IO_LOAD;
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin
      insn_t x;
      x = '0;
      x.op = pick_op();
      x.pl.pc = PC_W'(i * 4);
      x.pl.dst_v = (x.op inside {OP_ALU, OP_LOAD}) && ($urandom_range(0, 9) != 0);
      x.pl.dst = REG_W'($urandom_range(0, NREG-1));
      x.pl.src1_v = !(x.op inside {OP_NOP, OP_BRHINT});
      x.pl.src1 = REG_W'($urandom_range(0, NREG-1));
      x.pl.src2_v = (x.op inside {OP_ALU, OP_STORE, OP_IO_STORE}) && ($urandom_range(0, 1) != 0);
      x.pl.src2 = REG_W'($urandom_range(0, NREG-1));
      x.pl.imm = IMM_W'($urandom);
      prog[i].insn = x;
      prog[i].wp = ($urandom_range(0, 19) == 0);
      prog[i].pf = ($urandom_range(0, 19) == 0);
      prog[i].addr = ADDR_W'($urandom_range(0, 7) * 8);
      prog[i].miss = (x.op == OP_LOAD) && ($urandom_range(0, 5) == 0);
    end
  end

  // ---------------- environment state ----------------
  int fptr = 0;              // next instruction to fetch
  int next_issue = 0;        // next instruction expected at issue
  int next_commit = 0;       // next instruction expected at retire
  int now = 0;
  int miss_until = -1;       // miss outstanding until this cycle
  int miss_pulse_at = -1;
  typedef struct { int idx; logic pi; int ready_at; } ex_t;
  ex_t exq [$];
  int n_ret_lanes;
  int last_strike [64] = '{default: -1000};

  // reference model of store-commit tracking
  logic [NREG-1:0] m_reg;
  typedef struct { insn_t x; logic pi; } log_t;
  log_t plog [$];          // committed correct-path instructions

  // mechanism counters
  int c_squash = 0, c_refetch = 0, c_l0_ignored = 0, c_hold = 0, c_chunk_perr = 0;
  int c_iq_pi = 0, c_anti = 0, c_pi_ignored = 0, c_scope_err = 0;
  int c_prop = 0, c_retire_stall = 0, c_fetch_stall = 0, c_strike = 0;
  int c_commit_err = 0, c_regread_err = 0, c_pet_err = 0, c_pet_false = 0;
  longint occ_sum = 0;

  // drive all inputs just after each negedge
  task automatic drive();
    // fetch
    fetch_valid = (fptr < N) && ($urandom_range(0, 5) != 0);
    fetch_pi = 0;
    for (int i = 0; i < W; i++) begin
      fetch_mask[i] = (fptr + i < N);
      fetch_insn[i] = (fptr + i < N) ? prog[fptr + i].insn : '0;
    end
    fetch_parity = (^fetch_insn) ^ ($urandom_range(0, 29) == 0);
    // memory events
    l1_miss = (now == miss_pulse_at);
    miss_done = (now == miss_until);
    l0_miss = !l1_miss && ($urandom_range(0, 49) == 0);
    // issue stalls while a miss is outstanding
    issue_max = (miss_until >= now || miss_pulse_at >= now) ? '0 : ($clog2(W+1))'($urandom_range(0, W));
    // strikes, avoiding the address field (bits 4..35)
    // single-bit fault model: an entry is not struck again within 300 cycles
    strike_entry = 6'($urandom);
    strike = ($urandom_range(0, 5) == 0) && (now - last_strike[strike_entry] > 300);
    if (strike) last_strike[strike_entry] = now;
    strike_bit = ($urandom_range(0, 1) == 0) ? ($clog2(EW))'($urandom_range(0, 3))
                                             : ($clog2(EW))'($urandom_range(36, EW-1));
    // retire: up to W oldest executed instructions
    done_valid = '0;
    done_insn = '0;
    n_ret_lanes = 0;
    for (int i = 0; i < W && i < exq.size(); i++) begin
      if (exq[i].ready_at <= now && n_ret_lanes == i) begin
        done_valid[i] = 1;
        done_insn[i].ti.insn = prog[exq[i].idx].insn;
        done_insn[i].ti.pi = exq[i].pi;
        done_insn[i].wrong_path = prog[exq[i].idx].wp;
        done_insn[i].pred_false = prog[exq[i].idx].pf;
        done_insn[i].addr = prog[exq[i].idx].addr;
        done_insn[i].data = {32'(exq[i].idx), 32'hC0DE};
        n_ret_lanes++;
      end
    end
    // the cache is busy for 60 cycles out of every 400
    dcache_ready = ((now % 400) >= 60) && ($urandom_range(0, 3) != 0);
  endtask

  initial begin
    int nmax;
    logic rt_err, fh, eff, c;
    err_cause_e rc;
    logic [PC_W-1:0] rpc;
    logic [NREG-1:0] mr;
    insn_t x;
    int k;

    checks = 0; failures = 0; done = 0;
    fetch_valid = 0; fetch_insn = '0; fetch_mask = '0; fetch_parity = 0; fetch_pi = 0;
    l0_miss = 0; l1_miss = 0; miss_done = 0; issue_max = '0; done_valid = '0; done_insn = '0;
    dcache_ready = 0; strike = 0; strike_entry = '0; strike_bit = '0;
    m_reg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (next_commit < N) begin
      @(negedge clk);
      drive();
      #2;
      // ----- checks on the current cycle -----
      occ_sum += iq_count;
      check(squash == l1_miss, "squash on L1 miss only");
      if (l0_miss) c_l0_ignored++;
      if (iq_hold) begin
        c_hold++;
        check(iq_count == 0, "queue empty while waiting for the miss");
      end
      if (fetch_valid && !fetch_ready) c_fetch_stall++;
      if (chunk_perr) c_chunk_perr++;
      if (squash) begin
        c_squash++;
        if (refetch_valid) begin
          c_refetch++;
          check(refetch_pc == PC_W'(next_issue * 4), "refetch from the oldest unissued instruction");
        end else begin
          check(fptr == next_issue, "nothing in flight when no refetch is requested");
        end
      end
      nmax = 0;
      for (int i = 0; i < W; i++) begin
        if (issue_valid[i]) begin
          check(i == nmax, "issue lanes packed");
          nmax++;
          check(issue_insn[i].insn.pl.pc == PC_W'((next_issue + i) * 4), "issue in program order");
          if (!iq_perr[i] && !issue_insn[i].pi)
            check(issue_insn[i].insn == prog[next_issue + i].insn, "clean instruction issued bit-exact");
          if (iq_perr[i] && issue_insn[i].pi) c_iq_pi++;
          if (iq_perr[i] && !issue_insn[i].pi) c_anti++;
        end
      end
      // reference: retire group, per tracking mode
      rt_err = 0; rc = ERR_NONE; rpc = '0;
      mr = m_reg;
      if (done_valid != '0 && !done_ready) c_retire_stall++;
      if (MODE != PI_PET) check(done_ready, "retire never stalls without a PET buffer");
      if (done_valid != '0 && done_ready) begin
        for (int i = 0; i < W; i++) begin
          if (!done_valid[i]) continue;
          x = done_insn[i].ti.insn;
          c = !done_insn[i].wrong_path && !done_insn[i].pred_false;
          if (!c) begin
            if (done_insn[i].ti.pi) c_pi_ignored++;
            continue;
          end
          plog.push_back('{x, done_insn[i].ti.pi});
          if (MODE == PI_TILL_COMMIT) begin
            if (done_insn[i].ti.pi && !rt_err) begin rt_err = 1; rc = ERR_COMMIT; rpc = x.pl.pc; end
          end else if (MODE == PI_REGFILE) begin
            eff = (x.pl.src1_v && mr[x.pl.src1[3:0]]) || (x.pl.src2_v && mr[x.pl.src2[3:0]]);
            if (eff) begin
              if (!rt_err) begin rt_err = 1; rc = ERR_REG_READ; rpc = x.pl.pc; end
            end else if (done_insn[i].ti.pi && !x.pl.dst_v) begin
              if (!rt_err) begin rt_err = 1; rc = ERR_OUT_OF_SCOPE; rpc = x.pl.pc; end
            end
            if (x.pl.dst_v) begin
              if (done_insn[i].ti.pi) c_prop++;
              mr[x.pl.dst[3:0]] = done_insn[i].ti.pi;
            end
          end
        end
      end
      check(drain_valid == 0, "no stores buffered outside store-commit mode");
      if (MODE == PI_PET) begin
        check(!(mc && pet_false), "one PET decision at a time");
        if (mc || pet_false) begin
          // the subject is the oldest logged instruction with pi set; every
          // younger committed instruction is still in the buffer
          while (plog.size() != 0 && !plog[0].pi) void'(plog.pop_front());
          check(plog.size() != 0, "PET decision has a subject");
          if (plog.size() != 0) begin
            fh = 1;
            if (plog[0].x.pl.dst_v) begin
              fh = 1;
              for (int j = 1; j < plog.size(); j++) begin
                if ((plog[j].x.pl.src1_v && plog[j].x.pl.src1 == plog[0].x.pl.dst) ||
                    (plog[j].x.pl.src2_v && plog[j].x.pl.src2 == plog[0].x.pl.dst)) break;
                if (plog[j].x.pl.dst_v && plog[j].x.pl.dst == plog[0].x.pl.dst) begin fh = 0; break; end
              end
            end
            check(mc == fh, "PET error versus proven-dead decision");
            if (mc) check(mc_cause == ERR_PET && mc_pc == plog[0].x.pl.pc, "PET error names the instruction");
            if (mc) c_pet_err++; else c_pet_false++;
            void'(plog.pop_front());
          end
        end
      end else begin
        check(pet_false == 0, "no PET buffer in this mode");
        check(mc == rt_err, "machine check cycle");
        if (rt_err) check(mc_cause == rc && mc_pc == rpc, "machine check cause and address");
        if (rt_err && rc == ERR_COMMIT) c_commit_err++;
        if (rt_err && rc == ERR_REG_READ) c_regread_err++;
        if (rt_err && rc == ERR_OUT_OF_SCOPE) c_scope_err++;
      end
      if (strike) c_strike++;

      // ----- clock edge: advance the environment -----
      @(posedge clk);
      now++;
      if (done_valid != '0 && done_ready) m_reg = mr;
      // retire
      if (done_valid != '0 && done_ready) begin
        for (int i = 0; i < n_ret_lanes; i++) begin
          check(exq[0].idx == next_commit, "commit in program order, exactly once");
          void'(exq.pop_front());
          next_commit++;
        end
      end
      // issue into the execution pipeline; a marked load raises an L1 miss
      for (int i = 0; i < nmax; i++) begin
        exq.push_back('{next_issue, issue_insn[i].pi, now + LAT});
        if (prog[next_issue].miss && miss_until < now && miss_pulse_at < now) begin
          miss_pulse_at = now;               // signalled in the next cycle
          miss_until = now + MISS_LAT;
        end
        next_issue++;
      end
      // fetch pointer
      if (squash) begin
        if (refetch_valid) fptr = next_issue;
      end else if (fetch_valid && fetch_ready) begin
        fptr += W;
      end
    end
    check(next_issue == N && next_commit == N, "whole program issued and committed");
    check(c_squash > 0,       "mechanism: squash on L1 miss");
    check(c_refetch > 0,      "mechanism: refetch after squash");
    check(c_hold > 0,         "mechanism: queue held empty during a miss");
    check(c_l0_ignored > 0,   "mechanism: L0 miss not a trigger");
    check(c_chunk_perr > 0,   "mechanism: chunk parity error marks pi");
    check(c_iq_pi > 0,        "mechanism: queue parity error marks pi");
    check(c_pi_ignored > 0,   "mechanism: pi of an uncommitted instruction ignored");
    if (MODE == PI_TILL_COMMIT) check(c_commit_err > 0, "mechanism: error at commit");
    if (MODE == PI_REGFILE) begin
      check(c_regread_err > 0, "mechanism: error on reading a marked register");
      check(c_scope_err > 0,   "mechanism: error when pi has no register to go to");
      check(c_prop > 0,        "mechanism: pi moved to a register");
    end
    if (MODE == PI_PET) begin
      check(c_pet_err > 0,      "mechanism: PET buffer signals an error");
      check(c_pet_false > 0,    "mechanism: PET buffer proves a result dead");
      check(c_retire_stall > 0, "mechanism: retire stalled during a PET scan");
    end
    check(c_fetch_stall > 0,  "mechanism: fetch back-pressure");
    $display("mode=%s cycles=%0d squash=%0d hold=%0d iq_pi=%0d ignored=%0d commit_err=%0d regread_err=%0d scope_err=%0d pet_err=%0d pet_false=%0d rstall=%0d",
             MODE.name(), now, c_squash, c_hold, c_iq_pi, c_pi_ignored, c_commit_err, c_regread_err,
             c_scope_err, c_pet_err, c_pet_false, c_retire_stall);
    done = 1;
  end
endmodule
