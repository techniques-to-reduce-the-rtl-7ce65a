// serr_core_tb -- end-to-end test of the core at its default configuration
// (64-entry queue, 6-wide, squash on L1 misses, pi tracked to the store
// commit point).
//
// The testbench plays the parts outside the core: a front end that fetches
// 6-instruction chunks of a generated program (now and then with a bad chunk
// parity bit) and follows refetch requests; an execution pipeline of fixed
// latency that returns issued instructions with their wrong-path and
// predicate outcomes; a memory system that reports an L1 miss for marked
// loads one cycle after they issue, stalls issue and reports the miss done
// 25 cycles later (the document's L2 latency), and that also sends L0-miss
// pulses which must not squash; a data cache that accepts stores with random
// back-pressure; and particle strikes on random queue bits (outside the
// address field, which the reference needs to follow refetches), at most one
// per entry within 300 cycles so that every fault is a single-bit one.
//
// Checked: every instruction issues and commits exactly once and in program
// order; an instruction issued without a parity error is bit-exact; a
// squash empties the queue, the refetch address is the oldest unissued
// instruction, and the queue stays empty until the miss is done; the machine
// check stream (cycle, cause and address) equals a reference model of
// store-commit tracking built from the issued pi bits (register pi bits
// propagated along dependences, a store buffer with its drain and load
// matching). Each mechanism must occur at least once.
module serr_core_tb;
  import serr_pkg::*;
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

  serr_core dut (
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

  int checks = 0, failures = 0;
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
  typedef struct { logic [ADDR_W-1:0] addr; logic pi; int idx; } sb_t;
  sb_t m_sb [$];

  // mechanism counters
  int c_squash = 0, c_refetch = 0, c_l0_ignored = 0, c_hold = 0, c_chunk_perr = 0;
  int c_iq_pi = 0, c_anti = 0, c_pi_ignored = 0, c_st_err = 0, c_fwd_err = 0, c_scope_err = 0;
  int c_prop = 0, c_retire_stall = 0, c_fetch_stall = 0, c_strike = 0;
  longint occ_sum = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (issued %0d, committed %0d)", next_issue, next_commit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    logic e_mc, rt_err, fh, fp, eff, sb_err, c;
    err_cause_e e_cause, rc;
    logic [PC_W-1:0] e_pc, rpc;
    logic [NREG-1:0] mr;
    sb_t sbn [$];
    insn_t x;
    int k;

    fetch_valid = 0; fetch_insn = '0; fetch_mask = '0; fetch_parity = 0; fetch_pi = 0;
    l0_miss = 0; l1_miss = 0; miss_done = 0; issue_max = '0; done_valid = '0; done_insn = '0;
    dcache_ready = 0; strike = 0; strike_entry = '0; strike_bit = '0;
    m_reg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (next_commit < N || m_sb.size() != 0) begin
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
      // reference: retire group and store buffer
      e_mc = 0; e_cause = ERR_NONE; e_pc = '0; rt_err = 0; rc = ERR_NONE; rpc = '0;
      mr = m_reg;
      sbn = m_sb;
      if (done_valid != '0 && !done_ready) c_retire_stall++;
      check(done_ready == (m_sb.size() + W <= 16), "retire stalls only on a full store buffer");
      if (done_valid != '0 && done_ready) begin
        for (int i = 0; i < W; i++) begin
          if (!done_valid[i]) continue;
          x = done_insn[i].ti.insn;
          c = !done_insn[i].wrong_path && !done_insn[i].pred_false;
          if (!c) begin
            if (done_insn[i].ti.pi) c_pi_ignored++;
            continue;
          end
          eff = done_insn[i].ti.pi || (x.pl.src1_v && mr[x.pl.src1[3:0]]) || (x.pl.src2_v && mr[x.pl.src2[3:0]]);
          if (eff && !done_insn[i].ti.pi && x.pl.dst_v) c_prop++;
          fh = 0; fp = 0;
          if (x.op == OP_LOAD)
            foreach (sbn[j]) if (sbn[j].addr[ADDR_W-1:3] == done_insn[i].addr[ADDR_W-1:3]) begin fh = 1; fp = sbn[j].pi; end
          if (fh && fp) begin
            if (!rt_err) begin rt_err = 1; rc = ERR_LOAD_FWD; rpc = x.pl.pc; end
          end else if (x.op != OP_STORE && eff && (x.op inside {OP_IO_LOAD, OP_IO_STORE} || !x.pl.dst_v)) begin
            if (!rt_err) begin rt_err = 1; rc = ERR_OUT_OF_SCOPE; rpc = x.pl.pc; end
          end
          if (x.op == OP_STORE) sbn.push_back('{done_insn[i].addr, eff, next_commit + i});
          if (x.pl.dst_v) mr[x.pl.dst[3:0]] = eff;
        end
      end
      sb_err = 0;
      check(drain_valid == (m_sb.size() != 0), "store buffer drain valid");
      if (m_sb.size() != 0) begin
        check(drain_addr == m_sb[0].addr && drain_data == {32'(m_sb[0].idx), 32'hC0DE}, "store drains in order");
        if (dcache_ready && m_sb[0].pi) begin sb_err = 1; end
      end
      e_mc = sb_err || rt_err;
      e_cause = sb_err ? ERR_STORE : rc;
      e_pc = sb_err ? PC_W'(m_sb[0].idx * 4) : rpc;
      check(mc == e_mc, "machine check cycle");
      if (e_mc) check(mc_cause == e_cause && mc_pc == e_pc, "machine check cause and address");
      if (sb_err) c_st_err++;
      if (rt_err && rc == ERR_LOAD_FWD) c_fwd_err++;
      if (rt_err && rc == ERR_OUT_OF_SCOPE) c_scope_err++;
      if (strike) c_strike++;
      check(pet_false == 0, "no PET buffer in this mode");

      // ----- clock edge: advance the environment -----
      @(posedge clk);
      now++;
      // store buffer model: pushes land after the lookup, the drain pops the head
      if (dcache_ready && m_sb.size() != 0) begin
        void'(m_sb.pop_front());
        void'(sbn.pop_front());
      end
      if (done_valid != '0 && done_ready) begin
        m_sb = sbn;
        m_reg = mr;
      end
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
    check(c_anti > 0,         "mechanism: anti-pi masks a non-opcode error");
    check(c_pi_ignored > 0,   "mechanism: pi of an uncommitted instruction ignored");
    check(c_prop > 0,         "mechanism: pi propagated through a register");
    check(c_st_err > 0,       "mechanism: error at store commit");
    check(c_fwd_err > 0,      "mechanism: error on load forwarding");
    check(c_scope_err > 0,    "mechanism: error when pi leaves the tracked state");
    check(c_retire_stall > 0, "mechanism: retire stalled by the store buffer");
    check(c_fetch_stall > 0,  "mechanism: fetch back-pressure");
    $display("cycles=%0d squash=%0d refetch=%0d hold=%0d chunk_perr=%0d iq_pi=%0d anti=%0d ignored=%0d prop=%0d st_err=%0d fwd_err=%0d scope_err=%0d rstall=%0d fstall=%0d strikes=%0d avg_iq_occupancy=%0.2f",
             now, c_squash, c_refetch, c_hold, c_chunk_perr, c_iq_pi, c_anti, c_pi_ignored, c_prop,
             c_st_err, c_fwd_err, c_scope_err, c_retire_stall, c_fetch_stall, c_strike,
             real'(occ_sum) / real'(now));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
