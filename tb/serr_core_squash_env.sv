// serr_core_squash_env -- runs one program through the core with a given
// squash trigger and measures what squashing buys and costs.
//
// The environment models the parts of an in-order machine around the core:
// a front end that delivers a 6-instruction chunk in most cycles and follows
// refetch requests; a fixed-latency execution pipeline; and a two-level data
// cache in which a load misses L0 now and then (10-cycle service) and some of
// those also miss L1 (25-cycle service). Issue stops while a miss is
// outstanding, as an in-order pipeline does at the first use of the load.
// Every L0 miss pulses l0_miss_i, every L1 miss also pulses l1_miss_i, one
// cycle after the load issues; miss_done_i pulses when the data returns.
//
// The program, the issue bandwidth in each cycle and the fetch bubbles are
// fixed functions of the instruction index and the cycle number (a small
// integer hash), so environments built with different SQUASH_ON values see
// the same work and their results can be compared.
//
// Checked in every configuration: the squash fires on the chosen trigger
// only; the refetch address is the oldest unissued instruction; the queue is
// empty while held; instructions issue unchanged and commit exactly once in
// program order; no machine check is raised (no faults are injected).
//
// Reported: cycles, committed instructions, the sum over cycles of the
// queue's occupancy (exposure of valid instructions), the part of that sum
// spent while a miss was outstanding, and the number of squashes.
module serr_core_squash_env
  import serr_pkg::*;
#(
  parameter int unsigned SQUASH_ON = 1,
  parameter int unsigned N         = 6000   // program length
) (
  output bit     done,
  output int     checks,
  output int     failures,
  output int     cycles,
  output longint occ_sum,
  output longint occ_miss_sum,
  output int     n_squash
);
  localparam int unsigned W        = 6;
  localparam int unsigned LAT      = 3;    // execution latency
  localparam int unsigned L0_LAT   = 10;   // L0 miss service time
  localparam int unsigned L1_LAT   = 25;   // L1 miss service time

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
  logic mc;
  err_cause_e mc_cause;
  logic [PC_W-1:0] mc_pc;
  logic [6:0] iq_count;
  logic chunk_perr, pet_false;
  logic [127:0] reg_pi;

  serr_core #(.SQUASH_ON(SQUASH_ON)) dut (
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
    .strike_i(1'b0), .strike_entry_i('0), .strike_bit_i('0),
    .mc_o(mc), .mc_cause_o(mc_cause), .mc_pc_o(mc_pc),
    .iq_count_o(iq_count), .n_commit_o(n_commit), .n_pi_ignored_o(n_pi_ignored),
    .iq_parity_err_o(iq_perr), .chunk_parity_err_o(chunk_perr), .pet_false_err_o(pet_false),
    .reg_pi_o(reg_pi));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t (SQUASH_ON=%0d): %s", $time, SQUASH_ON, what);
    end
  endtask

  // integer hash (xorshift-multiply), the source of every "random" choice
  function automatic int unsigned h(input int unsigned a, input int unsigned salt);
    int unsigned x;
    x = a * 32'h9E3779B1 ^ salt * 32'h85EBCA77;
    x = x ^ (x >> 15);
    x = x * 32'h2C1B3C6D;
    x = x ^ (x >> 12);
    x = x * 32'h297A2D39;
    return x ^ (x >> 15);
  endfunction

  // ---------------- program ----------------
  typedef struct packed { insn_t insn; logic wp; logic pf; logic l0m; logic l1m; } pinsn_t;
  pinsn_t prog [N];

  initial begin
    for (int i = 0; i < N; i++) begin
      insn_t x;
      int unsigned r;
      r = h(i, 1) % 100;
      x = '0;
      x.op = (r < 50) ? OP_ALU : (r < 75) ? OP_LOAD : (r < 85) ? OP_STORE :
             (r < 93) ? OP_BRANCH : OP_NOP;
      x.pl.pc = PC_W'(i * 4);
      x.pl.dst_v = x.op inside {OP_ALU, OP_LOAD};
      x.pl.dst = REG_W'(h(i, 2) % 32);
      x.pl.src1_v = (x.op != OP_NOP);
      x.pl.src1 = REG_W'(h(i, 3) % 32);
      x.pl.src2_v = x.op inside {OP_ALU, OP_STORE};
      x.pl.src2 = REG_W'(h(i, 4) % 32);
      x.pl.imm = IMM_W'(h(i, 5));
      prog[i].insn = x;
      prog[i].wp = (h(i, 6) % 25 == 0);
      prog[i].pf = 1'b0;
      prog[i].l0m = (x.op == OP_LOAD) && (h(i, 7) % 6 == 0);
      prog[i].l1m = prog[i].l0m && (h(i, 8) % 3 == 0);
    end
  end

  // ---------------- environment state ----------------
  int fptr = 0, next_issue = 0, next_commit = 0, now = 0;
  int miss_until = -1, miss_pulse_at = -1;
  logic miss_is_l1 = 0;
  typedef struct { int idx; int ready_at; } ex_t;
  ex_t exq [$];
  int n_ret_lanes;

  task automatic drive();
    fetch_valid = (fptr < N) && (h(now, 11) % 8 != 0);
    fetch_pi = 0;
    for (int i = 0; i < W; i++) begin
      fetch_mask[i] = (fptr + i < N);
      fetch_insn[i] = (fptr + i < N) ? prog[fptr + i].insn : '0;
    end
    fetch_parity = ^fetch_insn;
    l0_miss = (now == miss_pulse_at);
    l1_miss = (now == miss_pulse_at) && miss_is_l1;
    miss_done = (now == miss_until);
    issue_max = (miss_until >= now || miss_pulse_at >= now) ? '0 :
                ($clog2(W+1))'(h(now, 12) % 4);
    done_valid = '0;
    done_insn = '0;
    n_ret_lanes = 0;
    for (int i = 0; i < W && i < exq.size(); i++) begin
      if (exq[i].ready_at <= now && n_ret_lanes == i) begin
        done_valid[i] = 1;
        done_insn[i].ti.insn = prog[exq[i].idx].insn;
        done_insn[i].wrong_path = prog[exq[i].idx].wp;
        done_insn[i].pred_false = prog[exq[i].idx].pf;
        done_insn[i].addr = ADDR_W'(exq[i].idx * 8);
        done_insn[i].data = 64'(exq[i].idx);
        n_ret_lanes++;
      end
    end
    dcache_ready = 1;
  endtask

  initial begin
    int nmax;
    logic trig;
    checks = 0; failures = 0; done = 0; cycles = 0;
    occ_sum = 0; occ_miss_sum = 0; n_squash = 0;
    fetch_valid = 0; fetch_insn = '0; fetch_mask = '0; fetch_parity = 0; fetch_pi = 0;
    l0_miss = 0; l1_miss = 0; miss_done = 0; issue_max = '0; done_valid = '0; done_insn = '0;
    dcache_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (next_commit < N) begin
      @(negedge clk);
      drive();
      #2;
      occ_sum += 64'(iq_count);
      if (miss_until >= now) occ_miss_sum += 64'(iq_count);
      trig = (SQUASH_ON == 1) ? l1_miss : (SQUASH_ON == 2) ? l0_miss : 1'b0;
      check(squash == trig, "squash on the selected trigger only");
      check(!mc, "no machine check without faults");
      if (iq_hold) check(iq_count == 0, "queue empty while waiting for the miss");
      if (squash) begin
        n_squash++;
        if (refetch_valid)
          check(refetch_pc == PC_W'(next_issue * 4), "refetch from the oldest unissued instruction");
        else
          check(fptr == next_issue, "nothing in flight when no refetch is requested");
      end
      nmax = 0;
      for (int i = 0; i < W; i++) begin
        if (issue_valid[i]) begin
          check(i == nmax, "issue lanes packed");
          nmax++;
          check(issue_insn[i].insn == prog[next_issue + i].insn && !issue_insn[i].pi,
                "instruction issued unchanged and in program order");
        end
      end
      check(done_ready, "retire never stalls");

      @(posedge clk);
      now++;
      if (done_valid != '0 && done_ready) begin
        for (int i = 0; i < n_ret_lanes; i++) begin
          check(exq[0].idx == next_commit, "commit in program order, exactly once");
          void'(exq.pop_front());
          next_commit++;
        end
      end
      for (int i = 0; i < nmax; i++) begin
        exq.push_back('{next_issue, now + LAT});
        if (prog[next_issue].l0m && miss_until < now && miss_pulse_at < now) begin
          miss_pulse_at = now;
          miss_is_l1 = prog[next_issue].l1m;
          miss_until = now + (prog[next_issue].l1m ? L1_LAT : L0_LAT);
        end
        next_issue++;
      end
      if (squash) begin
        if (refetch_valid) fptr = next_issue;
      end else if (fetch_valid && fetch_ready) begin
        fptr += W;
      end
    end
    check(next_issue == N && next_commit == N, "whole program issued and committed");
    cycles = now;
    done = 1;
  end
endmodule
