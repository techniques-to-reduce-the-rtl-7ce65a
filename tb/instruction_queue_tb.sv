// instruction_queue_tb -- self-checking test of the instruction queue.
//
// A reference model keeps the stored entries (instruction, two parity bits,
// pi, anti-pi) by physical slot. Random chunks are enqueued, random issue
// budgets drain the queue, particle strikes flip random stored bits, and L0
// and L1 miss pulses arrive. Checked: issue order and contents; the pi rule
// (opcode parity error always sets pi, a non-opcode error sets it only
// without anti-pi); that only the L1 trigger squashes; that a squash empties
// the queue, reports the oldest address, and blocks enqueue until the miss is
// done; and that an enqueued instruction can issue on the next cycle.
module instruction_queue_tb;
  import serr_pkg::*;
  localparam int unsigned DEPTH = 64, W = 6;
  localparam int unsigned EW = INSN_W + 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, l0, l1, mdone, squash, rf_valid, hold, strike;
  tracked_insn_t [W-1:0] in_insn, iss_insn;
  logic [W-1:0] in_mask, iss_valid, iss_perr;
  logic [$clog2(W+1)-1:0] iss_max;
  logic [PC_W-1:0] rf_pc;
  logic [$clog2(DEPTH)-1:0] s_entry;
  logic [$clog2(EW)-1:0] s_bit;
  logic [$clog2(DEPTH+1)-1:0] count;

  instruction_queue #(.DEPTH(DEPTH), .ENQ_W(W), .ISSUE_W(W), .SQUASH_ON(1)) dut (
    .clk, .rst_n, .in_valid_i(in_valid), .in_ready_o(in_ready), .in_insn_i(in_insn),
    .in_mask_i(in_mask), .issue_max_i(iss_max), .issue_valid_o(iss_valid),
    .issue_insn_o(iss_insn), .issue_perr_o(iss_perr), .l0_miss_i(l0), .l1_miss_i(l1),
    .miss_done_i(mdone), .squash_o(squash), .refetch_valid_o(rf_valid), .refetch_pc_o(rf_pc),
    .hold_o(hold), .strike_i(strike), .strike_entry_i(s_entry), .strike_bit_i(s_bit),
    .count_o(count));

  int checks = 0, failures = 0;
  int n_squash = 0, n_pi_set = 0, n_anti_masked = 0, n_issued = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // reference model
  logic [EW-1:0] m_mem [DEPTH];
  int m_head = 0, m_count = 0;
  logic m_hold = 0;

  function automatic logic [EW-1:0] pack(tracked_insn_t t);
    return {t.insn, ^t.insn.op, ^t.insn.pl, t.pi, t.anti_pi};
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int npush, nmax, k;
    logic [EW-1:0] e;
    insn_t ins;
    logic eop, epl, epi;
    in_valid = 0; in_mask = '0; in_insn = '0; iss_max = '0; l0 = 0; l1 = 0; mdone = 0;
    strike = 0; s_entry = '0; s_bit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // drive inputs at negedge
      in_valid = ($urandom_range(0, 2) != 0);
      in_mask  = W'($urandom);
      for (int i = 0; i < W; i++) begin
        in_insn[i].insn = insn_t'({$urandom, $urandom, $urandom});
        in_insn[i].insn.op = opclass_e'($urandom_range(0, 8));
        in_insn[i].pi = ($urandom_range(0, 15) == 0);
        in_insn[i].anti_pi = ($urandom_range(0, 1) == 0);
      end
      iss_max = ($urandom_range(0, 3) == 0) ? '0 : ($clog2(W+1))'($urandom_range(0, W));
      l1 = (cyc % 97 == 50);
      l0 = (cyc % 41 == 7);
      mdone = m_hold && ($urandom_range(0, 9) == 0);
      strike = ($urandom_range(0, 4) == 0);
      s_entry = ($clog2(DEPTH))'($urandom);
      s_bit = ($clog2(EW))'($urandom_range(0, EW-1));
      #1;
      // check combinational outputs against the model
      check(count == ($clog2(DEPTH+1))'(m_count), "occupancy");
      check(squash == l1, "only the L1 miss triggers a squash");
      check(in_ready == (!m_hold && !l1 && (DEPTH - m_count >= W)), "enqueue ready rule");
      if (l1) begin
        check(rf_valid == (m_count != 0), "refetch requested when something was squashed");
        if (m_count != 0) begin
          ins = insn_t'(m_mem[m_head][EW-1 -: INSN_W]);
          check(rf_pc == ins.pl.pc, "refetch address is the oldest squashed instruction");
        end
        check(iss_valid == '0, "no issue in the squash cycle");
      end else begin
        nmax = (int'(iss_max) < m_count) ? int'(iss_max) : m_count;
        for (int i = 0; i < W; i++) begin
          check(iss_valid[i] == (i < nmax), "issue count");
          if (i < nmax) begin
            e   = m_mem[(m_head + i) % DEPTH];
            ins = insn_t'(e[EW-1 -: INSN_W]);
            eop = (^ins.op) != e[3];
            epl = (^ins.pl) != e[2];
            epi = e[1] | eop | (epl & ~e[0]);
            check(iss_insn[i].insn == ins, "issued instruction in order");
            check(iss_insn[i].anti_pi == e[0], "anti-pi carried");
            check(iss_insn[i].pi == epi, "pi rule on parity error");
            check(iss_perr[i] == (eop | epl), "parity error flag");
            if (epi && !e[1]) n_pi_set++;
            if (epl && !eop && e[0]) n_anti_masked++;
            n_issued++;
          end
        end
      end
      // advance the model at the clock edge
      @(posedge clk);
      if (strike) m_mem[s_entry][s_bit] = ~m_mem[s_entry][s_bit];
      if (l1) begin
        n_squash++;
        m_head = (m_head + m_count) % DEPTH;
        m_count = 0;
        m_hold = !mdone;
      end else begin
        if (mdone) m_hold = 0;
        nmax = (int'(iss_max) < m_count) ? int'(iss_max) : m_count;
        m_head = (m_head + nmax) % DEPTH;
        m_count -= nmax;
        if (in_valid && in_ready) begin
          k = (m_head + m_count) % DEPTH;
          npush = 0;
          for (int i = 0; i < W; i++)
            if (in_mask[i]) begin
              m_mem[(k + npush) % DEPTH] = pack(in_insn[i]);
              npush++;
            end
          m_count += npush;
        end
      end
      @(negedge clk);
    end
    check(n_squash > 0 && n_pi_set > 0 && n_anti_masked > 0, "squash, pi setting and anti-pi masking all exercised");
    $display("issued=%0d squashes=%0d pi_set=%0d anti_masked=%0d", n_issued, n_squash, n_pi_set, n_anti_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
