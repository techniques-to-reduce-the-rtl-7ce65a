// pet_buffer_tb -- self-checking test of the post-commit error tracking buffer.
//
// Pushes random retire groups whose registers come from a small set, so that
// overwrites and reads of the same register are common, with an occasional
// pi bit. A queue model mirrors the buffer's contents. Every time the buffer
// announces a decision, the model recomputes it from the entries present:
// error if the oldest instruction has no destination, if a younger one reads
// the destination before any overwrite, or if no overwrite is in the buffer;
// a false (suppressed) error if an overwrite comes first. Silent evictions
// must only remove clean entries and only when room is needed. The test is
// run with a 32-entry buffer to reach many evictions quickly.
module pet_buffer_tb;
  import serr_pkg::*;
  localparam int unsigned DEPTH = 32, W = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [W-1:0] push, dv, s1v, s2v, pi;
  logic ready, err, ferr, scanning;
  logic [PC_W-1:0] pc [W];
  logic [REG_W-1:0] d [W];
  logic [REG_W-1:0] s1 [W];
  logic [REG_W-1:0] s2 [W];
  logic [PC_W-1:0] err_pc;
  logic [$clog2(DEPTH+1)-1:0] count;

  pet_buffer #(.DEPTH(DEPTH), .W(W)) dut (
    .clk, .rst_n, .push_i(push), .push_ready_o(ready), .pc_i(pc), .dst_v_i(dv), .dst_i(d),
    .src1_v_i(s1v), .src1_i(s1), .src2_v_i(s2v), .src2_i(s2), .pi_i(pi),
    .err_o(err), .err_pc_o(err_pc), .false_err_o(ferr), .scanning_o(scanning), .count_o(count));

  int checks = 0, failures = 0, n_true = 0, n_false = 0, n_nodst = 0, scan_cycles = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  typedef struct packed {
    logic [PC_W-1:0] pc; logic dv; logic [REG_W-1:0] d;
    logic s1v; logic [REG_W-1:0] s1; logic s2v; logic [REG_W-1:0] s2; logic pi;
  } ent_t;
  ent_t mq [$];

  // expected decision for the oldest entry: 1 = signal error, 0 = false error
  function automatic logic expect_err();
    ent_t h;
    h = mq[0];
    if (!h.dv) return 1'b1;
    for (int j = 1; j < mq.size(); j++) begin
      if ((mq[j].s1v && mq[j].s1 == h.d) || (mq[j].s2v && mq[j].s2 == h.d)) return 1'b1;
      if (mq[j].dv && mq[j].d == h.d) return 1'b0;
    end
    return 1'b1;
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pcn, old_count, npushed, nev;
    logic was_err, was_ferr, exp_e, was_ready;
    logic [PC_W-1:0] was_pc;
    ent_t e;
    push = '0; dv = '0; s1v = '0; s2v = '0; pi = '0;
    for (int i = 0; i < W; i++) begin pc[i] = '0; d[i] = '0; s1[i] = '0; s2[i] = '0; end
    pcn = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // contiguous group of 0..W instructions
      push = W'((1 << $urandom_range(0, W)) - 1);
      for (int i = 0; i < W; i++) begin
        pc[i] = PC_W'(pcn + 4*i);
        dv[i] = ($urandom_range(0, 4) != 0);
        d[i] = REG_W'($urandom_range(0, 11));
        s1v[i] = ($urandom_range(0, 1) != 0); s1[i] = REG_W'($urandom_range(0, 11));
        s2v[i] = ($urandom_range(0, 3) == 0); s2[i] = REG_W'($urandom_range(0, 11));
        pi[i] = ($urandom_range(0, 60) == 0);
      end
      #1;
      was_err = err; was_ferr = ferr; was_pc = err_pc; was_ready = ready;
      old_count = int'(count);
      check(old_count == mq.size(), "occupancy matches model");
      if (scanning) scan_cycles++;
      check(!(err && ferr), "one decision at a time");
      if (was_err || was_ferr) begin
        check(mq.size() > 0 && mq[0].pi, "decision only for an entry with pi set");
        exp_e = expect_err();
        check(was_err == exp_e, "error versus proven-dead decision");
        check(!was_err || was_pc == mq[0].pc, "error names the exact instruction");
        if (was_err && !mq[0].dv) n_nodst++;
        else if (was_err) n_true++;
        else n_false++;
      end
      npushed = 0;
      @(posedge clk);
      if (was_ready)
        for (int i = 0; i < W; i++)
          if (push[i]) npushed++;
      #1;
      nev = old_count + npushed - int'(count);
      if (was_err || was_ferr) begin
        check(nev == 1, "decided entry leaves alone");
        void'(mq.pop_front());
      end else if (nev > 0) begin
        check(old_count - nev >= int'(DEPTH - W), "silent eviction only to make room");
        for (int k = 0; k < nev; k++) begin
          e = mq.pop_front();
          check(!e.pi, "silent eviction only of clean entries");
        end
      end
      if (was_ready)
        for (int i = 0; i < W; i++)
          if (push[i]) mq.push_back('{pc[i], dv[i], d[i], s1v[i], s1[i], s2v[i], s2[i], pi[i]});
      pcn += 4*W;
      @(negedge clk);
    end
    check(n_true > 0 && n_false > 0 && n_nodst > 0, "all three decision kinds exercised");
    $display("true=%0d false=%0d nodst=%0d scan_cycles=%0d", n_true, n_false, n_nodst, scan_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
