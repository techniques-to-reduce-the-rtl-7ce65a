// pi_store_buffer_tb -- self-checking test of the pi-carrying store buffer.
//
// Random committed stores (some with pi set) to a small set of addresses,
// random cache back-pressure, and random load lookups. A queue model gives
// the expected drain order and contents, the error pulse (exactly when a
// store with pi set is accepted by the cache, naming that store) and the
// youngest-match lookup result for each load.
module pi_store_buffer_tb;
  import serr_pkg::*;
  localparam int unsigned DEPTH = 16, W = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [W-1:0] push, ppi, ldv, ldhit, ldpi;
  logic ready, dvalid, dready, err;
  logic [ADDR_W-1:0] paddr [W];
  logic [ADDR_W-1:0] laddr [W];
  logic [DATA_W-1:0] pdata [W];
  logic [PC_W-1:0] ppc [W];
  logic [ADDR_W-1:0] daddr;
  logic [DATA_W-1:0] ddata;
  logic [PC_W-1:0] epc;
  logic [$clog2(DEPTH+1)-1:0] count;

  pi_store_buffer #(.DEPTH(DEPTH), .W(W)) dut (
    .clk, .rst_n, .push_i(push), .push_ready_o(ready), .push_addr_i(paddr),
    .push_data_i(pdata), .push_pc_i(ppc), .push_pi_i(ppi), .ld_valid_i(ldv),
    .ld_addr_i(laddr), .ld_hit_o(ldhit), .ld_pi_o(ldpi), .drain_valid_o(dvalid),
    .dcache_ready_i(dready), .drain_addr_o(daddr), .drain_data_o(ddata),
    .err_o(err), .err_pc_o(epc), .count_o(count));

  int checks = 0, failures = 0, n_err = 0, n_fwd_pi = 0, n_drain = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  typedef struct packed {
    logic [ADDR_W-1:0] a; logic [DATA_W-1:0] d; logic [PC_W-1:0] pc; logic pi;
  } st_t;
  st_t mq [$];

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eh, ep, was_ready;
    int pcn;
    push = '0; ppi = '0; ldv = '0; dready = 0;
    for (int i = 0; i < W; i++) begin paddr[i] = '0; laddr[i] = '0; pdata[i] = '0; ppc[i] = '0; end
    pcn = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 8000; cyc++) begin
      push = ($urandom_range(0, 2) == 0) ? W'($urandom) & W'($urandom) : '0;
      ldv = W'($urandom);
      dready = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < W; i++) begin
        paddr[i] = ADDR_W'($urandom_range(0, 15) * 8 + $urandom_range(0, 7));
        laddr[i] = ADDR_W'($urandom_range(0, 15) * 8 + $urandom_range(0, 7));
        pdata[i] = {$urandom, $urandom};
        ppc[i] = PC_W'(pcn + 4*i);
        ppi[i] = ($urandom_range(0, 7) == 0);
      end
      pcn += 4*W;
      #1;
      was_ready = ready;
      check(int'(count) == mq.size(), "occupancy");
      check(ready == (mq.size() + W <= DEPTH), "push ready rule");
      check(dvalid == (mq.size() != 0), "drain valid");
      if (mq.size() != 0) begin
        check(daddr == mq[0].a && ddata == mq[0].d, "drain in order with data");
        check(err == (dready && mq[0].pi), "error exactly when a marked store drains");
        if (err) check(epc == mq[0].pc, "error names the store");
      end else begin
        check(!err, "no error when empty");
      end
      for (int l = 0; l < W; l++) begin
        eh = 0; ep = 0;
        if (ldv[l])
          foreach (mq[k])
            if (mq[k].a[ADDR_W-1:3] == laddr[l][ADDR_W-1:3]) begin eh = 1; ep = mq[k].pi; end
        check(ldhit[l] == eh && ldpi[l] == ep, "load lookup, youngest match");
        if (eh && ep) n_fwd_pi++;
      end
      if (err) n_err++;
      @(posedge clk);
      if (dready && mq.size() != 0) begin void'(mq.pop_front()); n_drain++; end
      if (was_ready)
        for (int i = 0; i < W; i++)
          if (push[i]) mq.push_back('{paddr[i], pdata[i], ppc[i], ppi[i]});
      @(negedge clk);
    end
    check(n_err > 0 && n_fwd_pi > 0, "drain error and marked forwarding exercised");
    $display("drains=%0d errors=%0d marked_forwards=%0d", n_drain, n_err, n_fwd_pi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
