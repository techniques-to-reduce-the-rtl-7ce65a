// serr_core_squash_tb -- the three squash configurations side by side: no
// squash, squash on L1 misses (the default) and squash on L0 misses.
//
// One environment per configuration (serr_core_squash_env) runs the same
// 6000-instruction program with the same fetch and issue timing. Each
// environment checks the core's behaviour on its own. This testbench then
// compares the configurations the way the exposure technique is judged:
//
//   exposure  = average number of valid instructions in the queue per cycle
//               divided by the 64 entries (an upper bound on the queue's
//               vulnerability, which counts only the bits that matter)
//   IPC       = committed instructions per cycle
//   IPC/exposure, proportional to mean instructions to failure at a fixed
//               raw error rate.
//
// Expected, and checked: squashing lowers exposure, and L0 squashing lowers
// it at least as much as L1 squashing; squashing never raises IPC, and L0
// squashing costs at least as much IPC as L1 squashing; L1 squashing raises
// IPC/exposure, so it is worth its cost; with squashing, no
// instruction sits in the queue while a squashing miss is outstanding, so
// the exposure during misses falls. The absolute numbers depend on the
// synthetic program and are printed, not checked.
module serr_core_squash_tb;
  localparam int unsigned N = 6000;

  bit     d[3];
  int     c[3], f[3], cyc[3], nsq[3];
  longint occ[3], occm[3];

  serr_core_squash_env #(.SQUASH_ON(0), .N(N)) e_none (
    .done(d[0]), .checks(c[0]), .failures(f[0]), .cycles(cyc[0]),
    .occ_sum(occ[0]), .occ_miss_sum(occm[0]), .n_squash(nsq[0]));
  serr_core_squash_env #(.SQUASH_ON(1), .N(N)) e_l1 (
    .done(d[1]), .checks(c[1]), .failures(f[1]), .cycles(cyc[1]),
    .occ_sum(occ[1]), .occ_miss_sum(occm[1]), .n_squash(nsq[1]));
  serr_core_squash_env #(.SQUASH_ON(2), .N(N)) e_l0 (
    .done(d[2]), .checks(c[2]), .failures(f[2]), .cycles(cyc[2]),
    .occ_sum(occ[2]), .occ_miss_sum(occm[2]), .n_squash(nsq[2]));

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #5000000;
    $display("FAIL: watchdog (done %0b%0b%0b)", d[0], d[1], d[2]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + checks,
             f[0] + f[1] + f[2] + failures + 1);
    $finish;
  end

  initial begin
    real ipc[3], expo[3];
    string name[3];
    name = '{"no squash", "squash on L1 miss", "squash on L0 miss"};
    wait (d[0] && d[1] && d[2]);
    for (int k = 0; k < 3; k++) begin
      ipc[k]  = real'(N) / real'(cyc[k]);
      expo[k] = real'(occ[k]) / (real'(cyc[k]) * 64.0);
      $display("%-18s cycles=%0d IPC=%0.3f exposure=%0.1f%% IPC/exposure=%0.2f squashes=%0d in-miss occupancy=%0d",
               name[k], cyc[k], ipc[k], 100.0 * expo[k], ipc[k] / expo[k], nsq[k], occm[k]);
    end
    check(nsq[0] == 0 && nsq[1] > 0 && nsq[2] > nsq[1], "squash counts follow the triggers");
    check(expo[1] < expo[0], "L1 squashing lowers exposure");
    check(expo[2] <= expo[1], "L0 squashing lowers exposure at least as much as L1");
    check(cyc[1] >= cyc[0], "L1 squashing does not raise IPC");
    check(cyc[2] >= cyc[1], "L0 squashing costs at least as much IPC as L1");
    check(ipc[1] / expo[1] > ipc[0] / expo[0], "L1 squashing raises IPC per unit of exposure");
    check(occm[1] < occm[0] && occm[2] < occm[1], "less exposure while misses are outstanding");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + checks,
             f[0] + f[1] + f[2] + failures);
    $finish;
  end
endmodule
