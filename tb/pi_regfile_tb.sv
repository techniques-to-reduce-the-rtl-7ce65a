// pi_regfile_tb -- self-checking test of the per-register pi bits.
//
// Random groups of up to six committing instructions with random sources,
// destinations and pi bits, with and without propagation. A bit-array model
// processed lane by lane gives the expected source pi, written pi and array
// contents. Also checks the two directed cases the mechanism exists for: a
// dead result (overwritten before read) leaves no trace, and a read of a
// marked register is seen.
module pi_regfile_tb;
  import serr_pkg::*;
  localparam int unsigned N = 128, W = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic prop;
  logic [W-1:0] valid, s1v, s2v, dv, pi, src_pi, wr_pi;
  logic [REG_W-1:0] s1 [W];
  logic [REG_W-1:0] s2 [W];
  logic [REG_W-1:0] d  [W];
  logic [N-1:0] q;

  pi_regfile #(.NUM_REGS(N), .W(W)) dut (
    .clk, .rst_n, .propagate_i(prop), .valid_i(valid), .src1_v_i(s1v), .src1_i(s1),
    .src2_v_i(s2v), .src2_i(s2), .dst_v_i(dv), .dst_i(d), .pi_i(pi),
    .src_pi_o(src_pi), .wr_pi_o(wr_pi), .pi_q_o(q));

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [N-1:0] m;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    valid = '0; s1v = '0; s2v = '0; dv = '0; pi = '0;
    for (int i = 0; i < W; i++) begin s1[i] = '0; s2[i] = '0; d[i] = '0; end
  endtask

  initial begin
    logic es, ew;
    prop = 0; idle();
    m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(q == '0, "reset clears all pi bits");
    // directed: r5 <- pi set ; r5 <- clean (overwritten before read) ; read r5
    idle(); valid = 6'b000011; dv = 6'b000011; d[0] = 5; d[1] = 5; pi[0] = 1; #1;
    check(wr_pi == 6'b000001, "marked then clean write");
    @(negedge clk);
    check(q[5] == 0, "dead marked result leaves no pi bit");
    idle(); valid = 6'b000001; dv = 6'b000001; d[0] = 9; pi[0] = 1;
    @(negedge clk);
    idle(); valid = 6'b000001; s2v = 6'b000001; s2[0] = 9; #1;
    check(src_pi[0], "read of marked register seen");
    @(negedge clk);
    m = q;
    for (int t = 0; t < 3000; t++) begin
      prop = t[0];
      valid = W'($urandom); s1v = W'($urandom); s2v = W'($urandom); dv = W'($urandom);
      pi = W'($urandom) & W'($urandom) & W'($urandom);
      for (int i = 0; i < W; i++) begin
        s1[i] = REG_W'($urandom_range(0, 15)); s2[i] = REG_W'($urandom_range(0, 15));
        d[i] = REG_W'($urandom_range(0, 15));
      end
      #1;
      for (int i = 0; i < W; i++) begin
        es = valid[i] && ((s1v[i] && m[s1[i]]) || (s2v[i] && m[s2[i]]));
        ew = valid[i] && (pi[i] || (prop && es));
        check(src_pi[i] == es, "source pi, in lane order");
        check(wr_pi[i] == ew, "written pi");
        if (valid[i] && dv[i]) m[d[i]] = ew;
      end
      @(negedge clk);
      check(q == m, "array contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
