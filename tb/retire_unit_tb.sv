// retire_unit_tb -- self-checking test of the retire unit in all four
// tracking modes.
//
// Four retire units (commit, PET, register-file and store-commit modes) see
// the same random retire groups: packed valid lanes, a mix of ALU, load,
// store, branch, no-op and I/O instructions, random wrong-path and
// false-predicate flags and occasional pi bits. The pi register file is
// modelled in the testbench (one bit per register, lanes in order), the
// store-buffer lookup answers and the ready signals are random. For each
// mode the expected lane errors, reported cause and address, store-buffer
// pushes with their pi bit, PET pushes and the commit and ignored-pi counts
// are recomputed independently and compared.
module retire_unit_tb;
  import serr_pkg::*;
  localparam int unsigned W = 6;
  localparam int unsigned NR = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [W-1:0] valid, ld_hit, ld_pi;
  logic sb_ready, pet_ready;
  done_insn_t [W-1:0] ins;

  int checks = 0, failures = 0;
  int n_err_cause [8];
  int n_ignored = 0;
  bit stim_done = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  for (genvar g = 0; g < 4; g++) begin : g_mode
    localparam pi_mode_e M = pi_mode_e'(g);
    logic rf_prop, ready, err;
    logic [W-1:0] rf_valid, rf_s1v, rf_s2v, rf_dv, rf_pi, rf_src_pi, rf_wr_pi;
    logic [REG_W-1:0] rf_s1 [W];
    logic [REG_W-1:0] rf_s2 [W];
    logic [REG_W-1:0] rf_d [W];
    logic [W-1:0] sb_push, sb_pi, sb_ldv, pet_push, pet_pi;
    logic [ADDR_W-1:0] sb_addr [W];
    logic [ADDR_W-1:0] sb_ldaddr [W];
    logic [DATA_W-1:0] sb_data [W];
    logic [PC_W-1:0] sb_pc [W];
    err_cause_e cause;
    logic [PC_W-1:0] epc;
    logic [$clog2(W+1)-1:0] ncommit, nign;
    logic [NR-1:0] m;       // model of the pi register file (registers 0..NR-1)

    retire_unit #(.MODE(M), .W(W)) dut (
      .clk, .rst_n, .in_valid_i(valid), .in_ready_o(ready), .in_insn_i(ins),
      .rf_propagate_o(rf_prop), .rf_valid_o(rf_valid), .rf_src1_v_o(rf_s1v), .rf_src1_o(rf_s1),
      .rf_src2_v_o(rf_s2v), .rf_src2_o(rf_s2), .rf_dst_v_o(rf_dv), .rf_dst_o(rf_d),
      .rf_pi_o(rf_pi), .rf_src_pi_i(rf_src_pi), .rf_wr_pi_i(rf_wr_pi),
      .sb_push_o(sb_push), .sb_ready_i(sb_ready), .sb_addr_o(sb_addr), .sb_data_o(sb_data),
      .sb_pc_o(sb_pc), .sb_pi_o(sb_pi), .sb_ld_valid_o(sb_ldv), .sb_ld_addr_o(sb_ldaddr),
      .sb_ld_hit_i(ld_hit), .sb_ld_pi_i(ld_pi), .pet_push_o(pet_push), .pet_ready_i(pet_ready),
      .pet_pi_o(pet_pi), .err_o(err), .err_cause_o(cause), .err_pc_o(epc),
      .n_commit_o(ncommit), .n_pi_ignored_o(nign));

    // register-file stand-in: answers the retire unit from the model array
    always_comb begin
      logic [NR-1:0] t;
      t = m;
      for (int i = 0; i < W; i++) begin
        rf_src_pi[i] = rf_valid[i] && ((rf_s1v[i] && t[rf_s1[i][2:0]]) || (rf_s2v[i] && t[rf_s2[i][2:0]]));
        rf_wr_pi[i]  = rf_valid[i] && (rf_pi[i] || (rf_prop && rf_src_pi[i]));
        if (rf_valid[i] && rf_dv[i]) t[rf_d[i][2:0]] = rf_wr_pi[i];
      end
    end

    initial begin
      logic [NR-1:0] mm;
      logic e_ready, any, fh, fp, le;
      logic [W-1:0] c, ew, es;
      err_cause_e lc, ecause;
      logic [PC_W-1:0] e_pc;
      logic eerr;
      int nc, ni;
      insn_t x;
      m = '0;
      @(posedge rst_n);
      while (!stim_done) begin
        @(negedge clk); #2;
        mm = m;
        e_ready = sb_ready && (M != PI_PET || pet_ready);
        any = (valid != '0);
        check(ready == e_ready, "ready rule");
        eerr = 0; ecause = ERR_NONE; e_pc = '0; nc = 0; ni = 0;
        for (int i = 0; i < W; i++) begin
          x = ins[i].ti.insn;
          c[i] = e_ready && any && valid[i] && !ins[i].wrong_path && !ins[i].pred_false;
          es[i] = 0; ew[i] = 0;
          if (c[i] && (M == PI_REGFILE || M == PI_STORE_COMMIT)) begin
            es[i] = (x.pl.src1_v && mm[x.pl.src1[2:0]]) || (x.pl.src2_v && mm[x.pl.src2[2:0]]);
            ew[i] = ins[i].ti.pi || (M == PI_STORE_COMMIT && es[i]);
            if (x.pl.dst_v) mm[x.pl.dst[2:0]] = ew[i];
          end
          le = 0; lc = ERR_NONE;
          if (c[i]) begin
            case (M)
              PI_TILL_COMMIT: if (ins[i].ti.pi) begin le = 1; lc = ERR_COMMIT; end
              PI_REGFILE:
                if (es[i]) begin le = 1; lc = ERR_REG_READ; end
                else if (ins[i].ti.pi && !x.pl.dst_v) begin le = 1; lc = ERR_OUT_OF_SCOPE; end
              PI_STORE_COMMIT: begin
                fh = ld_hit[i]; fp = ld_pi[i];
                for (int j = 0; j < i; j++)
                  if (c[j] && ins[j].ti.insn.op == OP_STORE && ins[j].addr[ADDR_W-1:3] == ins[i].addr[ADDR_W-1:3]) begin
                    fh = 1; fp = ew[j];
                  end
                if (x.op == OP_LOAD && fh && fp) begin le = 1; lc = ERR_LOAD_FWD; end
                else if (x.op != OP_STORE && ew[i] && (x.op inside {OP_IO_LOAD, OP_IO_STORE} || !x.pl.dst_v)) begin
                  le = 1; lc = ERR_OUT_OF_SCOPE;
                end
              end
              default: ;
            endcase
          end
          if (le && !eerr) begin eerr = 1; ecause = lc; e_pc = x.pl.pc; end
          if (c[i]) nc++;
          if (e_ready && any && valid[i] && !c[i] && ins[i].ti.pi) ni++;
          check(sb_push[i] == (c[i] && M == PI_STORE_COMMIT && x.op == OP_STORE), "store-buffer push");
          if (sb_push[i]) check(sb_pi[i] == ew[i], "store carries its pi and its sources' pi");
          check(sb_ldv[i] == (c[i] && M == PI_STORE_COMMIT && x.op == OP_LOAD), "load lookup request");
          check(pet_push[i] == (c[i] && M == PI_PET), "PET push");
          if (pet_push[i]) check(pet_pi[i] == ins[i].ti.pi, "PET pi");
        end
        check(err == eerr, "error raised");
        if (eerr) begin
          check(cause == ecause && epc == e_pc, "oldest lane's cause and address");
          n_err_cause[int'(ecause)]++;
        end
        check(int'(ncommit) == nc, "commit count");
        check(int'(nign) == ni, "ignored pi count");
        n_ignored += ni;
        @(posedge clk);
        m = mm;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opclass_e ops [7] = '{OP_ALU, OP_ALU, OP_LOAD, OP_STORE, OP_BRANCH, OP_NOP, OP_IO_STORE};
    valid = '0; ins = '0; ld_hit = '0; ld_pi = '0; sb_ready = 1; pet_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      valid = W'((1 << $urandom_range(0, W)) - 1);
      ld_hit = W'($urandom); ld_pi = W'($urandom);
      sb_ready = ($urandom_range(0, 7) != 0);
      pet_ready = ($urandom_range(0, 7) != 0);
      for (int i = 0; i < W; i++) begin
        ins[i] = '0;
        ins[i].ti.insn.op = ops[$urandom_range(0, 6)];
        ins[i].ti.insn.pl.pc = PC_W'(t * 64 + i * 4);
        ins[i].ti.insn.pl.dst_v = ins[i].ti.insn.op inside {OP_ALU, OP_LOAD} && ($urandom_range(0, 7) != 0);
        ins[i].ti.insn.pl.dst = REG_W'($urandom_range(0, NR-1));
        ins[i].ti.insn.pl.src1_v = $urandom_range(0, 1);
        ins[i].ti.insn.pl.src1 = REG_W'($urandom_range(0, NR-1));
        ins[i].ti.insn.pl.src2_v = $urandom_range(0, 1);
        ins[i].ti.insn.pl.src2 = REG_W'($urandom_range(0, NR-1));
        ins[i].ti.pi = ($urandom_range(0, 9) == 0);
        ins[i].wrong_path = ($urandom_range(0, 7) == 0);
        ins[i].pred_false = ($urandom_range(0, 9) == 0);
        ins[i].addr = ADDR_W'($urandom_range(0, 7) * 8);
        ins[i].data = {$urandom, $urandom};
      end
    end
    @(negedge clk);
    stim_done = 1;
    @(posedge clk); @(posedge clk);
    check(n_err_cause[int'(ERR_COMMIT)] > 0 && n_err_cause[int'(ERR_REG_READ)] > 0 &&
          n_err_cause[int'(ERR_OUT_OF_SCOPE)] > 0 && n_err_cause[int'(ERR_LOAD_FWD)] > 0,
          "every retire-unit error cause seen");
    check(n_ignored > 0, "pi of uncommitted instructions ignored");
    $display("causes commit=%0d regread=%0d scope=%0d fwd=%0d ignored=%0d",
             n_err_cause[1], n_err_cause[2], n_err_cause[3], n_err_cause[6], n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
