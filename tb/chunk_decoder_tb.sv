// chunk_decoder_tb -- self-checking test of the decode stage.
//
// Sends random chunks, some with a flipped parity bit and some with the
// incoming pi bit set, and checks that every decoded instruction carries
// pi = incoming pi OR parity mismatch, that anti-pi is set exactly for no-op,
// prefetch and branch-hint classes, that a stalled output holds its chunk,
// that a flush drops it, and that a chunk appears one cycle after it is
// accepted.
module chunk_decoder_tb;
  import serr_pkg::*;
  localparam int unsigned CW = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 flush, in_valid, in_ready, in_parity, in_pi, out_valid, out_ready, perr;
  insn_t [CW-1:0]       in_insn;
  logic  [CW-1:0]       in_mask, out_mask;
  tracked_insn_t [CW-1:0] out_insn;

  chunk_decoder #(.CHUNK_W(CW)) dut (
    .clk, .rst_n, .flush_i(flush),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_insn_i(in_insn), .in_mask_i(in_mask),
    .in_parity_i(in_parity), .in_pi_i(in_pi),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_insn_o(out_insn),
    .out_mask_o(out_mask), .parity_err_o(perr));

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic insn_t rand_insn();
    insn_t r;
    r = insn_t'({$urandom, $urandom, $urandom});
    r.op = opclass_e'($urandom_range(0, 8));
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    insn_t [CW-1:0] sent;
    logic exp_pi, bad;
    logic [CW-1:0] sent_mask;
    flush = 0; in_valid = 0; out_ready = 1; in_parity = 0; in_pi = 0; in_mask = '0; in_insn = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < CW; i++) in_insn[i] = rand_insn();
      in_mask   = CW'($urandom);
      bad       = ($urandom_range(0, 3) == 0);
      in_pi     = ($urandom_range(0, 4) == 0);
      in_parity = (^in_insn) ^ bad;
      in_valid  = 1;
      sent = in_insn; sent_mask = in_mask; exp_pi = in_pi | bad;
      @(negedge clk);
      check(in_ready, "ready while output empty or drained");
      @(posedge clk); #1;
      in_valid = 0;
      check(out_valid, "chunk appears one cycle after acceptance");
      check(out_mask == sent_mask, "mask carried");
      check(perr == bad, "parity error pulse");
      for (int i = 0; i < CW; i++) begin
        check(out_insn[i].insn == sent[i], "instruction carried");
        check(out_insn[i].pi == exp_pi, "chunk pi copied to instruction");
        check(out_insn[i].anti_pi == (sent[i].op inside {OP_NOP, OP_PREFETCH, OP_BRHINT}),
              "anti-pi set for neutral classes only");
      end
      // stall: output must hold and input must be refused
      if (t % 5 == 0) begin
        out_ready = 0;
        in_valid  = 1;
        for (int i = 0; i < CW; i++) in_insn[i] = rand_insn();
        @(negedge clk);
        check(!in_ready, "input refused while output stalled");
        @(posedge clk); #1;
        check(out_valid && out_insn[0].insn == sent[0], "stalled output held");
        in_valid = 0; out_ready = 1;
      end
      // flush drops the held chunk
      if (t % 7 == 0) begin
        out_ready = 0; flush = 1;
        @(posedge clk); #1;
        flush = 0; out_ready = 1;
        check(!out_valid, "flush drops chunk");
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
