// pet_buffer -- Post-commit Error Tracking buffer.
//
// A FIFO log of retired correct-path instructions, each with its pi bit.
// When room is needed the oldest entries are evicted. An entry whose pi bit
// is clear simply leaves. For an entry whose pi bit is set, the buffer scans
// the younger entries, oldest first: if one of them writes the same
// destination register before any of them reads it, the evicted instruction
// was first-level dynamically dead and its error was false, so nothing is
// signalled. If a read comes first, if no overwrite is found, or if the
// instruction has no register destination, the error is signalled together
// with the instruction's address, so the offending instruction is known
// exactly. This is the document's mechanism and its 512-entry size.
//
// This design's choices: eviction starts when fewer than W entries are free
// (so the buffer holds at least DEPTH-W instructions once filled, and a full
// retire group can always be accepted in the same cycle as an eviction);
// clean entries leave up to W per cycle; the scan reads one entry per cycle
// and stalls further pushes until it ends, which is acceptable because
// errors are rare.
//
// Interface: push up to W instructions (any mask) when push_ready_o.
// err_o / false_err_o pulse for one cycle when an eviction decision is made.
module pet_buffer
  import serr_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned W     = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [W-1:0]         push_i,
  output logic                 push_ready_o,
  input  logic [PC_W-1:0]      pc_i     [W],
  input  logic [W-1:0]         dst_v_i,
  input  logic [REG_W-1:0]     dst_i    [W],
  input  logic [W-1:0]         src1_v_i,
  input  logic [REG_W-1:0]     src1_i   [W],
  input  logic [W-1:0]         src2_v_i,
  input  logic [REG_W-1:0]     src2_i   [W],
  input  logic [W-1:0]         pi_i,
  output logic                 err_o,        // true error: signal machine check
  output logic [PC_W-1:0]      err_pc_o,
  output logic                 false_err_o,  // pi set but proven dead
  output logic                 scanning_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  typedef struct packed {
    logic [PC_W-1:0]  pc;
    logic             dst_v;
    logic [REG_W-1:0] dst;
    logic             src1_v;
    logic [REG_W-1:0] src1;
    logic             src2_v;
    logic [REG_W-1:0] src2;
    logic             pi;
  } pet_entry_t;

  typedef enum logic [0:0] {S_IDLE, S_SCAN} state_e;

  pet_entry_t    mem [DEPTH];
  logic [PW-1:0] head, tail, scan_ptr;
  logic [CW-1:0] count;
  state_e        state;

  logic [CW-1:0] n_evict, n_push, need;
  logic          start_scan, scan_done;
  logic          scan_read, scan_write, scan_end;
  pet_entry_t    hd, sc;
  logic [PW-1:0] push_idx [W];

  function automatic logic [PW-1:0] wrap(input logic [CW:0] v);
    return PW'(v % (CW+1)'(DEPTH));
  endfunction

  assign hd = mem[head];
  assign sc = mem[scan_ptr];

  // scan step: does the entry at scan_ptr read or write the evicted register?
  assign scan_read  = (sc.src1_v && sc.src1 == hd.dst) || (sc.src2_v && sc.src2 == hd.dst);
  assign scan_write = sc.dst_v && sc.dst == hd.dst;
  assign scan_end   = (scan_ptr == tail);

  // how many entries must leave so that W are free
  assign need = (count + CW'(W) > CW'(DEPTH)) ? count + CW'(W) - CW'(DEPTH) : '0;

  always_comb begin
    logic stop;
    stop          = 1'b0;
    n_evict       = '0;
    start_scan    = 1'b0;
    scan_done     = 1'b0;
    err_o         = 1'b0;
    false_err_o   = 1'b0;
    err_pc_o      = hd.pc;
    if (state == S_IDLE) begin
      if (need != '0) begin
        if (hd.pi) begin
          if (!hd.dst_v) begin
            err_o   = 1'b1;             // nothing to prove: signal at once
            n_evict = CW'(1);
          end else begin
            start_scan = 1'b1;
          end
        end else begin
          // evict leading clean entries, as many as needed, at most W
          for (int i = 0; i < W; i++) begin
            if (!stop && CW'(i) < need && !mem[wrap((CW+1)'(head) + (CW+1)'(i))].pi)
              n_evict = n_evict + CW'(1);
            else
              stop = 1'b1;
          end
        end
      end
    end else begin
      if (scan_end) begin
        err_o     = 1'b1;               // no overwrite found in the buffer
        scan_done = 1'b1;
      end else if (scan_read) begin
        err_o     = 1'b1;               // intervening read: result was used
        scan_done = 1'b1;
      end else if (scan_write) begin
        false_err_o = 1'b1;             // overwritten before read: FDD
        scan_done   = 1'b1;
      end
      if (scan_done) n_evict = CW'(1);
    end
  end

  assign push_ready_o = (state == S_IDLE) && !start_scan &&
                        (count - n_evict + CW'(W) <= CW'(DEPTH));

  always_comb begin
    logic [CW-1:0] off;
    off = '0;
    for (int i = 0; i < W; i++) begin
      push_idx[i] = wrap((CW+1)'(tail) + (CW+1)'(off));
      off = off + CW'(push_i[i]);
    end
    n_push = push_ready_o ? off : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head     <= '0;
      tail     <= '0;
      count    <= '0;
      scan_ptr <= '0;
      state    <= S_IDLE;
    end else begin
      head  <= wrap((CW+1)'(head) + (CW+1)'(n_evict));
      tail  <= wrap((CW+1)'(tail) + (CW+1)'(n_push));
      count <= count + n_push - n_evict;
      if (start_scan) begin
        state    <= S_SCAN;
        scan_ptr <= wrap((CW+1)'(head) + 1);
      end else if (state == S_SCAN) begin
        if (scan_done) state <= S_IDLE;
        else           scan_ptr <= wrap((CW+1)'(scan_ptr) + 1);
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < W; i++) begin
      if (push_ready_o && push_i[i]) begin
        mem[push_idx[i]] <= '{pc: pc_i[i], dst_v: dst_v_i[i], dst: dst_i[i],
                              src1_v: src1_v_i[i], src1: src1_i[i],
                              src2_v: src2_v_i[i], src2: src2_i[i], pi: pi_i[i]};
      end
    end
  end

  assign scanning_o = (state == S_SCAN);
  assign count_o    = count;

  // a decision is only ever made about a live entry
  assert property (@(posedge clk) disable iff (!rst_n) (err_o || false_err_o) |-> count != '0);

endmodule
