// pi_store_buffer -- post-commit store buffer that carries a pi bit per store.
//
// Committed stores wait here until the data cache accepts them. Each entry
// keeps the store's pi bit, which is the OR of the store instruction's own
// pi bit and the pi bits of the registers it read. In the store-commit
// tracking mode this is the place where a pi bit finally becomes a machine
// check: when a store with pi set drains to the cache (its value leaves the
// pi-tracked part of the chip), or when a committing load finds its data in
// a store whose pi bit is set. This follows the document. The depth (16),
// the in-order drain of one store per cycle and the 8-byte match granularity
// are this design's choices.
//
// Interface: up to W stores pushed per cycle (mask) when push_ready_o; W
// load lookups answered combinationally (youngest matching store wins);
// drain handshake drain_valid_o / dcache_ready_i. err_o is a one-cycle pulse
// with the store's address when a store with pi set drains; a load hit on a
// pi-marked store is reported through ld_hit_o/ld_pi_o and raised by the
// retire unit, which knows the load.
module pi_store_buffer
  import serr_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  // committed stores
  input  logic [W-1:0]        push_i,
  output logic                push_ready_o,
  input  logic [ADDR_W-1:0]   push_addr_i [W],
  input  logic [DATA_W-1:0]   push_data_i [W],
  input  logic [PC_W-1:0]     push_pc_i   [W],
  input  logic [W-1:0]        push_pi_i,
  // committing loads
  input  logic [W-1:0]        ld_valid_i,
  input  logic [ADDR_W-1:0]   ld_addr_i   [W],
  output logic [W-1:0]        ld_hit_o,
  output logic [W-1:0]        ld_pi_o,
  // data cache
  output logic                drain_valid_o,
  input  logic                dcache_ready_i,
  output logic [ADDR_W-1:0]   drain_addr_o,
  output logic [DATA_W-1:0]   drain_data_o,
  // error report
  output logic                err_o,
  output logic [PC_W-1:0]     err_pc_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
    logic [PC_W-1:0]   pc;
    logic              pi;
  } sb_entry_t;

  sb_entry_t     mem [DEPTH];
  logic [PW-1:0] head, tail;
  logic [CW-1:0] count, n_push;
  logic          do_drain;
  logic [PW-1:0] push_idx [W];

  function automatic logic [PW-1:0] wrap(input logic [CW:0] v);
    return PW'(v % (CW+1)'(DEPTH));
  endfunction

  assign push_ready_o  = (count + CW'(W) <= CW'(DEPTH));
  assign drain_valid_o = (count != '0);
  assign drain_addr_o  = mem[head].addr;
  assign drain_data_o  = mem[head].data;
  assign do_drain      = drain_valid_o && dcache_ready_i;

  always_comb begin
    logic [CW-1:0] off;
    off = '0;
    for (int i = 0; i < W; i++) begin
      push_idx[i] = wrap((CW+1)'(tail) + (CW+1)'(off));
      off = off + CW'(push_i[i]);
    end
    n_push = push_ready_o ? off : '0;
  end

  // load lookup, oldest to youngest so the youngest match is kept
  always_comb begin
    for (int l = 0; l < W; l++) begin
      ld_hit_o[l] = 1'b0;
      ld_pi_o[l]  = 1'b0;
      for (int k = 0; k < DEPTH; k++) begin
        sb_entry_t e;
        e = mem[wrap((CW+1)'(head) + (CW+1)'(k))];
        if (ld_valid_i[l] && CW'(k) < count &&
            e.addr[ADDR_W-1:3] == ld_addr_i[l][ADDR_W-1:3]) begin
          ld_hit_o[l] = 1'b1;
          ld_pi_o[l]  = e.pi;
        end
      end
    end
  end

  // a store with pi set leaving for the cache is the signalling point
  assign err_o    = do_drain && mem[head].pi;
  assign err_pc_o = mem[head].pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      head  <= do_drain ? wrap((CW+1)'(head) + 1) : head;
      tail  <= wrap((CW+1)'(tail) + (CW+1)'(n_push));
      count <= count + n_push - CW'(do_drain);
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < W; i++) begin
      if (push_ready_o && push_i[i])
        mem[push_idx[i]] <= '{addr: push_addr_i[i], data: push_data_i[i],
                              pc: push_pc_i[i], pi: push_pi_i[i]};
    end
  end

  assign count_o = count;

endmodule
