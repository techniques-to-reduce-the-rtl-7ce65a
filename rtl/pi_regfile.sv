// pi_regfile -- one pi bit per architectural register.
//
// Instead of raising an error on a committing instruction whose pi bit is
// set, the pi bit is moved to the register the instruction writes. A later
// reader of that register sees the bit (src_pi_o) and can either raise the
// error there or, with propagate_i set, OR it into its own pi bit so that it
// follows the dependence chain and reaches the register that reader writes.
// A register overwritten before anyone reads it loses its pi bit, which is
// how a first-level dynamically dead result escapes a false error. The
// mechanism follows the document; the register count (128) and the
// commit-time, in-order update are this design's choices.
//
// Interface: W lanes, processed in lane order within a cycle: lane i sees
// the writes of lanes 0..i-1 of the same cycle. src_pi_o and wr_pi_o are
// combinational; the array updates on the clock edge.
module pi_regfile
  import serr_pkg::*;
#(
  parameter int unsigned NUM_REGS = 128,
  parameter int unsigned W        = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                propagate_i,
  input  logic [W-1:0]        valid_i,
  input  logic [W-1:0]        src1_v_i,
  input  logic [REG_W-1:0]    src1_i [W],
  input  logic [W-1:0]        src2_v_i,
  input  logic [REG_W-1:0]    src2_i [W],
  input  logic [W-1:0]        dst_v_i,
  input  logic [REG_W-1:0]    dst_i  [W],
  input  logic [W-1:0]        pi_i,       // pi bit of the instruction itself
  output logic [W-1:0]        src_pi_o,   // pi of the registers it reads
  output logic [W-1:0]        wr_pi_o,    // pi written to its destination
  output logic [NUM_REGS-1:0] pi_q_o      // whole array, for observation
);

  logic [NUM_REGS-1:0] pi_q, pi_d;

  always_comb begin
    pi_d = pi_q;
    for (int i = 0; i < W; i++) begin
      src_pi_o[i] = 1'b0;
      wr_pi_o[i]  = 1'b0;
      if (valid_i[i]) begin
        src_pi_o[i] = (src1_v_i[i] && pi_d[src1_i[i]]) ||
                      (src2_v_i[i] && pi_d[src2_i[i]]);
        wr_pi_o[i]  = pi_i[i] || (propagate_i && src_pi_o[i]);
        if (dst_v_i[i]) pi_d[dst_i[i]] = wr_pi_o[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pi_q <= '0;
    else        pi_q <= pi_d;
  end

  assign pi_q_o = pi_q;

  initial assert (NUM_REGS <= 2**REG_W);

endmodule
