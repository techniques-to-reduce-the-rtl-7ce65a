// chunk_decoder -- decode stage that starts the pi-bit chain.
//
// Instructions arrive in fetch chunks of CHUNK_W slots with one even-parity
// bit over the whole chunk. The decoder checks that parity; a mismatch, or a
// pi bit already set by an earlier front-end structure (chunk_pi_i), sets the
// chunk's pi bit instead of raising an error, and that pi value is copied to
// every instruction decoded from the chunk. The decoder also sets the anti-pi
// bit of neutral instruction types (no-op, prefetch, branch hint), whose
// non-opcode bits cannot affect the program's outcome. Copying the chunk pi
// bit and setting anti-pi follow the document; the chunk width, one parity
// bit per chunk and the single register stage are this design's choices.
//
// Interface: valid/ready handshake on both sides; flush_i (a squash) drops
// the chunk held in the stage and refuses input in that cycle. Timing: one
// cycle from an accepted chunk to out_valid_o.
module chunk_decoder
  import serr_pkg::*;
#(
  parameter int unsigned CHUNK_W = 6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  flush_i,
  // fetch side
  input  logic                  in_valid_i,
  output logic                  in_ready_o,
  input  insn_t [CHUNK_W-1:0]   in_insn_i,
  input  logic  [CHUNK_W-1:0]   in_mask_i,    // which slots hold instructions
  input  logic                  in_parity_i,  // even parity over in_insn_i
  input  logic                  in_pi_i,      // pi from an earlier structure
  // instruction queue side
  output logic                  out_valid_o,
  input  logic                  out_ready_i,
  output tracked_insn_t [CHUNK_W-1:0] out_insn_o,
  output logic  [CHUNK_W-1:0]   out_mask_o,
  output logic                  parity_err_o  // pulse: chunk parity mismatch seen
);

  logic          chunk_pi;
  tracked_insn_t [CHUNK_W-1:0] dec;

  assign chunk_pi = in_pi_i | (^in_insn_i != in_parity_i);

  always_comb begin
    for (int i = 0; i < CHUNK_W; i++) begin
      dec[i].insn    = in_insn_i[i];
      dec[i].pi      = chunk_pi;
      dec[i].anti_pi = is_neutral(in_insn_i[i].op);
    end
  end

  assign in_ready_o = !flush_i && (!out_valid_o || out_ready_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid_o  <= 1'b0;
      out_mask_o   <= '0;
      out_insn_o   <= '0;
      parity_err_o <= 1'b0;
    end else begin
      parity_err_o <= 1'b0;
      if (flush_i) begin
        out_valid_o <= 1'b0;
      end else if (in_ready_o) begin
        out_valid_o <= in_valid_i;
        if (in_valid_i) begin
          out_insn_o   <= dec;
          out_mask_o   <= in_mask_i;
          parity_err_o <= (^in_insn_i != in_parity_i);
        end
      end
    end
  end

endmodule
