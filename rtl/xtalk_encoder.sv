// xtalk_encoder -- transmit side of one bus segment.
//
// Maps an EFF_W = 2 bit data word onto one of the N_CODES = 4 codewords of
// the segment's three signal pins. The codewords form a set in which every
// transition between two of them (or a repeat of one) satisfies all eleven
// crosstalk constraints of xtalk_pkg, so any data sequence can be sent at
// one word per clock with no further state. With the aggressive
// thresholds the codebook is 00->000, 01->001, 10->010, 11->100; with the
// non-aggressive thresholds it is 00->000, 01->001, 10->010, 11->011.
//
// The codebook is computed at elaboration from the constraint equations.
// That the CODEC maps 2^2 data states onto a subset of the 2^3 pin states
// follows the source; the register stage and the data-to-codeword order are
// this design's choices.
//
// Interface: data_i is sampled on each rising clk edge and its codeword
// appears on sig_o after that edge (latency 1, one word per cycle). sig_o
// is registered so the pad drivers see glitch-free levels. An active-low
// synchronous reset sets sig_o to codeword 0, the all-zero state.
module xtalk_encoder
  import xtalk_pkg::*;
#(
  parameter bit AGGRESSIVE = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [EFF_W-1:0] data_i,
  output sig_t             sig_o
);

  localparam xtalk_cfg_t CFG = cfg_of(AGGRESSIVE);
  localparam codebook_t  CB  = find_codebook(CFG);

  if (!codebook_ok(CFG)) begin : g_no_codebook
    $error("xtalk_encoder: thresholds admit no %0d-word codebook", N_CODES);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) sig_o <= CB[0];
    else        sig_o <= CB[data_i];
  end

endmodule
