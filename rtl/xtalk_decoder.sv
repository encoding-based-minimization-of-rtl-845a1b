// xtalk_decoder -- receive side of one bus segment.
//
// Compares the three received signal pins with each codeword of the same
// codebook the encoder uses (computed from the constraint equations in
// xtalk_pkg) and returns the matching data word. A pin state that is no
// codeword raises err_o; data_o then holds the previous word. The source
// states only that the CODEC maps the subset of pin states back to the
// original states; the error flag and the hold behaviour are this design's
// choices.
//
// Interface: sig_i is sampled on each rising clk edge; data_o and err_o are
// registered (latency 1, one word per cycle). Active-low synchronous reset
// clears data_o and err_o.
module xtalk_decoder
  import xtalk_pkg::*;
#(
  parameter bit AGGRESSIVE = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sig_t             sig_i,
  output logic [EFF_W-1:0] data_o,
  output logic             err_o
);

  localparam xtalk_cfg_t CFG = cfg_of(AGGRESSIVE);
  localparam codebook_t  CB  = find_codebook(CFG);

  logic [EFF_W-1:0] word;
  logic             hit;

  always_comb begin
    word = '0;
    hit  = 1'b0;
    for (int w = 0; w < int'(N_CODES); w++) begin
      if (sig_i == CB[w]) begin
        word = EFF_W'(w);
        hit  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_o <= '0;
      err_o  <= 1'b0;
    end else begin
      if (hit) data_o <= word;
      err_o <= !hit;
    end
  end

endmodule
