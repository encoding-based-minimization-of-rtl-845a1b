// xtalk_link -- inductive-crosstalk avoiding off-chip link, K_SEG segments.
//
// The bus is K_SEG segments of five pins each (VDD, S1, S2, S3, VSS), so
// the default K_SEG = 3 gives a 15-pin bus carrying 9 signals and
// 6 data bits. Each segment carries 2 data bits on its 3 signal pins:
// an xtalk_encoder drives the transmit pins, an xtalk_constraint_eval
// watches them and reports any violated crosstalk rule, and an
// xtalk_decoder on the receive pins recovers the data. The package
// interconnect and the pad drivers sit between tx_sig_o and rx_sig_i and
// are outside this module; for a loop-back connect tx_sig_o to rx_sig_i.
// Supply pins carry no logic and have no ports: pin 5j of the physical
// bus is VDD, pins 5j+1..5j+3 are tx_sig_o[j] (S1 = bit 2, S3 = bit 0)
// and pin 5j+4 is VSS.
//
// The segment structure, the example size (n = 5, k = 3, p = 2) and the
// 2-of-3 CODEC follow the source; the registered interfaces, the
// monitor and the decoder error flag are this design's choices.
//
// Timing: tx_data_i is taken every cycle and appears on tx_sig_o after one
// rising edge; a received word appears on rx_data_o one edge after it is
// on rx_sig_i. With a zero-delay loop-back the latency is two cycles at
// one 2-bit word per segment per cycle. viol_o / viol_any_o are
// combinational for the transition now on tx_sig_o; an assertion checks
// that the encoders never produce a violating transition.
module xtalk_link
  import xtalk_pkg::*;
#(
  parameter int unsigned K_SEG      = 3,
  parameter bit          AGGRESSIVE = 1'b1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // transmit side
  input  logic [K_SEG-1:0][EFF_W-1:0] tx_data_i,
  output sig_t [K_SEG-1:0]            tx_sig_o,
  output rule_mask_t [K_SEG-1:0]      viol_o,
  output logic                        viol_any_o,
  // receive side
  input  sig_t [K_SEG-1:0]            rx_sig_i,
  output logic [K_SEG-1:0][EFF_W-1:0] rx_data_o,
  output logic [K_SEG-1:0]            rx_err_o
);

  logic [K_SEG-1:0] seg_viol;

  for (genvar j = 0; j < int'(K_SEG); j++) begin : g_seg
    xtalk_encoder #(.AGGRESSIVE(AGGRESSIVE)) u_enc (
      .clk   (clk),
      .rst_n (rst_n),
      .data_i(tx_data_i[j]),
      .sig_o (tx_sig_o[j])
    );

    xtalk_constraint_eval #(.AGGRESSIVE(AGGRESSIVE)) u_mon (
      .clk       (clk),
      .rst_n     (rst_n),
      .sig_i     (tx_sig_o[j]),
      .viol_o    (viol_o[j]),
      .viol_any_o(seg_viol[j])
    );

    xtalk_decoder #(.AGGRESSIVE(AGGRESSIVE)) u_dec (
      .clk   (clk),
      .rst_n (rst_n),
      .sig_i (rx_sig_i[j]),
      .data_o(rx_data_o[j]),
      .err_o (rx_err_o[j])
    );
  end

  assign viol_any_o = |seg_viol;

  a_no_violation: assert property (@(posedge clk) disable iff (!rst_n) !viol_any_o)
    else $error("xtalk_link: encoded bus made a transition that violates a crosstalk rule");

endmodule
