// xtalk_constraint_eval -- crosstalk constraint monitor of one segment.
//
// Keeps the previous value of the segment's three signal pins and, each
// cycle, evaluates the eleven constraint equations of xtalk_pkg for the
// transition from that value to the present one: VDD bounce (rule 1),
// rising / falling / static coupling for S1, S2, S3 (rules 2-10) and VSS
// bounce (rule 11). viol_o has bit r-1 set for each violated rule r.
// The equations are those of the source method; evaluating them in
// hardware on the live bus, as a monitor, is this design's choice.
//
// Per pin i the datapath forms the transition v_i = next - prev, the
// coupling sum c_i = k1*(v_{i-1}+v_{i+1}) + k2*(v_{i-2}+v_{i+2}) with supply
// pins static, and compares it with the bound for the pin's direction; the
// counts of rising and falling pins are scaled by L/2 and compared with
// Pbnc.
//
// Interface: sig_i is the pin state driven in the present cycle; viol_o
// and viol_any_o are combinational from sig_i and the registered previous
// state. Active-low synchronous reset loads the all-zero bus state as the
// previous value, matching the encoder's reset codeword.
module xtalk_constraint_eval
  import xtalk_pkg::*;
#(
  parameter bit AGGRESSIVE = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  sig_t       sig_i,
  output rule_mask_t viol_o,
  output logic       viol_any_o
);

  localparam xtalk_cfg_t CFG = cfg_of(AGGRESSIVE);

  sig_t prev_q;

  always_ff @(posedge clk) begin
    if (!rst_n) prev_q <= '0;
    else        prev_q <= sig_i;
  end

  always_comb begin
    viol_o     = rules_violated(prev_q, sig_i, CFG);
    viol_any_o = |viol_o;
  end

endmodule
