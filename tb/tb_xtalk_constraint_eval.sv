// tb_xtalk_constraint_eval -- self-checking test of the crosstalk constraint
// monitor in both threshold settings.
//
// Every ordered pair of signal-pin states (64 pairs, covering all 27
// transition vectors) is applied as a previous / present state. The
// violated-rule mask is compared with a table typed in from the
// published list of eliminated transitions (rule numbers 1..11), which is
// independent of the constraint arithmetic in the design. For the
// non-aggressive setting the published list marks all-rising as a VSS
// (rule 11) and all-falling as a VDD (rule 1) violation; the reference
// here uses rule 1 for all-rising and rule 11 for all-falling, since VDD
// carries the rising current.
module tb_xtalk_constraint_eval;
  import xtalk_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  sig_t       sig;
  rule_mask_t viol_a, viol_n;
  logic       any_a, any_n;
  int         checks = 0, failures = 0;
  int         n_viol_a = 0, n_legal_a = 0;

  always #5 clk = ~clk;

  xtalk_constraint_eval #(.AGGRESSIVE(1'b1)) dut_a (
    .clk(clk), .rst_n(rst_n), .sig_i(sig), .viol_o(viol_a), .viol_any_o(any_a));
  xtalk_constraint_eval #(.AGGRESSIVE(1'b0)) dut_n (
    .clk(clk), .rst_n(rst_n), .sig_i(sig), .viol_o(viol_n), .viol_any_o(any_n));

  function automatic rule_mask_t rules(int r0, int r1 = 0, int r2 = 0, int r3 = 0);
    rule_mask_t m;
    m = '0;
    if (r0 > 0) m[r0-1] = 1'b1;
    if (r1 > 0) m[r1-1] = 1'b1;
    if (r2 > 0) m[r2-1] = 1'b1;
    if (r3 > 0) m[r3-1] = 1'b1;
    return m;
  endfunction

  // Transition vector S1 S2 S3 packed two bits per pin.
  function automatic logic [5:0] vec(int v1, int v2, int v3);
    return {2'(v1), 2'(v2), 2'(v3)};
  endfunction

  // Published eliminated transitions, vector written S1 S2 S3.
  function automatic rule_mask_t expect_aggr(int v1, int v2, int v3);
    case (vec(v1, v2, v3))
      vec(0, 1, 1):    return rules(1, 4);
      vec(0, -1, -1):  return rules(4, 11);
      vec(1, 0, 1):    return rules(1, 7);
      vec(1, 1, 0):    return rules(1, 10);
      vec(1, 1, 1):    return rules(1, 2, 5, 8);
      vec(1, 1, -1):   return rules(1);
      vec(1, -1, 1):   return rules(1);
      vec(1, -1, -1):  return rules(11);
      vec(-1, 0, -1):  return rules(7, 11);
      vec(-1, 1, 1):   return rules(1);
      vec(-1, 1, -1):  return rules(11);
      vec(-1, -1, 0):  return rules(10, 11);
      vec(-1, -1, 1):  return rules(11);
      vec(-1, -1, -1): return rules(3, 6, 9, 11);
      default:      return '0;
    endcase
  endfunction

  function automatic rule_mask_t expect_nonaggr(int v1, int v2, int v3);
    if (v1 == 1 && v2 == 1 && v3 == 1)    return rules(1);
    if (v1 == -1 && v2 == -1 && v3 == -1) return rules(11);
    return '0;
  endfunction

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v1, v2, v3;
    rule_mask_t ea, en;
    sig = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < 8; p++) begin
      for (int n = 0; n < 8; n++) begin
        sig = sig_t'(p);
        @(posedge clk);
        #1 sig = sig_t'(n);
        #1;
        v1 = int'(n[2]) - int'(p[2]);
        v2 = int'(n[1]) - int'(p[1]);
        v3 = int'(n[0]) - int'(p[0]);
        ea = expect_aggr(v1, v2, v3);
        en = expect_nonaggr(v1, v2, v3);
        checks += 4;
        if (viol_a !== ea) begin
          failures++;
          $display("FAIL aggressive %03b->%03b: mask %011b expected %011b", p[2:0], n[2:0], viol_a, ea);
        end
        if (any_a !== (ea != '0)) failures++;
        if (viol_n !== en) begin
          failures++;
          $display("FAIL non-aggressive %03b->%03b: mask %011b expected %011b", p[2:0], n[2:0], viol_n, en);
        end
        if (any_n !== (en != '0)) failures++;
        if (ea != '0) n_viol_a++; else n_legal_a++;
      end
    end
    // Legal pairs under the aggressive rules: hand count from the published
    // table (13 legal vectors; a static pin has two realisations).
    checks++;
    if (n_legal_a != 8 + 6 * 4 + 6 * 2) begin
      failures++;
      $display("FAIL legal aggressive pairs %0d", n_legal_a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
