// tb_xtalk_encoder -- self-checking test of the segment encoder in both
// threshold settings.
//
// Checks, against hand-derived expectations: the reset codeword (000);
// the codeword of each data word (aggressive 000/001/010/100,
// non-aggressive 000/001/010/011); a latency of one clock; that the four
// codewords are distinct; and that every one of the 16 word-to-word
// transitions seen on the pins keeps to the closed form of the published
// rules: aggressive - at most one pin rising and at most one falling;
// non-aggressive - not all three pins switching the same way.
module tb_xtalk_encoder;
  import xtalk_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [EFF_W-1:0] data;
  sig_t             sig_a, sig_n;
  int               checks = 0, failures = 0;

  always #5 clk = ~clk;

  xtalk_encoder #(.AGGRESSIVE(1'b1)) dut_a (.clk(clk), .rst_n(rst_n), .data_i(data), .sig_o(sig_a));
  xtalk_encoder #(.AGGRESSIVE(1'b0)) dut_n (.clk(clk), .rst_n(rst_n), .data_i(data), .sig_o(sig_n));

  function automatic sig_t code_a(int w);
    case (w)
      0: return 3'b000;
      1: return 3'b001;
      2: return 3'b010;
      default: return 3'b100;
    endcase
  endfunction

  function automatic sig_t code_n(int w);
    return sig_t'(w);
  endfunction

  function automatic bit ok_aggr(sig_t p, sig_t n);
    return $countones(n & ~p) <= 1 && $countones(p & ~n) <= 1;
  endfunction

  function automatic bit ok_nonaggr(sig_t p, sig_t n);
    return !((p == 3'b000 && n == 3'b111) || (p == 3'b111 && n == 3'b000));
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = 2'd3;
    @(posedge clk);
    #1;
    check(sig_a == 3'b000 && sig_n == 3'b000, "reset codeword");
    rst_n = 1'b1;
    // Latency: change data mid-cycle, pins must not move before the edge.
    data = 2'd2;
    #1 check(sig_a == 3'b000, "output moved before the clock edge");
    @(posedge clk);
    #1 check(sig_a == code_a(2) && sig_n == code_n(2), "codeword one edge after data");
    // Codeword of every word, and every word-to-word transition.
    for (int p = 0; p < 4; p++) begin
      for (int n = 0; n < 4; n++) begin
        data = EFF_W'(p);
        @(posedge clk);
        #1;
        check(sig_a == code_a(p), $sformatf("aggressive codeword of %0d is %03b", p, sig_a));
        check(sig_n == code_n(p), $sformatf("non-aggressive codeword of %0d is %03b", p, sig_n));
        data = EFF_W'(n);
        @(posedge clk);
        #1;
        check(ok_aggr(code_a(p), sig_a), $sformatf("aggressive transition %0d->%0d", p, n));
        check(ok_nonaggr(code_n(p), sig_n), $sformatf("non-aggressive transition %0d->%0d", p, n));
      end
    end
    for (int a = 0; a < 4; a++)
      for (int b = a + 1; b < 4; b++)
        check(code_a(a) != code_a(b), "distinct codewords");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
