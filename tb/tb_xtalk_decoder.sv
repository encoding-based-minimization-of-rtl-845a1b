// tb_xtalk_decoder -- self-checking test of the segment decoder in both
// threshold settings.
//
// Drives all eight pin states and compares the decoded word and the error
// flag with hand-written codebooks (aggressive 000/001/010/100,
// non-aggressive 000/001/010/011), checks that a non-codeword holds the
// previous word, the one-clock latency and the reset values.
module tb_xtalk_decoder;
  import xtalk_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  sig_t             sig;
  logic [EFF_W-1:0] data_a, data_n;
  logic             err_a, err_n;
  int               checks = 0, failures = 0;

  always #5 clk = ~clk;

  xtalk_decoder #(.AGGRESSIVE(1'b1)) dut_a (.clk(clk), .rst_n(rst_n), .sig_i(sig), .data_o(data_a), .err_o(err_a));
  xtalk_decoder #(.AGGRESSIVE(1'b0)) dut_n (.clk(clk), .rst_n(rst_n), .sig_i(sig), .data_o(data_n), .err_o(err_n));

  // Returns the word of a codeword, or -1 for a non-codeword.
  function automatic int word_a(sig_t s);
    case (s)
      3'b000: return 0;
      3'b001: return 1;
      3'b010: return 2;
      3'b100: return 3;
      default: return -1;
    endcase
  endfunction

  function automatic int word_n(sig_t s);
    return (s[2] == 1'b0) ? int'(s) : -1;
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
    int last_a, last_n, wa, wn;
    sig = 3'b100;
    @(posedge clk);
    #1 check(data_a == 2'd0 && !err_a && data_n == 2'd0 && !err_n, "reset values");
    rst_n = 1'b1;
    #1 check(data_a == 2'd0, "output moved before the clock edge");
    @(posedge clk);
    #1 check(data_a == 2'd3 && !err_a, "word one edge after pins");
    check(err_n && data_n == 2'd0, "non-aggressive rejects 100 and holds");
    last_a = 3;
    last_n = 0;
    for (int r = 0; r < 3; r++) begin
      for (int s = 0; s < 8; s++) begin
        sig = sig_t'((s * 5 + r * 3) % 8);
        @(posedge clk);
        #1;
        wa = word_a(sig);
        wn = word_n(sig);
        if (wa >= 0) last_a = wa;
        if (wn >= 0) last_n = wn;
        check(err_a == (wa < 0), $sformatf("aggressive err for %03b", sig));
        check(int'(data_a) == last_a, $sformatf("aggressive word for %03b is %0d", sig, data_a));
        check(err_n == (wn < 0), $sformatf("non-aggressive err for %03b", sig));
        check(int'(data_n) == last_n, $sformatf("non-aggressive word for %03b is %0d", sig, data_n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
