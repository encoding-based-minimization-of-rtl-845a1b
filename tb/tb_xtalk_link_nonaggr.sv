// tb_xtalk_link_nonaggr -- end-to-end test of the crosstalk-avoiding link
// with the non-aggressive thresholds (10 % of VDD), 3 segments. Same
// procedure as tb_xtalk_link; the codebook is then 000/001/010/011 and
// the legality reference excludes only all-three-pins-same-way.
//
// The transmit pins are looped back to the receive pins through a channel
// model that can flip single pins for one cycle. The test first walks
// every ordered pair of data words on every segment, then sends random
// words with occasional pin flips. Each cycle it checks, against a model
// that uses hand-written codebooks: the received word two cycles after it
// was sent (one word per segment per cycle); the receive error flag for
// corrupted codewords; that no pin transition switches all three pins
// the same way (the closed form of the published non-aggressive rules);
// and that the constraint monitor stays
// silent. It counts how often each mechanism occurred and fails if one
// never did: static repeats, single-pin and two-pin transitions, each of
// the transition vectors between codewords (all 12 non-zero vectors of
// the published transition graph in the aggressive setting), and a
// detected corrupted codeword.
module tb_xtalk_link_nonaggr;
  import xtalk_pkg::*;

  localparam int  K    = 3;
  localparam bit  AGGR = 1'b0;
  localparam int  NRND = 3000;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic [K-1:0][EFF_W-1:0] tx_data;
  sig_t [K-1:0]            tx_sig, rx_sig, inj;
  rule_mask_t [K-1:0]      viol;
  logic                    viol_any;
  logic [K-1:0][EFF_W-1:0] rx_data;
  logic [K-1:0]            rx_err;

  int checks = 0, failures = 0;
  int n_static = 0, n_single = 0, n_pair = 0, n_err_detect = 0, n_words = 0;
  int vec_seen [K][27];
  int pair_seen [K][16];

  always #5 clk = ~clk;

  xtalk_link #(.AGGRESSIVE(AGGR)) dut (
    .clk       (clk),
    .rst_n     (rst_n),
    .tx_data_i (tx_data),
    .tx_sig_o  (tx_sig),
    .viol_o    (viol),
    .viol_any_o(viol_any),
    .rx_sig_i  (rx_sig),
    .rx_data_o (rx_data),
    .rx_err_o  (rx_err)
  );

  // Channel: loop-back with optional single-cycle pin flips.
  assign rx_sig = tx_sig ^ inj;

  function automatic sig_t code(int w);
    if (AGGR) begin
      case (w)
        0: return 3'b000;
        1: return 3'b001;
        2: return 3'b010;
        default: return 3'b100;
      endcase
    end
    return sig_t'(w[1:0]);
  endfunction

  function automatic int word_of(sig_t s);
    for (int w = 0; w < 4; w++) if (code(w) == s) return w;
    return -1;
  endfunction

  function automatic bit legal_ref(sig_t p, sig_t n);
    if (AGGR) return $countones(n & ~p) <= 1 && $countones(p & ~n) <= 1;
    return !((p == 3'b000 && n == 3'b111) || (p == 3'b111 && n == 3'b000));
  endfunction

  // Transition vector S1 S2 S3 of p -> n as a base-3 number 0..26.
  function automatic int vec_index(sig_t p, sig_t n);
    int v1, v2, v3;
    v1 = int'(n[2]) - int'(p[2]);
    v2 = int'(n[1]) - int'(p[1]);
    v3 = int'(n[0]) - int'(p[0]);
    return 9 * (v1 + 1) + 3 * (v2 + 1) + (v3 + 1);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (NRND + 400) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // History of what was driven: index 0 = this cycle.
  int   sent   [3][K];
  sig_t injh   [3][K];
  sig_t prev_tx [K];
  int   last_rx [K];
  int   cyc = 0;

  task automatic step(logic [K-1:0][EFF_W-1:0] d, sig_t [K-1:0] flip);
    @(posedge clk);
    #1;
    for (int j = 0; j < K; j++) begin
      sent[2][j] = sent[1][j];
      sent[1][j] = sent[0][j];
      sent[0][j] = int'(d[j]);
      injh[2][j] = injh[1][j];
      injh[1][j] = injh[0][j];
      injh[0][j] = flip[j];
    end
    tx_data = d;
    inj     = flip;
    cyc++;
    // tx_sig now shows the codeword of the word sent last cycle.
    for (int j = 0; j < K; j++) begin
      sig_t p, n;
      n = tx_sig[j];
      p = prev_tx[j];
      if (cyc > 2) begin
        check(n == code(sent[1][j]), $sformatf("seg %0d pins %03b for word %0d", j, n, sent[1][j]));
        check(legal_ref(p, n), $sformatf("seg %0d illegal transition %03b->%03b", j, p, n));
        vec_seen[j][vec_index(p, n)]++;
        case ($countones(p ^ n))
          0: n_static++;
          1: n_single++;
          default: n_pair++;
        endcase
        pair_seen[j][4 * sent[2][j] + sent[1][j]]++;
      end
      prev_tx[j] = n;
      check(!viol_any && viol[j] == '0, $sformatf("seg %0d monitor flagged %011b", j, viol[j]));
      // rx_data now shows the word sent two cycles ago, as seen through
      // the channel flips of last cycle.
      if (cyc > 3) begin
        sig_t got;
        int   w;
        got = code(sent[2][j]) ^ injh[1][j];
        w   = word_of(got);
        if (w >= 0) begin
          check(!rx_err[j], $sformatf("seg %0d false error", j));
          check(int'(rx_data[j]) == w, $sformatf("seg %0d rx %0d expected %0d", j, rx_data[j], w));
          last_rx[j] = w;
          n_words++;
        end else begin
          check(rx_err[j], $sformatf("seg %0d missed corrupted codeword %03b", j, got));
          check(int'(rx_data[j]) == last_rx[j], $sformatf("seg %0d did not hold on error", j));
          if (rx_err[j]) n_err_detect++;
        end
      end
    end
  endtask

  initial begin
    logic [K-1:0][EFF_W-1:0] d;
    sig_t [K-1:0]            f;
    int                      missing;
    tx_data = '0;
    inj     = '0;
    for (int j = 0; j < K; j++) begin
      prev_tx[j] = '0;
      last_rx[j] = 0;
      for (int h = 0; h < 3; h++) begin
        sent[h][j] = 0;
        injh[h][j] = '0;
      end
      for (int v = 0; v < 27; v++) vec_seen[j][v] = 0;
      for (int q = 0; q < 16; q++) pair_seen[j][q] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(tx_sig == '0, "reset pins are all zero");
    // Directed: every ordered word pair on every segment.
    for (int p = 0; p < 4; p++)
      for (int n = 0; n < 4; n++) begin
        for (int j = 0; j < K; j++) d[j] = EFF_W'((p + j) % 4);
        step(d, '0);
        for (int j = 0; j < K; j++) d[j] = EFF_W'((n + j) % 4);
        step(d, '0);
      end
    // Random words, with a single pin flip now and then.
    for (int i = 0; i < NRND; i++) begin
      for (int j = 0; j < K; j++) d[j] = EFF_W'($urandom_range(3));
      f = '0;
      if ($urandom_range(19) == 0) f[$urandom_range(K - 1)] = sig_t'(1 << $urandom_range(N_SIG - 1));
      step(d, f);
    end
    step('0, '0);
    step('0, '0);
    // Mechanism coverage.
    checks += 4;
    if (n_static == 0)     begin failures++; $display("FAIL no static repeat"); end
    if (n_single == 0)     begin failures++; $display("FAIL no single-pin transition"); end
    if (n_pair == 0)       begin failures++; $display("FAIL no two-pin transition"); end
    if (n_err_detect == 0) begin failures++; $display("FAIL no corrupted codeword detected"); end
    missing = 0;
    for (int j = 0; j < K; j++) begin
      for (int q = 0; q < 16; q++) if (pair_seen[j][q] == 0) missing++;
      // Every transition between two codewords, i.e. every edge of the
      // transition graph among the codebook states, must have occurred.
      for (int p = 0; p < 4; p++)
        for (int n = 0; n < 4; n++)
          if (vec_seen[j][vec_index(code(p), code(n))] == 0) missing++;
    end
    checks++;
    if (missing != 0) begin
      failures++;
      $display("FAIL %0d word pairs or transition vectors never occurred", missing);
    end
    $display("mechanisms: static=%0d single=%0d pair=%0d corrupted_detected=%0d words=%0d cycles=%0d",
             n_static, n_single, n_pair, n_err_detect, n_words, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
