// xtalk_pkg -- shared types, constants and constant functions of the
// inductive-crosstalk avoiding bus CODEC.
//
// The off-chip bus is built from identical segments of N_PINS = 5 pins:
// VDD, three signal pins S1..S3, VSS (pin positions 0..4). A transition of
// a pin is v = +1 (rising), -1 (falling) or 0 (static); supply pins are
// always static. For every transition of a segment's signal pins the
// package evaluates 3*N_PINS-4 = 11 constraint equations:
//   rule 1            VDD bounce:  L/2 * (#rising signals)  <= Pbnc
//   rule 2+3(i-1)     S_i rising:  coupling sum c_i <= P1
//   rule 3+3(i-1)     S_i falling: coupling sum c_i >= P-1
//   rule 4+3(i-1)     S_i static:  -P0 <= c_i <= P0
//   rule 11           VSS bounce:  L/2 * (#falling signals) <= Pbnc
// where c_i = sum over d=1..P_REACH of k_d * (v_{i-d} + v_{i+d}). With
// P_REACH = 2 every neighbour outside the segment is a supply pin, so a
// segment's transitions do not depend on the adjacent segments.
//
// The rule set, the reach p = 2 and the segment width follow the
// source method. The coupling coefficients k1, k2, the half supply
// inductance L/2 and the thresholds are integers in units of 1 % of VDD;
// the thresholds (5 % aggressive, 10 % non-aggressive) follow the source,
// the values k1 = 4, k2 = 2, L/2 = 4 are this design's choice, picked so
// that the rules eliminate exactly the transitions the source lists.
// The edge rules are written so that switching neighbours moving in the
// same direction (positive c_i for a rising pin) count against the
// transition.
//
// find_codebook() picks the CODEC: the set of N_CODES signal-pin states
// in which every ordered pair (including a state with itself) is a legal
// transition, so any data sequence can be sent one word per clock. Among
// the valid sets it takes the one with the smallest bit-mask of member
// states; members in ascending order carry data words 0..N_CODES-1.
package xtalk_pkg;

  localparam int unsigned N_PINS  = 5;               // n: pins per segment
  localparam int unsigned N_SIG   = N_PINS - 2;      // signal pins per segment
  localparam int unsigned P_REACH = 2;               // p: coupling reach
  localparam int unsigned N_RULES = 3 * N_PINS - 4;  // constraint equations
  localparam int unsigned EFF_W   = 2;               // data bits per segment
  localparam int unsigned N_CODES = 1 << EFF_W;      // codewords per segment
  localparam int unsigned N_STATES = 1 << N_SIG;     // signal-pin states

  // Signal pins of one segment. Bit (N_SIG-i) carries S_i, so a literal
  // reads S1 S2 S3 from left to right, e.g. 3'b011 is S1=0, S2=1, S3=1.
  typedef logic [N_SIG-1:0] sig_t;

  // Bit (r-1) is set when rule r is violated.
  typedef logic [N_RULES-1:0] rule_mask_t;

  // Codeword of data word w is element [w].
  typedef logic [N_CODES-1:0][N_SIG-1:0] codebook_t;

  // Coupling and threshold constants, signed, in units of 1 % of VDD.
  typedef struct packed {
    logic signed [15:0] k1;      // nearest-neighbour coupling
    logic signed [15:0] k2;      // second-neighbour coupling
    logic signed [15:0] l_half;  // L/2 of the shared supply return
    logic signed [15:0] p0;      // glitch bound
    logic signed [15:0] p1;      // rising edge bound
    logic signed [15:0] pm1;     // falling edge bound
    logic signed [15:0] pbnc;    // supply bounce bound
  } xtalk_cfg_t;

  localparam xtalk_cfg_t CFG_AGGRESSIVE = '{
    k1: 16'sd4, k2: 16'sd2, l_half: 16'sd4,
    p0: 16'sd5, p1: 16'sd5, pm1: -16'sd5, pbnc: 16'sd5};

  localparam xtalk_cfg_t CFG_NON_AGGRESSIVE = '{
    k1: 16'sd4, k2: 16'sd2, l_half: 16'sd4,
    p0: 16'sd10, p1: 16'sd10, pm1: -16'sd10, pbnc: 16'sd10};

  function automatic xtalk_cfg_t cfg_of(bit aggressive);
    return aggressive ? CFG_AGGRESSIVE : CFG_NON_AGGRESSIVE;
  endfunction

  // Transition of the pin at segment position pos (0..N_PINS-1, or beyond
  // for pins of the adjacent segments): supply pins and pins outside the
  // segment's signals are static.
  function automatic int pin_v(sig_t prev, sig_t next, int pos);
    int v;
    v = 0;
    if (pos >= 1 && pos <= int'(N_SIG))
      v = int'(next[N_SIG-pos]) - int'(prev[N_SIG-pos]);
    return v;
  endfunction

  // Coupling coefficient k_d of the neighbour d pins away (d = 1 or 2).
  function automatic int k_of(int k1, int k2, int d);
    return (d == 1) ? k1 : k2;
  endfunction

  // Rules violated by the transition prev -> next.
  function automatic rule_mask_t rules_violated(sig_t prev, sig_t next,
                                                xtalk_cfg_t cfg);
    rule_mask_t m;
    int rises, falls, v, c, base;
    m = '0;
    rises = 0;
    falls = 0;
    for (int i = 1; i <= int'(N_SIG); i++) begin
      v = pin_v(prev, next, i);
      c = 0;
      for (int d = 1; d <= int'(P_REACH); d++)
        c += k_of(int'(cfg.k1), int'(cfg.k2), d) * (pin_v(prev, next, i - d) + pin_v(prev, next, i + d));
      base = 3 * (i - 1);               // rule numbers base+2..base+4
      if (v > 0) begin
        rises++;
        if (c > int'(cfg.p1)) m[base + 1] = 1'b1;
      end else if (v < 0) begin
        falls++;
        if (c < int'(cfg.pm1)) m[base + 2] = 1'b1;
      end else begin
        if (c > int'(cfg.p0) || c < -int'(cfg.p0)) m[base + 3] = 1'b1;
      end
    end
    if (int'(cfg.l_half) * rises > int'(cfg.pbnc)) m[0] = 1'b1;
    if (int'(cfg.l_half) * falls > int'(cfg.pbnc)) m[N_RULES-1] = 1'b1;
    return m;
  endfunction

  function automatic bit legal(sig_t prev, sig_t next, xtalk_cfg_t cfg);
    return rules_violated(prev, next, cfg) == '0;
  endfunction

  // True when every ordered pair of states in the set is a legal transition.
  function automatic bit is_clique(logic [N_STATES-1:0] set, xtalk_cfg_t cfg);
    bit ok;
    ok = 1'b1;
    for (int a = 0; a < int'(N_STATES); a++)
      for (int b = 0; b < int'(N_STATES); b++)
        if (set[a] && set[b] && !legal(sig_t'(a), sig_t'(b), cfg)) ok = 1'b0;
    return ok;
  endfunction

  // Smallest state set of N_CODES members that is a clique; '0 if none.
  function automatic logic [N_STATES-1:0] codebook_set(xtalk_cfg_t cfg);
    logic [N_STATES-1:0] best;
    logic [N_STATES-1:0] s;
    best = '0;
    for (int m = (1 << N_STATES) - 1; m > 0; m--) begin
      s = N_STATES'(m);
      if ($countones(s) == int'(N_CODES) && is_clique(s, cfg)) best = s;
    end
    return best;
  endfunction

  function automatic bit codebook_ok(xtalk_cfg_t cfg);
    return codebook_set(cfg) != '0;
  endfunction

  function automatic codebook_t find_codebook(xtalk_cfg_t cfg);
    codebook_t cb;
    logic [N_STATES-1:0] s;
    int w;
    cb = '0;
    s = codebook_set(cfg);
    w = 0;
    for (int st = 0; st < int'(N_STATES); st++)
      if (s[st] && w < int'(N_CODES)) begin
        cb[w] = sig_t'(st);
        w++;
      end
    return cb;
  endfunction

endpackage
