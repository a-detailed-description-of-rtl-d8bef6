// fms_ref_pkg: reference model of the FMS / FPD-East trigger tree for the
// testbenches. It is written independently of the RTL: each layer-0 cluster is
// looked up as an explicit list of QT8 sums (one entry per row of the cluster
// table), and every DSM is modelled as a plain function of its inputs, without
// pipelining. Conventions shared with the RTL: thresholds fire on ">", the
// lowest board / channel wins a tie, and cells that are not used for clusters
// give a cluster sum of 0.
package fms_ref_pkg;
  import fms_trig_pkg::*;

  // Layer-0 board types.
  typedef enum int {L0_SMALL = 0, L0_HORIZ = 1, L0_SIDE = 2} l0_kind_e;

  // What the cluster table says about a cell.
  typedef enum int {ACT_IGNORED, ACT_DONE, ACT_DONE4, ACT_NOT_FEASIBLE, ACT_LAYER1} action_e;

  // One QT8 sum: board b (local letter index), stripe k.
  function automatic logic [15:0] T(int b, int k);
    return 16'(1) << (b * 4 + k);
  endfunction

  function automatic bit in_rng(int id, int lo, int hi);
    return id >= lo && id <= hi;
  endfunction

  // Cluster table: QT8 sums added at layer 0 for a highest tower at (b, id).
  function automatic logic [15:0] l0_terms(l0_kind_e kind, int b, int id);
    logic [15:0] t;
    t = '0;
    case (kind)
      L0_SMALL: begin // A=0 B=1 C=2 D=3
        case (b)
          0: begin
            if (in_rng(id, 1, 5))   t = T(0,0)|T(0,1);
            if (in_rng(id, 9, 13))  t = T(0,0)|T(0,1)|T(0,2);
            if (in_rng(id, 17, 21)) t = T(0,1)|T(0,2)|T(0,3);
            if (in_rng(id, 25, 29)) t = T(0,2)|T(0,3)|T(1,0);
          end
          1: begin
            if (in_rng(id, 1, 5))   t = T(0,3)|T(1,0)|T(1,1);
            if (in_rng(id, 10, 14)) t = T(1,0)|T(1,1)|T(1,2);
            if (id == 16)           t = T(1,1)|T(1,2)|T(1,3)|T(3,0);
            if (in_rng(id, 17, 22)) t = T(1,1)|T(1,2)|T(1,3);
            if (id == 24)           t = T(1,2)|T(1,3)|T(2,0)|T(3,0);
            if (in_rng(id, 25, 30)) t = T(1,2)|T(1,3)|T(2,0);
          end
          2: begin
            if (id == 0)            t = T(1,3)|T(2,0)|T(2,1)|T(3,0);
            if (in_rng(id, 1, 6))   t = T(1,3)|T(2,0)|T(2,1);
            if (id == 8)            t = T(2,0)|T(2,1)|T(2,2)|T(3,0);
            if (in_rng(id, 9, 14))  t = T(2,0)|T(2,1)|T(2,2);
            if (id == 16)           t = T(2,1)|T(2,2)|T(2,3)|T(3,0);
            if (in_rng(id, 17, 22)) t = T(2,1)|T(2,2)|T(2,3);
          end
          default: begin
            if (in_rng(id, 1, 5))   t = T(3,0)|T(3,1);            // not feasible
            if (in_rng(id, 9, 13))  t = T(3,0)|T(3,1)|T(3,2);
            if (in_rng(id, 17, 21)) t = T(3,1)|T(3,2)|T(3,3);
            if (in_rng(id, 25, 29)) t = T(3,2)|T(3,3);            // + D(3) at layer 1
          end
        endcase
      end
      L0_HORIZ: begin // E=0 F=1 G=2 H=3
        case (b)
          0: begin
            if (in_rng(id, 9, 14))  t = T(0,0)|T(0,1)|T(0,2);
            if (in_rng(id, 17, 22)) t = T(0,1)|T(0,2)|T(0,3);
            if (in_rng(id, 25, 30)) t = T(0,2)|T(0,3)|T(1,0);
          end
          1: begin
            if (in_rng(id, 1, 6))   t = T(0,3)|T(1,0)|T(1,1);
            if (in_rng(id, 9, 14))  t = T(1,0)|T(1,1)|T(1,2);
            if (in_rng(id, 17, 22)) t = T(1,1)|T(1,2)|T(1,3);
            if (in_rng(id, 25, 30)) t = T(1,2)|T(1,3);            // not feasible
          end
          2: begin
            if (id == 10)           t = T(2,0)|T(2,1)|T(2,2);
            if (id == 11)           t = T(2,0)|T(2,1)|T(2,2)|T(1,3);
            if (in_rng(id, 17, 18)) t = T(2,1)|T(2,2)|T(2,3);
            if (id == 19)           t = T(2,1)|T(2,2)|T(2,3)|T(1,3);
            if (in_rng(id, 25, 26)) t = T(2,2)|T(2,3)|T(3,0);
            if (id == 27)           t = T(2,2)|T(2,3)|T(3,0)|T(1,3);
          end
          default: begin
            if (id == 0)            t = T(1,3)|T(2,3)|T(3,0)|T(3,1);
            if (in_rng(id, 1, 2))   t = T(2,3)|T(3,0)|T(3,1);
            if (id == 8)            t = T(1,3)|T(3,0)|T(3,1)|T(3,2);
            if (in_rng(id, 9, 13))  t = T(3,0)|T(3,1)|T(3,2);
            if (id == 16)           t = T(1,3)|T(3,1)|T(3,2)|T(3,3);
            if (in_rng(id, 17, 22)) t = T(3,1)|T(3,2)|T(3,3);
            if (in_rng(id, 25, 30)) t = T(3,2)|T(3,3);            // + I(0) at layer 1
          end
        endcase
      end
      default: begin // I=0 J=1
        if (b == 0) begin
          if (in_rng(id, 1, 6))   t = T(0,0)|T(0,1);              // + H(3) at layer 1
          if (in_rng(id, 9, 14))  t = T(0,0)|T(0,1)|T(0,2);
          if (in_rng(id, 17, 22)) t = T(0,1)|T(0,2)|T(0,3);
          if (in_rng(id, 25, 30)) t = T(0,2)|T(0,3)|T(1,0);
        end else begin
          if (in_rng(id, 1, 6))   t = T(0,3)|T(1,0)|T(1,1);
          if (in_rng(id, 9, 14))  t = T(1,0)|T(1,1)|T(1,2);
          if (in_rng(id, 17, 22)) t = T(1,1)|T(1,2)|T(1,3);
          if (in_rng(id, 25, 30)) t = T(1,2)|T(1,3);              // + J(3) at layer 1
        end
      end
    endcase
    return t;
  endfunction

  function automatic action_e l0_action(l0_kind_e kind, int b, int id);
    logic [15:0] t;
    t = l0_terms(kind, b, id);
    if (t == 0) return ACT_IGNORED;
    if (kind == L0_SMALL && b == 0 && in_rng(id, 1, 5))   return ACT_LAYER1;
    if (kind == L0_SMALL && b == 3 && in_rng(id, 25, 29)) return ACT_LAYER1;
    if (kind == L0_SMALL && b == 3 && in_rng(id, 1, 5))   return ACT_NOT_FEASIBLE;
    if (kind == L0_HORIZ && b == 3 && in_rng(id, 25, 30)) return ACT_LAYER1;
    if (kind == L0_HORIZ && b == 1 && in_rng(id, 25, 30)) return ACT_NOT_FEASIBLE;
    if (kind == L0_SIDE  && b == 0 && in_rng(id, 1, 6))   return ACT_LAYER1;
    if (kind == L0_SIDE  && b == 1 && in_rng(id, 25, 30)) return ACT_LAYER1;
    if ($countones(t) == 4) return ACT_DONE4;
    return ACT_DONE;
  endfunction

  function automatic int l0_nboards(l0_kind_e kind);
    return (kind == L0_SIDE) ? 2 : 4;
  endfunction

  // Board that wins the HT comparison (first of the highest).
  function automatic int l0_winner(l0_kind_e kind, qt_word_t w [4]);
    int best;
    best = 0;
    for (int b = 1; b < l0_nboards(kind); b++)
      if (w[b].ht > w[best].ht) best = b;
    return best;
  endfunction

  // Layer-0 DSM output for board words w[] indexed by letter (A.., E.., I..).
  function automatic l0_word_t ref_l0(l0_kind_e kind, qt_word_t w [4], logic [6:0] th);
    l0_word_t o;
    int win;
    logic [15:0] t;
    int sum;
    o   = '0;
    win = l0_winner(kind, w);
    t   = l0_terms(kind, win, int'(w[win].htid));
    sum = 0;
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < 4; k++)
        if (t[b*4+k]) sum += int'(w[b].qt8[k]);
    o.cl_sum   = 8'(sum);
    o.ext_htid = 7'(win * 32 + int'(w[win].htid));
    o.ht_bit   = w[win].ht > th;
    case (kind)
      L0_SMALL: begin o.qt8_lo = w[0].qt8[0]; o.qt8_hi = w[3].qt8[3]; end
      L0_HORIZ: begin o.qt8_lo = '0;          o.qt8_hi = w[3].qt8[3]; end
      default:  begin o.qt8_lo = w[0].qt8[0]; o.qt8_hi = w[1].qt8[3]; end
    endcase
    return o;
  endfunction

  function automatic clth_t ref_th3(int sum, logic [2:0][7:0] th);
    clth_t r;
    for (int n = 0; n < 3; n++) r[n] = sum > int'(th[n]);
    return r;
  endfunction

  // FM101. in[] = ST, SB, NT, NB.
  function automatic l1_small_t ref_fm101(l0_word_t in [4], logic [2:0][7:0] th);
    l1_small_t o;
    int a_from [4] = '{2, 3, 0, 1};   // ST<-NT, SB<-NB, NT<-ST, NB<-SB
    int d_from [4] = '{1, 0, 3, 2};   // ST<-SB, SB<-ST, NT<-NB, NB<-NT
    clth_t bits [4];
    for (int q = 0; q < 4; q++) begin
      int s;
      s = int'(in[q].cl_sum);
      if (in[q].ext_htid >= 1 && in[q].ext_htid <= 5)          s += int'(in[a_from[q]].qt8_lo);
      else if (in[q].ext_htid >= 121 && in[q].ext_htid <= 125) s += int'(in[d_from[q]].qt8_hi);
      bits[q] = ref_th3(s, th);
    end
    o.st = bits[0]; o.sb = bits[1]; o.nt = bits[2]; o.nb = bits[3];
    o.ht_bits = {in[3].ht_bit, in[2].ht_bit, in[1].ht_bit, in[0].ht_bit};
    return o;
  endfunction

  // FM102/FM103. in[] = Top, Upper-Side, Bottom, Lower-Side.
  function automatic l1_large_t ref_fm102(l0_word_t in [4], logic [2:0][7:0] th);
    l1_large_t o;
    int s [4];
    for (int k = 0; k < 4; k++) s[k] = int'(in[k].cl_sum);
    // H bottom-row cells take I(0) of their own side section
    if (in[0].ext_htid >= 121 && in[0].ext_htid <= 126) s[0] += int'(in[1].qt8_lo);
    if (in[2].ext_htid >= 121 && in[2].ext_htid <= 126) s[2] += int'(in[3].qt8_lo);
    // I top-row cells take H(3); J bottom-row cells take J(3) of the other side
    if (in[1].ext_htid >= 1 && in[1].ext_htid <= 6)        s[1] += int'(in[0].qt8_hi);
    else if (in[1].ext_htid >= 57 && in[1].ext_htid <= 62) s[1] += int'(in[3].qt8_hi);
    if (in[3].ext_htid >= 1 && in[3].ext_htid <= 6)        s[3] += int'(in[2].qt8_hi);
    else if (in[3].ext_htid >= 57 && in[3].ext_htid <= 62) s[3] += int'(in[1].qt8_hi);
    o.top     = ref_th3(s[0], th) | ref_th3(s[1], th);
    o.bottom  = ref_th3(s[2], th) | ref_th3(s[3], th);
    o.ht_bits = {in[2].ht_bit | in[3].ht_bit, in[0].ht_bit | in[1].ht_bit};
    return o;
  endfunction

  function automatic logic [1:0] ref_fe101(int sums [4], int th);
    return {(sums[2] + sums[3]) > th, (sums[0] + sums[1]) > th};
  endfunction

  function automatic l2_word_t ref_fp201(l1_small_t sm, l1_large_t ls, l1_large_t ln,
                                         logic [1:0] fpe);
    l2_word_t o;
    clth_t sq [4];
    clth_t lq [4];
    o = '0;
    sq = '{sm.st, sm.sb, sm.nt, sm.nb};
    lq = '{ls.top, ls.bottom, ln.top, ln.bottom};
    o.fpe    = |fpe;
    o.sml_ht = |sm.ht_bits;
    o.lrg_ht = |ls.ht_bits | |ln.ht_bits;
    for (int n = 0; n < 3; n++) begin
      int cs, cl;
      cs = 0; cl = 0;
      for (int q = 0; q < 4; q++) begin
        cs += int'(sq[q][n]);
        cl += int'(lq[q][n]);
      end
      o.sml_cl[n]   = cs > 0;
      o.lrg_cl[n]   = cl > 0;
      o.sml_mult[n] = cs >= 2;
      o.lrg_mult[n] = cl >= 2;
    end
    return o;
  endfunction

  // FMS QT board with the RTL's default scaling (shift by 5, saturate).
  function automatic qt_word_t ref_qt_fms(logic [31:0][11:0] adc, logic [31:0] mask,
                                          int sum_shift, int ht_shift);
    qt_word_t w;
    int best;
    w = '0;
    for (int c = 0; c < 4; c++) begin
      int s;
      s = 0;
      for (int i = 0; i < 8; i++) s += int'(adc[c*8+i]);
      s = s >> sum_shift;
      w.qt8[c] = 5'((s > 31) ? 31 : s);
    end
    best = -1;
    for (int i = 0; i < 32; i++) begin
      int h;
      h = int'(adc[i]) >> ht_shift;
      if (h > 127) h = 127;
      if (!mask[i] && (best < 0 || h > int'(w.ht))) begin
        best   = i;
        w.ht   = 7'(h);
        w.htid = 5'(i);
      end
    end
    return w;
  endfunction

  function automatic int ref_qt_fpe(logic [31:0][11:0] adc, logic [31:0] mask);
    int s;
    s = 0;
    for (int i = 0; i < 32; i++) if (!mask[i]) s += int'(adc[i]);
    return s;
  endfunction

endpackage
