// tb_fms_trigger_top: end-to-end testbench of the whole trigger tree at its
// default parameters.
//
// Every clock a new beam crossing is presented: ADC values for all 40 FMS QT
// boards (4 quadrants x boards A..J x 32 channels) and the 4 FPD-East QT
// boards. Each board is quiet, noisy, active or carries a large tower, chosen
// at random. The expected trigger word is computed with the chained reference
// model (QT boards -> layer 0 -> layer 1 -> layer 2) and compared with both
// trig_out and scaler_out exactly LATENCY = 14 clocks later.
// The run is split into segments with different thresholds; in most of them
// the HT masks exclude the cells the cluster tables never use, as the QT
// boards are meant to be programmed, in one segment nothing is masked. The
// testbench counts every mechanism of the tree and fails if one never
// happened: each kind of layer-0 cluster (2/3-stripe, 4-stripe, not
// completable, left for layer 1, boundary cell), each of the five layer-1
// boundary completions (A(0), D(3), I(0), H(3), J(3)) changing a threshold
// bit, the masks changing a highest tower, HT bits, single and multi-cluster
// bits for small and large cells, and the FPD-East bit.
`timescale 1ns/1ps
module tb_fms_trigger_top;
  import fms_trig_pkg::*;
  import fms_ref_pkg::*;

  localparam int NVEC = 400;
  localparam int NSEG = 4;
  localparam int LAT  = QT_FMS_LATENCY + 3 * DSM_LATENCY;

  logic                              clk = 1'b0;
  logic                              rst_n;
  logic [3:0][9:0][31:0][11:0]       fms_adc;
  logic [3:0][9:0][31:0]             fms_ht_mask;
  logic [3:0][31:0][11:0]            fpe_adc;
  logic [3:0][31:0]                  fpe_mask;
  logic [6:0]                        fms_small_ht_th, fms_large_ht_th;
  logic [2:0][7:0]                   fms_small_cl_th, fms_large_cl_th;
  logic [11:0]                       fpe_th_lsb;
  logic [5:0]                        fpe_th_msb;
  l2_word_t                          trig_out, scaler_out;

  fms_trigger_top dut (
    .clk(clk), .rst_n(rst_n), .fms_adc(fms_adc), .fms_ht_mask(fms_ht_mask),
    .fpe_adc(fpe_adc), .fpe_mask(fpe_mask),
    .fms_small_ht_th(fms_small_ht_th), .fms_large_ht_th(fms_large_ht_th),
    .fms_small_cl_th(fms_small_cl_th), .fms_large_cl_th(fms_large_cl_th),
    .fpe_th_lsb(fpe_th_lsb), .fpe_th_msb(fpe_th_msb),
    .trig_out(trig_out), .scaler_out(scaler_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_act [3][5];                 // [layer-0 kind][action]
  int n_a0 = 0, n_d3 = 0, n_i0 = 0, n_h3 = 0, n_j3 = 0;
  int n_mask_effect = 0;
  int n_sml_ht = 0, n_lrg_ht = 0, n_sml_cl = 0, n_lrg_cl = 0, n_sml_mult = 0, n_lrg_mult = 0;
  int n_fpe = 0, n_trig_bits_zero = 0;

  l2_word_t exp_q [$];

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Kind and local board number of FMS board b (A..J).
  function automatic l0_kind_e kind_of(int b);
    return (b < 4) ? L0_SMALL : (b < 8) ? L0_HORIZ : L0_SIDE;
  endfunction
  function automatic int local_of(int b);
    return (b < 4) ? b : (b < 8) ? b - 4 : b - 8;
  endfunction

  // Fill one board with a random activity pattern.
  function automatic logic [31:0][11:0] rand_board(bit quiet);
    logic [31:0][11:0] a;
    int level;
    level = quiet ? $urandom_range(0, 5) : $urandom_range(0, 9);
    for (int i = 0; i < 32; i++) begin
      if (level < 3)      a[i] = 12'd0;
      else if (level < 6) a[i] = 12'($urandom_range(0, 40));
      else                a[i] = 12'($urandom_range(0, 160));
    end
    if (level >= 8) a[$urandom_range(0, 31)] = 12'($urandom_range(600, 4095));
    return a;
  endfunction

  // Apply the stimulus of one crossing and queue its expected result.
  task automatic apply_vector(bit use_mask);
    qt_word_t  qt [4][10];
    qt_word_t  w  [4];
    l0_word_t  l0s [4], l0h [4], l0v [4];
    l0_word_t  in4 [4];
    l1_small_t e101;
    l1_large_t e102, e103;
    int        fsum [4];
    logic [1:0] fbits;
    l2_word_t  e;
    bit        quiet;

    quiet = ($urandom_range(0, 3) == 0);   // a crossing with noise only

    for (int q = 0; q < 4; q++)
      for (int b = 0; b < 10; b++) begin
        fms_adc[q][b] = rand_board(quiet);
        for (int i = 0; i < 32; i++)
          fms_ht_mask[q][b][i] = use_mask && (l0_terms(kind_of(b), local_of(b), i) == 0);
        qt[q][b] = ref_qt_fms(fms_adc[q][b], fms_ht_mask[q][b], 5, 5);
        if (use_mask && qt[q][b] != ref_qt_fms(fms_adc[q][b], '0, 5, 5)) n_mask_effect++;
      end
    for (int k = 0; k < 4; k++) begin
      for (int i = 0; i < 32; i++) fpe_adc[k][i] = 12'($urandom_range(0, quiet ? 200 : 2000));
      fpe_mask[k] = ($urandom_range(0, 3) == 0) ? ($urandom() & $urandom()) : '0;
      fsum[k] = ref_qt_fpe(fpe_adc[k], fpe_mask[k]);
    end

    // layer 0
    for (int q = 0; q < 4; q++) begin
      int win;
      w = '{qt[q][0], qt[q][1], qt[q][2], qt[q][3]};
      l0s[q] = ref_l0(L0_SMALL, w, fms_small_ht_th);
      win = l0_winner(L0_SMALL, w);
      n_act[L0_SMALL][l0_action(L0_SMALL, win, int'(w[win].htid))]++;
      w = '{qt[q][4], qt[q][5], qt[q][6], qt[q][7]};
      l0h[q] = ref_l0(L0_HORIZ, w, fms_large_ht_th);
      win = l0_winner(L0_HORIZ, w);
      n_act[L0_HORIZ][l0_action(L0_HORIZ, win, int'(w[win].htid))]++;
      w = '{qt[q][8], qt[q][9], '0, '0};
      l0v[q] = ref_l0(L0_SIDE, w, fms_large_ht_th);
      win = l0_winner(L0_SIDE, w);
      n_act[L0_SIDE][l0_action(L0_SIDE, win, int'(w[win].htid))]++;
    end

    // layer 1, counting boundary completions that change a threshold bit
    e101 = ref_fm101(l0s, fms_small_cl_th);
    for (int q = 0; q < 4; q++) begin
      int s;
      s = int'(l0s[q].cl_sum);
      if (l0s[q].ext_htid inside {[1:5]} &&
          ref_th3(s, fms_small_cl_th) != ref_th3(s + int'(l0s[q ^ 2].qt8_lo), fms_small_cl_th)) n_a0++;
      if (l0s[q].ext_htid inside {[121:125]} &&
          ref_th3(s, fms_small_cl_th) != ref_th3(s + int'(l0s[q ^ 1].qt8_hi), fms_small_cl_th)) n_d3++;
    end
    for (int side = 0; side < 2; side++) begin
      in4 = '{l0h[2*side], l0v[2*side], l0h[2*side+1], l0v[2*side+1]};
      if (side == 0) e102 = ref_fm102(in4, fms_large_cl_th);
      else           e103 = ref_fm102(in4, fms_large_cl_th);
      for (int h = 0; h < 4; h += 2) begin
        int s;
        s = int'(in4[h].cl_sum);
        if (in4[h].ext_htid inside {[121:126]} &&
            ref_th3(s, fms_large_cl_th) != ref_th3(s + int'(in4[h+1].qt8_lo), fms_large_cl_th)) n_i0++;
        s = int'(in4[h+1].cl_sum);
        if (in4[h+1].ext_htid inside {[1:6]} &&
            ref_th3(s, fms_large_cl_th) != ref_th3(s + int'(in4[h].qt8_hi), fms_large_cl_th)) n_h3++;
        if (in4[h+1].ext_htid inside {[57:62]} &&
            ref_th3(s, fms_large_cl_th) != ref_th3(s + int'(in4[(h+1) ^ 2].qt8_hi), fms_large_cl_th)) n_j3++;
      end
    end
    fbits = ref_fe101(fsum, int'({fpe_th_msb, fpe_th_lsb}));

    // layer 2
    e = ref_fp201(e101, e102, e103, fbits);
    exp_q.push_back(e);
    if (e.sml_ht) n_sml_ht++;
    if (e.lrg_ht) n_lrg_ht++;
    if (e.sml_cl != 0 && e.sml_mult == 0) n_sml_cl++;
    if (e.lrg_cl != 0 && e.lrg_mult == 0) n_lrg_cl++;
    if (e.sml_mult != 0) n_sml_mult++;
    if (e.lrg_mult != 0) n_lrg_mult++;
    if (e.fpe) n_fpe++;
    if (e == '0) n_trig_bits_zero++;
  endtask

  task automatic check_vector();
    l2_word_t e;
    e = exp_q.pop_front();
    checks += 2;
    if (trig_out !== e) begin
      failures++;
      if (failures < 10) $display("mismatch at %0t: got %b exp %b", $time, trig_out, e);
    end
    if (scaler_out !== e) failures++;
  endtask

  initial begin
    int fth;
    rst_n = 1'b0;
    fms_adc = '0; fms_ht_mask = '0; fpe_adc = '0; fpe_mask = '0;
    fms_small_ht_th = 7'd30; fms_large_ht_th = 7'd30;
    fms_small_cl_th = '{8'd70, 8'd50, 8'd30};
    fms_large_cl_th = '{8'd70, 8'd50, 8'd30};
    fpe_th_lsb = '0; fpe_th_msb = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (trig_out !== '0) failures++;
    rst_n = 1'b1;
    for (int seg = 0; seg < NSEG; seg++) begin
      fms_small_ht_th = 7'($urandom_range(10, 60));
      fms_large_ht_th = 7'($urandom_range(10, 60));
      fms_small_cl_th = '{8'($urandom_range(60, 90)), 8'($urandom_range(40, 60)), 8'($urandom_range(15, 40))};
      fms_large_cl_th = '{8'($urandom_range(60, 90)), 8'($urandom_range(40, 60)), 8'($urandom_range(15, 40))};
      fth = 64000 + int'($urandom_range(0, 4000));
      fpe_th_lsb = 12'(fth);
      fpe_th_msb = 6'(fth >> 12);
      for (int n = 0; n < NVEC + LAT; n++) begin
        @(negedge clk);
        if (exp_q.size() == LAT || (n >= NVEC && exp_q.size() > 0)) check_vector();
        if (n < NVEC) apply_vector(seg != 2);
      end
    end

    $display("layer0 small : ignored=%0d done=%0d done4=%0d not_feasible=%0d layer1=%0d",
             n_act[0][ACT_IGNORED], n_act[0][ACT_DONE], n_act[0][ACT_DONE4],
             n_act[0][ACT_NOT_FEASIBLE], n_act[0][ACT_LAYER1]);
    $display("layer0 horiz : ignored=%0d done=%0d done4=%0d not_feasible=%0d layer1=%0d",
             n_act[1][ACT_IGNORED], n_act[1][ACT_DONE], n_act[1][ACT_DONE4],
             n_act[1][ACT_NOT_FEASIBLE], n_act[1][ACT_LAYER1]);
    $display("layer0 side  : ignored=%0d done=%0d layer1=%0d",
             n_act[2][ACT_IGNORED], n_act[2][ACT_DONE], n_act[2][ACT_LAYER1]);
    $display("layer1 completions changing bits: A0=%0d D3=%0d I0=%0d H3=%0d J3=%0d",
             n_a0, n_d3, n_i0, n_h3, n_j3);
    $display("mask changed HT=%0d; layer2: sml_ht=%0d lrg_ht=%0d sml_single=%0d lrg_single=%0d sml_mult=%0d lrg_mult=%0d fpe=%0d none=%0d",
             n_mask_effect, n_sml_ht, n_lrg_ht, n_sml_cl, n_lrg_cl, n_sml_mult, n_lrg_mult, n_fpe,
             n_trig_bits_zero);

    for (int k = 0; k < 3; k++) begin
      if (n_act[k][ACT_IGNORED] == 0) failures++;
      if (n_act[k][ACT_DONE] == 0) failures++;
      if (n_act[k][ACT_LAYER1] == 0) failures++;
    end
    for (int k = 0; k < 2; k++) begin
      if (n_act[k][ACT_DONE4] == 0) failures++;
      if (n_act[k][ACT_NOT_FEASIBLE] == 0) failures++;
    end
    if (n_a0 == 0 || n_d3 == 0 || n_i0 == 0 || n_h3 == 0 || n_j3 == 0) failures++;
    if (n_mask_effect == 0) failures++;
    if (n_sml_ht == 0 || n_lrg_ht == 0 || n_sml_cl == 0 || n_lrg_cl == 0) failures++;
    if (n_sml_mult == 0 || n_lrg_mult == 0 || n_fpe == 0 || n_trig_bits_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
