// fms_trigger_top: complete FMS cluster trigger and FPD-East trigger tree.
//
// Data flow, one beam crossing per clock:
//   40 FMS QT boards (10 per quadrant, letters A..J)
//     -> 12 layer-0 DSMs, three per quadrant:
//          FM001..FM004  small cells   (boards A..D)      dsm_fms_fm001
//          FM005/7/9/11  large top/bottom section (E..H)   dsm_fms_fm005
//          FM006/8/10/12 large side section (I, J)         dsm_fms_fm006
//     -> layer 1: FM101 (all small-cell quadrants), FM102 (large cells South),
//        FM103 (large cells North)
//   4 FPD-East QT boards -> FE101 (layer 1)
//   FM101, FM102, FM103, FE101 -> FP201 (layer 2) -> 16-bit trigger word,
//   with a copy for the scaler system.
// Quadrants are numbered ST=0, SB=1, NT=2, NB=3. Every quadrant uses the same
// board lettering and channel IDs, so fms_adc[q][b][id] is the cell with
// channel ID id on board b (A=0 .. J=9) of quadrant q. The wiring of QT boards
// to DSMs and of DSMs to layer 1 and layer 2 follows the published channel
// assignments. The FPD-East path is one layer shorter than the FMS path; this
// design delays the FE101 word by FPE_ALIGN clocks so that FP201 combines data
// from the same crossing. The register values (thresholds, masks) are ports.
// Timing: trig_out belongs to the inputs presented LATENCY = 14 clocks earlier.
module fms_trigger_top
  import fms_trig_pkg::*;
#(
  parameter int unsigned SUM_SHIFT = 5,   // QT8 sum scaling (see qt8_card)
  parameter int unsigned HT_SHIFT  = 5    // HT scaling
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // FMS QT boards: [quadrant][board A..J][channel ID]
  input  logic [3:0][9:0][31:0][ADC_W-1:0] fms_adc,
  input  logic [3:0][9:0][31:0]           fms_ht_mask,   // 1 = excluded from HT search
  // FPD-East QT boards 1..4: [board][channel]
  input  logic [3:0][31:0][ADC_W-1:0]     fpe_adc,
  input  logic [3:0][31:0]                fpe_mask,      // 1 = excluded from the sum
  // DSM registers
  input  logic [HT_W-1:0]                 fms_small_ht_th,   // FM001 R0
  input  logic [HT_W-1:0]                 fms_large_ht_th,   // FM005/FM006 R0
  input  logic [2:0][CLTH_W-1:0]          fms_small_cl_th,   // FM101 R0..R2
  input  logic [2:0][CLTH_W-1:0]          fms_large_cl_th,   // FM102/FM103 R0..R2
  input  logic [11:0]                     fpe_th_lsb,        // FE101 R0
  input  logic [5:0]                      fpe_th_msb,        // FE101 R1
  output l2_word_t                        trig_out,
  output l2_word_t                        scaler_out
);

  localparam int unsigned FMS_PATH  = QT_FMS_LATENCY + 2 * DSM_LATENCY;
  localparam int unsigned FPE_PATH  = QT_FPE_LATENCY + DSM_LATENCY;
  localparam int unsigned FPE_ALIGN = FMS_PATH - FPE_PATH;

  // ---------------- QT boards ----------------
  qt_word_t fms_qt [4][10];
  logic [31:0] fpe_qt [4];

  for (genvar q = 0; q < 4; q++) begin : g_quad
    for (genvar b = 0; b < 10; b++) begin : g_board
      qt_fms_board #(.SUM_SHIFT(SUM_SHIFT), .HT_SHIFT(HT_SHIFT)) u_qt (
        .clk     (clk),
        .rst_n   (rst_n),
        .adc     (fms_adc[q][b]),
        .ht_mask (fms_ht_mask[q][b]),
        .qt_word (fms_qt[q][b])
      );
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_fpe_qt
    qt_fpe_board u_qt (
      .clk     (clk),
      .rst_n   (rst_n),
      .adc     (fpe_adc[k]),
      .mask    (fpe_mask[k]),
      .qt_word (fpe_qt[k])
    );
  end

  // ---------------- layer 0 ----------------
  // Board cables are reversed: channel pair 0 holds the last board.
  l0_word_t l0_small [4];
  l0_word_t l0_horiz [4];
  l0_word_t l0_side  [4];

  for (genvar q = 0; q < 4; q++) begin : g_l0
    dsm_fms_fm001 u_fm001 (
      .clk      (clk),
      .rst_n    (rst_n),
      .ch_in    ({fms_qt[q][0], fms_qt[q][1], fms_qt[q][2], fms_qt[q][3]}),  // A B C D
      .r0_ht_th (fms_small_ht_th),
      .dsm_out  (l0_small[q])
    );
    dsm_fms_fm005 u_fm005 (
      .clk      (clk),
      .rst_n    (rst_n),
      .ch_in    ({fms_qt[q][4], fms_qt[q][5], fms_qt[q][6], fms_qt[q][7]}),  // E F G H
      .r0_ht_th (fms_large_ht_th),
      .dsm_out  (l0_horiz[q])
    );
    dsm_fms_fm006 u_fm006 (
      .clk      (clk),
      .rst_n    (rst_n),
      .ch_in    ({64'd0, fms_qt[q][8], fms_qt[q][9]}),                     // I J
      .r0_ht_th (fms_large_ht_th),
      .dsm_out  (l0_side[q])
    );
  end

  // ---------------- layer 1 ----------------
  l1_small_t fm101_out;
  l1_large_t fm102_out, fm103_out;
  logic [15:0] fe101_out, fe101_aligned;

  dsm_fms_fm101 u_fm101 (
    .clk     (clk),
    .rst_n   (rst_n),
    .ch_in   ({l0_small[Q_NB], l0_small[Q_NT], l0_small[Q_SB], l0_small[Q_ST]}),
    .cl_th   (fms_small_cl_th),
    .dsm_out (fm101_out)
  );

  // sections: Top, Upper-Side, Bottom, Lower-Side on channel pairs 0..3
  dsm_fms_fm102 u_fm102 (
    .clk     (clk),
    .rst_n   (rst_n),
    .ch_in   ({l0_side[Q_SB], l0_horiz[Q_SB], l0_side[Q_ST], l0_horiz[Q_ST]}),
    .cl_th   (fms_large_cl_th),
    .dsm_out (fm102_out)
  );

  dsm_fms_fm102 u_fm103 (
    .clk     (clk),
    .rst_n   (rst_n),
    .ch_in   ({l0_side[Q_NB], l0_horiz[Q_NB], l0_side[Q_NT], l0_horiz[Q_NT]}),
    .cl_th   (fms_large_cl_th),
    .dsm_out (fm103_out)
  );

  dsm_mix_fe101 u_fe101 (
    .clk       (clk),
    .rst_n     (rst_n),
    .ch_in     ({fpe_qt[3], fpe_qt[2], fpe_qt[1], fpe_qt[0]}),
    .r0_th_lsb (fpe_th_lsb),
    .r1_th_msb (fpe_th_msb),
    .dsm_out   (fe101_out)
  );

  pipe_delay #(.W(16), .N(FPE_ALIGN)) u_fpe_align (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (fe101_out),
    .q     (fe101_aligned)
  );

  // ---------------- layer 2 ----------------
  dsm_l2_fp201 u_fp201 (
    .clk        (clk),
    .rst_n      (rst_n),
    .ch_in      ({fe101_aligned, 16'd0, 16'd0, {8'd0, fm103_out}, 16'd0, {8'd0, fm102_out},
                  16'd0, fm101_out}),
    .trig_out   (trig_out),
    .scaler_out (scaler_out)
  );

endmodule
