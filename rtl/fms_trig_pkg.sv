// fms_trig_pkg: widths, word formats and latencies shared by the FMS / FPD-East
// level-0 trigger tree (QT boards -> layer-0 DSMs -> layer-1 DSMs -> layer-2 DSM).
//
// The bit layouts of the QT board word, the layer-0 DSM word, the two layer-1
// words and the layer-2 trigger word follow the published formats bit for bit.
// Packed structs are declared MSB first, so the first field listed holds the
// highest bits. The pipeline latencies are this design's own choice: every DSM
// runs its four algorithm steps in four clock cycles, and the QT boards take two
// (FMS) and one (FPD-East) cycles.
package fms_trig_pkg;

  localparam int unsigned ADC_W      = 12;  // QT ADC value
  localparam int unsigned QT8_SUM_W  = 5;   // sum sent for each QT8 daughter card
  localparam int unsigned HT_W       = 7;   // highest-tower ADC value
  localparam int unsigned HTID_W     = 5;   // channel ID 0..31 inside a QT board
  localparam int unsigned EXT_HTID_W = 7;   // 2-bit board number + HTID
  localparam int unsigned CLSUM_W    = 8;   // layer-0 cluster sum
  localparam int unsigned CLTH_W     = 8;   // layer-1 cluster threshold registers
  localparam int unsigned FPE_SUM_W  = 17;  // FPD-East QT board sum
  localparam int unsigned FPE_MOD_W  = 18;  // FPD-East module sum

  // Cycles from input to registered output.
  localparam int unsigned QT_FMS_LATENCY = 2;  // QT8 card stage + motherboard stage
  localparam int unsigned QT_FPE_LATENCY = 1;
  localparam int unsigned DSM_LATENCY    = 4;  // steps 1..4, one clock each

  typedef logic [QT8_SUM_W-1:0] qt8_sum_t;

  // 32-bit word from one FMS QT board to a layer-0 DSM (two 16-bit DSM channels).
  // Bits 0:4 QT8(0), 5:9 QT8(1), 10:14 QT8(2), 15:19 QT8(3), 20:26 HT, 27:31 HTID.
  typedef struct packed {
    logic [HTID_W-1:0] htid;
    logic [HT_W-1:0]   ht;
    qt8_sum_t [3:0]    qt8;
  } qt_word_t;

  // 32-bit layer-0 DSM output.
  // Bits 0:7 cluster sum, 8:14 extended HTID, 16:20 low-side QT8 sum (A(0) or I(0)),
  // 21:25 high-side QT8 sum (D(3), H(3) or J(3)), 26 HT threshold bit.
  typedef struct packed {
    logic [4:0]            spare_hi;
    logic                  ht_bit;
    qt8_sum_t              qt8_hi;
    qt8_sum_t              qt8_lo;
    logic                  spare15;
    logic [EXT_HTID_W-1:0] ext_htid;
    logic [CLSUM_W-1:0]    cl_sum;
  } l0_word_t;

  typedef logic [2:0] clth_t;  // cluster threshold bits, bit 0 = threshold 0

  // 16-bit FM101 output: bits 0:2 ST, 3:5 SB, 6:8 NT, 9:11 NB, 12:15 HT bits (ST,SB,NT,NB).
  typedef struct packed {
    logic [3:0] ht_bits;  // [0]=ST .. [3]=NB
    clth_t      nb;
    clth_t      nt;
    clth_t      sb;
    clth_t      st;
  } l1_small_t;

  // 8-bit FM102/FM103 output: bits 0:2 Top, 3:5 Bottom, 6:7 HT bits (Top, Bottom).
  typedef struct packed {
    logic [1:0] ht_bits;  // [0]=Top, [1]=Bottom
    clth_t      bottom;
    clth_t      top;
  } l1_large_t;

  // 16-bit FP201 output word.
  typedef struct packed {
    logic  unused15;
    logic  fpe;        // 14
    logic  lrg_ht;     // 13
    clth_t lrg_mult;   // 10:12
    clth_t lrg_cl;     // 7:9
    logic  sml_ht;     // 6
    clth_t sml_mult;   // 3:5
    clth_t sml_cl;     // 0:2
  } l2_word_t;

  // How a layer-0 DSM treats a high-tower ID (from the cluster tables):
  // not used for clusters, a 2- or 3-stripe sum, or that sum plus a 4th QT8 sum.
  typedef enum logic [1:0] {CELL_IGNORED = 2'd0, CELL_SUM = 2'd1, CELL_SUM_PLUS = 2'd2} cell_use_e;

  // Zero-extending adders used for the cluster sums.
  function automatic logic [CLSUM_W-1:0] add2(input qt8_sum_t a, input qt8_sum_t b);
    return CLSUM_W'(a) + CLSUM_W'(b);
  endfunction

  function automatic logic [CLSUM_W-1:0] add3(input qt8_sum_t a, input qt8_sum_t b,
                                              input qt8_sum_t c);
    return CLSUM_W'(a) + CLSUM_W'(b) + CLSUM_W'(c);
  endfunction

  // Quadrant numbering used throughout.
  typedef enum logic [1:0] {Q_ST = 2'd0, Q_SB = 2'd1, Q_NT = 2'd2, Q_NB = 2'd3} quadrant_e;

endpackage
