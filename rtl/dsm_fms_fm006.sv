// dsm_fms_fm006: large-cell layer-0 DSM for a side section of the large-cell
// array (boards FM006, FM008, FM010, FM012).
//
// Inputs are the words of QT boards I and J: channels 0/1 carry board J and
// 2/3 board I; channels 4..7 are unused. Board numbers inside this module are
// I=0 and J=1, the numbers that prefix the extended HTID. The published
// pipeline:
//   step 1  latch the two board words;
//   step 2  compare the two HTs, compare each HT with R0 (HT > R0), form every
//           2- and 3-stripe cluster sum; delay the HTIDs to step 3 and I(0),
//           J(3) to step 4;
//   step 3  pick the higher board, select its cluster sum and HT threshold
//           bit, build the extended HTID {board, HTID};
//   step 4  latch: bits 0:7 cluster sum, 8:14 extended HTID, 16:20 I(0),
//           21:25 J(3), 26 HT threshold bit.
// The I cells on the upper edge (I(0)+I(1)) are completed with H(3) and the J
// cells on the lower edge (J(2)+J(3)) with J(3) of the neighbouring section in
// the layer-1 board. Boundary cells and IDs with no cell give a cluster sum of
// 0; that, I winning a tie and the strict ">" against R0 are this design's
// choices.
// Timing: one word per clock, DSM_LATENCY = 4 clocks from ch_in to dsm_out.
module dsm_fms_fm006
  import fms_trig_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0][15:0] ch_in,      // channels 4..7 unused
  input  logic [HT_W-1:0]  r0_ht_th,   // R0: FMSlarge-HT-th
  output l0_word_t         dsm_out
);

  localparam int unsigned NB = 2;

  // ---------------- step 1: input latch ----------------
  qt_word_t s1_qt [NB];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NB; b++) s1_qt[b] <= '0;
    end else begin
      for (int b = 0; b < NB; b++) s1_qt[b] <= qt_word_t'(ch_in[2*(NB-1-b) +: 2]);
    end
  end

  // ---------------- step 2: compare, threshold, 2/3-stripe sums ----------------
  logic [CLSUM_W-1:0] cand [NB][4];   // [board][stripe of HTID]

  always_comb begin
    // board I
    cand[0][0] = add2(s1_qt[0].qt8[0], s1_qt[0].qt8[1]);
    cand[0][1] = add3(s1_qt[0].qt8[0], s1_qt[0].qt8[1], s1_qt[0].qt8[2]);
    cand[0][2] = add3(s1_qt[0].qt8[1], s1_qt[0].qt8[2], s1_qt[0].qt8[3]);
    cand[0][3] = add3(s1_qt[0].qt8[2], s1_qt[0].qt8[3], s1_qt[1].qt8[0]);
    // board J
    cand[1][0] = add3(s1_qt[0].qt8[3], s1_qt[1].qt8[0], s1_qt[1].qt8[1]);
    cand[1][1] = add3(s1_qt[1].qt8[0], s1_qt[1].qt8[1], s1_qt[1].qt8[2]);
    cand[1][2] = add3(s1_qt[1].qt8[1], s1_qt[1].qt8[2], s1_qt[1].qt8[3]);
    cand[1][3] = add2(s1_qt[1].qt8[2], s1_qt[1].qt8[3]);
  end

  logic               s2_i_ge_j;       // HT(I) >= HT(J)
  logic [NB-1:0]      s2_over;
  logic [CLSUM_W-1:0] s2_cand [NB][4];
  logic [HTID_W-1:0]  s2_htid [NB];
  qt8_sum_t           s2_i0, s2_j3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NB; i++) begin
        for (int k = 0; k < 4; k++) s2_cand[i][k] <= '0;
        s2_htid[i] <= '0;
      end
      s2_i_ge_j <= 1'b0;
      s2_over   <= '0;
      s2_i0     <= '0;
      s2_j3     <= '0;
    end else begin
      for (int i = 0; i < NB; i++) begin
        for (int k = 0; k < 4; k++) s2_cand[i][k] <= cand[i][k];
        s2_htid[i] <= s1_qt[i].htid;
        s2_over[i] <= s1_qt[i].ht > r0_ht_th;
      end
      s2_i_ge_j <= s1_qt[0].ht >= s1_qt[1].ht;
      s2_i0     <= s1_qt[0].qt8[0];
      s2_j3     <= s1_qt[1].qt8[3];
    end
  end

  // ---------------- step 3: select the higher board and its cluster ----------------
  // Cluster table for boards I and J: cells 1:6 of every stripe.
  function automatic cell_use_e cell_use(input logic [2:0] pos);  // position in stripe
    return (pos inside {[3'd1:3'd6]}) ? CELL_SUM : CELL_IGNORED;
  endfunction

  logic               win;
  logic [CLSUM_W-1:0] win_sum;

  always_comb begin
    win     = !s2_i_ge_j;
    win_sum = (cell_use(s2_htid[win][2:0]) == CELL_SUM) ? s2_cand[win][s2_htid[win][4:3]] : '0;
  end

  logic [CLSUM_W-1:0]    s3_sum;
  logic [EXT_HTID_W-1:0] s3_ext_htid;
  logic                  s3_ht_bit;
  qt8_sum_t              s3_i0, s3_j3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_sum      <= '0;
      s3_ext_htid <= '0;
      s3_ht_bit   <= 1'b0;
      s3_i0       <= '0;
      s3_j3       <= '0;
    end else begin
      s3_sum      <= win_sum;
      s3_ext_htid <= {1'b0, win, s2_htid[win]};
      s3_ht_bit   <= s2_over[win];
      s3_i0       <= s2_i0;
      s3_j3       <= s2_j3;
    end
  end

  // ---------------- step 4: output latch ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsm_out <= '0;
    end else begin
      dsm_out          <= '0;
      dsm_out.cl_sum   <= s3_sum;
      dsm_out.ext_htid <= s3_ext_htid;
      dsm_out.qt8_lo   <= s3_i0;
      dsm_out.qt8_hi   <= s3_j3;
      dsm_out.ht_bit   <= s3_ht_bit;
    end
  end

endmodule
