// dsm_fms_fm001: small-cell layer-0 DSM (boards FM001..FM004, one per quadrant).
//
// Inputs are the words of four small-cell QT boards A..D. The cable order is
// reversed: channels 0/1 carry board D, 2/3 C, 4/5 B and 6/7 A (channel 2k is
// the low 16 bits of a board word). Board numbers inside this module are
// A=0, B=1, C=2, D=3, the same numbers that prefix the extended HTID.
//
// A cluster is the QT8 sum of the stripe holding the highest tower plus the
// stripes on either side. The module finds the board with the highest HT and
// reports the cluster sum around that board's HTID. The published pipeline:
//   step 1  latch the four board words;
//   step 2  compare the HTs pairwise and each HT with R0 (HT > R0 sets the HT
//           threshold bit); in parallel form every 2- and 3-stripe cluster sum;
//           delay the HTIDs and D(0) to step 3, A(0) and D(3) to step 4;
//   step 3  pick the highest board, select its cluster sum, add D(0) for the
//           cells next to board D that need a 4th stripe, and build the
//           extended HTID {board, HTID};
//   step 4  latch the output word: bits 0:7 cluster sum, 8:14 extended HTID,
//           16:20 A(0), 21:25 D(3), 26 HT threshold bit.
// Which sum belongs to which HTID follows the cluster table for boards A..D.
// A D-board cell on the upper edge would need five stripes; as published, only
// D(0)+D(1) is used there. Cells the table marks as never sent by the QT boards
// (boundary cells) and IDs with no cell give a cluster sum of 0 here; that, the
// lowest-board-wins tie rule and the strict ">" against R0 are this design's
// choices.
// Timing: one word per clock, DSM_LATENCY = 4 clocks from ch_in to dsm_out.
module dsm_fms_fm001
  import fms_trig_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0][15:0] ch_in,
  input  logic [HT_W-1:0]  r0_ht_th,   // R0: FMSsmall-HT-th
  output l0_word_t         dsm_out
);

  localparam int unsigned NB = 4;

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
    // board A
    cand[0][0] = add2(s1_qt[0].qt8[0], s1_qt[0].qt8[1]);
    cand[0][1] = add3(s1_qt[0].qt8[0], s1_qt[0].qt8[1], s1_qt[0].qt8[2]);
    cand[0][2] = add3(s1_qt[0].qt8[1], s1_qt[0].qt8[2], s1_qt[0].qt8[3]);
    cand[0][3] = add3(s1_qt[0].qt8[2], s1_qt[0].qt8[3], s1_qt[1].qt8[0]);
    // board B
    cand[1][0] = add3(s1_qt[0].qt8[3], s1_qt[1].qt8[0], s1_qt[1].qt8[1]);
    cand[1][1] = add3(s1_qt[1].qt8[0], s1_qt[1].qt8[1], s1_qt[1].qt8[2]);
    cand[1][2] = add3(s1_qt[1].qt8[1], s1_qt[1].qt8[2], s1_qt[1].qt8[3]);
    cand[1][3] = add3(s1_qt[1].qt8[2], s1_qt[1].qt8[3], s1_qt[2].qt8[0]);
    // board C (its stripe 3 holds no usable cell)
    cand[2][0] = add3(s1_qt[1].qt8[3], s1_qt[2].qt8[0], s1_qt[2].qt8[1]);
    cand[2][1] = add3(s1_qt[2].qt8[0], s1_qt[2].qt8[1], s1_qt[2].qt8[2]);
    cand[2][2] = add3(s1_qt[2].qt8[1], s1_qt[2].qt8[2], s1_qt[2].qt8[3]);
    cand[2][3] = '0;
    // board D
    cand[3][0] = add2(s1_qt[3].qt8[0], s1_qt[3].qt8[1]);
    cand[3][1] = add3(s1_qt[3].qt8[0], s1_qt[3].qt8[1], s1_qt[3].qt8[2]);
    cand[3][2] = add3(s1_qt[3].qt8[1], s1_qt[3].qt8[2], s1_qt[3].qt8[3]);
    cand[3][3] = add2(s1_qt[3].qt8[2], s1_qt[3].qt8[3]);
  end

  logic               s2_ge [NB][NB];  // [i][j], i<j: HT(i) >= HT(j)
  logic [NB-1:0]      s2_over;
  logic [CLSUM_W-1:0] s2_cand [NB][4];
  logic [HTID_W-1:0]  s2_htid [NB];
  qt8_sum_t           s2_d0, s2_a0, s2_d3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NB; i++) begin
        for (int j = 0; j < NB; j++) s2_ge[i][j] <= 1'b0;
        for (int k = 0; k < 4; k++)  s2_cand[i][k] <= '0;
        s2_htid[i] <= '0;
      end
      s2_over <= '0;
      s2_d0   <= '0;
      s2_a0   <= '0;
      s2_d3   <= '0;
    end else begin
      for (int i = 0; i < NB; i++) begin
        for (int j = 0; j < NB; j++) s2_ge[i][j] <= (i < j) && (s1_qt[i].ht >= s1_qt[j].ht);
        for (int k = 0; k < 4; k++)  s2_cand[i][k] <= cand[i][k];
        s2_htid[i] <= s1_qt[i].htid;
        s2_over[i] <= s1_qt[i].ht > r0_ht_th;
      end
      s2_d0 <= s1_qt[3].qt8[0];
      s2_a0 <= s1_qt[0].qt8[0];
      s2_d3 <= s1_qt[3].qt8[3];
    end
  end

  // ---------------- step 3: select highest board and its cluster ----------------
  // Cluster table for boards A..D.
  function automatic cell_use_e cell_use(input logic [1:0] b, input logic [HTID_W-1:0] id);
    cell_use_e u;
    u = CELL_IGNORED;
    unique case (b)
      2'd0, 2'd3:  // A and D: cells 1:5 of every stripe
        if (id[2:0] inside {[3'd1:3'd5]}) u = CELL_SUM;
      2'd1:        // B
        if (id inside {[5'd1:5'd5], [5'd10:5'd14], [5'd17:5'd22], [5'd25:5'd30]}) u = CELL_SUM;
        else if (id inside {5'd16, 5'd24}) u = CELL_SUM_PLUS;
      2'd2:        // C
        if (id inside {[5'd1:5'd6], [5'd9:5'd14], [5'd17:5'd22]}) u = CELL_SUM;
        else if (id inside {5'd0, 5'd8, 5'd16}) u = CELL_SUM_PLUS;
      default: u = CELL_IGNORED;
    endcase
    return u;
  endfunction

  logic [1:0]         win;
  cell_use_e          win_use;
  logic [CLSUM_W-1:0] win_sum;

  logic [NB-1:0]      win_vec;          // one-hot: board that beats all others

  always_comb begin
    win = '0;
    for (int i = 0; i < NB; i++) begin
      win_vec[i] = 1'b1;
      for (int j = 0; j < NB; j++) begin
        if (j < i && s2_ge[j][i]) win_vec[i] = 1'b0;  // an earlier board is >= : it wins
        if (j > i && !s2_ge[i][j]) win_vec[i] = 1'b0; // a later board is strictly higher
      end
      if (win_vec[i]) win = 2'(i);
    end
    win_use = cell_use(win, s2_htid[win]);
    unique case (win_use)
      CELL_SUM:      win_sum = s2_cand[win][s2_htid[win][4:3]];
      CELL_SUM_PLUS: win_sum = s2_cand[win][s2_htid[win][4:3]] + CLSUM_W'(s2_d0);
      default:       win_sum = '0;
    endcase
  end

  // Pairwise ">=" results are transitive, so exactly one board wins.
  always_comb begin
    if (rst_n) assert ($onehot(win_vec)) else $error("HT comparison selected %b", win_vec);
  end

  logic [CLSUM_W-1:0]    s3_sum;
  logic [EXT_HTID_W-1:0] s3_ext_htid;
  logic                  s3_ht_bit;
  qt8_sum_t              s3_a0, s3_d3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_sum      <= '0;
      s3_ext_htid <= '0;
      s3_ht_bit   <= 1'b0;
      s3_a0       <= '0;
      s3_d3       <= '0;
    end else begin
      s3_sum      <= win_sum;
      s3_ext_htid <= {win, s2_htid[win]};
      s3_ht_bit   <= s2_over[win];
      s3_a0       <= s2_a0;
      s3_d3       <= s2_d3;
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
      dsm_out.qt8_lo   <= s3_a0;
      dsm_out.qt8_hi   <= s3_d3;
      dsm_out.ht_bit   <= s3_ht_bit;
    end
  end

endmodule
