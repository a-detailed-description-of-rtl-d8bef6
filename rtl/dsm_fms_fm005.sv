// dsm_fms_fm005: large-cell layer-0 DSM for the top or bottom section of the
// large-cell array (boards FM005, FM007, FM009, FM011).
//
// Inputs are the words of QT boards E..H, cabled in reverse: channels 0/1 carry
// board H, 2/3 G, 4/5 F and 6/7 E. Board numbers inside this module are E=0,
// F=1, G=2, H=3, the numbers that prefix the extended HTID. The published
// pipeline is the same as in the small-cell board:
//   step 1  latch the four board words;
//   step 2  pairwise HT comparisons, HT > R0 for each board, every 2- and
//           3-stripe cluster sum; delay the HTIDs and F(3) to step 3 and H(3)
//           to step 4;
//   step 3  pick the highest board, select its cluster sum, add F(3) for the
//           G and H cells next to the corner of board F, build {board, HTID};
//   step 4  latch: bits 0:7 cluster sum, 8:14 extended HTID, 16:20 unused (0),
//           21:25 H(3), 26 HT threshold bit.
// Where the stripes change direction, F cells on the right-hand edge would need
// five stripes; as published only F(2)+F(3) is used for them. The H cells on the
// lower edge are completed with I(0) in the layer-1 board. Boundary cells and
// IDs with no cell give a cluster sum of 0; that, the lowest-board-wins tie rule
// and the strict ">" against R0 are this design's choices.
// Timing: one word per clock, DSM_LATENCY = 4 clocks from ch_in to dsm_out.
module dsm_fms_fm005
  import fms_trig_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0][15:0] ch_in,
  input  logic [HT_W-1:0]  r0_ht_th,   // R0: FMSlarge-HT-th
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
    // board E (its stripe 0 holds no usable cell)
    cand[0][0] = '0;
    cand[0][1] = add3(s1_qt[0].qt8[0], s1_qt[0].qt8[1], s1_qt[0].qt8[2]);
    cand[0][2] = add3(s1_qt[0].qt8[1], s1_qt[0].qt8[2], s1_qt[0].qt8[3]);
    cand[0][3] = add3(s1_qt[0].qt8[2], s1_qt[0].qt8[3], s1_qt[1].qt8[0]);
    // board F
    cand[1][0] = add3(s1_qt[0].qt8[3], s1_qt[1].qt8[0], s1_qt[1].qt8[1]);
    cand[1][1] = add3(s1_qt[1].qt8[0], s1_qt[1].qt8[1], s1_qt[1].qt8[2]);
    cand[1][2] = add3(s1_qt[1].qt8[1], s1_qt[1].qt8[2], s1_qt[1].qt8[3]);
    cand[1][3] = add2(s1_qt[1].qt8[2], s1_qt[1].qt8[3]);
    // board G (its stripe 0 holds no usable cell)
    cand[2][0] = '0;
    cand[2][1] = add3(s1_qt[2].qt8[0], s1_qt[2].qt8[1], s1_qt[2].qt8[2]);
    cand[2][2] = add3(s1_qt[2].qt8[1], s1_qt[2].qt8[2], s1_qt[2].qt8[3]);
    cand[2][3] = add3(s1_qt[2].qt8[2], s1_qt[2].qt8[3], s1_qt[3].qt8[0]);
    // board H
    cand[3][0] = add3(s1_qt[2].qt8[3], s1_qt[3].qt8[0], s1_qt[3].qt8[1]);
    cand[3][1] = add3(s1_qt[3].qt8[0], s1_qt[3].qt8[1], s1_qt[3].qt8[2]);
    cand[3][2] = add3(s1_qt[3].qt8[1], s1_qt[3].qt8[2], s1_qt[3].qt8[3]);
    cand[3][3] = add2(s1_qt[3].qt8[2], s1_qt[3].qt8[3]);
  end

  logic               s2_ge [NB][NB];  // [i][j], i<j: HT(i) >= HT(j)
  logic [NB-1:0]      s2_over;
  logic [CLSUM_W-1:0] s2_cand [NB][4];
  logic [HTID_W-1:0]  s2_htid [NB];
  qt8_sum_t           s2_f3, s2_h3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NB; i++) begin
        for (int j = 0; j < NB; j++) s2_ge[i][j] <= 1'b0;
        for (int k = 0; k < 4; k++)  s2_cand[i][k] <= '0;
        s2_htid[i] <= '0;
      end
      s2_over <= '0;
      s2_f3   <= '0;
      s2_h3   <= '0;
    end else begin
      for (int i = 0; i < NB; i++) begin
        for (int j = 0; j < NB; j++) s2_ge[i][j] <= (i < j) && (s1_qt[i].ht >= s1_qt[j].ht);
        for (int k = 0; k < 4; k++)  s2_cand[i][k] <= cand[i][k];
        s2_htid[i] <= s1_qt[i].htid;
        s2_over[i] <= s1_qt[i].ht > r0_ht_th;
      end
      s2_f3 <= s1_qt[1].qt8[3];
      s2_h3 <= s1_qt[3].qt8[3];
    end
  end

  // ---------------- step 3: select highest board and its cluster ----------------
  // Cluster table for boards E..H.
  function automatic cell_use_e cell_use(input logic [1:0] b, input logic [HTID_W-1:0] id);
    cell_use_e u;
    u = CELL_IGNORED;
    unique case (b)
      2'd0:        // E
        if (id inside {[5'd9:5'd14], [5'd17:5'd22], [5'd25:5'd30]}) u = CELL_SUM;
      2'd1:        // F
        if (id inside {[5'd1:5'd6], [5'd9:5'd14], [5'd17:5'd22], [5'd25:5'd30]}) u = CELL_SUM;
      2'd2:        // G
        if (id inside {5'd10, 5'd17, 5'd18, 5'd25, 5'd26}) u = CELL_SUM;
        else if (id inside {5'd11, 5'd19, 5'd27}) u = CELL_SUM_PLUS;
      2'd3:        // H
        if (id inside {5'd1, 5'd2, [5'd9:5'd13], [5'd17:5'd22], [5'd25:5'd30]}) u = CELL_SUM;
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
      CELL_SUM_PLUS: win_sum = s2_cand[win][s2_htid[win][4:3]] + CLSUM_W'(s2_f3);
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
  qt8_sum_t              s3_h3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_sum      <= '0;
      s3_ext_htid <= '0;
      s3_ht_bit   <= 1'b0;
      s3_h3       <= '0;
    end else begin
      s3_sum      <= win_sum;
      s3_ext_htid <= {win, s2_htid[win]};
      s3_ht_bit   <= s2_over[win];
      s3_h3       <= s2_h3;
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
      dsm_out.qt8_hi   <= s3_h3;
      dsm_out.ht_bit   <= s3_ht_bit;
    end
  end

endmodule
