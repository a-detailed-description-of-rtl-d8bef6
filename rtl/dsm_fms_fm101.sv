// dsm_fms_fm101: small-cell layer-1 DSM.
//
// Receives the layer-0 words of the four small-cell quadrants: channels 0/1
// FM001 South-Top, 2/3 FM002 South-Bottom, 4/5 FM003 North-Top, 6/7 FM004
// North-Bottom (channel 2k = low 16 bits). It completes the clusters that
// layer 0 could not finish and applies three 8-bit cluster thresholds.
//   step 1  latch the four words;
//   step 2  delay the HTIDs and cluster sums to step 3; form the 8 boundary
//           sums: each quadrant's cluster sum plus A(0) of the quadrant on the
//           other (North/South) side, and plus D(3) of the other (Top/Bottom)
//           quadrant of the same side; delay the HT bits to step 4;
//   step 3  compare all 12 sums with R0..R2 (sum > Rn sets bit n); from each
//           quadrant's extended HTID decide whether its cluster lies on the
//           A(0) edge (board A, HTID 1:5) or the D(3) edge (board D, HTID 25:29)
//           and take the threshold bits of the matching sum;
//   step 4  latch: bits 0:2 ST, 3:5 SB, 6:8 NT, 9:11 NB cluster bits,
//           12:15 HT bits (ST, SB, NT, NB).
// The pairing of quadrants, the boundary cells and the output format are
// published; the 9-bit boundary sums and the strict ">" are this design's.
// Timing: one word per clock, DSM_LATENCY = 4 clocks from ch_in to dsm_out.
module dsm_fms_fm101
  import fms_trig_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [7:0][15:0]           ch_in,
  input  logic [2:0][CLTH_W-1:0]     cl_th,    // R0..R2: FMSsmall-cluster-th0..2
  output l1_small_t                  dsm_out
);

  localparam int unsigned SUM_W = CLSUM_W + 1;

  // partner quadrant that supplies A(0): the other side (ST<->NT, SB<->NB)
  function automatic int unsigned a0_partner(input int unsigned q);
    return q ^ 2;
  endfunction
  // partner quadrant that supplies D(3): same side, other half (ST<->SB, NT<->NB)
  function automatic int unsigned d3_partner(input int unsigned q);
    return q ^ 1;
  endfunction

  // ---------------- step 1 ----------------
  l0_word_t s1_in [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < 4; q++) s1_in[q] <= '0;
    end else begin
      for (int q = 0; q < 4; q++) s1_in[q] <= l0_word_t'(ch_in[2*q +: 2]);
    end
  end

  // ---------------- step 2 ----------------
  logic [SUM_W-1:0]      s2_sum   [4];
  logic [SUM_W-1:0]      s2_sum_a [4];
  logic [SUM_W-1:0]      s2_sum_d [4];
  logic [EXT_HTID_W-1:0] s2_htid  [4];
  logic [3:0]            s2_ht;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < 4; q++) begin
        s2_sum[q]   <= '0;
        s2_sum_a[q] <= '0;
        s2_sum_d[q] <= '0;
        s2_htid[q]  <= '0;
      end
      s2_ht <= '0;
    end else begin
      for (int q = 0; q < 4; q++) begin
        s2_sum[q]   <= SUM_W'(s1_in[q].cl_sum);
        s2_sum_a[q] <= SUM_W'(s1_in[q].cl_sum) + SUM_W'(s1_in[a0_partner(q)].qt8_lo);
        s2_sum_d[q] <= SUM_W'(s1_in[q].cl_sum) + SUM_W'(s1_in[d3_partner(q)].qt8_hi);
        s2_htid[q]  <= s1_in[q].ext_htid;
        s2_ht[q]    <= s1_in[q].ht_bit;
      end
    end
  end

  // ---------------- step 3 ----------------
  function automatic clth_t th_bits(input logic [SUM_W-1:0] s, input logic [2:0][CLTH_W-1:0] th);
    clth_t r;
    for (int n = 0; n < 3; n++) r[n] = s > SUM_W'(th[n]);
    return r;
  endfunction

  clth_t      sel_bits [4];
  clth_t      s3_bits  [4];
  logic [3:0] s3_ht;

  always_comb begin
    for (int q = 0; q < 4; q++) begin
      if (s2_htid[q] inside {[7'd1:7'd5]})          // board A, left-hand stripe
        sel_bits[q] = th_bits(s2_sum_a[q], cl_th);
      else if (s2_htid[q] inside {[7'd121:7'd125]}) // board D, bottom stripe
        sel_bits[q] = th_bits(s2_sum_d[q], cl_th);
      else
        sel_bits[q] = th_bits(s2_sum[q], cl_th);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < 4; q++) s3_bits[q] <= '0;
      s3_ht <= '0;
    end else begin
      for (int q = 0; q < 4; q++) s3_bits[q] <= sel_bits[q];
      s3_ht <= s2_ht;
    end
  end

  // ---------------- step 4 ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsm_out <= '0;
    end else begin
      dsm_out.st      <= s3_bits[Q_ST];
      dsm_out.sb      <= s3_bits[Q_SB];
      dsm_out.nt      <= s3_bits[Q_NT];
      dsm_out.nb      <= s3_bits[Q_NB];
      dsm_out.ht_bits <= s3_ht;
    end
  end

endmodule
