// dsm_l2_fp201: layer-2 DSM shared by the FMS and FPD-East.
//
// Inputs: channel 0 FM101 (small cells, 16-bit word), channel 2 FM102 (large
// cells South, 8-bit word), channel 4 FM103 (large cells North), channel 7
// FE101 (FPD-East, bits 0:1). Channels 1, 3, 5 and 6 are not read.
//   step 1  latch the inputs;
//   step 2  OR the two FPD-East bits; for small and large cells separately OR
//           the Top and Bottom quadrants' HT bits and cluster bits into South
//           and North bits, and count, per cluster threshold, how many of the
//           four quadrant bits are set;
//   step 3  OR South and North into whole-array HT and cluster bits; set a
//           multi-cluster bit where the count is above 1 (two or more
//           quadrants had a cluster over that threshold); delay the FPD-East bit;
//   step 4  latch the 16-bit trigger word and an identical copy for the
//           scaler system:
//             0:2 small cluster th0..2, 3:5 small multi-cluster th0..2,
//             6 small HT, 7:9 large cluster th0..2, 10:12 large multi-cluster
//             th0..2, 13 large HT, 14 FPD-East, 15 unused (0).
// All of this is published; only the channel use inside each channel pair is
// this design's choice.
// Timing: one word per clock, DSM_LATENCY = 4 clocks from ch_in to the outputs.
module dsm_l2_fp201
  import fms_trig_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0][15:0] ch_in,
  output l2_word_t         trig_out,
  output l2_word_t         scaler_out
);

  // ---------------- step 1 ----------------
  l1_small_t s1_sml;
  l1_large_t s1_lrg [2];   // [0] South (FM102), [1] North (FM103)
  logic [1:0] s1_fpe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_sml    <= '0;
      s1_lrg[0] <= '0;
      s1_lrg[1] <= '0;
      s1_fpe    <= '0;
    end else begin
      s1_sml    <= l1_small_t'(ch_in[0]);
      s1_lrg[0] <= l1_large_t'(ch_in[2][7:0]);
      s1_lrg[1] <= l1_large_t'(ch_in[4][7:0]);
      s1_fpe    <= ch_in[7][1:0];
    end
  end

  // ---------------- step 2 ----------------
  // Quadrant bits in a common order: [0] South-Top, [1] South-Bottom,
  // [2] North-Top, [3] North-Bottom.
  clth_t      sml_q [4];
  clth_t      lrg_q [4];

  always_comb begin
    sml_q[0] = s1_sml.st;
    sml_q[1] = s1_sml.sb;
    sml_q[2] = s1_sml.nt;
    sml_q[3] = s1_sml.nb;
    lrg_q[0] = s1_lrg[0].top;
    lrg_q[1] = s1_lrg[0].bottom;
    lrg_q[2] = s1_lrg[1].top;
    lrg_q[3] = s1_lrg[1].bottom;
  end

  logic       s2_fpe;
  logic [1:0] s2_sml_ht, s2_lrg_ht;       // [0] South, [1] North
  clth_t      s2_sml_cl [2];
  clth_t      s2_lrg_cl [2];
  logic [2:0] s2_sml_cnt [3];             // per threshold, 0..4
  logic [2:0] s2_lrg_cnt [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_fpe    <= 1'b0;
      s2_sml_ht <= '0;
      s2_lrg_ht <= '0;
      for (int s = 0; s < 2; s++) begin
        s2_sml_cl[s] <= '0;
        s2_lrg_cl[s] <= '0;
      end
      for (int n = 0; n < 3; n++) begin
        s2_sml_cnt[n] <= '0;
        s2_lrg_cnt[n] <= '0;
      end
    end else begin
      s2_fpe       <= |s1_fpe;
      s2_sml_ht[0] <= s1_sml.ht_bits[0] | s1_sml.ht_bits[1];
      s2_sml_ht[1] <= s1_sml.ht_bits[2] | s1_sml.ht_bits[3];
      s2_lrg_ht[0] <= |s1_lrg[0].ht_bits;
      s2_lrg_ht[1] <= |s1_lrg[1].ht_bits;
      for (int s = 0; s < 2; s++) begin
        s2_sml_cl[s] <= sml_q[2*s] | sml_q[2*s+1];
        s2_lrg_cl[s] <= lrg_q[2*s] | lrg_q[2*s+1];
      end
      for (int n = 0; n < 3; n++) begin
        s2_sml_cnt[n] <= 3'(sml_q[0][n]) + 3'(sml_q[1][n]) + 3'(sml_q[2][n]) + 3'(sml_q[3][n]);
        s2_lrg_cnt[n] <= 3'(lrg_q[0][n]) + 3'(lrg_q[1][n]) + 3'(lrg_q[2][n]) + 3'(lrg_q[3][n]);
      end
    end
  end

  // ---------------- step 3 ----------------
  l2_word_t s3_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_word <= '0;
    end else begin
      s3_word          <= '0;
      s3_word.fpe      <= s2_fpe;
      s3_word.sml_ht   <= |s2_sml_ht;
      s3_word.lrg_ht   <= |s2_lrg_ht;
      s3_word.sml_cl   <= s2_sml_cl[0] | s2_sml_cl[1];
      s3_word.lrg_cl   <= s2_lrg_cl[0] | s2_lrg_cl[1];
      for (int n = 0; n < 3; n++) begin
        s3_word.sml_mult[n] <= s2_sml_cnt[n] > 3'd1;
        s3_word.lrg_mult[n] <= s2_lrg_cnt[n] > 3'd1;
      end
    end
  end

  // ---------------- step 4 ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_out   <= '0;
      scaler_out <= '0;
    end else begin
      trig_out   <= s3_word;
      scaler_out <= s3_word;
    end
  end

endmodule
