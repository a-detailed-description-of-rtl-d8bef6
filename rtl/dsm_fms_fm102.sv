// dsm_fms_fm102: large-cell layer-1 DSM, one per side of the large-cell array
// (FM102 South, FM103 North run the same algorithm).
//
// Section inputs: channels 0/1 Top (FM005 / FM009), 2/3 Upper-Side (FM006 /
// FM010), 4/5 Bottom (FM007 / FM011), 6/7 Lower-Side (FM008 / FM012).
// Sections are numbered 0..3 in that order; the top/bottom sections come from
// dsm_fms_fm005 and carry H(3), the side sections from dsm_fms_fm006 and carry
// I(0) and J(3).
//   step 1  latch the four words;
//   step 2  delay HTIDs and cluster sums; form the 6 boundary sums:
//             top/bottom cluster + I(0) of its own side section,
//             side cluster + H(3) of its own top/bottom section,
//             side cluster + J(3) of the other side section;
//           OR the HT bits of Top and Upper-Side, and of Bottom and Lower-Side;
//   step 3  compare the 10 sums with R0..R2 (sum > Rn); pick, from each
//           section's extended HTID, the bits of the sum that completes its
//           cluster: H cells 25:30 (ext 121:126) take +I(0), I cells 1:6 (ext
//           1:6) take +H(3), J cells 25:30 (ext 57:62) take +J(3); OR Top with
//           Upper-Side and Bottom with Lower-Side; delay the HT bits;
//   step 4  latch: bits 0:2 Top, 3:5 Bottom cluster bits, 6:7 HT bits.
// Timing: one word per clock, DSM_LATENCY = 4 clocks from ch_in to dsm_out.
module dsm_fms_fm102
  import fms_trig_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [7:0][15:0]       ch_in,
  input  logic [2:0][CLTH_W-1:0] cl_th,    // R0..R2: FMSlarge-cluster-th0..2
  output l1_large_t              dsm_out
);

  localparam int unsigned SUM_W = CLSUM_W + 1;
  // section numbers
  localparam int unsigned SEC_TOP = 0, SEC_USIDE = 1, SEC_BOT = 2, SEC_LSIDE = 3;

  // ---------------- step 1 ----------------
  l0_word_t s1_in [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 4; s++) s1_in[s] <= '0;
    end else begin
      for (int s = 0; s < 4; s++) s1_in[s] <= l0_word_t'(ch_in[2*s +: 2]);
    end
  end

  // ---------------- step 2 ----------------
  // For a top/bottom section (even s): s2_bnd1 = sum + I(0) of section s+1.
  // For a side section (odd s):        s2_bnd1 = sum + H(3) of section s-1,
  //                                    s2_bnd2 = sum + J(3) of section s^2.
  logic [SUM_W-1:0]      s2_sum  [4];
  logic [SUM_W-1:0]      s2_bnd1 [4];
  logic [SUM_W-1:0]      s2_bnd2 [4];
  logic [EXT_HTID_W-1:0] s2_htid [4];
  logic [1:0]            s2_ht;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 4; s++) begin
        s2_sum[s]  <= '0;
        s2_bnd1[s] <= '0;
        s2_bnd2[s] <= '0;
        s2_htid[s] <= '0;
      end
      s2_ht <= '0;
    end else begin
      for (int s = 0; s < 4; s++) begin
        s2_sum[s]  <= SUM_W'(s1_in[s].cl_sum);
        s2_htid[s] <= s1_in[s].ext_htid;
        if (s % 2 == 0) begin
          s2_bnd1[s] <= SUM_W'(s1_in[s].cl_sum) + SUM_W'(s1_in[s+1].qt8_lo);
          s2_bnd2[s] <= '0;
        end else begin
          s2_bnd1[s] <= SUM_W'(s1_in[s].cl_sum) + SUM_W'(s1_in[s-1].qt8_hi);
          s2_bnd2[s] <= SUM_W'(s1_in[s].cl_sum) + SUM_W'(s1_in[s^2].qt8_hi);
        end
      end
      s2_ht[0] <= s1_in[SEC_TOP].ht_bit | s1_in[SEC_USIDE].ht_bit;
      s2_ht[1] <= s1_in[SEC_BOT].ht_bit | s1_in[SEC_LSIDE].ht_bit;
    end
  end

  // ---------------- step 3 ----------------
  function automatic clth_t th_bits(input logic [SUM_W-1:0] x, input logic [2:0][CLTH_W-1:0] th);
    clth_t r;
    for (int n = 0; n < 3; n++) r[n] = x > SUM_W'(th[n]);
    return r;
  endfunction

  clth_t      sel_bits [4];
  clth_t      s3_top, s3_bot;
  logic [1:0] s3_ht;

  always_comb begin
    for (int s = 0; s < 4; s++) begin
      if (s % 2 == 0) begin
        if (s2_htid[s] inside {[7'd121:7'd126]})      // board H, bottom stripe
          sel_bits[s] = th_bits(s2_bnd1[s], cl_th);
        else
          sel_bits[s] = th_bits(s2_sum[s], cl_th);
      end else begin
        if (s2_htid[s] inside {[7'd1:7'd6]})          // board I, top stripe
          sel_bits[s] = th_bits(s2_bnd1[s], cl_th);
        else if (s2_htid[s] inside {[7'd57:7'd62]})   // board J, bottom stripe
          sel_bits[s] = th_bits(s2_bnd2[s], cl_th);
        else
          sel_bits[s] = th_bits(s2_sum[s], cl_th);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_top <= '0;
      s3_bot <= '0;
      s3_ht  <= '0;
    end else begin
      s3_top <= sel_bits[SEC_TOP] | sel_bits[SEC_USIDE];
      s3_bot <= sel_bits[SEC_BOT] | sel_bits[SEC_LSIDE];
      s3_ht  <= s2_ht;
    end
  end

  // ---------------- step 4 ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsm_out <= '0;
    end else begin
      dsm_out.top     <= s3_top;
      dsm_out.bottom  <= s3_bot;
      dsm_out.ht_bits <= s3_ht;
    end
  end

endmodule
