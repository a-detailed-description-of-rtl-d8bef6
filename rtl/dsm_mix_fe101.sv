// dsm_mix_fe101: FPD-East layer-1 DSM.
//
// Channels 0/1..6/7 carry the 17-bit sums of FPD-East QT boards 1..4 (bits
// 0:16 of each 32-bit word). QT1+QT2 form the 18-bit sum of module 1 and
// QT3+QT4 that of module 2. Each module sum is compared with one 18-bit
// threshold, built from two 16-bit registers because a register cannot hold
// 18 bits: R0 gives the 12 low bits and R1 the 6 high bits.
//   step 1  latch the four sums;
//   step 2  add them in pairs;
//   step 3  compare each module sum with {R1, R0} (sum > threshold);
//   step 4  latch: bit 0 module 1, bit 1 module 2; bits 2:15 are 0.
// The steps, widths and register split are published; the strict ">" is this
// design's choice.
// Timing: one word per clock, DSM_LATENCY = 4 clocks from ch_in to dsm_out.
module dsm_mix_fe101
  import fms_trig_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0][15:0] ch_in,
  input  logic [11:0]      r0_th_lsb,   // R0: FPE-threshold-12LSB
  input  logic [5:0]       r1_th_msb,   // R1: FPE-threshold-6MSB
  output logic [15:0]      dsm_out
);

  logic [FPE_SUM_W-1:0] s1_sum [4];
  logic [FPE_MOD_W-1:0] s2_mod [2];
  logic [1:0]           s3_bits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) s1_sum[k] <= '0;
      for (int m = 0; m < 2; m++) s2_mod[m] <= '0;
      s3_bits <= '0;
      dsm_out <= '0;
    end else begin
      // step 1
      for (int k = 0; k < 4; k++) s1_sum[k] <= FPE_SUM_W'(ch_in[2*k +: 2]);
      // step 2
      for (int m = 0; m < 2; m++)
        s2_mod[m] <= FPE_MOD_W'(s1_sum[2*m]) + FPE_MOD_W'(s1_sum[2*m+1]);
      // step 3
      for (int m = 0; m < 2; m++) s3_bits[m] <= s2_mod[m] > {r1_th_msb, r0_th_lsb};
      // step 4
      dsm_out <= {14'd0, s3_bits};
    end
  end

endmodule
