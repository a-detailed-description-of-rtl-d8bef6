// qt8_card: algorithm of one QT8 daughter card of an FMS QT board.
//
// The card sees 8 ADC channels (12 bits). In one registered stage it forms
//  * the sum of all 8 ADC values, scaled down by SUM_SHIFT and saturated to the
//    5-bit QT8 sum that is sent to the layer-0 DSM, and
//  * the highest 7-bit HT value (ADC scaled by HT_SHIFT and saturated) among
//    the channels whose exclude-mask bit is clear, with its 3-bit channel
//    number; on equal HT values the lowest channel wins.
// The mask lets dead, noisy and boundary cells be kept out of the high-tower
// search; it does not affect the sum. That the card sums its channels, finds
// the highest one and honours a user mask is the published algorithm; the
// scaling shifts, the saturation, the lowest-channel-wins tie rule and the
// single register stage are this design's own choices.
// Timing: outputs are valid one clock after the inputs.
module qt8_card
  import fms_trig_pkg::*;
#(
  parameter int unsigned SUM_SHIFT = 5,
  parameter int unsigned HT_SHIFT  = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [7:0][ADC_W-1:0] adc,
  input  logic [7:0]           ht_mask,   // 1 = exclude channel from HT search
  output qt8_sum_t             sum_o,
  output logic [HT_W-1:0]      ht_o,
  output logic [2:0]           ht_ch_o,
  output logic                 ht_valid_o // at least one channel was searched
);

  localparam int unsigned RAW_SUM_W = ADC_W + 3;

  logic [RAW_SUM_W-1:0] raw_sum;
  logic [HT_W-1:0]      ch_ht [8];
  logic [HT_W-1:0]      max_val;
  logic [2:0]           max_ch;
  logic                 any_valid;
  logic [RAW_SUM_W-1:0] sum_scaled;

  always_comb begin
    raw_sum   = '0;
    max_val   = '0;
    max_ch    = '0;
    any_valid = 1'b0;
    for (int i = 0; i < 8; i++) begin
      raw_sum  = raw_sum + RAW_SUM_W'(adc[i]);
      ch_ht[i] = ((adc[i] >> HT_SHIFT) > ADC_W'((1 << HT_W) - 1))
                 ? HT_W'((1 << HT_W) - 1) : HT_W'(adc[i] >> HT_SHIFT);
      // strictly greater keeps the lowest channel on a tie
      if (!ht_mask[i] && (!any_valid || ch_ht[i] > max_val)) begin
        max_val   = ch_ht[i];
        max_ch    = 3'(i);
        any_valid = 1'b1;
      end
    end
    sum_scaled = raw_sum >> SUM_SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_o      <= '0;
      ht_o       <= '0;
      ht_ch_o    <= '0;
      ht_valid_o <= 1'b0;
    end else begin
      sum_o      <= (sum_scaled > RAW_SUM_W'((1 << QT8_SUM_W) - 1))
                    ? qt8_sum_t'((1 << QT8_SUM_W) - 1) : qt8_sum_t'(sum_scaled);
      ht_o       <= max_val;
      ht_ch_o    <= max_ch;
      ht_valid_o <= any_valid;
    end
  end

endmodule
