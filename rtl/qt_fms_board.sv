// qt_fms_board: FMS QT board (motherboard plus four QT8 daughter cards).
//
// The 32 channels are split over four QT8 cards, channel IDs 0:7 on card 0,
// 8:15 on card 1, 16:23 on card 2 and 24:31 on card 3; each card covers one
// "stripe" of cells. Every card reports its 5-bit sum and its highest
// unmasked channel (qt8_card). The motherboard picks the card with the highest
// 7-bit HT (lowest card wins a tie), forms HTID = card*8 + channel and registers
// the 32-bit word for the layer-0 DSM:
//   bits 0:19 QT8(0..3) sums, 20:26 HT, 27:31 HTID.
// If every channel is masked the board sends HT = 0 and HTID = 0.
// The word format and channel numbering are published; the card/motherboard
// register split and tie rule are this design's choices.
// Timing: QT_FMS_LATENCY = 2 clocks from adc to qt_word.
module qt_fms_board
  import fms_trig_pkg::*;
#(
  parameter int unsigned SUM_SHIFT = 5,
  parameter int unsigned HT_SHIFT  = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [31:0][ADC_W-1:0]  adc,       // index = channel ID
  input  logic [31:0]             ht_mask,   // 1 = exclude from HT search
  output qt_word_t                qt_word
);

  qt8_sum_t        card_sum   [4];
  logic [HT_W-1:0] card_ht    [4];
  logic [2:0]      card_ch    [4];
  logic            card_valid [4];

  for (genvar c = 0; c < 4; c++) begin : g_card
    qt8_card #(.SUM_SHIFT(SUM_SHIFT), .HT_SHIFT(HT_SHIFT)) u_card (
      .clk        (clk),
      .rst_n      (rst_n),
      .adc        (adc[c*8 +: 8]),
      .ht_mask    (ht_mask[c*8 +: 8]),
      .sum_o      (card_sum[c]),
      .ht_o       (card_ht[c]),
      .ht_ch_o    (card_ch[c]),
      .ht_valid_o (card_valid[c])
    );
  end

  logic [HT_W-1:0]   best_ht;
  logic [HTID_W-1:0] best_id;
  logic              best_valid;

  always_comb begin
    best_ht    = '0;
    best_id    = '0;
    best_valid = 1'b0;
    for (int c = 0; c < 4; c++) begin
      if (card_valid[c] && (!best_valid || card_ht[c] > best_ht)) begin
        best_ht    = card_ht[c];
        best_id    = {2'(c), card_ch[c]};
        best_valid = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qt_word <= '0;
    end else begin
      qt_word.htid <= best_id;
      qt_word.ht   <= best_ht;
      for (int c = 0; c < 4; c++) qt_word.qt8[c] <= card_sum[c];
    end
  end

endmodule
