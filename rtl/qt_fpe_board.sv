// qt_fpe_board: FPD-East QT board algorithm.
//
// Adds the 32 12-bit ADC values of the board into a 17-bit sum, leaving out
// every channel whose mask bit is set (dead or noisy cells). The sum cannot
// overflow: 32 * 4095 < 2^17. The masked 17-bit sum is the published
// algorithm; the mask polarity (1 = exclude) and the single register stage are
// this design's choices. The result is placed in bits 0:16 of the 32-bit word
// sent to the FE101 layer-1 DSM; bits 17:31 are zero.
// Timing: QT_FPE_LATENCY = 1 clock from adc to qt_word.
module qt_fpe_board
  import fms_trig_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [31:0][ADC_W-1:0] adc,
  input  logic [31:0]            mask,     // 1 = exclude channel from the sum
  output logic [31:0]            qt_word
);

  logic [FPE_SUM_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < 32; i++)
      if (!mask[i]) sum = sum + FPE_SUM_W'(adc[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) qt_word <= '0;
    else        qt_word <= 32'(sum);
  end

endmodule
