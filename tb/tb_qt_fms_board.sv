// tb_qt_fms_board: self-checking testbench for qt_fms_board.
//
// Streams random 32-channel ADC sets and HT masks, one per clock, and checks
// every 32-bit board word QT_FMS_LATENCY = 2 clocks later against the
// reference model (per-card sums and a single search over all 32 channels for
// the first highest unmasked HT). Ties between channels on different cards
// and fully masked boards are counted and must occur.
`timescale 1ns/1ps
module tb_qt_fms_board;
  import fms_trig_pkg::*;
  import fms_ref_pkg::*;

  localparam int NVEC = 3000;
  localparam int LAT  = QT_FMS_LATENCY;

  logic              clk = 1'b0;
  logic              rst_n;
  logic [31:0][11:0] adc;
  logic [31:0]       ht_mask;
  qt_word_t          qt_word;

  int checks = 0, failures = 0;
  int n_cross_tie = 0, n_allmask = 0;
  qt_word_t exp_q [$];

  qt_fms_board dut (.clk(clk), .rst_n(rst_n), .adc(adc), .ht_mask(ht_mask), .qt_word(qt_word));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; adc = '0; ht_mask = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NVEC + LAT; n++) begin
      @(negedge clk);
      if (exp_q.size() == LAT || (n >= NVEC && exp_q.size() > 0)) begin
        qt_word_t e;
        e = exp_q.pop_front();
        checks++;
        if (qt_word !== e) begin
          failures++;
          if (failures < 10)
            $display("mismatch: got %h exp %h", qt_word, e);
        end
      end
      if (n < NVEC) begin
        int mode;
        qt_word_t e;
        mode = $urandom_range(0, 2);
        for (int i = 0; i < 32; i++)
          adc[i] = (mode == 0) ? 12'($urandom_range(0, 70)) :
                   (mode == 1) ? 12'($urandom_range(0, 4095)) : 12'($urandom_range(0, 400));
        ht_mask = ($urandom_range(0, 15) == 0) ? '1 : ($urandom() & $urandom());
        e = ref_qt_fms(adc, ht_mask, 5, 5);
        exp_q.push_back(e);
        if (&ht_mask) n_allmask++;
        for (int i = 0; i < 32; i++)
          if (!ht_mask[i] && i / 8 != int'(e.htid) / 8 && int'(adc[i]) / 32 == int'(e.ht)) begin
            n_cross_tie++;
            break;
          end
      end
    end
    $display("cross-card ties=%0d all_masked=%0d", n_cross_tie, n_allmask);
    if (n_cross_tie == 0 || n_allmask == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
