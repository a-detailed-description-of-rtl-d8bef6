// tb_qt8_card: self-checking testbench for qt8_card.
//
// Drives a new set of 8 ADC values and an exclude mask every clock and checks,
// one clock later, the saturated 5-bit sum and the 7-bit highest tower with
// its channel number against values computed here. ADC values are drawn
// from narrow and full ranges so that ties, saturation and fully masked cards
// all occur; each of these is counted and must happen.
`timescale 1ns/1ps
module tb_qt8_card;
  import fms_trig_pkg::*;

  localparam int NVEC = 5000;

  logic                  clk = 1'b0;
  logic                  rst_n;
  logic [7:0][11:0]      adc;
  logic [7:0]            ht_mask;
  logic [4:0]            sum_o;
  logic [6:0]            ht_o;
  logic [2:0]            ht_ch_o;
  logic                  ht_valid_o;

  int checks = 0, failures = 0;
  int n_sat = 0, n_tie = 0, n_allmask = 0;

  qt8_card dut (.clk(clk), .rst_n(rst_n), .adc(adc), .ht_mask(ht_mask), .sum_o(sum_o),
                .ht_o(ht_o), .ht_ch_o(ht_ch_o), .ht_valid_o(ht_valid_o));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e_sum, e_ht, e_ch, e_valid, mode;
    rst_n = 1'b0; adc = '0; ht_mask = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NVEC; n++) begin
      mode = $urandom_range(0, 2);
      for (int i = 0; i < 8; i++)
        adc[i] = (mode == 0) ? 12'($urandom_range(0, 100)) :
                 (mode == 1) ? 12'($urandom_range(0, 4095)) : 12'($urandom_range(0, 700));
      ht_mask = ($urandom_range(0, 9) == 0) ? 8'hFF : 8'($urandom_range(0, 255) & $urandom_range(0, 255));
      // expected values
      e_sum = 0;
      for (int i = 0; i < 8; i++) e_sum += int'(adc[i]);
      e_sum = e_sum / 32;
      if (e_sum > 31) begin e_sum = 31; n_sat++; end
      e_ht = 0; e_ch = 0; e_valid = 0;
      for (int i = 0; i < 8; i++) begin
        int h;
        h = int'(adc[i]) / 32;
        if (!ht_mask[i]) begin
          if (!e_valid || h > e_ht) begin e_ht = h; e_ch = i; end
          else if (h == e_ht) n_tie++;
          e_valid = 1;
        end
      end
      if (!e_valid) n_allmask++;
      @(negedge clk);
      checks++;
      if (int'(sum_o) != e_sum || int'(ht_o) != e_ht || int'(ht_ch_o) != e_ch ||
          int'(ht_valid_o) != e_valid) begin
        failures++;
        if (failures < 10)
          $display("mismatch: sum %0d/%0d ht %0d/%0d ch %0d/%0d valid %0d/%0d",
                   sum_o, e_sum, ht_o, e_ht, ht_ch_o, e_ch, ht_valid_o, e_valid);
      end
    end
    $display("saturated=%0d ties=%0d all_masked=%0d", n_sat, n_tie, n_allmask);
    if (n_sat == 0 || n_tie == 0 || n_allmask == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
