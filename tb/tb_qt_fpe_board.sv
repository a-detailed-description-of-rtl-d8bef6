// tb_qt_fpe_board: self-checking testbench for qt_fpe_board.
//
// Streams random ADC sets and masks and checks the masked 17-bit sum one
// clock later. Includes all-maximum inputs (largest possible sum) and fully
// masked boards.
`timescale 1ns/1ps
module tb_qt_fpe_board;
  import fms_trig_pkg::*;
  import fms_ref_pkg::*;

  localparam int NVEC = 3000;

  logic              clk = 1'b0;
  logic              rst_n;
  logic [31:0][11:0] adc;
  logic [31:0]       mask;
  logic [31:0]       qt_word;

  int checks = 0, failures = 0;
  int n_max = 0, n_allmask = 0;

  qt_fpe_board dut (.clk(clk), .rst_n(rst_n), .adc(adc), .mask(mask), .qt_word(qt_word));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    rst_n = 1'b0; adc = '0; mask = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NVEC; n++) begin
      case ($urandom_range(0, 9))
        0: begin adc = '1; mask = '0; n_max++; end
        1: begin for (int i = 0; i < 32; i++) adc[i] = 12'($urandom()); mask = '1; n_allmask++; end
        default: begin
          for (int i = 0; i < 32; i++) adc[i] = 12'($urandom());
          mask = $urandom() & $urandom();
        end
      endcase
      e = ref_qt_fpe(adc, mask);
      @(negedge clk);
      checks++;
      if (qt_word !== 32'(e)) begin
        failures++;
        if (failures < 10) $display("mismatch: got %0d exp %0d", qt_word, e);
      end
    end
    if (n_max == 0 || n_allmask == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
