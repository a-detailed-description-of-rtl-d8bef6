// tb_dsm_mix_fe101: self-checking testbench for dsm_mix_fe101.
//
// Streams four random 17-bit FPD-East QT sums per clock and checks the two
// module threshold bits DSM_LATENCY = 4 clocks later. The 18-bit threshold is
// given through the 12-bit R0 and 6-bit R1 registers; sums are drawn close to
// the threshold, including exactly equal, and both bits must be seen set and
// clear, also with a threshold above 2^17 so that the high register matters.
`timescale 1ns/1ps
module tb_dsm_mix_fe101;
  import fms_trig_pkg::*;
  import fms_ref_pkg::*;

  localparam int NVEC = 3000;
  localparam int LAT  = DSM_LATENCY;

  logic             clk = 1'b0;
  logic             rst_n;
  logic [7:0][15:0] ch_in;
  logic [11:0]      r0_th_lsb;
  logic [5:0]       r1_th_msb;
  logic [15:0]      dsm_out;

  int checks = 0, failures = 0;
  int n_set [2], n_clr [2], n_eq = 0;
  logic [15:0] exp_q [$];

  dsm_mix_fe101 dut (.clk(clk), .rst_n(rst_n), .ch_in(ch_in), .r0_th_lsb(r0_th_lsb),
                     .r1_th_msb(r1_th_msb), .dsm_out(dsm_out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int th;
    int s [4];
    rst_n = 1'b0; ch_in = '0; r0_th_lsb = '0; r1_th_msb = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int seg = 0; seg < 4; seg++) begin
      th = (seg == 3) ? 200000 + int'($urandom_range(0, 40000)) : int'($urandom_range(1000, 200000));
      r0_th_lsb = 12'(th);
      r1_th_msb = 6'(th >> 12);
      for (int n = 0; n < NVEC + LAT; n++) begin
        @(negedge clk);
        if (exp_q.size() == LAT || (n >= NVEC && exp_q.size() > 0)) begin
          logic [15:0] e;
          e = exp_q.pop_front();
          checks++;
          if (dsm_out !== e) begin
            failures++;
            if (failures < 10) $display("mismatch: got %h exp %h", dsm_out, e);
          end
        end
        if (n < NVEC) begin
          for (int k = 0; k < 4; k++) begin
            s[k] = int'($urandom_range(0, 131071));
            if ($urandom_range(0, 1) == 1 && k % 2 == 1) begin
              // place the module sum right at the threshold
              int t;
              t = th - s[k-1] + int'($urandom_range(0, 2)) - 1;
              if (t >= 0 && t < 131072) s[k] = t;
            end
            ch_in[2*k +: 2] = 32'(s[k]);
          end
          exp_q.push_back({14'd0, ref_fe101(s, th)});
          for (int m = 0; m < 2; m++) begin
            if (s[2*m] + s[2*m+1] > th) n_set[m]++; else n_clr[m]++;
            if (s[2*m] + s[2*m+1] == th) n_eq++;
          end
        end
      end
    end
    $display("module1 set/clear %0d/%0d module2 set/clear %0d/%0d equal=%0d",
             n_set[0], n_clr[0], n_set[1], n_clr[1], n_eq);
    if (n_set[0] == 0 || n_clr[0] == 0 || n_set[1] == 0 || n_clr[1] == 0 || n_eq == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
