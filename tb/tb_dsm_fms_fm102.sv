// tb_dsm_fms_fm102: self-checking testbench for dsm_fms_fm102.
//
// Streams random layer-0 words for the Top, Upper-Side, Bottom and Lower-Side
// sections and checks the 8-bit output DSM_LATENCY = 4 clocks later against
// the reference model. Extended HTIDs are biased towards the three boundary
// ranges (H cells 25:30, I cells 1:6, J cells 25:30); the testbench counts the
// clusters whose threshold bits change because of the added I(0), H(3) or J(3)
// stripe and fails if any of the three never happens.
`timescale 1ns/1ps
module tb_dsm_fms_fm102;
  import fms_trig_pkg::*;
  import fms_ref_pkg::*;

  localparam int NVEC = 3000;
  localparam int LAT  = DSM_LATENCY;

  logic             clk = 1'b0;
  logic             rst_n;
  logic [7:0][15:0] ch_in;
  logic [2:0][7:0]  cl_th;
  l1_large_t        dsm_out;

  int checks = 0, failures = 0;
  int n_i0 = 0, n_h3 = 0, n_j3 = 0;
  l1_large_t exp_q [$];

  dsm_fms_fm102 dut (.clk(clk), .rst_n(rst_n), .ch_in(ch_in), .cl_th(cl_th), .dsm_out(dsm_out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic l0_word_t rand_l0(bit side);
    l0_word_t w;
    w = '0;
    w.cl_sum = 8'($urandom_range(0, 124));
    case ($urandom_range(0, 3))
      0: w.ext_htid = side ? 7'($urandom_range(0, 8)) : 7'($urandom_range(118, 127));
      1: w.ext_htid = side ? 7'($urandom_range(55, 64)) : 7'($urandom_range(0, 127));
      default: w.ext_htid = side ? 7'($urandom_range(0, 63)) : 7'($urandom_range(0, 127));
    endcase
    w.qt8_lo = side ? 5'($urandom_range(0, 31)) : 5'd0;
    w.qt8_hi = 5'($urandom_range(0, 31));
    w.ht_bit = 1'($urandom_range(0, 1));
    return w;
  endfunction

  initial begin
    l0_word_t w [4];
    rst_n = 1'b0; ch_in = '0; cl_th = '{8'd100, 8'd70, 8'd40};
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int seg = 0; seg < 2; seg++) begin
      if (seg == 1) cl_th = '{8'($urandom_range(0, 255)), 8'($urandom_range(0, 128)), 8'($urandom_range(0, 64))};
      for (int n = 0; n < NVEC + LAT; n++) begin
        @(negedge clk);
        if (exp_q.size() == LAT || (n >= NVEC && exp_q.size() > 0)) begin
          l1_large_t e;
          e = exp_q.pop_front();
          checks++;
          if (dsm_out !== e) begin
            failures++;
            if (failures < 10) $display("mismatch: got %h exp %h", dsm_out, e);
          end
        end
        if (n < NVEC) begin
          for (int s = 0; s < 4; s++) begin
            w[s] = rand_l0(s % 2 == 1);
            ch_in[2*s +: 2] = w[s];
          end
          exp_q.push_back(ref_fm102(w, cl_th));
          for (int h = 0; h < 4; h += 2) begin
            int s;
            s = int'(w[h].cl_sum);
            if (w[h].ext_htid inside {[121:126]} &&
                ref_th3(s, cl_th) != ref_th3(s + int'(w[h+1].qt8_lo), cl_th)) n_i0++;
          end
          for (int d = 1; d < 4; d += 2) begin
            int s;
            s = int'(w[d].cl_sum);
            if (w[d].ext_htid inside {[1:6]} &&
                ref_th3(s, cl_th) != ref_th3(s + int'(w[d-1].qt8_hi), cl_th)) n_h3++;
            if (w[d].ext_htid inside {[57:62]} &&
                ref_th3(s, cl_th) != ref_th3(s + int'(w[d^2].qt8_hi), cl_th)) n_j3++;
          end
        end
      end
    end
    $display("boundary clusters changed by I(0)=%0d H(3)=%0d J(3)=%0d", n_i0, n_h3, n_j3);
    if (n_i0 == 0 || n_h3 == 0 || n_j3 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
