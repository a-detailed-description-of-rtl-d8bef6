// tb_dsm_fms_fm101: self-checking testbench for dsm_fms_fm101.
//
// Streams four random layer-0 words per clock (ST, SB, NT, NB) and checks the
// 16-bit output DSM_LATENCY = 4 clocks later against the reference model.
// Extended HTIDs are often drawn from the two edge ranges (board A cells 1:5,
// board D cells 25:29), and cluster sums from around the thresholds, so that
// clusters completed with A(0) of the other side and with D(3) of the other
// half both happen and cross a threshold only thanks to the added stripe.
`timescale 1ns/1ps
module tb_dsm_fms_fm101;
  import fms_trig_pkg::*;
  import fms_ref_pkg::*;

  localparam int NVEC = 3000;
  localparam int LAT  = DSM_LATENCY;

  logic             clk = 1'b0;
  logic             rst_n;
  logic [7:0][15:0] ch_in;
  logic [2:0][7:0]  cl_th;
  l1_small_t        dsm_out;

  int checks = 0, failures = 0;
  int n_a0 = 0, n_d3 = 0, n_plain = 0, n_a0_flip = 0, n_d3_flip = 0;
  l1_small_t exp_q [$];

  dsm_fms_fm101 dut (.clk(clk), .rst_n(rst_n), .ch_in(ch_in), .cl_th(cl_th), .dsm_out(dsm_out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic l0_word_t rand_l0();
    l0_word_t w;
    w = '0;
    w.cl_sum = 8'($urandom_range(0, 124));
    case ($urandom_range(0, 3))
      0: w.ext_htid = 7'($urandom_range(0, 7));
      1: w.ext_htid = 7'($urandom_range(118, 127));
      default: w.ext_htid = 7'($urandom_range(0, 127));
    endcase
    w.qt8_lo = 5'($urandom_range(0, 31));
    w.qt8_hi = 5'($urandom_range(0, 31));
    w.ht_bit = 1'($urandom_range(0, 1));
    return w;
  endfunction

  initial begin
    l0_word_t w [4];
    int a_from [4] = '{2, 3, 0, 1};
    int d_from [4] = '{1, 0, 3, 2};
    rst_n = 1'b0; ch_in = '0; cl_th = '{8'd100, 8'd70, 8'd40};
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int seg = 0; seg < 2; seg++) begin
      if (seg == 1) cl_th = '{8'($urandom_range(0, 255)), 8'($urandom_range(0, 128)), 8'($urandom_range(0, 64))};
      for (int n = 0; n < NVEC + LAT; n++) begin
        @(negedge clk);
        if (exp_q.size() == LAT || (n >= NVEC && exp_q.size() > 0)) begin
          l1_small_t e;
          e = exp_q.pop_front();
          checks++;
          if (dsm_out !== e) begin
            failures++;
            if (failures < 10) $display("mismatch: got %h exp %h", dsm_out, e);
          end
        end
        if (n < NVEC) begin
          for (int q = 0; q < 4; q++) begin
            w[q] = rand_l0();
            ch_in[2*q +: 2] = w[q];
          end
          exp_q.push_back(ref_fm101(w, cl_th));
          for (int q = 0; q < 4; q++) begin
            if (w[q].ext_htid inside {[1:5]}) begin
              n_a0++;
              if (ref_th3(int'(w[q].cl_sum), cl_th) != ref_th3(int'(w[q].cl_sum) + int'(w[a_from[q]].qt8_lo), cl_th)) n_a0_flip++;
            end else if (w[q].ext_htid inside {[121:125]}) begin
              n_d3++;
              if (ref_th3(int'(w[q].cl_sum), cl_th) != ref_th3(int'(w[q].cl_sum) + int'(w[d_from[q]].qt8_hi), cl_th)) n_d3_flip++;
            end else n_plain++;
          end
        end
      end
    end
    $display("plain=%0d a0=%0d (changed bits %0d) d3=%0d (changed bits %0d)",
             n_plain, n_a0, n_a0_flip, n_d3, n_d3_flip);
    if (n_a0_flip == 0 || n_d3_flip == 0 || n_plain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
