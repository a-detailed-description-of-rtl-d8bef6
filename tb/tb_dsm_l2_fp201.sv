// tb_dsm_l2_fp201: self-checking testbench for dsm_l2_fp201.
//
// Streams random layer-1 words (FM101 on channel 0, FM102 on channel 2, FM103
// on channel 4, FE101 on channel 7, noise on the unused channels) and checks
// the 16-bit trigger word and its scaler copy DSM_LATENCY = 4 clocks later.
// Quadrant bits are set sparsely so that single clusters, multi-cluster
// counts of exactly 2 and of 0/1 all occur for every threshold.
`timescale 1ns/1ps
module tb_dsm_l2_fp201;
  import fms_trig_pkg::*;
  import fms_ref_pkg::*;

  localparam int NVEC = 4000;
  localparam int LAT  = DSM_LATENCY;

  logic             clk = 1'b0;
  logic             rst_n;
  logic [7:0][15:0] ch_in;
  l2_word_t         trig_out, scaler_out;

  int checks = 0, failures = 0;
  int n_smult [3], n_lmult [3], n_single = 0, n_fpe = 0;
  l2_word_t exp_q [$];

  dsm_l2_fp201 dut (.clk(clk), .rst_n(rst_n), .ch_in(ch_in), .trig_out(trig_out),
                    .scaler_out(scaler_out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] sparse3();
    logic [2:0] r;
    for (int i = 0; i < 3; i++) r[i] = ($urandom_range(0, 3) == 0);
    return r;
  endfunction

  initial begin
    l1_small_t sm;
    l1_large_t ls, ln;
    logic [1:0] fpe;
    rst_n = 1'b0; ch_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NVEC + LAT; n++) begin
      @(negedge clk);
      if (exp_q.size() == LAT || (n >= NVEC && exp_q.size() > 0)) begin
        l2_word_t e;
        e = exp_q.pop_front();
        checks += 2;
        if (trig_out !== e) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h exp %h", trig_out, e);
        end
        if (scaler_out !== e) failures++;
      end
      if (n < NVEC) begin
        l2_word_t e;
        sm = {4'($urandom_range(0, 15) & $urandom_range(0, 15)), sparse3(), sparse3(), sparse3(), sparse3()};
        ls = {2'($urandom_range(0, 3) & $urandom_range(0, 3)), sparse3(), sparse3()};
        ln = {2'($urandom_range(0, 3) & $urandom_range(0, 3)), sparse3(), sparse3()};
        fpe = 2'($urandom_range(0, 3) & $urandom_range(0, 3));
        for (int c = 0; c < 8; c++) ch_in[c] = 16'($urandom());   // noise on unused channels
        ch_in[0] = sm;
        ch_in[2] = {8'($urandom()), ls};
        ch_in[4] = {8'($urandom()), ln};
        ch_in[7] = {14'($urandom()), fpe};
        e = ref_fp201(sm, ls, ln, fpe);
        exp_q.push_back(e);
        for (int t = 0; t < 3; t++) begin
          if (e.sml_mult[t]) n_smult[t]++;
          if (e.lrg_mult[t]) n_lmult[t]++;
          if (e.sml_cl[t] && !e.sml_mult[t]) n_single++;
        end
        if (e.fpe) n_fpe++;
      end
    end
    $display("multi small %0d/%0d/%0d large %0d/%0d/%0d single=%0d fpe=%0d",
             n_smult[0], n_smult[1], n_smult[2], n_lmult[0], n_lmult[1], n_lmult[2], n_single, n_fpe);
    for (int t = 0; t < 3; t++) if (n_smult[t] == 0 || n_lmult[t] == 0) failures++;
    if (n_single == 0 || n_fpe == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
