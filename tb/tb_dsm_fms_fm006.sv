// tb_dsm_fms_fm006: self-checking testbench for dsm_fms_fm006 (large-cell side layer-0 DSM).
//
// Streams one random set of QT board words per clock into the DSM and compares
// every output word, exactly DSM_LATENCY = 4 clocks later, with the reference
// model in fms_ref_pkg (cluster table looked up as explicit lists of QT8 sums).
// HT values are often drawn from a narrow range so that ties between boards
// occur. It counts how often the highest tower fell on each kind of cell of
// the cluster table (plain 2/3-stripe cluster, 4-stripe cluster, cluster left
// for layer 1, cluster that cannot be completed, boundary cell) and fails if
// one of the kinds this board has never occurred.
`timescale 1ns/1ps
module tb_dsm_fms_fm006;
  import fms_trig_pkg::*;
  import fms_ref_pkg::*;

  localparam l0_kind_e KIND = L0_SIDE;
  localparam int NB  = 2;
  localparam int LAT = DSM_LATENCY;
  localparam int NVEC = 3000;

  logic             clk = 1'b0;
  logic             rst_n;
  logic [7:0][15:0] ch_in;
  logic [6:0]       r0_ht_th;
  l0_word_t         dsm_out;

  int checks = 0, failures = 0;
  int n_act [5];
  int n_tie = 0, n_htbit = 0;

  dsm_fms_fm006 dut (.clk(clk), .rst_n(rst_n), .ch_in(ch_in), .r0_ht_th(r0_ht_th), .dsm_out(dsm_out));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  l0_word_t exp_q [$];

  task automatic check_out();
    l0_word_t e;
    e = exp_q.pop_front();
    checks++;
    if (dsm_out !== e) begin
      failures++;
      if (failures < 10)
        $display("mismatch: got sum=%0d ext=%0d lo=%0d hi=%0d ht=%0d  exp sum=%0d ext=%0d lo=%0d hi=%0d ht=%0d",
                 dsm_out.cl_sum, dsm_out.ext_htid, dsm_out.qt8_lo, dsm_out.qt8_hi, dsm_out.ht_bit,
                 e.cl_sum, e.ext_htid, e.qt8_lo, e.qt8_hi, e.ht_bit);
    end
  endtask

  initial begin
    qt_word_t w [4];
    rst_n    = 1'b0;
    ch_in    = '0;
    r0_ht_th = 7'd40;
    repeat (3) @(posedge clk);
    // reset value of the output
    checks++;
    if (dsm_out !== '0) failures++;
    @(negedge clk);
    rst_n = 1'b1;
    for (int seg = 0; seg < 3; seg++) begin
      r0_ht_th = 7'($urandom_range(0, 127));
      for (int n = 0; n < NVEC + LAT; n++) begin
        @(negedge clk);
        if (exp_q.size() == LAT || (n >= NVEC && exp_q.size() > 0)) check_out();
        if (n < NVEC) begin
          int win;
          for (int b = 0; b < 4; b++) begin
            w[b] = '0;
            if (b < NB) begin
              for (int k = 0; k < 4; k++) w[b].qt8[k] = 5'($urandom_range(0, 31));
              w[b].ht   = ($urandom_range(0, 1) == 0) ? 7'($urandom_range(0, 3))
                                                      : 7'($urandom_range(0, 127));
              w[b].htid = 5'($urandom_range(0, 31));
            end
          end
          ch_in = '0;
          for (int b = 0; b < NB; b++) ch_in[2*(NB-1-b) +: 2] = w[b];
          exp_q.push_back(ref_l0(KIND, w, r0_ht_th));
          win = l0_winner(KIND, w);
          n_act[l0_action(KIND, win, int'(w[win].htid))]++;
          for (int b = 0; b < NB; b++) if (b != win && w[b].ht == w[win].ht) begin n_tie++; break; end
          if (w[win].ht > r0_ht_th) n_htbit++;
        end
      end
    end
    $display("cells: ignored=%0d done=%0d done4=%0d not_feasible=%0d layer1=%0d ties=%0d ht_bit=%0d",
             n_act[ACT_IGNORED], n_act[ACT_DONE], n_act[ACT_DONE4], n_act[ACT_NOT_FEASIBLE],
             n_act[ACT_LAYER1], n_tie, n_htbit);
    if (n_act[ACT_IGNORED] == 0) failures++;
    if (n_act[ACT_DONE] == 0) failures++;
    if (n_act[ACT_LAYER1] == 0) failures++;
    if (0 && n_act[ACT_DONE4] == 0) failures++;
    if (0 && n_act[ACT_NOT_FEASIBLE] == 0) failures++;
    if (n_tie == 0 || n_htbit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
