// tb_cluster_statistics: recovers the per-board cluster statistics from the
// RTL itself and compares them with the published counts.
//
// For every layer-0 board type and every (board, HTID) it makes that cell the
// highest tower and probes the DSM once per QT8 sum (that sum = 1, all others
// 0) to find which stripes the layer-0 cluster sum really contains. It then
// drives the matching layer-1 board with that extended HTID, a zero cluster
// sum, thresholds of 0 and all forwarded stripes = 1, to see whether layer 1
// completes the cluster. Each cell in use is classified as
//   completed at layer 1    (layer 1 adds a stripe),
//   cannot be completed     (two stripes only and nothing added at layer 1),
//   completed at layer 0    (three or four stripes).
// Expected counts per quadrant (small / large top-bottom / large side):
// completed at layer 0 70 / 60 / 36, at layer 1 10 / 6 / 12, not completable
// 5 / 6 / 0. With 119 / 110 / 64 cells per region, the rest (34 / 38 / 16) are
// boundary cells. The extended HTID of every probe is checked as well.
`timescale 1ns/1ps
module tb_cluster_statistics;
  import fms_trig_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n;
  logic [7:0][15:0] l0_ch [3];
  l0_word_t         l0_out [3];
  logic [7:0][15:0] ch101, ch102;
  l1_small_t        out101;
  l1_large_t        out102;

  int checks = 0, failures = 0;

  dsm_fms_fm001 u_s (.clk(clk), .rst_n(rst_n), .ch_in(l0_ch[0]), .r0_ht_th(7'd0), .dsm_out(l0_out[0]));
  dsm_fms_fm005 u_h (.clk(clk), .rst_n(rst_n), .ch_in(l0_ch[1]), .r0_ht_th(7'd0), .dsm_out(l0_out[1]));
  dsm_fms_fm006 u_v (.clk(clk), .rst_n(rst_n), .ch_in(l0_ch[2]), .r0_ht_th(7'd0), .dsm_out(l0_out[2]));
  dsm_fms_fm101 u_101 (.clk(clk), .rst_n(rst_n), .ch_in(ch101), .cl_th('0), .dsm_out(out101));
  dsm_fms_fm102 u_102 (.clk(clk), .rst_n(rst_n), .ch_in(ch102), .cl_th('0), .dsm_out(out102));

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_dsm();
    repeat (DSM_LATENCY) @(posedge clk);
    @(negedge clk);
  endtask

  // Number of stripes layer 0 adds for cell (b, id) of board type k.
  task automatic probe_l0(int k, int b, int id, output int nterms);
    int nb;
    qt_word_t w;
    nb = (k == 2) ? 2 : 4;
    nterms = 0;
    for (int t = 0; t < nb * 4; t++) begin
      l0_ch[k] = '0;
      for (int bb = 0; bb < nb; bb++) begin
        w = '0;
        if (bb == b) begin
          w.ht   = 7'd100;
          w.htid = 5'(id);
        end
        if (bb == t / 4) w.qt8[t % 4] = 5'd1;
        l0_ch[k][2*(nb-1-bb) +: 2] = w;
      end
      wait_dsm();
      checks++;
      if (int'(l0_out[k].ext_htid) != b * 32 + id) failures++;
      if (l0_out[k].cl_sum == 8'd1) nterms++;
      else if (l0_out[k].cl_sum != 8'd0) failures++;
    end
  endtask

  // Does layer 1 add a stripe to a cluster at extended HTID ext of type k?
  task automatic probe_l1(int k, int ext, output bit added);
    l0_word_t w, other;
    other = '0;
    other.qt8_lo = 5'd1;
    other.qt8_hi = 5'd1;
    w = other;
    w.ext_htid = 7'(ext);
    if (k == 0) begin
      // South-Top quadrant; all other quadrants forward stripes = 1
      ch101 = {other, other, other, w};
      wait_dsm();
      added = out101.st[0];
    end else begin
      // Top section (k = 1) or Upper-Side section (k = 2) of one side
      if (k == 1) ch102 = {other, other, other, w};
      else        ch102 = {other, other, w, other};
      wait_dsm();
      added = out102.top[0];
    end
  endtask

  initial begin
    int done [3], l1 [3], nf [3];
    int exp_done [3] = '{70, 60, 36};
    int exp_l1   [3] = '{10, 6, 12};
    int exp_nf   [3] = '{5, 6, 0};
    int total    [3] = '{119, 110, 64};
    string name  [3] = '{"small-cell quadrant", "large-cell horizontal", "large-cell vertical"};
    rst_n = 1'b0;
    for (int k = 0; k < 3; k++) l0_ch[k] = '0;
    ch101 = '0; ch102 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3; k++) begin
      done[k] = 0; l1[k] = 0; nf[k] = 0;
      for (int b = 0; b < ((k == 2) ? 2 : 4); b++)
        for (int id = 0; id < 32; id++) begin
          int nt;
          bit added;
          probe_l0(k, b, id, nt);
          if (nt == 0) continue;
          probe_l1(k, b * 32 + id, added);
          if (added)        l1[k]++;
          else if (nt == 2) nf[k]++;
          else              done[k]++;
        end
      $display("%-22s: done at layer 0 %0d (exp %0d), at layer 1 %0d (exp %0d), not completable %0d (exp %0d), boundary %0d",
               name[k], done[k], exp_done[k], l1[k], exp_l1[k], nf[k], exp_nf[k],
               total[k] - done[k] - l1[k] - nf[k]);
      checks += 3;
      if (done[k] != exp_done[k]) failures++;
      if (l1[k] != exp_l1[k]) failures++;
      if (nf[k] != exp_nf[k]) failures++;
    end
    $display("totals: done %0d, layer 1 %0d, not completable %0d",
             done[0] + done[1] + done[2], l1[0] + l1[1] + l1[2], nf[0] + nf[1] + nf[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
