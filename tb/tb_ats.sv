// tb_ats: self-checking test of the adaptive threshold segmentation.
//
// Streams five 8x4 frames of random background with a few bright pixels into
// the statistics side and checks after each frame that the threshold
// max(T_MIN, (mean + max) / 2) is stored for the right buffer (0, 1, 0, ...)
// with a done pulse, that a dark frame falls back to T_MIN, and that the
// segmentation port compares a pixel against the threshold of the buffer it
// names.
module tb_ats;
  import ist_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 8, H = 4, FR = W * H, TMIN = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic stat_valid = 0;
  px_t  stat_px = '0;
  logic done, done_buf, seg_buf = 0, seg_bin;
  pix_t thr [2];
  pix_t seg_pix = '0;

  ats #(.WIDTH(W), .HEIGHT(H), .T_MIN(TMIN)) dut (
    .clk, .rst_n, .stat_valid, .stat_px, .done, .done_buf, .thr,
    .seg_pix, .seg_buf, .seg_bin);

  int checks = 0, failures = 0, n_done = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && done) n_done++;

  initial begin
    #1000000;
    $display("watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    img_t a;
    int exp_t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(thr[0] == TMIN && thr[1] == TMIN, "thresholds start at T_MIN");
    for (int f = 0; f < 5; f++) begin
      a = (f == 3) ? rand_img(W, H, 0, 3) : rand_img(W, H, 0, 40);
      if (f != 3) for (int k = 0; k < 3; k++) a[$urandom % FR] = 150 + int'($urandom % 100);
      exp_t = thresh(a, TMIN);
      for (int p = 0; p < FR; p++) begin
        repeat ($urandom % 3) @(negedge clk);
        stat_valid = 1;
        stat_px = '{pix: pix_t'(a[p]), row: ROW_W'(p / W), col: COL_W'(p % W)};
        @(negedge clk);
        stat_valid = 0;
      end
      @(negedge clk);
      check(n_done == f + 1, "one done pulse per frame");
      check(done_buf == 1'(f % 2), "buffer alternates");
      check(int'(thr[f % 2]) == exp_t, $sformatf("frame %0d threshold %0d exp %0d", f, thr[f % 2], exp_t));
      // segmentation against both buffers
      for (int b = 0; b < 2; b++) begin
        seg_buf = 1'(b);
        seg_pix = thr[b];
        #1 check(!seg_bin, "pixel equal to threshold is background");
        seg_pix = thr[b] + 1;
        #1 check(seg_bin, "pixel above threshold is target");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
