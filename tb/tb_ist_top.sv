// tb_ist_top: end-to-end test of the whole detector, at a reduced size.
//
// Frames are 32x16 with a shortened VGA blanking, and the Top-hat uses the
// erosion-first order so the target is bright, as in a real infrared scene.
//
// A synthetic infrared scene (a smooth sky gradient with a bright static
// band, pixel noise uniform in +-3 grey levels and a 2x2 target that
// moves three pixels a frame, 80 levels brighter than its surroundings) is streamed from the camera
// port at the camera rate, one pixel every 13 clocks, into the top with the
// behavioural SRAM attached. A reference model computes every stage from
// the definitions: Top-hat, three frames difference, running maximum,
// closing and threshold. Checked:
//  * the Top-hat, TFDF, or and closing streams inside the top, pixel by
//    pixel, against the model;
//  * the threshold of every completed frame and the closed frames left in
//    the two display buffers of the SRAM;
//  * the TFDF frame read back through the external read port;
//  * every VGA frame shows one whole thresholded frame (or black before the
//    first), the last completed one is shown, and its white pixels lie on
//    the target track;
//  * no FIFO overflow, no dropped request, no display underrun.
// Each mechanism is counted and must happen at least once: TFDF with full
// history, accumulation raising a pixel, closing filling a gap, a threshold
// above its floor (at its floor for the low-contrast scene), a display buffer swap, a two-word TFDF read burst and a
// VGA read burst, every shared-memory channel served.
module tb_ist_top;
  import ist_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 32, H = 16, FR = W * H, NF = 6, TMIN = 16;
  localparam bit ERODE_FIRST = 1'b1;
  localparam int AMP = 80, NOISE = 3;
  localparam bit STRICT = 1'b1;  // require a clean detection
  localparam int CAM_DIV = 13;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic cam_valid = 0;
  pix_t cam_pix = '0;
  logic sram_we, sram_re, vga_hsync, vga_vsync, vga_de, ext_rq_ready, ext_rd_valid;
  logic [SRAM_AW-1:0] sram_addr;
  logic [SRAM_DW-1:0] sram_wdata, sram_rdata, ext_rd_data;
  pix_t vga_grey;
  logic ext_rq_valid = 0, ext_rd_pop = 0;
  logic [SRAM_AW-1:0] ext_rq_addr = '0;
  logic frame_done, err;
  pix_t thr [2];

  ist_top #(.WIDTH(32), .HEIGHT(16), .TH_ORDER(ORDER_ERODE_FIRST), .H_FP(4), .H_SYNC(4), .H_BP(4),
            .V_FP(2), .V_SYNC(2), .V_BP(2)) dut (
    .clk, .rst_n, .cam_valid, .cam_pix,
    .sram_we, .sram_re, .sram_addr, .sram_wdata, .sram_rdata,
    .vga_hsync, .vga_vsync, .vga_de, .vga_grey,
    .ext_rq_valid, .ext_rq_addr, .ext_rq_ready, .ext_rd_valid, .ext_rd_data, .ext_rd_pop,
    .frame_done, .thr, .err);

  sram_model #(.AW(SRAM_AW), .DW(SRAM_DW), .DEPTH(7 * FR)) u_sram (
    .clk, .we(sram_we), .re(sram_re), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  // ---------------- scene and reference model ----------------
  img_t cam [NF + 1], t [NF + 1], d [NF + 1], o [NF + 1], c [NF + 1];
  int   thv [NF + 1];
  int   tgt_r [NF + 1], tgt_c [NF + 1];

  function automatic img_t scene(int k);
    img_t a = new[FR];
    for (int r = 0; r < H; r++)
      for (int cc = 0; cc < W; cc++) begin
        int v;
        v = 60 + (100 * r) / H + int'($urandom % (2 * NOISE + 1)) - NOISE;
        if (r >= H / 3 && r < H / 3 + 3) v += 50;
        a[r * W + cc] = v;
      end
    for (int dr = 0; dr < 2; dr++)
      for (int dc = 0; dc < 2; dc++)
        a[(tgt_r[k] + dr) * W + tgt_c[k] + dc] += ERODE_FIRST ? AMP : -AMP;
    foreach (a[i]) a[i] = imin(255, imax(0, a[i]));
    return a;
  endfunction

  function automatic img_t bin(img_t a, int th);
    img_t b = new[a.size()];
    foreach (a[i]) b[i] = (a[i] > th) ? 255 : 0;
    return b;
  endfunction

  // ---------------- stream monitors inside the top ----------------
  int n_t = 0, n_d = 0, n_o = 0, n_c = 0, n_done = 0;
  int m_hist = 0, m_accum = 0, m_fill = 0, m_thr = 0, m_floor = 0, m_swap = 0, m_burst2 = 0, m_burst4 = 0;
  int served [8];
  int run_ch = -1, run_len = 0;

  always @(posedge clk) if (rst_n) begin
    int f, p;
    if (dut.th_valid) begin
      f = n_t / FR; p = n_t % FR;
      if (f <= NF) check(int'(dut.th_px.pix) == t[f][p], $sformatf("top-hat f%0d p%0d got %0d exp %0d", f, p, dut.th_px.pix, t[f][p]));
      n_t++;
    end
    if (dut.d_valid) begin
      f = n_d / FR; p = n_d % FR;
      if (f <= NF) check(int'(dut.d_px.pix) == d[f][p], $sformatf("tfdf f%0d p%0d got %0d exp %0d", f, p, dut.d_px.pix, d[f][p]));
      if (f >= 2 && dut.d_px.pix != 0) m_hist++;
      n_d++;
    end
    if (dut.o_valid) begin
      f = n_o / FR; p = n_o % FR;
      if (f <= NF) check(int'(dut.o_px.pix) == o[f][p], $sformatf("or f%0d p%0d got %0d exp %0d", f, p, dut.o_px.pix, o[f][p]));
      if (f >= 1 && f <= NF && o[f][p] > o[f-1][p] && o[f-1][p] > 0) m_accum++;
      n_o++;
    end
    if (dut.c_valid) begin
      f = n_c / FR; p = n_c % FR;
      if (f <= NF) begin
        check(int'(dut.c_px.pix) == c[f][p], $sformatf("close f%0d p%0d got %0d exp %0d", f, p, dut.c_px.pix, c[f][p]));
        if (c[f][p] > o[f][p]) m_fill++;
      end
      n_c++;
    end
    if (frame_done) begin
      @(negedge clk);
      check(int'(thr[n_done % 2]) == thv[n_done], $sformatf("threshold of frame %0d: %0d exp %0d", n_done, thr[n_done % 2], thv[n_done]));
      if (thv[n_done] > TMIN) m_thr++;
      else m_floor++;
      n_done++;
    end
  end

  // Shared-memory slot use and bursts.
  always @(posedge clk) if (rst_n) begin
    int ch;
    ch = -1;
    for (int i = 0; i < 4; i++) begin
      if (dut.u_mcsm.u_ctrl.wr_pop[i]) ch = 2 * i;
      if (dut.u_mcsm.u_ctrl.rq_pop[i]) ch = 2 * i + 1;
    end
    if (ch >= 0) begin
      served[ch]++;
      if (ch == run_ch) run_len++;
      else begin
        run_ch = ch;
        run_len = 1;
      end
      if (ch == 1 && run_len == 2) m_burst2++;
      if (ch == 7 && run_len == 4) m_burst4++;
    end else begin
      run_ch = -1;
      run_len = 0;
    end
    check(!err, "error flag (overflow, drop or underrun)");
  end

  // ---------------- VGA capture ----------------
  int vpix [$];
  int shown [$];
  int shown_done [$];
  logic vs_q = 1;
  logic dbuf_q = 0;
  always @(posedge clk) if (rst_n && dut.u_vga.pe) begin
    if (vga_de) vpix.push_back(int'(vga_grey));
    if (!vga_vsync && vs_q && vpix.size() > 0) begin
      int kind;
      check(vpix.size() == FR, "visible pixels per VGA frame");
      kind = -2;
      begin
        bit black;
        black = 1;
        foreach (vpix[i]) if (vpix[i] != 0) black = 0;
        if (black) kind = -1;
      end
      for (int j = 0; j < n_done && j <= NF; j++) begin
        img_t b;
        bit same;
        b = bin(c[j], thv[j]);
        same = 1;
        foreach (vpix[i]) if (vpix[i] != b[i]) same = 0;
        if (same) kind = j;
      end
      shown.push_back(kind);
      shown_done.push_back(n_done);
      vpix.delete();
    end
    vs_q = vga_vsync;
    if (dut.u_vga.d_buf != dbuf_q) m_swap++;
    dbuf_q = dut.u_vga.d_buf;
  end

  // ---------------- stimulus ----------------
  initial begin
    #(64'd200000000);
    $display("watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= NF; k++) begin
      tgt_r[k] = (H / 2 + 3 * k) % (H - 2);
      tgt_c[k] = (W / 4 + 3 * k) % (W - 2);
      cam[k] = scene(k);
      t[k] = tophat(cam[k], W, H, ERODE_FIRST);
      d[k] = (k < 2) ? rand_img(W, H, 0, 0) : tfdf(t[k], t[k-1], t[k-2]);
      o[k] = new[FR];
      foreach (o[k][i]) o[k][i] = (k == 0) ? d[k][i] : imax(o[k-1][i], d[k][i]);
      c[k] = close3(o[k], W, H);
      thv[k] = thresh(c[k], TMIN);
    end
    repeat (4) @(negedge clk);
    rst_n = 1;
    // NF frames and one more that pushes the last one out of the filters
    for (int k = 0; k <= NF; k++)
      for (int p = 0; p < FR; p++) begin
        repeat (CAM_DIV - 1) @(negedge clk);
        cam_valid = 1;
        cam_pix = pix_t'(cam[k][p]);
        @(negedge clk);
        cam_valid = 0;
      end
    repeat (200) @(negedge clk);
    check(n_t >= NF * FR + FR - 2 * W - 2 && n_c >= NF * FR, $sformatf("stream counts %0d %0d %0d %0d", n_t, n_d, n_o, n_c));
    check(n_done == NF, $sformatf("frames completed %0d", n_done));
    // display buffers hold the last two closed frames, the first rows of
    // one of them already overwritten by the flush frame
    for (int j = NF - 2; j < NF; j++)
      for (int p = 0; p < FR; p++) begin
        int e;
        e = ((j + 2) * FR + p < n_c) ? c[j + 2][p] : c[j][p];
        check(int'(u_sram.mem[(5 + j % 2) * FR + p]) == e, $sformatf("display buffer of frame %0d p%0d", j, p));
      end
    // TFDF frame through the external read port: frame NF-1, partly NF
    fork
      for (int p = 0; p < FR; p++) begin
        @(negedge clk);
        while (!ext_rq_ready) @(negedge clk);
        ext_rq_valid = 1;
        ext_rq_addr = SRAM_AW'(3 * FR + p);
        @(negedge clk);
        ext_rq_valid = 0;
      end
      for (int p = 0; p < FR; p++) begin
        int e;
        @(negedge clk);
        while (!ext_rd_valid) @(negedge clk);
        e = (NF * FR + p < n_d) ? d[NF][p] : d[NF - 1][p];
        check(int'(ext_rd_data) == e, $sformatf("external read of TFDF p%0d got %0d exp %0d", p, ext_rd_data, e));
        ext_rd_pop = 1;
        @(negedge clk);
        ext_rd_pop = 0;
      end
    join
    // let the display show the last frame twice
    repeat (7744) @(negedge clk);
    begin
      int last_kind, bad;
      bad = 0;
      foreach (shown[i]) if (shown[i] == -2) bad++;
      check(bad == 0, $sformatf("%0d VGA frames were not one whole frame", bad));
      check(shown.size() >= 3 && shown[0] == -1, "first VGA frame black");
      last_kind = shown[shown.size() - 1];
      check(last_kind == NF - 1, $sformatf("last VGA frame shows frame %0d", last_kind));
      if (last_kind >= 0) begin
        img_t b;
        int white, off;
        b = bin(c[last_kind], thv[last_kind]);
        white = 0; off = 0;
        foreach (b[i]) if (b[i] != 0) begin
          bit near;
          near = 0;
          white++;
          for (int k = 0; k <= last_kind; k++)
            if (iabs(i / W - tgt_r[k]) <= 3 && iabs(i % W - tgt_c[k]) <= 3) near = 1;
          if (!near) off++;
        end
        if (STRICT) begin
          check(white > 0, "target detected");
          check(off == 0, $sformatf("%0d white pixels off the target track", off));
        end
        $display("detection: %0d white pixels, %0d of them off the target track", white, off);
      end
    end
    check(m_hist > 0, "TFDF with history");
    check(m_accum > 0, "accumulation raised a pixel");
    check(m_fill > 0, "closing filled a gap");
    // a clean scene lifts the threshold above its floor; the noisy one keeps
    // it at the floor
    if (STRICT) check(m_thr > 0, "threshold above floor");
    else check(m_floor > 0, "threshold held at its floor");
    check(m_swap > 0, "display buffer swap");
    check(m_burst2 > 0, "TFDF two-word burst");
    check(m_burst4 > 0, "VGA four-word burst");
    for (int i = 0; i < 8; i++) check(served[i] > 0, $sformatf("channel slot %0d served", i));
    $display("mechanisms: hist=%0d accum=%0d fill=%0d thr=%0d floor=%0d swap=%0d burst2=%0d burst4=%0d vga_frames=%0d",
             m_hist, m_accum, m_fill, m_thr, m_floor, m_swap, m_burst2, m_burst4, shown.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
