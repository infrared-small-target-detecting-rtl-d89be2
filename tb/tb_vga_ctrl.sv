// tb_vga_ctrl: self-checking test of the VGA controller.
//
// Uses a miniature timing (8x4 visible, 15x8 total) so that many frames run
// quickly. The read channel is served by a behavioural memory holding two
// different frames in buffers 0 and 1; the threshold is modelled as
// "pixel > 100". Checked per displayed frame: the number of visible pixels,
// the sync pulse widths and counts, that the picture is black before any
// buffer is complete, that after a buffer is announced the display switches
// to it at a frame boundary within two frames and shows it whole (never a
// mix of buffers), and that the fetch never runs dry.
module tb_vga_ctrl;
  import ist_pkg::*;

  localparam int HV = 8, HF = 2, HS = 3, HB = 2, VV = 4, VF = 1, VS = 2, VB = 1;
  localparam int FR = HV * VV, CREG = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic new_buf = 0, new_buf_id = 0;
  logic rq_valid, rd_pop, seg_buf, hsync, vsync, de, err_underrun;
  logic [SRAM_AW-1:0] rq_addr;
  logic rd_valid = 0;
  logic [SRAM_DW-1:0] rd_data = '0;
  pix_t seg_pix, grey;
  logic seg_bin;
  assign seg_bin = seg_pix > 8'd100;

  vga_ctrl #(.H_VIS(HV), .H_FP(HF), .H_SYNC(HS), .H_BP(HB), .V_VIS(VV), .V_FP(VF),
             .V_SYNC(VS), .V_BP(VB), .PIX_DIV(4), .C_REGION(CREG)) dut (
    .clk, .rst_n, .new_buf, .new_buf_id, .rq_valid, .rq_addr, .rq_ready(1'b1),
    .rd_valid, .rd_data, .rd_pop, .seg_pix, .seg_buf, .seg_bin,
    .hsync, .vsync, .de, .grey, .err_underrun);

  // Memory: buffer b, pixel p.
  function automatic logic [7:0] pattern(int b, int p);
    if (b == 0) return (p % 3 == 0) ? 8'd200 : 8'd20;
    else return (p % 5 == 0) ? 8'd150 : 8'd90;
  endfunction
  int rq_q [$];
  logic [7:0] d_q [$];
  always @(posedge clk) begin
    if (rst_n) begin
      if (rd_pop && d_q.size() > 0) void'(d_q.pop_front());
      if (rq_q.size() > 0) begin
        int a;
        a = rq_q.pop_front();
        d_q.push_back(pattern((a / FR) - CREG, a % FR));
      end
      if (rq_valid) rq_q.push_back(int'(rq_addr));
      rd_valid <= d_q.size() > 0;
      rd_data <= (d_q.size() > 0) ? d_q[0] : 8'd0;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // Sample once per pixel clock.
  int pix [$];
  int shown [$];           // per frame: -1 black, 0 / 1 buffer, -2 mixed or wrong
  int hs_run = 0, hs_pulses = 0, vs_lines = 0;
  logic vsync_q = 1, hsync_q = 1;
  always @(posedge clk) begin
    if (rst_n && dut.pe) begin
      if (de) pix.push_back(int'(grey));
      if (!hsync) hs_run++;
      if (hsync && !hsync_q) begin
        check(hs_run == HS, $sformatf("hsync width %0d", hs_run));
        hs_run = 0;
        hs_pulses++;
      end
      if (!vsync && vsync_q) begin
        // a frame has just been shown
        int kind;
        if (pix.size() > 0) begin
          check(pix.size() == FR, $sformatf("visible pixels %0d", pix.size()));
          kind = -1;
          for (int b = 0; b < 2; b++) begin
            bit same;
            same = 1;
            foreach (pix[p]) if (pix[p] != ((pattern(b, p) > 100) ? 255 : 0)) same = 0;
            if (same) kind = b;
          end
          if (kind == -1) foreach (pix[p]) if (pix[p] != 0) kind = -2;
          shown.push_back(kind);
        end
        pix.delete();
      end
      vsync_q = vsync;
      hsync_q = hsync;
    end
    if (rst_n) check(!err_underrun, "display ran dry");
  end

  initial begin
    #1000000;
    $display("watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int FCLK = (HV + HF + HS + HB) * (VV + VF + VS + VB) * 4;
  task automatic announce(bit id);
    @(negedge clk);
    new_buf = 1;
    new_buf_id = id;
    @(negedge clk);
    new_buf = 0;
  endtask

  initial begin
    int n_a, n_b, i_a;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3 * FCLK) @(negedge clk);
    announce(0);
    repeat (4 * FCLK) @(negedge clk);
    announce(1);
    repeat (4 * FCLK) @(negedge clk);
    // 11 frames shown: 3 black, then buffer 0 within two, then buffer 1
    check(shown.size() >= 10, $sformatf("frames shown %0d", shown.size()));
    foreach (shown[i]) check(shown[i] != -2, $sformatf("frame %0d is one whole buffer", i));
    check(shown[0] == -1 && shown[1] == -1 && shown[2] == -1, "black before any buffer");
    check(shown[4] == 0 && shown[5] == 0 && shown[6] == 0, "buffer 0 shown after announcement");
    check(shown[8] == 1 && shown[9] == 1, "buffer 1 shown after announcement");
    check(hs_pulses >= 10 * (VV + VF + VS + VB), "hsync pulse count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
