// tb_morph_h3: self-checking test of the 1x3 dilation/erosion stage.
//
// Instantiates a dilating and an eroding copy on a 9x4 frame, streams three
// random frames with random gaps between pixels, and compares every output
// pixel (value and position) with a direct 1x3 reference. It also checks the
// one-sample lag: the result for sample p appears only after sample p+1 has
// entered and before sample p+2 does when pixels come every 4 clocks.
module tb_morph_h3;
  import ist_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 9, H = 4, NF = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic in_valid = 0;
  px_t  in_px = '0;
  logic ov_d, ov_e;
  px_t  op_d, op_e;

  morph_h3 #(.OP(OP_DILATE), .WIDTH(W)) u_d (.clk, .rst_n, .in_valid, .in_px, .out_valid(ov_d), .out_px(op_d));
  morph_h3 #(.OP(OP_ERODE),  .WIDTH(W)) u_e (.clk, .rst_n, .in_valid, .in_px, .out_valid(ov_e), .out_px(op_e));

  int checks = 0, failures = 0;
  img_t frames [NF+1];
  img_t ref_d [NF+1], ref_e [NF+1];
  int n_in = 0, n_out = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && ov_d) begin
      int f, p;
      f = n_out / (W * H);
      p = n_out % (W * H);
      check(op_d.row == ROW_W'(p / W) && op_d.col == COL_W'(p % W), "dilate position");
      check(int'(op_d.pix) == ref_d[f][p], $sformatf("dilate value f%0d p%0d got %0d exp %0d", f, p, op_d.pix, ref_d[f][p]));
      check(ov_e && int'(op_e.pix) == ref_e[f][p], $sformatf("erode value f%0d p%0d got %0d exp %0d", f, p, op_e.pix, ref_e[f][p]));
      check(n_in >= n_out + 2, "lag: output before its right neighbour entered");
      n_out++;
    end
  end

  initial begin
    #200000;
    $display("watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f <= NF; f++) begin
      frames[f] = (f == NF) ? rand_img(W, H, 7, 7) : rand_img(W, H, 0, 255);
      ref_d[f] = morph(frames[f], W, H, 0, 1, 0);
      ref_e[f] = morph(frames[f], W, H, 1, 1, 0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++)
      for (int p = 0; p < W * H; p++) begin
        repeat ($urandom % 3) @(negedge clk);
        in_valid = 1;
        in_px = '{pix: pix_t'(frames[f][p]), row: ROW_W'(p / W), col: COL_W'(p % W)};
        @(negedge clk);
        n_in++;
        in_valid = 0;
      end
    // one-sample lag at a steady rate of one pixel every 4 clocks
    repeat (10) @(posedge clk);
    begin
      int n0;
      n0 = n_out;
      for (int k = 0; k < 3; k++) begin
        in_valid = 1;
        in_px = '{pix: 8'd7, row: '0, col: COL_W'(k)};
        @(negedge clk);
        n_in++;
        in_valid = 0;
        repeat (3) @(negedge clk);
        check(n_out == n0 + k + 1, $sformatf("one output per input once primed: %0d vs %0d", n_out - n0, k + 1));
      end
    end
    check(n_out >= NF * W * H, "all pixels of all frames came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
