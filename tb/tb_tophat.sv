// tb_tophat: self-checking test of the streaming Top-hat.
//
// Two Top-hats on a 12x6 frame, one in the default pass order (dilation
// first) and one in the erosion-first order, get four random frames: the
// first with random gaps, the second at the camera rate (one pixel every 13
// clocks), the third back to back, one pixel per clock, and the fourth with
// random gaps again. Every output is compared with a direct 3x3 reference,
// |closing - original| or |original - opening|. At the camera rate the lag
// must be exactly 2*W+2 samples; back to back the filter must keep up with
// one pixel per clock; the delay FIFO must never overflow.
module tb_tophat;
  import ist_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 12, H = 6, NF = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic in_valid = 0;
  px_t  in_px = '0;
  logic ov_c, ov_o, ovf_c, ovf_o;
  px_t  op_c, op_o;

  tophat #(.WIDTH(W), .HEIGHT(H)) u_c (
    .clk, .rst_n, .in_valid, .in_px, .out_valid(ov_c), .out_px(op_c), .delay_overflow(ovf_c));
  tophat #(.WIDTH(W), .HEIGHT(H), .ORDER(ORDER_ERODE_FIRST)) u_o (
    .clk, .rst_n, .in_valid, .in_px, .out_valid(ov_o), .out_px(op_o), .delay_overflow(ovf_o));

  int checks = 0, failures = 0;
  img_t frames [NF];
  img_t ref_c [NF], ref_o [NF];
  int n_in = 0, n_out = 0, n_lag = 0, cycles = 0;
  int mode = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    cycles++;
    if (rst_n) begin
      check(!ovf_c && !ovf_o, "delay FIFO overflow");
      if (ov_c) begin
        int f, p;
        f = n_out / (W * H);
        p = n_out % (W * H);
        check(op_c.row == ROW_W'(p / W) && op_c.col == COL_W'(p % W), "position");
        check(int'(op_c.pix) == ref_c[f][p], $sformatf("closing top-hat f%0d p%0d got %0d exp %0d", f, p, op_c.pix, ref_c[f][p]));
        check(ov_o && int'(op_o.pix) == ref_o[f][p], $sformatf("opening top-hat f%0d p%0d got %0d exp %0d", f, p, op_o.pix, ref_o[f][p]));
        if (mode == 1 && n_out > W * H) begin
          check(n_in == n_out + 2 * W + 3, $sformatf("lag %0d samples", n_in - n_out - 1));
          n_lag++;
        end
        n_out++;
      end
    end
  end

  initial begin
    #2000000;
    $display("watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, o0;
    for (int f = 0; f < NF; f++) begin
      frames[f] = rand_img(W, H, 0, 255);
      ref_c[f] = tophat(frames[f], W, H, 0);
      ref_o[f] = tophat(frames[f], W, H, 1);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      mode = f;
      if (f == 2) begin
        t0 = cycles;
        o0 = n_out;
      end
      for (int p = 0; p < W * H; p++) begin
        case (f)
          1: repeat (12) @(negedge clk);
          2: ;
          default: repeat ($urandom % 3) @(negedge clk);
        endcase
        in_valid = 1;
        in_px = '{pix: pix_t'(frames[f][p]), row: ROW_W'(p / W), col: COL_W'(p % W)};
        @(negedge clk);
        n_in++;
        in_valid = 0;
      end
      if (f == 2) check(n_out - o0 >= W * H - 12 && cycles - t0 == W * H,
                        $sformatf("one pixel per clock: %0d out in %0d clocks", n_out - o0, cycles - t0));
    end
    repeat (30) @(negedge clk);
    check(n_out == NF * W * H - 2 * W - 2, $sformatf("output count %0d", n_out));
    check(n_lag > 0, "lag measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
